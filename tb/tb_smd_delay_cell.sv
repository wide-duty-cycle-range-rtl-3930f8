// tb_smd_delay_cell: self-checking test of the delay cell model.
//
// Applies random input combinations, one at a time, and checks that the
// output still holds the old AND value 1 ps before T_DC_PS and shows the new
// one 1 ps after it.
`timescale 1ps / 1ps
module tb_smd_delay_cell;

  localparam int TDC = 70;
  logic a = 1'b0, b = 1'b0, c = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  smd_delay_cell dut (.a(a), .b(b), .c(c), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit old_v, new_v;
    #500;
    check(y == 1'b0, "initial output");
    for (int i = 0; i < 300; i++) begin
      old_v = a & b & c;
      {a, b, c} = 3'($urandom);
      new_v = a & b & c;
      #(TDC - 1) check(y == old_v, $sformatf("step %0d: changed too early", i));
      #2         check(y == new_v, $sformatf("step %0d: y=%0b expected %0b", i, y, new_v));
      #200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
