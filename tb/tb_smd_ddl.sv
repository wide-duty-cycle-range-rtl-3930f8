// tb_smd_ddl: self-checking test of the dummy delay line.
//
// With the enable high, every edge must come out after
// Td1 + Td2 + Td3(code 0) + Td4 = 153 + 97 + 118 + 205 = 573 ps. With the
// enable low the output must stay low, and a clock that is already high
// when the enable rises must produce its rising edge 573 ps after that.
`timescale 1ps / 1ps
module tb_smd_ddl;

  localparam int TDDL = 573;
  logic din = 1'b0, en = 1'b0;
  logic dout;
  int checks = 0, failures = 0;

  smd_ddl dut (.din(din), .en(en), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // Enable low: clock toggles, nothing comes out.
    repeat (10) begin
      #600 din = ~din;
      check(dout == 1'b0, "output while disabled");
    end
    #1000;
    din = 1'b1;
    #400 en = 1'b1;       // clock already high
    #(TDDL - 1) check(dout == 1'b0, "rising edge too early");
    #2          check(dout == 1'b1, "no rising edge after enable");
    // Random edges with the enable high.
    for (int i = 0; i < 100; i++) begin
      bit v;
      #($urandom_range(1200, 700));
      din = ~din; v = din;
      #(TDDL - 1) check(dout != v, $sformatf("edge %0d early", i));
      #2          check(dout == v, $sformatf("edge %0d missing", i));
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
