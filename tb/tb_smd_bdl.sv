// tb_smd_bdl: self-checking test of the backward delay line.
//
// Selects one mirror cell k and clocks IB_OUT; every rising and falling edge
// must leave the line T_EMDC + (k+1) x T_DC = 97 + (k+1) x 70 ps later, so
// the duty cycle is kept. With no cell selected the output must stay low.
`timescale 1ps / 1ps
module tb_smd_bdl;

  localparam int N = 72, TDC = 70, TEMDC = 97;
  logic         ib_out = 1'b0;
  logic [N-1:0] m = '1;
  logic         bout;
  int checks = 0, failures = 0;

  smd_bdl dut (.ib_out(ib_out), .m(m), .bout(bout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    repeat (4) begin
      #1000 ib_out = ~ib_out;
      check(bout == 1'b0, "output with no cell selected");
    end
    for (int t = 0; t < 30; t++) begin
      int k, d;
      k = (t == 0) ? 0 : (t == 1) ? N - 1 : $urandom_range(N - 1);
      d = TEMDC + (k + 1) * TDC;
      ib_out = 1'b0; m = '1;
      #(d + 200);
      m[k] = 1'b0;
      #(TEMDC + 1);
      for (int e = 0; e < 4; e++) begin
        bit v;
        ib_out = ~ib_out; v = ib_out;
        #(d - 1) check(bout != v, $sformatf("cell %0d edge %0d early", k, e));
        #2       check(bout == v, $sformatf("cell %0d edge %0d missing after %0d ps", k, e, d));
        #($urandom_range(300, 100));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
