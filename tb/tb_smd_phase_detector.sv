// tb_smd_phase_detector: self-checking test of the bang-bang phase detector.
//
// Runs EXT_CLK at 2.5 ns and an INT_CLK of the same period shifted by a
// random offset of up to +/-400 ps. An INT_CLK that rises before EXT_CLK
// must give UP, one that rises after it DN, from the EXT_CLK edge on.
`timescale 1ps / 1ps
module tb_smd_phase_detector;

  localparam int T = 2500;
  logic ext_clk = 1'b0, int_clk = 1'b0, rst_n = 1'b1;
  logic up, dn;
  int checks = 0, failures = 0;
  int offset = 100;  // INT_CLK rising edge minus EXT_CLK rising edge, ps

  smd_phase_detector dut (.ext_clk(ext_clk), .int_clk(int_clk), .rst_n(rst_n), .up(up), .dn(dn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // EXT_CLK: rising at k*T, 50 % duty.
  always begin
    #(T/2) ext_clk = 1'b1;
    #(T/2) ext_clk = 1'b0;
  end
  // INT_CLK: same period; each EXT_CLK edge schedules the INT_CLK edge that
  // belongs to the next EXT_CLK edge, offset by the current offset.
  always @(posedge ext_clk) begin
    automatic int o = offset;
    fork
      begin
        #(T + o) int_clk = 1'b1;
        #(T/2)   int_clk = 1'b0;
      end
    join_none
  end

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset edge
    #(T/4);
    check(!up && !dn, "outputs active in reset");
    rst_n = 1'b1;
    repeat (2) @(posedge ext_clk);
    for (int i = 0; i < 200; i++) begin
      int o;
      o = int'($urandom_range(800)) - 400;
      if (o == 0) o = 1;
      @(negedge ext_clk);
      offset = o;
      repeat (2) @(posedge ext_clk);
      #1;
      if (offset < 0) check(up && !dn, $sformatf("offset %0d: up=%0b dn=%0b", offset, up, dn));
      else            check(dn && !up, $sformatf("offset %0d: up=%0b dn=%0b", offset, up, dn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 2000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
