// tb_smd_mcc: self-checking test of the mirror control circuit.
//
// Applies random tap patterns, including single-edge patterns of the kind
// the forward line holds, captures them with IB_OUT and compares every
// mirror select with M[n] = NOT(p[n] AND NOT p[n+1]) (tap past the end
// taken as low). Checks that nothing is captured while BLK is low and that
// reset clears the selection.
`timescale 1ps / 1ps
module tb_smd_mcc;

  localparam int N = 72;
  logic         ib_out = 1'b0, rst_n = 1'b1, blk = 1'b0;
  logic [N-1:0] f = '0;
  logic [N-1:0] m;
  logic [N-1:0] held;
  int checks = 0, failures = 0;

  smd_mcc dut (.ib_out(ib_out), .rst_n(rst_n), .blk(blk), .f(f), .m(m));

  function automatic logic [N-1:0] expect_m(input logic [N-1:0] p);
    logic [N:0] pe;
    pe = {1'b0, p};
    for (int i = 0; i < N; i++) expect_m[i] = !(pe[i] && !pe[i+1]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    #100 ib_out = 1'b1;
    #100 ib_out = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset edge
    #50 check(m == '1, "after reset not all high");
    rst_n = 1'b1;
    held = '1;
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] p;
      int k, j;
      if (t % 2 == 0) begin
        // Forward-line snapshot: ones from j to k, zeros elsewhere.
        k = $urandom_range(N - 1); j = $urandom_range(k);
        p = '0;
        for (int i = j; i <= k; i++) p[i] = 1'b1;
      end else begin
        p = {$urandom, $urandom, $urandom};
      end
      f = p;
      blk = (t % 5 != 4);
      pulse();
      if (blk) held = expect_m(p);
      check(m == held, $sformatf("pattern %0d blk=%0b: m=%h expected %h", t, blk, m, held));
      if (t % 2 == 0 && blk)
        check($countones(~m) == 1 && !m[k], $sformatf("single edge at %0d not selected alone", k));
    end
    rst_n = 1'b0;
    #10 check(m == '1, "reset does not clear selection");
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
