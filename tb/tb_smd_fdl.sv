// tb_smd_fdl: self-checking test of the forward delay line with blocking.
//
// Launches a rising edge with BLK high and no mirror cell selected and
// checks it reaches tap n exactly (n+1) x 70 ps later. Then selects a mirror
// cell k and checks that a new edge stops at tap k+1 (cell k+2 is gated by
// M[k]), and finally that BLK low empties the whole line.
`timescale 1ps / 1ps
module tb_smd_fdl;

  localparam int N = 72, TDC = 70;
  logic         fin = 1'b0, blk = 1'b1;
  logic [N-1:0] m = '1;
  logic [N-1:0] f;
  int checks = 0, failures = 0;

  smd_fdl dut (.fin(fin), .blk(blk), .m(m), .f(f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int k;
    longint t0;
    #(TDC * (N + 5));
    check(f == '0, "line not empty at start");
    // Free propagation.
    fin = 1'b1;
    t0 = $time;
    for (int n = 0; n < N; n++) begin
      #(t0 + (n + 1) * TDC - 1 - $time) check(f[n] == 1'b0, $sformatf("tap %0d early", n));
      #2                                check(f[n] == 1'b1, $sformatf("tap %0d late", n));
    end
    #(TDC * 2) check(f == '1, "line not full");
    fin = 1'b0;
    #(TDC * (N + 2)) check(f == '0, "line not empty");
    // Mirror select stops the edge two cells later.
    for (int t = 0; t < 10; t++) begin
      k = $urandom_range(N - 3);
      m = '1; m[k] = 1'b0;
      fin = 1'b1;
      #(TDC * (N + 2));
      for (int n = 0; n < N; n++)
        check(f[n] == (n <= k + 1), $sformatf("M[%0d] low: tap %0d = %0b", k, n, f[n]));
      fin = 1'b0; m = '1;
      #(TDC * (N + 2));
    end
    // Blocking empties the line.
    fin = 1'b1;
    #(TDC * (N + 2)) check(f == '1, "line not full before blocking");
    blk = 1'b0;
    #(TDC + 1) check(f == '0, "BLK low does not clear the line");
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
