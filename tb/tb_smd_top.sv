// tb_smd_top: end-to-end test of the synchronous mirror delay at its
// default parameters.
//
// For each clock (frequency and duty cycle) the test resets the SMD, runs
// EXT_CLK and checks, against values it computes from the delay parameters:
//   - coarse lock: exactly one mirror select low, at cell
//     floor((Tck - Tddl) / Tdc) - 1, and the first INT_CLK edge two cycles
//     after the first EXT_CLK edge with error 4 * 10 ps - remainder;
//   - blocking: BLK low from the second IB_OUT edge on and every forward tap
//     low afterwards;
//   - fine lock: the FTC sequence of a +/-1 search from mid-scale, LOCKED
//     after 10 EXT_CLK cycles, and the final phase error of INT_CLK against
//     EXT_CLK equal to the model's (|error| <= 10 ps);
//   - duty cycle: INT_CLK keeps the high time of EXT_CLK.
// Clocks cover 200-400 MHz and duty cycles 20-80 %. Each mechanism (coarse
// lock, blocking, UP step, DN step, 20 % and 80 % duty, both range ends) is
// counted, and one that never occurs is a failure.
`timescale 1ps / 1ps
module tb_smd_top;

  localparam int TDC   = 70;
  localparam int TDDL  = 153 + 97 + 118 + 205;  // IB + EMDC + FTDL base + CD
  localparam int TSTEP = 10;
  localparam int N     = 72;

  logic         ext_clk = 1'b0;
  logic         rst_n   = 1'b1;
  logic         int_clk;
  logic [2:0]   ftc;
  logic         blk, up, dn, locked;
  logic [N-1:0] m_sel;

  smd_top dut (
    .ext_clk(ext_clk), .rst_n(rst_n), .int_clk(int_clk), .ftc(ftc), .blk(blk),
    .up(up), .dn(dn), .m_sel(m_sel), .locked(locked)
  );

  int checks = 0, failures = 0;
  int n_coarse = 0, n_block = 0, n_up = 0, n_dn = 0, n_d20 = 0, n_d80 = 0;
  int n_f200 = 0, n_f400 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Clock generator state.
  int  period_ps = 2500;
  int  high_ps   = 1250;
  bit  run_clk   = 1'b0;
  longint t_first_edge;      // time of first EXT_CLK edge after reset release
  int  ext_edges;            // EXT_CLK rising edges since reset release

  initial begin
    forever begin
      wait (run_clk);
      ext_clk = 1'b1;
      if (rst_n) begin
        if (ext_edges == 0) t_first_edge = $time;
        ext_edges++;
      end
      #(high_ps);
      ext_clk = 1'b0;
      #(period_ps - high_ps);
    end
  end

  // INT_CLK rising and falling edge times.
  longint int_rise[$];
  longint int_fall[$];
  always @(posedge int_clk) if (rst_n) int_rise.push_back($time);
  always @(negedge int_clk) if (rst_n) int_fall.push_back($time);

  // FTC and LOCKED observation.
  int     ftc_hist[$];
  int     locked_at_edge;
  always @(ftc) if (rst_n) ftc_hist.push_back(int'(ftc));
  always @(posedge locked) locked_at_edge = ext_edges;

  task automatic run_case(input int per, input int duty_pct);
    int     ncell, r, c, exp_k, lows, low_idx;
    int     exp_seq[$];
    longint err, exp_err;
    bit     taps_clear;
    per = per;
    period_ps = per;
    high_ps   = per * duty_pct / 100;
    ncell = (per - TDDL) / TDC;
    r     = per - TDDL - ncell * TDC;
    exp_k = ncell - 1;
    // Fine search model: INT early (error < 0) -> UP -> one more step.
    c = 4;
    for (int s = 0; s < 4; s++) begin
      if (TSTEP * c - r < 0) c = (c < 7) ? c + 1 : 7;
      else                   c = (c > 0) ? c - 1 : 0;
      exp_seq.push_back(c);
    end
    exp_err = TSTEP * c - r;

    // Reset with the clock running, release while EXT_CLK is low.
    rst_n = 1'b0;
    run_clk = 1'b1;
    int_rise.delete(); int_fall.delete(); ftc_hist.delete();
    ext_edges = 0; locked_at_edge = -1;
    repeat (3) @(posedge ext_clk);
    @(negedge ext_clk);
    #(period_ps / 10);
    rst_n = 1'b1;

    // Coarse lock: after the third EXT edge (INT's first edge is due there).
    wait (ext_edges == 3);
    #(period_ps / 2);
    lows = 0; low_idx = -1;
    for (int i = 0; i < N; i++) if (!m_sel[i]) begin lows++; low_idx = i; end
    check(lows == 1, $sformatf("T=%0d: %0d mirror cells selected", per, lows));
    check(low_idx == exp_k, $sformatf("T=%0d: mirror cell %0d, expected %0d", per, low_idx, exp_k));
    if (lows == 1 && low_idx == exp_k) n_coarse++;
    check(int_rise.size() >= 1, $sformatf("T=%0d: no INT_CLK edge after coarse lock", per));
    if (int_rise.size() >= 1) begin
      err = int_rise[0] - (t_first_edge + 2 * per);
      check(err == TSTEP * 4 - r,
            $sformatf("T=%0d: first INT edge error %0d ps, expected %0d", per, err, TSTEP * 4 - r));
    end
    // Blocking: BLK low and the whole forward line empty.
    taps_clear = (dut.f == '0);
    check(!blk && taps_clear, $sformatf("T=%0d: FDL not blocked (blk=%0b)", per, blk));
    if (!blk && taps_clear) n_block++;

    // Fine lock.
    wait (ext_edges == 14);
    check(locked, $sformatf("T=%0d: not locked", per));
    check(locked_at_edge == 10,
          $sformatf("T=%0d: locked after %0d cycles, expected 10", per, locked_at_edge));
    check(ftc_hist.size() <= 4, $sformatf("T=%0d: %0d FTC changes", per, ftc_hist.size()));
    check(int'(ftc) == c, $sformatf("T=%0d: final FTC %0d, expected %0d", per, ftc, c));
    begin
      int prev = 4;
      for (int s = 0; s < 4; s++) begin
        if (exp_seq[s] > prev) n_up++;
        if (exp_seq[s] < prev) n_dn++;
        prev = exp_seq[s];
      end
    end
    // Phase error and duty cycle of the last INT_CLK edges.
    for (int i = int_rise.size() - 3; i < int_rise.size(); i++) begin
      longint t_ext, rel;
      rel   = int_rise[i] - t_first_edge;
      t_ext = ((rel + per / 2) / per) * per;
      err   = rel - t_ext;
      check(err == exp_err,
            $sformatf("T=%0d: phase error %0d ps, expected %0d", per, err, exp_err));
      check(err <= 10 && err >= -10, $sformatf("T=%0d: phase error %0d ps too large", per, err));
    end
    begin
      int nf = int_fall.size();
      longint hi;
      hi = int_fall[nf-1] - int_rise[nf-1 - (int_fall[0] < int_rise[0] ? 1 : 0)];
      check(hi == longint'(high_ps),
            $sformatf("T=%0d: INT high %0d ps, EXT high %0d ps", per, hi, high_ps));
    end
    if (duty_pct <= 20) n_d20++;
    if (duty_pct >= 80) n_d80++;
    if (per >= 5000) n_f200++;
    if (per <= 2500) n_f400++;
    $display("T=%0d ps duty=%0d%%: cell %0d, r=%0d ps, FTC %0d, phase error %0d ps",
             per, duty_pct, low_idx, r, ftc, exp_err);
    run_clk = 1'b0;
    #(2 * per);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    run_case(2500, 20);
    run_case(2500, 80);
    run_case(5000, 20);
    run_case(5000, 80);
    run_case(2500, 50);
    run_case(3331, 50);
    run_case(4007, 35);
    run_case(2777, 65);
    run_case(4561, 50);
    // mechanism coverage
    check(n_coarse > 0, "coarse lock never seen");
    check(n_block  > 0, "blocking never seen");
    check(n_up     > 0, "no UP step");
    check(n_dn     > 0, "no DN step");
    check(n_d20    > 0, "20% duty never run");
    check(n_d80    > 0, "80% duty never run");
    check(n_f200   > 0, "200 MHz never run");
    check(n_f400   > 0, "400 MHz never run");
    $display("mechanisms: coarse=%0d block=%0d up=%0d dn=%0d duty20=%0d duty80=%0d f200=%0d f400=%0d",
             n_coarse, n_block, n_up, n_dn, n_d20, n_d80, n_f200, n_f400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
