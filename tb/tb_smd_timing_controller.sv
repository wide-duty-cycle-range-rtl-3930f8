// tb_smd_timing_controller: self-checking test of the timing controller.
//
// Clocks IB_OUT, drives UP/DN at random and checks, edge by edge after
// reset: BLK low before the first edge, high between the first and second,
// low afterwards; FTC starting at 4 and moving one saturating step in the
// UP/DN direction only on edges 4, 6, 8 and 10; LOCKED from edge 10 on with
// FTC frozen. Repeated over many resets, including runs that saturate.
`timescale 1ps / 1ps
module tb_smd_timing_controller;

  logic       ib_out = 1'b0, rst_n = 1'b1, up = 1'b0, dn = 1'b0;
  logic       blk, locked;
  logic [2:0] ftc;
  int checks = 0, failures = 0;

  smd_timing_controller dut (.ib_out(ib_out), .rst_n(rst_n), .up(up), .dn(dn),
                             .blk(blk), .ftc(ftc), .locked(locked));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_ftc;
    #1 rst_n = 1'b0;  // asynchronous reset edge
    for (int run = 0; run < 60; run++) begin
      int mode;
      mode = run % 3;   // 0 random, 1 always UP, 2 always DN
      rst_n = 1'b0;
      #300;
      check(!blk && !locked && ftc == 3'd4, $sformatf("run %0d: reset state", run));
      rst_n = 1'b1;
      exp_ftc = 4;
      for (int e = 1; e <= 16; e++) begin
        bit u, d;
        case (mode)
          0: begin u = 1'($urandom); d = $urandom_range(3) == 0 ? u : !u; end
          1: begin u = 1'b1; d = 1'b0; end
          default: begin u = 1'b0; d = 1'b1; end
        endcase
        up = u; dn = d;
        #1000 ib_out = 1'b1;
        if (e == 4 || e == 6 || e == 8 || e == 10) begin
          if (u && !d && exp_ftc < 7) exp_ftc++;
          else if (d && !u && exp_ftc > 0) exp_ftc--;
        end
        #10;
        check(blk == (e == 1), $sformatf("run %0d edge %0d: blk=%0b", run, e, blk));
        check(int'(ftc) == exp_ftc, $sformatf("run %0d edge %0d: ftc=%0d expected %0d", run, e, ftc, exp_ftc));
        check(locked == (e >= 10), $sformatf("run %0d edge %0d: locked=%0b", run, e, locked));
        #990 ib_out = 1'b0;
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
