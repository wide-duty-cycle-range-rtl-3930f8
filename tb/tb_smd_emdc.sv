// tb_smd_emdc: self-checking test of one edge-trigger mirror delay cell.
//
// Drives random tap values, neighbour QB values and capture enables around
// IB_OUT rising edges and compares Q, QB and M[n] = NAND(Q, QB[n+1]) with a
// reference flip-flop kept in the testbench; also checks the asynchronous
// reset.
`timescale 1ps / 1ps
module tb_smd_emdc;

  logic ib_out = 1'b0, rst_n = 1'b1, blk = 1'b0, f_n = 1'b0, qb_next = 1'b1;
  logic q, qb, m_n;
  int checks = 0, failures = 0;
  bit ref_q;

  smd_emdc dut (.ib_out(ib_out), .rst_n(rst_n), .blk(blk), .f_n(f_n),
                .qb_next(qb_next), .q(q), .qb(qb), .m_n(m_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string where);
    check(q == ref_q, $sformatf("%s: q=%0b expected %0b", where, q, ref_q));
    check(qb == !ref_q, $sformatf("%s: qb=%0b", where, qb));
    check(m_n == !(ref_q && qb_next), $sformatf("%s: m_n=%0b (q=%0b qb_next=%0b)", where, m_n, ref_q, qb_next));
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset edge
    ref_q = 1'b0;
    #100 compare("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      f_n = 1'($urandom); blk = 1'($urandom); qb_next = 1'($urandom);
      #100;
      compare("before edge");
      ib_out = 1'b1;
      if (blk) ref_q = f_n;
      #50 compare("after edge");
      f_n = ~f_n;            // tap changes while clock high: no effect
      #50 compare("clock high");
      ib_out = 1'b0;
      if (i % 97 == 96) begin
        rst_n = 1'b0; ref_q = 1'b0;
        #10 compare("async reset");
        rst_n = 1'b1;
      end
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
