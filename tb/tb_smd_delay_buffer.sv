// tb_smd_delay_buffer: self-checking test of the fixed-delay buffer model.
//
// Sends a random clock-like waveform through buffers with the input-buffer
// and clock-driver delays and checks that every edge appears exactly
// DELAY_PS later.
`timescale 1ps / 1ps
module tb_smd_delay_buffer;

  logic din = 1'b0;
  logic dout_ib, dout_cd;
  int checks = 0, failures = 0;
  longint t_in[$];
  longint t_ib[$];
  longint t_cd[$];

  smd_delay_buffer                 u_ib (.din(din), .dout(dout_ib));
  smd_delay_buffer #(.DELAY_PS(205)) u_cd (.din(din), .dout(dout_cd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(din)     t_in.push_back($time);
  always @(dout_ib) t_ib.push_back($time);
  always @(dout_cd) t_cd.push_back($time);

  initial begin
    #1000;
    t_in.delete(); t_ib.delete(); t_cd.delete();
    for (int i = 0; i < 200; i++) begin
      din = ~din;
      #($urandom_range(900, 300));
    end
    #1000;
    check(t_ib.size() == t_in.size(), $sformatf("IB edges %0d of %0d", t_ib.size(), t_in.size()));
    check(t_cd.size() == t_in.size(), $sformatf("CD edges %0d of %0d", t_cd.size(), t_in.size()));
    for (int i = 0; i < t_in.size() && i < t_ib.size() && i < t_cd.size(); i++) begin
      check(t_ib[i] - t_in[i] == 153, $sformatf("IB edge %0d delay %0d", i, t_ib[i] - t_in[i]));
      check(t_cd[i] - t_in[i] == 205, $sformatf("CD edge %0d delay %0d", i, t_cd[i] - t_in[i]));
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
