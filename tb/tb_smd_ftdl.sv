// tb_smd_ftdl: self-checking test of the fine-tuning delay line model.
//
// For every code, and in random order, sends rising and falling edges
// through the line and checks the delay 118 ps + 10 ps x (4*FTC[2] +
// 2*FTC[1] + FTC[0]), i.e. one step per unit varactor switched in.
`timescale 1ps / 1ps
module tb_smd_ftdl;

  logic       din = 1'b0;
  logic [2:0] ftc = 3'd0;
  logic       dout;
  int checks = 0, failures = 0;

  smd_ftdl dut (.din(din), .ftc(ftc), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int code);
    int d;
    longint t0;
    d = 118 + 10 * (4 * ((code >> 2) & 1) + 2 * ((code >> 1) & 1) + (code & 1));
    ftc = 3'(code);
    #300;
    for (int e = 0; e < 2; e++) begin
      din = ~din;
      t0 = $time;
      #(d - 1) check(dout != din, $sformatf("code %0d: edge before %0d ps", code, d));
      #2       check(dout == din, $sformatf("code %0d: no edge at %0d ps", code, d));
      #300;
    end
  endtask

  initial begin
    #300;
    for (int c = 0; c < 8; c++) measure(c);
    for (int i = 0; i < 40; i++) measure($urandom_range(7));
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
