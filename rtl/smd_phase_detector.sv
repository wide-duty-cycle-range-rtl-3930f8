// smd_phase_detector: bang-bang phase detector between EXT_CLK and INT_CLK.
//
// A flip-flop samples INT_CLK on each rising edge of EXT_CLK. If INT_CLK is
// already high, its rising edge came early and the output path needs more
// delay: UP is asserted. If INT_CLK is still low, it is late: DN is asserted.
// The decision is valid while the phase error is smaller than the high and
// low phases of the clock, which holds after coarse locking (the error is
// then below one delay cell).
//
// The document names the detector and its UP/DN outputs but not its
// circuit; the single sampling flip-flop is this implementation's choice, as
// is the reset (UP and DN both low until the first EXT_CLK edge).
//
// Timing: UP/DN change on the EXT_CLK rising edge and hold for one cycle.
`timescale 1ps / 1ps
module smd_phase_detector (
  input  logic ext_clk,
  input  logic int_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic valid;
  logic sample;

  always_ff @(posedge ext_clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      sample <= 1'b0;
    end else begin
      valid  <= 1'b1;
      sample <= int_clk;
    end
  end

  assign up = valid & sample;
  assign dn = valid & ~sample;

endmodule
