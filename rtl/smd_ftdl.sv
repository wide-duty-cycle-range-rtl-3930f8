// smd_ftdl: fine-tuning delay line (FTDL) with digitally controlled
// varactors (DCV).
//
// Behavioural model. A driving buffer is loaded by a bank of DCVs, each an
// inverter used only for its gate capacitance and switched in by one bit of
// the fine-tuning code: 4 DCVs on FTC[2], 2 on FTC[1] and 1 on FTC[0], so the
// added load is 4, 2 and 1 unit capacitances. Each switched-in unit adds
// T_FTDL_STEP_PS to the buffer delay, giving delay
//   T_FTDL_BASE_PS + T_FTDL_STEP_PS * (number of enabled DCVs)
//   = T_FTDL_BASE_PS + T_FTDL_STEP_PS * FTC.
// The binary-weighted bank follows the published circuit and the 10 ps step
// its stated resolution; the base delay is this implementation's choice, as
// is the assumption that a DCV adds load when its code bit is 1.
//
// Timing: transport delay; a change of ftc applies to edges that arrive
// after it.
`timescale 1ps / 1ps
module smd_ftdl #(
  parameter int unsigned FTC_W          = 3,
  parameter int unsigned T_FTDL_BASE_PS = 118,
  parameter int unsigned T_FTDL_STEP_PS = 10
) (
  input  logic             din,
  input  logic [FTC_W-1:0] ftc,
  output logic             dout
);

  // Number of unit varactors switched onto the buffer output.
  int unsigned n_dcv;

  always_comb begin
    n_dcv = 0;
    for (int b = 0; b < int'(FTC_W); b++)
      if (ftc[b]) n_dcv += (1 << b);
  end

  always @(din) dout <= #(T_FTDL_BASE_PS + T_FTDL_STEP_PS * n_dcv) din;

  initial dout = 1'b0;

endmodule
