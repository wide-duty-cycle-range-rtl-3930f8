// smd_delay_cell: delay cell (DC) of the forward and backward delay lines.
//
// Behavioural model. The cell is a three-input AND gate with one gate delay,
// T_DC_PS, which sets the coarse resolution of the mirror delay. In the
// forward line the chain input is gated by the blocking signal and by the
// mirror select two cells back; in the backward line one gating input carries
// the injected clock and the other is tied high.
//
// The AND gate as the unit cell follows the document; the delay value is
// this implementation's choice. The document puts it at several hundred
// picoseconds, but the 3-bit fine-tuning line with 10 ps steps can only make
// up a coarse error of up to 70 ps, so the default is 70 ps.
//
// Timing: y follows a & b & c after T_DC_PS (inertial, as a gate).
`timescale 1ps / 1ps
module smd_delay_cell #(
  parameter int unsigned T_DC_PS = 70
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign #(T_DC_PS) y = a & b & c;

endmodule
