// smd_delay_buffer: fixed-delay clock buffer (input buffer IB, clock driver
// CD, and the dummy copies of both in the dummy delay line).
//
// Behavioural model of an analog buffer: dout follows din after DELAY_PS.
// The input buffer's delay is Td1 and the clock driver's Td4 in the delay
// equation of the SMD; the dummy delay line uses copies with the same delay
// so the forward measurement subtracts them. Delay values are this
// implementation's choice.
//
// Timing: transport delay of DELAY_PS picoseconds on both edges.
`timescale 1ps / 1ps
module smd_delay_buffer #(
  parameter int unsigned DELAY_PS = 153
) (
  input  logic din,
  output logic dout
);

  always @(din) dout <= #(DELAY_PS) din;

  initial dout = 1'b0;

endmodule
