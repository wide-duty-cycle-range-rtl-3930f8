// smd_bdl: backward delay line (BDL) with the mirror transfer gates.
//
// Behavioural model. At every position n a transfer gate lets IB_OUT into
// the line when the mirror select M[n] is low; its delay T_EMDC_PS is the
// EMDC delay Td2 of the delay equation, matched by the dummy delay line. The
// clock then runs back from cell n to cell 0 through n+1 delay cells, the
// same number the edge crossed in the forward line during one period, and
// leaves at bout. The line is built from the same AND delay cells as the
// forward line and carries the clock active low (transfer gate
// NAND(IB_OUT, ~M[n]), idle high), so it is inverted once at the output.
// Because the whole IB_OUT waveform is passed, the output keeps the input
// duty cycle.
//
// The document gives the BDL as a chain of delay cells fed from the mirror
// control circuit, with EMDCs as dummy loading (they only add capacitance and
// are not modelled); the transfer gate and active-low polarity are this
// implementation's choice.
//
// Timing: bout = IB_OUT delayed by T_EMDC_PS + (n+1) * T_DC_PS for the
// selected cell n; low when no cell is selected.
`timescale 1ps / 1ps
module smd_bdl #(
  parameter int unsigned N_CELLS   = 72,
  parameter int unsigned T_DC_PS   = 70,
  parameter int unsigned T_EMDC_PS = 97
) (
  input  logic               ib_out,
  input  logic [N_CELLS-1:0] m,
  output logic               bout
);

  logic [N_CELLS:0]   b_n;    // backward chain, active low
  logic [N_CELLS-1:0] xfer_n; // transfer gate outputs, active low

  assign b_n[N_CELLS] = 1'b1;

  for (genvar n = 0; n < N_CELLS; n++) begin : g_dc
    assign #(T_EMDC_PS) xfer_n[n] = ~(ib_out & ~m[n]);
    smd_delay_cell #(.T_DC_PS(T_DC_PS)) u_dc (.a(b_n[n+1]), .b(xfer_n[n]), .c(1'b1), .y(b_n[n]));
  end

  assign bout = ~b_n[0];

endmodule
