// smd_fdl: forward delay line (FDL) with the blocking edge-trigger scheme.
//
// Behavioural model: a chain of N_CELLS delay cells. Cell n passes the
// previous tap F[n-1] (the dummy delay line output for n = 0) only while the
// blocking signal BLK is high and the mirror select M[n-2] of the cell two
// positions back is high. BLK is high for exactly one clock period, so only
// one rising edge ever travels the line and at most one mirror cell can
// fire, however long the line is. Once BLK falls, every tap returns low.
//
// The gating of each cell by M[n-2] and BLK follows the published delay cell
// with blocking; the cell count and delay are this implementation's choice.
//
// Timing: the edge reaches tap n (n+1) * T_DC_PS after it enters at fin.
`timescale 1ps / 1ps
module smd_fdl #(
  parameter int unsigned N_CELLS = 72,
  parameter int unsigned T_DC_PS = 70
) (
  input  logic               fin,
  input  logic               blk,
  input  logic [N_CELLS-1:0] m,
  output logic [N_CELLS-1:0] f
);

  for (genvar n = 0; n < N_CELLS; n++) begin : g_dc
    logic prev, msel;
    if (n == 0) begin : g_first
      assign prev = fin;
    end else begin : g_next
      assign prev = f[n-1];
    end
    if (n < 2) begin : g_nomsel
      assign msel = 1'b1;
    end else begin : g_msel
      assign msel = m[n-2];
    end
    smd_delay_cell #(.T_DC_PS(T_DC_PS)) u_dc (.a(prev), .b(blk), .c(msel), .y(f[n]));
  end

endmodule
