// smd_mcc: mirror control circuit (MCC).
//
// A row of N_CELLS edge-trigger mirror delay cells, one per forward delay
// line tap. On the IB_OUT rising edge that ends the measured period, every
// cell samples its tap; the cell where the sampled pattern changes from 1 to
// 0 (tap n high, tap n+1 low) pulls its mirror select M[n] low. The backward
// delay line injects the clock at that cell. Beyond the last tap the line is
// taken as low, so an edge that ran off the end selects the last cell.
//
// The row of cells and the neighbour connection (QB[n+1] into cell n) follow
// the published circuit; the number of cells is this implementation's choice
// (the operating range 200-400 MHz with the default delays needs 63 cells).
//
// Interface: f[n] is tap n; m[n] is active low. Timing: m changes only after
// an IB_OUT rising edge while blk is high.
`timescale 1ps / 1ps
module smd_mcc #(
  parameter int unsigned N_CELLS = 72
) (
  input  logic               ib_out,
  input  logic               rst_n,
  input  logic               blk,
  input  logic [N_CELLS-1:0] f,
  output logic [N_CELLS-1:0] m
);

  logic [N_CELLS-1:0] q;
  logic [N_CELLS:0]   qb;

  // Virtual tap past the end of the line: always low, so its QB is high.
  assign qb[N_CELLS] = 1'b1;

  for (genvar n = 0; n < N_CELLS; n++) begin : g_cell
    smd_emdc u_emdc (
      .ib_out (ib_out),
      .rst_n  (rst_n),
      .blk    (blk),
      .f_n    (f[n]),
      .qb_next(qb[n+1]),
      .q      (q[n]),
      .qb     (qb[n]),
      .m_n    (m[n])
    );
  end

endmodule
