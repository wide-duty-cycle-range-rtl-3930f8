// smd_emdc: edge-trigger mirror delay cell (EMDC).
//
// One cell of the mirror control circuit. A D flip-flop samples the forward
// delay line tap F[n] on the rising edge of IB_OUT. The cell output
// M[n] = NAND(Q[n], QB[n+1]) is low only when tap n was high and tap n+1 was
// low at that edge, i.e. at the position the launched rising clock edge had
// reached. Because it looks at a level change between neighbouring taps
// rather than at a pulse, the cell works for any input duty cycle.
//
// The flip-flop, its D/clock connections and the two-tap output gate follow
// the published cell. Two things are this implementation's choice: the
// capture enable BLK (the blocking signal also freezes the flip-flop after
// the mirror point has been captured, so M[n] stays valid while the forward
// line is blocked) and the asynchronous active-low reset that clears Q.
//
// Timing: Q and QB change on the IB_OUT rising edge; M[n] is combinational
// from Q[n] and the neighbour's QB[n+1].
`timescale 1ps / 1ps
module smd_emdc (
  input  logic ib_out,   // sampling clock (buffered input clock)
  input  logic rst_n,    // asynchronous reset, active low
  input  logic blk,      // capture enable: sample only while high
  input  logic f_n,      // forward delay line tap F[n]
  input  logic qb_next,  // QB[n+1] from the next cell
  output logic q,        // Q[n]
  output logic qb,       // QB[n], to the previous cell
  output logic m_n       // mirror select M[n], active low
);

  always_ff @(posedge ib_out or negedge rst_n) begin
    if (!rst_n)   q <= 1'b0;
    else if (blk) q <= f_n;
  end

  assign qb  = ~q;
  assign m_n = ~(q & qb_next);

endmodule
