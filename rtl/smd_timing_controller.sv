// smd_timing_controller: blocking signal and fine-tuning code of the SMD.
//
// Counts rising edges of IB_OUT after reset and sequences the lock:
//   edge 1          BLK goes high: the first edge may enter the forward line.
//   edge 2          the mirror cells capture the edge position; BLK goes low,
//                   blocking the forward line and freezing the mirror point
//                   (coarse locking, two cycles).
//   edges 4,6,8,10  FTC moves one step up (UP) or down (DN), saturating;
//                   one update every two cycles, four updates in all.
//   edge 10         LOCKED: FTC holds from then on.
// The two-cycle coarse lock, BLK going low at the second IB_OUT edge, the
// 3-bit FTC changed every two cycles from UP/DN and the 10-cycle total follow
// the published design. The update rule (saturating +/-1 from mid-scale),
// BLK being held low until the first edge, and the reset are this
// implementation's choices. Starting at mid-scale, four unit steps reach any
// of the eight codes.
//
// Timing: all outputs change on IB_OUT rising edges. UP/DN are read at the
// update edges, one full cycle after the previous FTC change, so the phase
// detector has seen an output edge produced with the new code.
`timescale 1ps / 1ps
module smd_timing_controller #(
  parameter int unsigned FTC_W         = smd_pkg::FTC_W,
  parameter int unsigned COARSE_CYCLES = smd_pkg::COARSE_CYCLES,
  parameter int unsigned FINE_STEPS    = smd_pkg::FINE_STEPS,
  parameter int unsigned FINE_INTERVAL = smd_pkg::FINE_INTERVAL,
  parameter logic [FTC_W-1:0] FTC_INIT = FTC_W'(1 << (FTC_W - 1))
) (
  input  logic             ib_out,
  input  logic             rst_n,
  input  logic             up,
  input  logic             dn,
  output logic             blk,
  output logic [FTC_W-1:0] ftc,
  output logic             locked
);

  localparam int unsigned LOCK_AT = COARSE_CYCLES + FINE_STEPS * FINE_INTERVAL;
  localparam int unsigned CNT_W   = $clog2(LOCK_AT + 1);
  localparam logic [FTC_W-1:0] FTC_MAX = '1;

  smd_pkg::tc_state_e state;
  logic [CNT_W-1:0] edge_cnt;     // IB_OUT rising edges seen, saturating
  logic [CNT_W-1:0] edge_next;
  logic             update;

  assign edge_next = edge_cnt + 1'b1;

  // FTC is updated on fine-locking edges COARSE + k*INTERVAL, k = 1..STEPS.
  always_comb begin
    update = 1'b0;
    if (state == smd_pkg::TC_FINE && int'(edge_next) > int'(COARSE_CYCLES) &&
        ((int'(edge_next) - int'(COARSE_CYCLES)) % int'(FINE_INTERVAL)) == 0)
      update = 1'b1;
  end

  always_ff @(posedge ib_out or negedge rst_n) begin
    if (!rst_n) begin
      state    <= smd_pkg::TC_RESET;
      edge_cnt <= '0;
      ftc      <= FTC_INIT;
    end else begin
      if (state != smd_pkg::TC_LOCKED) edge_cnt <= edge_next;
      if (update) begin
        if (up && !dn && ftc != FTC_MAX) ftc <= ftc + 1'b1;
        else if (dn && !up && ftc != '0) ftc <= ftc - 1'b1;
      end
      unique case (state)
        smd_pkg::TC_RESET:   state <= smd_pkg::TC_MEASURE;
        smd_pkg::TC_MEASURE: if (int'(edge_next) >= int'(COARSE_CYCLES)) state <= smd_pkg::TC_FINE;
        smd_pkg::TC_FINE:    if (int'(edge_next) >= int'(LOCK_AT))       state <= smd_pkg::TC_LOCKED;
        smd_pkg::TC_LOCKED:  state <= smd_pkg::TC_LOCKED;
        default:    state <= smd_pkg::TC_RESET;
      endcase
    end
  end

  assign blk    = (state == smd_pkg::TC_MEASURE);
  assign locked = (state == smd_pkg::TC_LOCKED);

endmodule
