// smd_pkg: constants shared by the synchronous mirror delay (SMD) blocks.
//
// The SMD locks in two phases. Coarse locking takes COARSE_CYCLES input
// clock cycles: one period is measured in the forward delay line and mirrored
// into the backward delay line. Fine locking then makes FINE_STEPS
// adjustments of the 3-bit fine-tuning code, one every FINE_INTERVAL cycles,
// so the whole procedure ends after 2 + 2 x 4 = 10 cycles. The code width,
// the step count and the interval follow the published design; the starting
// code (mid-scale) is this implementation's choice.
`timescale 1ps / 1ps
package smd_pkg;

  // Width of the fine-tuning control code FTC.
  localparam int unsigned FTC_W         = 3;
  // Clock cycles of coarse locking.
  localparam int unsigned COARSE_CYCLES = 2;
  // Number of fine-tuning updates of FTC.
  localparam int unsigned FINE_STEPS    = 4;
  // Clock cycles between two FTC updates.
  localparam int unsigned FINE_INTERVAL = 2;

  // States of the timing controller.
  typedef enum logic [1:0] {
    TC_RESET   = 2'd0,  // waiting for the first IB_OUT edge, FDL blocked
    TC_MEASURE = 2'd1,  // first edge is travelling through the FDL
    TC_FINE    = 2'd2,  // mirror point frozen, FTC being tuned
    TC_LOCKED  = 2'd3   // locking procedure finished
  } tc_state_e;

endpackage
