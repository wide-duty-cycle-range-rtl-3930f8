// smd_top: wide duty cycle range synchronous mirror delay (SMD).
//
// De-skews a clock: INT_CLK, taken from the end of the on-chip clock path,
// is brought into phase with EXT_CLK without a feedback loop, using the fact
// that a delay of exactly two clock periods looks like zero skew.
//
//   EXT_CLK -> IB -> IB_OUT -> DDL -> FDL ....(one period)....
//                      |                |  taps
//                      |               MCC (EMDC row, captures edge position)
//                      +--> BDL (enters at the captured cell, runs back)
//                             -> FTDL (FTC) -> CD -> INT_CLK
//   EXT_CLK, INT_CLK -> phase detector -> UP/DN -> timing controller -> BLK, FTC
//
// Coarse locking (two cycles): BLK opens the dummy and forward delay lines
// at the first IB_OUT edge after reset; that edge crosses the dummy delay line
// (Td1+Td2+Td3+Td4) and then runs along the FDL. At the second IB_OUT edge
// the EMDC row samples the taps, the one cell where the pattern steps from 1
// to 0 pulls its M[n] low, and BLK falls, blocking the FDL and freezing the
// selection. From then on IB_OUT enters the BDL at cell n and crosses as many
// cells backwards as the edge crossed forwards, so
//   Td1 + (Td1+Td2+Td3+Td4) + (Tck-Td1-Td2-Td3-Td4) + Td2
//       + (Tck-Td1-Td2-Td3-Td4) + Td3 + Td4 = 2 Tck.
// Fine locking (eight cycles): the forward count is rounded down to whole
// cells, so INT_CLK is early by less than one cell. The phase detector
// compares INT_CLK with EXT_CLK and the timing controller moves the 3-bit
// FTC of the output fine-tuning delay line one 10 ps step every two cycles,
// four times. Locking ends after 2 + 2 x 4 = 10 cycles.
//
// The block structure, the delay equation, the blocking scheme and the lock
// sequence follow the published design. The analog parts (buffers, delay
// cells, varactor line) are behavioural delay models, so this module and
// the ones below it simulate the timing but are not synthesizable as a
// whole; the EMDC row, phase detector and timing controller are
// synthesizable logic. All delay values, the cell count, the reset and the
// detector circuit are this implementation's choices.
//
// Interface: rst_n is an asynchronous active-low reset (hold it for a few
// clock cycles, then release; locking starts at the next IB_OUT edge).
// ftc, blk, up, dn, m_sel and locked are brought out for observation.
`timescale 1ps / 1ps
module smd_top #(
  parameter int unsigned N_CELLS        = 72,
  parameter int unsigned FTC_W          = smd_pkg::FTC_W,
  parameter int unsigned T_DC_PS        = 70,
  parameter int unsigned T_IB_PS        = 153,
  parameter int unsigned T_EMDC_PS      = 97,
  parameter int unsigned T_FTDL_BASE_PS = 118,
  parameter int unsigned T_FTDL_STEP_PS = 10,
  parameter int unsigned T_CD_PS        = 205
) (
  input  logic               ext_clk,
  input  logic               rst_n,
  output logic               int_clk,
  output logic [FTC_W-1:0]   ftc,
  output logic               blk,
  output logic               up,
  output logic               dn,
  output logic [N_CELLS-1:0] m_sel,
  output logic               locked
);

  logic               ib_out;
  logic               fdl_in;
  logic [N_CELLS-1:0] f;
  logic               bdl_out;
  logic               ftdl_out;

  // Input buffer (Td1).
  smd_delay_buffer #(.DELAY_PS(T_IB_PS)) u_ib (.din(ext_clk), .dout(ib_out));

  // Dummy delay line: IB + EMDC + FTDL + CD copies, fed only while BLK is high.
  smd_ddl #(
    .FTC_W         (FTC_W),
    .T_IB_PS       (T_IB_PS),
    .T_EMDC_PS     (T_EMDC_PS),
    .T_FTDL_BASE_PS(T_FTDL_BASE_PS),
    .T_FTDL_STEP_PS(T_FTDL_STEP_PS),
    .T_CD_PS       (T_CD_PS)
  ) u_ddl (.din(ib_out), .en(blk), .dout(fdl_in));

  // Forward delay line with blocking.
  smd_fdl #(.N_CELLS(N_CELLS), .T_DC_PS(T_DC_PS)) u_fdl (
    .fin(fdl_in), .blk(blk), .m(m_sel), .f(f)
  );

  // Mirror control circuit.
  smd_mcc #(.N_CELLS(N_CELLS)) u_mcc (
    .ib_out(ib_out), .rst_n(rst_n), .blk(blk), .f(f), .m(m_sel)
  );

  // Backward delay line.
  smd_bdl #(.N_CELLS(N_CELLS), .T_DC_PS(T_DC_PS), .T_EMDC_PS(T_EMDC_PS)) u_bdl (
    .ib_out(ib_out), .m(m_sel), .bout(bdl_out)
  );

  // Output fine-tuning delay line (Td3).
  smd_ftdl #(
    .FTC_W         (FTC_W),
    .T_FTDL_BASE_PS(T_FTDL_BASE_PS),
    .T_FTDL_STEP_PS(T_FTDL_STEP_PS)
  ) u_ftdl (.din(bdl_out), .ftc(ftc), .dout(ftdl_out));

  // Clock driver (Td4).
  smd_delay_buffer #(.DELAY_PS(T_CD_PS)) u_cd (.din(ftdl_out), .dout(int_clk));

  smd_phase_detector u_pd (
    .ext_clk(ext_clk), .int_clk(int_clk), .rst_n(rst_n), .up(up), .dn(dn)
  );

  smd_timing_controller #(.FTC_W(FTC_W)) u_tc (
    .ib_out(ib_out), .rst_n(rst_n), .up(up), .dn(dn),
    .blk(blk), .ftc(ftc), .locked(locked)
  );

  // At most one mirror cell may be selected (the point of the blocking scheme).
  a_one_mirror: assert property (@(posedge ext_clk) disable iff (!rst_n)
                                 $countones(~m_sel) <= 1)
    else $error("more than one EMDC output low");

endmodule
