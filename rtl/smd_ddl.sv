// smd_ddl: dummy delay line (DDL) of the delay-matching structure.
//
// Behavioural model built from copies of the parts on the clock path outside
// the mirror lines: an input buffer (Td1), the EMDC mirror transfer gate
// (Td2), a fine-tuning delay line (Td3) and a clock driver (Td4), in series.
// The edge reaches the forward delay line Td1+Td2+Td3+Td4 after IB_OUT, so
// the forward line measures Tck - (Td1+Td2+Td3+Td4) and the loop
//   Td1 + (Td1+Td2+Td3+Td4) + 2*(Tck - (Td1+Td2+Td3+Td4)) + Td2 + Td3 + Td4
// totals 2*Tck. The chain follows the published structure. The dummy FTDL
// is held at code 0 (this implementation's choice): the coarse mirror always
// leaves INT_CLK early by less than one delay cell, so the output FTDL only
// has to add delay, over its full 0..7 range.
//
// The input is gated by the blocking signal BLK (this implementation's
// choice): BLK rises on the first IB_OUT edge after reset, so the first
// rising edge the forward line ever sees is that IB_OUT edge, whatever level
// the clock had while the line was closed. Without the gate, a clock that is
// high at the moment the line opens would look like a second, earlier edge.
//
// Timing: dout = (din & en) delayed by T_IB_PS + T_EMDC_PS + T_FTDL_BASE_PS + T_CD_PS.
`timescale 1ps / 1ps
module smd_ddl #(
  parameter int unsigned FTC_W          = 3,
  parameter int unsigned T_IB_PS        = 153,
  parameter int unsigned T_EMDC_PS      = 97,
  parameter int unsigned T_FTDL_BASE_PS = 118,
  parameter int unsigned T_FTDL_STEP_PS = 10,
  parameter int unsigned T_CD_PS        = 205
) (
  input  logic din,
  input  logic en,
  output logic dout
);

  logic din_g, ib_q, emdc_q, ftdl_q;

  assign din_g = din & en;

  smd_delay_buffer #(.DELAY_PS(T_IB_PS))   u_ib   (.din(din_g),  .dout(ib_q));
  smd_delay_buffer #(.DELAY_PS(T_EMDC_PS)) u_emdc (.din(ib_q),   .dout(emdc_q));
  smd_ftdl #(
    .FTC_W         (FTC_W),
    .T_FTDL_BASE_PS(T_FTDL_BASE_PS),
    .T_FTDL_STEP_PS(T_FTDL_STEP_PS)
  ) u_ftdl (.din(emdc_q), .ftc('0), .dout(ftdl_q));
  smd_delay_buffer #(.DELAY_PS(T_CD_PS))   u_cd   (.din(ftdl_q), .dout(dout));

endmodule
