// division_modulator: DM counter followed by the MASH 1-1 modulator.
//
// The DM counter integrates the slope modulator's bit stream (step size) with
// the direction given by Sign, producing the 14-bit fractional division word
// D. The MASH 1-1 turns D into a 2-bit modulus code per feedback cycle whose
// average is D / 2^14, so the loop divides by N + D / 2^14 on average.
// Interface: sm_out/sign sampled on enabled clk edges; d registered; code
// registered, one clk after the MASH state it reflects.
module division_modulator #(
  parameter int unsigned W        = 14,
  parameter int unsigned ALPHA    = 0,
  parameter int unsigned BETA     = 1,
  parameter int unsigned GAMMA    = 2,
  parameter int unsigned DMAX_LOW = 6554,
  parameter int unsigned DMIN_LOW = 6111,
  parameter int unsigned DMAX_HI  = 16383,
  parameter int unsigned DMIN_HI  = 15646
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         ssc_en,
  input  logic         m0,
  input  logic         sm_out,
  input  logic         sign,
  output logic [W-1:0] d,
  output logic [1:0]   code
);
  timeunit 1ps;
  timeprecision 1fs;

  dm_counter #(
    .W(W), .ALPHA(ALPHA), .BETA(BETA), .GAMMA(GAMMA),
    .DMAX_LOW(DMAX_LOW), .DMIN_LOW(DMIN_LOW), .DMAX_HI(DMAX_HI), .DMIN_HI(DMIN_HI)
  ) u_cnt (
    .clk, .rst_n, .en, .ssc_en, .m0, .sm_out, .sign, .d
  );

  mash11_sdm #(.W(W)) u_mash (
    .clk, .rst_n, .en, .x(d), .code
  );
endmodule
