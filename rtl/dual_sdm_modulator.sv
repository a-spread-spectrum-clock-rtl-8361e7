// dual_sdm_modulator: the Hershey-Kiss profile generator.
//
// The slope modulator produces a triangle (the magnitude of the profile
// slope) and a 1-bit stream of matching density plus the slope Sign; the
// division modulator integrates that stream into the fractional division
// word D and sigma-delta modulates D into the 2-bit modulus code for the
// multi-modulus divider. D therefore rises slowly near the middle of each
// half period (slope counter near 0) and fast near its ends (counter near
// K), tracing the cusped Hershey-Kiss profile with period 4*K clocks.
// Both modulators run on the divider output clock, one step per reference
// period when the loop is locked. ssc_en = 0 freezes the slope modulator and
// holds D at D_MAX (no spreading).
// Interface: all outputs registered on clk.
module dual_sdm_modulator
  import sscg_pkg::*;
#(
  parameter int unsigned SMW      = SM_W,
  parameter int unsigned K        = SM_K,
  parameter int unsigned DMW      = DM_W,
  parameter int unsigned ALPHA    = STEP_ALPHA,
  parameter int unsigned BETA     = STEP_BETA,
  parameter int unsigned GAMMA    = STEP_GAMMA,
  parameter int unsigned DMAX_LO  = sscg_pkg::DMAX_LOW,
  parameter int unsigned DMIN_LO  = sscg_pkg::DMIN_LOW,
  parameter int unsigned DMAX_HI  = DMAX_HIGH,
  parameter int unsigned DMIN_HI  = DMIN_HIGH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ssc_en,
  input  logic           m0,
  output logic [1:0]     code,
  output logic [DMW-1:0] d,
  output logic [SMW-1:0] sm_count,
  output logic           sm_out,
  output logic           sign
);
  timeunit 1ps;
  timeprecision 1fs;

  slope_modulator #(.W(SMW), .K(K)) u_sm (
    .clk, .rst_n, .en(ssc_en), .sm_out, .sign, .count(sm_count)
  );

  division_modulator #(
    .W(DMW), .ALPHA(ALPHA), .BETA(BETA), .GAMMA(GAMMA),
    .DMAX_LOW(DMAX_LO), .DMIN_LOW(DMIN_LO), .DMAX_HI(DMAX_HI), .DMIN_HI(DMIN_HI)
  ) u_dm (
    .clk, .rst_n, .en(1'b1), .ssc_en, .m0, .sm_out, .sign, .d, .code
  );
endmodule
