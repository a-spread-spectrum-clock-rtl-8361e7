// sscg_digital: digital part of the spread-spectrum clock generator.
//
// The VCO clock enters the loop-path selector (divide by 2 when M1 = 1),
// then the multi-modulus divider, whose output is both the feedback clock for
// the phase detector and the clock of the dual sigma-delta modulator. The
// modulator supplies the divider's modulus code for each feedback period, so
// the average loop division follows the Hershey-Kiss profile
// N + D(t) / 2^14. The charge-pump current select is decoded from M1, M0.
// Interface: vco_clk in, fb_clk out (about 30 MHz when locked); m1, m0 and
// ssc_en are static switches. Observability outputs are registered.
module sscg_digital
  import sscg_pkg::*;
(
  input  logic             vco_clk,
  input  logic             rst_n,
  input  logic             m1,
  input  logic             m0,
  input  logic             ssc_en,
  output logic             fb_clk,
  output cp_sel_e          cp_sel,
  output logic [1:0]       div_code,
  output logic [3:0]       div_ratio,
  output logic [DM_W-1:0]  dm_value,
  output logic [SM_W-1:0]  sm_count,
  output logic             sm_out,
  output logic             sign
);
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_mmd;

  loop_path_sel u_path (
    .vco_clk, .rst_n, .m1, .clk_mmd
  );

  mmd #(.N_LOW(N_LOW), .N_HIGH(N_HIGH), .CW(4)) u_mmd (
    .clk(clk_mmd), .rst_n, .m0, .code(div_code), .div_out(fb_clk), .ratio(div_ratio)
  );

  dual_sdm_modulator u_mod (
    .clk(fb_clk), .rst_n, .ssc_en, .m0,
    .code(div_code), .d(dm_value), .sm_count, .sm_out, .sign
  );

  cp_selector u_cpsel (
    .m1, .m0, .sel(cp_sel)
  );
endmodule
