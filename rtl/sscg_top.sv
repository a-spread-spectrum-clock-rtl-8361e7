// sscg_top: spread-spectrum clock generator for DisplayPort 1.2.
//
// A fractional-N PLL locks a VCO to N + D/2^14 times the 30 MHz reference
// (twice that in the 540 MHz mode, where the VCO is halved before the
// divider). The dual sigma-delta modulator sweeps D along a Hershey-Kiss
// profile with period 4*K = 992 reference cycles (30.24 kHz), giving 0.5 %
// down-spread at 162, 270 or 540 MHz selected by {M1, M0} = 00, 01, 11.
// The digital part (sscg_digital) is synthesizable RTL; the phase detector,
// charge pump, loop filter and VCO are behavioural models so that the whole
// loop can be simulated.
// Interface: ref_clk 30 MHz; rst_n active low (holds the digital part; the
// VCO keeps running so that every register sees reset); ssc_en = 0 gives
// the unspread clock. vctrl is the analog
// control voltage, brought out for observation.
module sscg_top
  import sscg_pkg::*;
(
  input  logic             ref_clk,
  input  logic             rst_n,
  input  logic             m1,
  input  logic             m0,
  input  logic             ssc_en,
  output logic             clk_out,
  output logic             fb_clk,
  output logic [1:0]       div_code,
  output logic [3:0]       div_ratio,
  output logic [DM_W-1:0]  dm_value,
  output logic [SM_W-1:0]  sm_count,
  output logic             sm_out,
  output logic             sign,
  output real              vctrl
);
  timeunit 1ps;
  timeprecision 1fs;

  logic    up, dn;
  cp_sel_e cp_sel;
  real     icp;

  pfd u_pfd (
    .ref_clk, .fb_clk, .rst_n, .up, .dn
  );

  charge_pump u_cp (
    .up, .dn, .sel(cp_sel), .icp
  );

  loop_filter u_lf (
    .icp, .vctrl
  );

  vco u_vco (
    .en(1'b1), .vctrl, .clk(clk_out)
  );

  sscg_digital u_dig (
    .vco_clk(clk_out), .rst_n, .m1, .m0, .ssc_en,
    .fb_clk, .cp_sel, .div_code, .div_ratio, .dm_value, .sm_count, .sm_out, .sign
  );
endmodule
