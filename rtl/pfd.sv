// pfd: behavioural model of the phase-frequency detector (not synthesizable).
//
// Classic three-state detector: a rising edge of ref_clk sets UP, a rising
// edge of fb_clk sets DN, and once both are set they are cleared together
// after a reset delay T_RST_PS. The short overlap pulse at lock removes the
// dead zone. The design only names this block; the three-state structure and
// the 150 ps reset delay are this model's choice.
// Interface: up/dn are the pulse outputs to the charge pump; rst_n clears
// both.
module pfd #(
  parameter real T_RST_PS = 150.0
) (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps;
  timeprecision 1fs;

  logic clr, clear;

  assign clear = clr || !rst_n;

  always_ff @(posedge ref_clk or posedge clear) begin
    if (clear) up <= 1'b0;
    else       up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clear) begin
    if (clear) dn <= 1'b0;
    else       dn <= 1'b1;
  end

  // Reset path: AND of the two flags, delayed by T_RST_PS.
  assign #(T_RST_PS) clr = up && dn;
endmodule
