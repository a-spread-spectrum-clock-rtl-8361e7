// dm_counter: the division counter of the division modulator.
//
// Holds the 14-bit fractional division word D (loop division = N + D / 2^14).
// Every enabled clock it moves by one step: up when Sign = 1, down when
// Sign = 0. The step is GAMMA when the slope modulator output is 1, otherwise
// ALPHA (M0 = 0, 162 MHz) or BETA (M0 = 1, 270/540 MHz). Because the density
// of 1s follows the slope counter, the step size, and hence the frequency
// slope, grows and shrinks gradually: this is what bends the triangle into
// the Hershey-Kiss shape.
// D is kept inside [D_MIN, D_MAX] of the selected mode, which fixes the spread
// at the design's 0.5 % and also pulls D into range after a mode change.
// With ssc_en = 0 D is held at D_MAX, the unspread (nominal) frequency.
// Interface: inputs are sampled on enabled clk edges; d is registered. The
// steps, widths and limits are the design's; the saturation at the limits,
// the reset value (0, so the first cycle lands on D_MIN) and ssc_en are this
// implementation's.
module dm_counter #(
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
  output logic [W-1:0] d
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W+1:0] step, dmax, dmin, sum, nxt;

  always_comb begin
    dmax = m0 ? (W+2)'(DMAX_HI) : (W+2)'(DMAX_LOW);
    dmin = m0 ? (W+2)'(DMIN_HI) : (W+2)'(DMIN_LOW);
    if (sm_out)  step = (W+2)'(GAMMA);
    else if (m0) step = (W+2)'(BETA);
    else         step = (W+2)'(ALPHA);

    // Two guard bits keep the sum and difference from wrapping before the
    // comparison with the limits.
    if (sign) sum = {2'b00, d} + step;
    else      sum = {2'b00, d} - step;

    if (!ssc_en)                          nxt = dmax;
    else if (!sign && ({2'b00, d} < dmin + step)) nxt = dmin;  // would go below D_MIN
    else if (sum > dmax)                  nxt = dmax;
    else if (sum < dmin)                  nxt = dmin;
    else                                  nxt = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= nxt[W-1:0];
  end

  // Once running, D stays inside the window of the selected mode.
  logic started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  started <= 1'b0;
    else if (en) started <= 1'b1;
  end
  a_d_window: assert property (@(posedge clk) disable iff (!rst_n || !started)
                               $stable(m0) |-> ({2'b00, d} >= dmin && {2'b00, d} <= dmax));

  initial assert (DMAX_HI < (1 << W) && DMAX_LOW < (1 << W) && DMIN_LOW <= DMAX_LOW && DMIN_HI <= DMAX_HI)
    else $error("dm_counter: limits out of range");
endmodule
