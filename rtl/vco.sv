// vco: behavioural model of the ring VCO (not synthesizable).
//
// The circuit is a four-stage differential ring of source-coupled delay
// cells with symmetric loads, biased by a replica-bias loop that keeps the
// gain linear over process, voltage and temperature. This model keeps only
// that linear tuning law, f = F0_HZ + KVCO_HZ_PER_V * vctrl, clamped to
// [F_MIN_HZ, F_MAX_HZ], and recomputes the half period at every edge.
// The 1.2 GHz/V gain is the design's; the offset and limits are this
// model's.
// Interface: vctrl in volts; clk is the VCO output (the SSCG output clock);
// en = 0 stops the ring with clk low.
module vco #(
  parameter real KVCO_HZ_PER_V = 1.2e9,
  parameter real F0_HZ         = 0.0,
  parameter real F_MIN_HZ      = 50.0e6,
  parameter real F_MAX_HZ      = 1.2e9
) (
  input  logic en,
  input  real  vctrl,
  output logic clk
);
  timeunit 1ps;
  timeprecision 1fs;

  real f_hz;

  initial clk = 1'b0;

  always begin
    if (!en) begin
      clk = 1'b0;
      @(posedge en);
    end else begin
      f_hz = F0_HZ + KVCO_HZ_PER_V * vctrl;
      if (f_hz < F_MIN_HZ) f_hz = F_MIN_HZ;
      if (f_hz > F_MAX_HZ) f_hz = F_MAX_HZ;
      #(0.5e12 / f_hz);
      clk = ~clk;
    end
  end
endmodule
