// loop_filter: behavioural model of the third-order passive loop filter (not
// synthesizable).
//
// The charge-pump current flows into node v1, which holds C2 to ground and
// the series R1-C1 branch that gives the stabilising zero; R3 and C3 then add
// a third pole that attenuates reference and sigma-delta ripple before the
// VCO input. State equations, integrated with forward Euler:
//   dvc1/dt = (v1 - vc1) / (R1 C1)
//   dv1/dt  = (icp - (v1 - vc1)/R1 - (v1 - vctrl)/R3) / C2
//   dvc3/dt = (v1 - vctrl) / (R3 C3)
// The state advances whenever icp changes and at least every DT_PS, so the
// charge of each UP/DN pulse is integrated over its exact duration.
// The design gives only "third order" and the 300 kHz loop bandwidth; the
// component values are this model's, chosen for about 300 kHz bandwidth and
// 60 degrees phase margin in the 540 MHz mode (40 uA, division 18,
// 1.2 GHz/V).
// Interface: icp in amperes, vctrl in volts (starts at V_INIT).
module loop_filter #(
  parameter real R1     = 750.0,
  parameter real C1     = 3.0e-9,
  parameter real C2     = 200.0e-12,
  parameter real R3     = 1000.0,
  parameter real C3     = 20.0e-12,
  parameter real DT_PS  = 50.0,
  parameter real V_INIT = 0.3
) (
  input  real icp,
  output real vctrl
);
  timeunit 1ps;
  timeprecision 1fs;

  real vc1, v1, v3, t_last, i_now;

  // Advance the filter state from t_last to now with current i_now.
  task automatic advance();
    real h, dt, ir1, ir3;
    h = $realtime - t_last;
    while (h > 0.0) begin
      dt  = (h > DT_PS) ? DT_PS : h;
      ir1 = (v1 - vc1) / R1;
      ir3 = (v1 - v3) / R3;
      vc1 = vc1 + ir1 * dt * 1.0e-12 / C1;
      v1  = v1 + (i_now - ir1 - ir3) * dt * 1.0e-12 / C2;
      v3  = v3 + ir3 * dt * 1.0e-12 / C3;
      h   = h - dt;
    end
    t_last = $realtime;
    vctrl  = v3;
  endtask

  initial begin
    vc1 = V_INIT; v1 = V_INIT; v3 = V_INIT;
    vctrl = V_INIT; t_last = 0.0; i_now = 0.0;
  end

  always begin
    #(DT_PS);
    advance();
  end

  always @(icp) begin
    advance();
    i_now = icp;
  end
endmodule
