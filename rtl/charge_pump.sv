// charge_pump: behavioural model of the switched-current charge pump (not
// synthesizable).
//
// Three matched source/sink pairs of 10, 20 and 40 uA; the one-hot select
// from the CP selector enables one pair. While UP is high the source current
// flows into the loop filter, while DN is high the sink current flows out;
// both together cancel. In the circuit a unity-gain buffer holds the idle
// current-source nodes at the output voltage so that switching causes no
// charge sharing; this ideal model has no such glitches to begin with.
// Currents follow the design; mismatch and leakage are not modelled.
// Interface: icp is the output current in amperes (positive into the filter).
module charge_pump
  import sscg_pkg::*;
#(
  parameter real I_UNIT = 10.0e-6   // smallest source, amperes
) (
  input  logic    up,
  input  logic    dn,
  input  cp_sel_e sel,
  output real     icp
);
  timeunit 1ps;
  timeprecision 1fs;

  real i_src;

  always_comb begin
    i_src = 0.0;
    if (sel[0]) i_src = i_src + I_UNIT;
    if (sel[1]) i_src = i_src + 2.0 * I_UNIT;
    if (sel[2]) i_src = i_src + 4.0 * I_UNIT;
    icp = (up ? i_src : 0.0) - (dn ? i_src : 0.0);
  end
endmodule
