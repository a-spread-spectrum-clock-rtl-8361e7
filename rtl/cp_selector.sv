// cp_selector: charge-pump current selection from the rate switches.
//
// Each output rate uses its own charge-pump current so that the loop
// bandwidth stays the same although the loop division differs:
//   M0 = 0         -> 10 uA (162 MHz, loop division about 5.4)
//   M1 = 0, M0 = 1 -> 20 uA (270 MHz, loop division about 9)
//   M1 = 1, M0 = 1 -> 40 uA (540 MHz, loop division about 18)
// The output is a one-hot enable, one bit per current source pair.
// Interface: combinational. The currents and their pairing with the rates
// are the design's; treating M1 = 1, M0 = 0 (not a defined rate) like the
// other M0 = 0 case is this implementation's.
module cp_selector
  import sscg_pkg::*;
(
  input  logic    m1,
  input  logic    m0,
  output cp_sel_e sel
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    unique case ({m1, m0})
      2'b01:   sel = CP_20UA;
      2'b11:   sel = CP_40UA;
      default: sel = CP_10UA;
    endcase
  end
endmodule
