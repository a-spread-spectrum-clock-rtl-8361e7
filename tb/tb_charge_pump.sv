// tb_charge_pump: checks the charge-pump model for every UP/DN state and
// every current selection: +I for UP alone, -I for DN alone, 0 otherwise,
// with I = 10, 20 or 40 uA.
module tb_charge_pump;
  timeunit 1ps;
  timeprecision 1fs;
  import sscg_pkg::*;

  logic up, dn;
  cp_sel_e sel;
  real icp;
  int checks = 0, failures = 0;

  charge_pump dut (.up, .dn, .sel, .icp);

  initial begin
    cp_sel_e sels[3] = '{CP_10UA, CP_20UA, CP_40UA};
    real     amps[3] = '{10.0e-6, 20.0e-6, 40.0e-6};
    for (int s = 0; s < 3; s++)
      for (int u = 0; u < 2; u++)
        for (int d = 0; d < 2; d++) begin
          real want;
          sel = sels[s]; up = 1'(u); dn = 1'(d);
          #10;
          want = (u - d) * amps[s];
          checks++;
          if (icp > want + 1.0e-9 || icp < want - 1.0e-9) begin
            failures++;
            $display("FAIL sel=%b up=%0d dn=%0d icp=%g expected %g", sel, u, d, icp, want);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
