// tb_loop_filter: checks the loop-filter model.
//
// A 10 uA current for 1 us deposits 10 pC; once settled, the control voltage
// must have risen by Q / (C1 + C2 + C3) = 10 pC / 3.22 nF = 3.106 mV. During
// the pulse the output must first rise faster than the final step would
// suggest (the R1 zero), and a negative pulse of the same charge must bring
// the voltage back.
module tb_loop_filter;
  timeunit 1ps;
  timeprecision 1fs;

  real icp = 0.0, vctrl;
  int checks = 0, failures = 0;

  loop_filter dut (.icp, .vctrl);

  task automatic expect_v(input real got, input real want, input real tol, input string what);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: %.6f V, expected %.6f V", what, got, want);
    end
  endtask

  initial begin
    real v0, dv, v_mid;
    #10_000;
    v0 = vctrl;
    expect_v(v0, 0.3, 1.0e-9, "initial voltage");
    icp = 10.0e-6;
    #500_000;
    v_mid = vctrl;
    #500_000;
    icp = 0.0;
    #20_000_000;
    dv = 10.0e-12 / (3.0e-9 + 200.0e-12 + 20.0e-12);
    expect_v(vctrl - v0, dv, dv * 0.01, "settled step after 10 pC");
    checks++;
    if (!(v_mid - v0 > 0.5 * dv)) begin failures++; $display("FAIL no proportional path: %.6f", v_mid - v0); end
    icp = -10.0e-6;
    #1_000_000;
    icp = 0.0;
    #20_000_000;
    expect_v(vctrl, v0, dv * 0.01, "back after -10 pC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
