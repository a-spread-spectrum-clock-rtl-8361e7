// tb_dual_sdm_modulator: checks the Hershey-Kiss profile generator.
//
// In each mode the division word D is recorded over two modulation periods.
// Expected properties, worked out from the profile equations:
//  - Sign changes every 2*K = 496 cycles (modulation period 992 cycles);
//  - D spans [D_MIN, D_MAX] of the mode (443 or 737 codes), within 2 codes
//    at the end opposite to the last clamp;
//  - the slope of D near the cusps (first and last eighth of a half period,
//    slope counter near K) is close to gamma*K/256 + (1-K/256)*beta-or-alpha,
//    and near the middle (counter near 0) close to beta or alpha, so the
//    profile is curved, not triangular;
//  - the mean of (code - 1) over a period equals mean(D) / 2^14 within 4/992;
//  - with ssc_en = 0, D sits at D_MAX and the code averages D_MAX / 2^14.
module tb_dual_sdm_modulator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, ssc_en = 1'b1, m0 = 1'b1;
  logic [1:0] code;
  logic [13:0] d;
  logic [7:0] sm_count;
  logic sm_out, sign;
  int checks = 0, failures = 0;

  dual_sdm_modulator dut (.clk, .rst_n, .ssc_en, .m0, .code, .d, .sm_count, .sm_out, .sign);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bit mm0);
    int dv[$], edges[$], dmin, dmax, lo, hi;
    real s_end, s_mid, base, s_end_exp, s_mid_exp, csum, dsum;
    logic sign_q;
    m0 = mm0;
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    lo = mm0 ? 15646 : 6111;
    hi = mm0 ? 16383 : 6554;
    base = mm0 ? 1.0 : 0.0;
    sign_q = sign;
    csum = 0; dsum = 0;
    for (int t = 0; t < 3 * 992; t++) begin
      @(posedge clk); #1;
      dv.push_back(int'(d));
      if (sign != sign_q) edges.push_back(t);
      sign_q = sign;
      if (t >= 992 && t < 2 * 992) begin
        csum = csum + real'(int'(code) - 1);
        dsum += real'(d) / 16384.0;
      end
    end
    check(edges.size() >= 4, "Sign edges");
    if (edges.size() >= 4) begin
      check(edges[1] - edges[0] == 496 && edges[2] - edges[1] == 496, "Sign half period 2K");
      check(edges[3] - edges[1] == 992, "modulation period 4K");
    end
    dmin = 99999; dmax = 0;
    for (int t = 992; t < 3 * 992; t++) begin
      if (dv[t] < dmin) dmin = dv[t];
      if (dv[t] > dmax) dmax = dv[t];
    end
    check(dmin >= lo && dmin <= lo + 2 && dmax <= hi && dmax >= hi - 2,
          $sformatf("D range %0d..%0d, expected %0d..%0d", dmin, dmax, lo, hi));
    // Slopes on the rising half that starts at edges[1] (Sign becomes 1 there
    // or 0: pick the half where D rises).
    begin
      int s0 = (dv[edges[1] + 10] > dv[edges[1]]) ? edges[1] : edges[2];
      // near cusp: cycles 2..62 of the half; middle: 217..279 (counter near 0)
      s_end = (dv[s0 + 62] - dv[s0 + 2]) / 60.0;
      s_mid = (dv[s0 + 278] - dv[s0 + 218]) / 60.0;
      // counter is about K - 32 on average in the first window
      s_end_exp = (2.0 - base) * (248.0 - 32.0) / 256.0 + base;
      // counter averages about 16 in the middle window
      s_mid_exp = (2.0 - base) * 16.0 / 256.0 + base;
      $display("m0=%0d: slope near cusp %.3f (exp %.3f), near middle %.3f (exp %.3f)", mm0, s_end, s_end_exp, s_mid, s_mid_exp);
      check(s_end > s_end_exp - 0.1 && s_end < s_end_exp + 0.1, "slope near the cusp");
      check(s_mid > s_mid_exp - 0.1 && s_mid < s_mid_exp + 0.1, "slope near the middle");
    end
    check(csum > dsum - 4.0 && csum < dsum + 4.0,
          $sformatf("code mean %.1f vs D mean %.1f over a period", csum, dsum));
  endtask

  initial begin
    run(1'b1);
    run(1'b0);
    // SSC off
    begin
      real csum;
      ssc_en = 1'b0; m0 = 1'b1;
      repeat (4) @(posedge clk);
      csum = 0;
      for (int t = 0; t < 16384; t++) begin
        @(posedge clk); #1;
        csum = csum + real'(int'(code) - 1);
        if (t == 0) check(d == 14'd16383, "SSC off holds D_MAX");
      end
      check(csum > 16383.0 - 3.0 && csum < 16383.0 + 3.0, "SSC off code average");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
