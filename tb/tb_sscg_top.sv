// tb_sscg_top: closed-loop test of the whole spread-spectrum clock generator
// at its default parameters.
//
// A 30 MHz reference drives the PLL. For each rate (540, 270, 162 MHz) the
// loop is given time to lock, then the output frequency is measured over
// windows of WIN output cycles for two modulation periods. Expected values
// are computed here from the rate table: the top of the profile is
// mult * 30 MHz * (N + D_MAX/2^14) and the bottom mult * 30 MHz *
// (N + D_MIN/2^14). The test checks both extremes, the down-spread, the
// modulation period (time between Sign edges, 4*K reference periods), that
// all four divider moduli are used, and an SSC-off run where the frequency
// must stay at the top of the profile. Mechanisms exercised are counted and
// each one that never happened is a failure.
module tb_sscg_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_REF_PS = 1.0e12 / 30.0e6;
  localparam int  WIN      = 400;

  logic        ref_clk = 1'b0, rst_n = 1'b1, m1 = 1'b1, m0 = 1'b1, ssc_en = 1'b1;
  logic        clk_out, fb_clk, sm_out, sign;
  logic [1:0]  div_code;
  logic [3:0]  div_ratio;
  logic [13:0] dm_value;
  logic [7:0]  sm_count;
  real         vctrl;

  int checks = 0, failures = 0;

  sscg_top dut (.*);

  always #(T_REF_PS / 2.0) ref_clk = ~ref_clk;

  // Assert reset with a real falling edge: the feedback-clock domain has no
  // clock edges during reset, so only that edge initialises it.
  initial rst_n = 1'b0;

  // ---- windowed frequency of the output clock ----
  int  ncyc = 0;
  real t_win = 0.0, f_now = 0.0, f_max = 0.0, f_min = 1.0e12;
  bit  measuring = 1'b0;

  always @(posedge clk_out) begin
    ncyc++;
    if (ncyc == WIN) begin
      f_now = WIN * 1.0e12 / ($realtime - t_win);
      t_win = $realtime;
      ncyc  = 0;
      if (measuring) begin
        if (f_now > f_max) f_max = f_now;
        if (f_now < f_min) f_min = f_now;
      end
    end
  end

  // ---- mechanisms ----
  int n_sign_toggle = 0, n_code[4] = '{default: 0}, n_mode_switch = 0, n_ssc_off = 0;
  int n_dm_at_max = 0, n_dm_at_min = 0;
  real t_sign_rise = 0.0, t_period = 0.0;
  logic sign_q = 1'b1;

  always @(posedge fb_clk) if (rst_n) begin
    n_code[div_code]++;
    if (sign != sign_q) begin
      n_sign_toggle++;
      if (sign) begin
        if (t_sign_rise > 0.0) t_period = $realtime - t_sign_rise;
        t_sign_rise = $realtime;
      end
    end
    sign_q = sign;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_mode(input logic mm1, input logic mm0, input logic ssc,
                          input real mult, input int n, input int dmax, input int dmin);
    real f_hi, f_lo, spread;
    int  at_max, at_min;
    if (m1 != mm1 || m0 != mm0) n_mode_switch++;
    m1 = mm1; m0 = mm0; ssc_en = ssc;
    if (!ssc) n_ssc_off++;
    // lock
    #(100_000_000.0);
    t_period = 0.0; t_sign_rise = 0.0;
    f_max = 0.0; f_min = 1.0e12;
    measuring = 1'b1;
    at_max = 0; at_min = 0;
    repeat (2 * 992) begin
      @(posedge ref_clk);
      if (dm_value == 14'(dmax)) at_max++;
      if (dm_value == 14'(dmin)) at_min++;
    end
    measuring = 1'b0;
    n_dm_at_max += (at_max > 0);
    n_dm_at_min += (at_min > 0);
    f_hi = mult * 30.0e6 * (n + dmax / 16384.0);
    f_lo = ssc ? mult * 30.0e6 * (n + dmin / 16384.0) : f_hi;
    spread = (f_max - f_min) / f_max;
    $display("mode M1=%0d M0=%0d ssc=%0d: f_max %.4f MHz (exp %.4f)  f_min %.4f MHz (exp %.4f)  spread %.0f ppm  mod period %.3f us  vctrl %.3f V",
             mm1, mm0, ssc, f_max / 1e6, f_hi / 1e6, f_min / 1e6, f_lo / 1e6, spread * 1e6, t_period / 1e6, vctrl);
    check(f_max < f_hi * 1.0008 && f_max > f_hi * 0.9992, "profile top frequency");
    check(f_min < f_lo * 1.0008 && f_min > f_lo * 0.9992, "profile bottom frequency");
    if (ssc) begin
      check(spread > 0.0040 && spread < 0.0060, "down-spread near 5000 ppm");
      // 4*K = 992 reference periods = 33.07 us (30.24 kHz)
      check(t_period > 992 * T_REF_PS * 0.999 && t_period < 992 * T_REF_PS * 1.001, "modulation period");
    end else begin
      check(spread < 0.0008, "no spreading with SSC off");
    end
  endtask

  initial begin
    #(200_000.0);
    rst_n = 1'b1;
    run_mode(1'b1, 1'b1, 1'b1, 2.0, 8, 16383, 15646);   // 540 MHz
    run_mode(1'b1, 1'b1, 1'b0, 2.0, 8, 16383, 15646);   // 540 MHz, SSC off
    run_mode(1'b0, 1'b1, 1'b1, 1.0, 8, 16383, 15646);   // 270 MHz
    run_mode(1'b0, 1'b0, 1'b1, 1.0, 5, 6554, 6111);     // 162 MHz
    check(n_sign_toggle > 0, "Sign toggled");
    for (int c = 0; c < 4; c++) check(n_code[c] > 0, $sformatf("modulus N-1+%0d used", c));
    check(n_mode_switch >= 2, "rate switches");
    check(n_ssc_off > 0, "SSC-off run");
    check(n_dm_at_max > 0 && n_dm_at_min > 0, "division word reached both limits");
    $display("mechanisms: sign toggles %0d, codes %0d/%0d/%0d/%0d, rate switches %0d, ssc-off runs %0d, D at max %0d, D at min %0d",
             n_sign_toggle, n_code[0], n_code[1], n_code[2], n_code[3], n_mode_switch, n_ssc_off, n_dm_at_max, n_dm_at_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_200_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
