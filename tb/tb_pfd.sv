// tb_pfd: checks the phase-frequency detector model.
//
// Two 30 MHz clocks with a known skew: when the reference leads by 2 ns the
// UP pulse must last 2 ns plus the reset delay and DN only the reset delay;
// when the feedback leads, the reverse. With a faster reference (frequency
// error) UP must be high longer in total than DN.
module tb_pfd;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T = 33333.333;
  localparam real TRST = 150.0;

  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;
  real t_up = 0.0, t_dn = 0.0, t_last = 0.0;

  pfd #(.T_RST_PS(TRST)) dut (.ref_clk, .fb_clk, .rst_n, .up, .dn);

  // accumulate high time of up and dn
  real t_up_rise, t_dn_rise;
  always @(posedge up) t_up_rise = $realtime;
  always @(negedge up) t_up += $realtime - t_up_rise;
  always @(posedge dn) t_dn_rise = $realtime;
  always @(negedge dn) t_dn += $realtime - t_dn_rise;

  task automatic pair(input real t_ref, input real t_fb);
    fork
      begin #(t_ref); ref_clk = 1'b1; #(T / 2); ref_clk = 1'b0; end
      begin #(t_fb);  fb_clk = 1'b1;  #(T / 2); fb_clk = 1'b0; end
    join
    #(T / 2 - (t_ref > t_fb ? t_ref : t_fb));
  endtask

  task automatic expect_time(input real got, input real want, input string what);
    checks++;
    if (got < want - 1.0 || got > want + 1.0) begin
      failures++;
      $display("FAIL %s: %.1f ps, expected %.1f ps", what, got, want);
    end
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      t_up = 0; t_dn = 0;
      pair(1000.0, 3000.0);          // reference leads by 2 ns
      expect_time(t_up, 2000.0 + TRST, "UP width, ref leads");
      expect_time(t_dn, TRST, "DN width, ref leads");
    end
    for (int i = 0; i < 5; i++) begin
      t_up = 0; t_dn = 0;
      pair(3500.0, 1000.0);          // feedback leads by 2.5 ns
      expect_time(t_up, TRST, "UP width, fb leads");
      expect_time(t_dn, 2500.0 + TRST, "DN width, fb leads");
    end
    // frequency error: reference 10 % faster than feedback
    t_up = 0; t_dn = 0;
    fork
      repeat (40) begin ref_clk = 1'b1; #(T * 0.45); ref_clk = 1'b0; #(T * 0.45); end
      repeat (36) begin fb_clk = 1'b1; #(T * 0.5); fb_clk = 1'b0; #(T * 0.5); end
    join
    checks++;
    if (!(t_up > 4.0 * t_dn)) begin failures++; $display("FAIL frequency detection: up %.0f dn %.0f", t_up, t_dn); end
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
