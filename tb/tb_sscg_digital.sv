// tb_sscg_digital: checks the digital part of the SSCG in open loop.
//
// An ideal VCO clock at the nominal rate (540, 270 or 162 MHz) drives the
// block. Every feedback period is measured in VCO cycles and must equal
// mult * (N - 1 + code), where code is the modulus the modulator produced
// at the start of the previous feedback period (the divider samples it at
// its reload, which is the edge that starts the period; mult = 2 with
// M1 = 1). Over one modulation
// period (992 feedback cycles, from Sign edge to Sign edge) the average
// division must lie between N + D_MIN/2^14 and N + D_MAX/2^14, and the
// charge-pump select must match the rate.
module tb_sscg_digital;
  timeunit 1ps;
  timeprecision 1fs;
  import sscg_pkg::*;

  logic vco_clk = 1'b0, rst_n = 1'b1, m1 = 1'b1, m0 = 1'b1, ssc_en = 1'b1;
  logic fb_clk, sm_out, sign;
  cp_sel_e cp_sel;
  logic [1:0] div_code;
  logic [3:0] div_ratio;
  logic [13:0] dm_value;
  logic [7:0] sm_count;
  int checks = 0, failures = 0;
  real t_half = 925.926;

  sscg_digital dut (.*);

  always #(t_half) vco_clk = ~vco_clk;

  int n_vco = 0, prev_code = -1, prev2_code = -1, mult = 2, nbase = 8;
  int sign_edges = 0, fb_since_edge = 0, vco_since_edge = 0, period_fb = 0;
  real avg_div = 0.0;
  logic sign_q = 1'b1;
  bit  active = 1'b0;

  always @(posedge vco_clk) begin #1; n_vco++; end

  always @(posedge fb_clk) begin
    #2;
    if (active) begin
      if (prev2_code >= 0) begin
        checks++;
        if (n_vco != mult * (nbase - 1 + prev2_code)) begin
          failures++;
          if (failures < 10) $display("FAIL period %0d VCO cycles, expected %0d", n_vco, mult * (nbase - 1 + prev2_code));
        end
      end
      fb_since_edge++;
      vco_since_edge += n_vco;
      if (sign != sign_q) begin
        if (sign_edges > 0) begin
          period_fb = fb_since_edge;
          avg_div   = real'(vco_since_edge) / fb_since_edge / mult;
        end
        sign_edges++;
        fb_since_edge = 0; vco_since_edge = 0;
      end
      sign_q = sign;
    end
    prev2_code = prev_code;
    prev_code  = int'(div_code);
    n_vco = 0;
  end

  task automatic run(input logic mm1, input logic mm0, input real f_mhz, input int nb,
                     input int dmin, input int dmax, input cp_sel_e exp_sel);
    rst_n = 1'b0; active = 1'b0;
    m1 = mm1; m0 = mm0; t_half = 0.5e6 / f_mhz;
    mult = mm1 ? 2 : 1; nbase = nb;
    #20_000;
    rst_n = 1'b1;
    prev_code = -1; prev2_code = -1; sign_edges = 0; sign_q = 1'b1; period_fb = 0;
    repeat (3) @(posedge fb_clk);
    active = 1'b1;
    // three Sign edges: two halves of a modulation period measured
    wait (sign_edges == 3);
    active = 1'b0;
    checks++;
    if (period_fb != 496) begin failures++; $display("FAIL Sign half period %0d feedback cycles", period_fb); end
    checks++;
    if (avg_div < nb + dmin / 16384.0 || avg_div > nb + dmax / 16384.0) begin
      failures++;
      $display("FAIL average division %.5f outside %.5f..%.5f", avg_div, nb + dmin / 16384.0, nb + dmax / 16384.0);
    end
    checks++;
    if (cp_sel != exp_sel) begin failures++; $display("FAIL cp_sel %b", cp_sel); end
    $display("M1=%0d M0=%0d: average division over a half period %.5f", mm1, mm0, avg_div);
  endtask

  initial begin
    run(1'b1, 1'b1, 540.0, 8, 15646, 16383, CP_40UA);
    run(1'b0, 1'b1, 270.0, 8, 15646, 16383, CP_20UA);
    run(1'b0, 1'b0, 162.0, 5, 6111, 6554, CP_10UA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
