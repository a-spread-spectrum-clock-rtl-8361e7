// tb_dm_counter: checks the division counter against a reference model.
//
// Random SM output bits and Sign values are applied in both modes; the model
// applies step gamma = 2 for a 1, alpha = 0 (M0 = 0) or beta = 1 (M0 = 1) for
// a 0, up when Sign = 1, down when Sign = 0, limited to [D_MIN, D_MAX] of the
// mode. Long runs of one sign check that the limits are reached and held,
// and ssc_en = 0 must force D_MAX.
module tb_dm_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ssc_en = 1'b1, m0 = 1'b1, sm_out = 1'b0, sign = 1'b1;
  logic [13:0] d;
  int checks = 0, failures = 0;
  int dm, n_sat_hi = 0, n_sat_lo = 0;

  dm_counter dut (.clk, .rst_n, .en, .ssc_en, .m0, .sm_out, .sign, .d);

  always #5 clk = ~clk;

  function automatic int model(int dv, bit mm0, bit s, bit sm, bit ssc);
    int hi = mm0 ? 16383 : 6554;
    int lo = mm0 ? 15646 : 6111;
    int st = sm ? 2 : (mm0 ? 1 : 0);
    int nx = s ? dv + st : dv - st;
    if (!ssc) return hi;
    if (nx > hi) nx = hi;
    if (nx < lo) nx = lo;
    return nx;
  endfunction

  task automatic step();
    int lo, hi;
    dm = model(dm, m0, sign, sm_out, ssc_en);
    @(posedge clk); #1;
    lo = m0 ? 15646 : 6111;
    hi = m0 ? 16383 : 6554;
    if (dm == hi) n_sat_hi++;
    if (dm == lo) n_sat_lo++;
    checks++;
    if (d != 14'(dm)) begin
      failures++;
      if (failures < 10) $display("FAIL m0=%0d sign=%0d sm=%0d d=%0d exp=%0d", m0, sign, sm_out, d, dm);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    dm = 0;
    for (int mode = 0; mode < 4; mode++) begin
      m0 = mode[0];
      for (int seg = 0; seg < 6; seg++) begin
        sign = seg[0];
        for (int t = 0; t < 400; t++) begin
          sm_out = 1'($urandom_range(0, 1));
          step();
        end
      end
    end
    // SSC off forces D_MAX
    ssc_en = 1'b0;
    repeat (5) step();
    ssc_en = 1'b1;
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("FAIL limits never reached"); end
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
