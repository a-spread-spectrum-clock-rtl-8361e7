// tb_division_modulator: checks DM counter plus MASH 1-1 together.
//
// Random SM bits are applied with Sign alternating every 496 cycles. The
// division word must follow a reference model of the counter, and over each
// 2^12-cycle block the sum of (code - 1) must track the sum of D / 2^14
// within 3, i.e. the modulus code carries the division word to the divider.
module tb_division_modulator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ssc_en = 1'b1, m0 = 1'b1, sm_out = 1'b0, sign = 1'b1;
  logic [13:0] d;
  logic [1:0] code;
  int checks = 0, failures = 0;

  division_modulator dut (.clk, .rst_n, .en, .ssc_en, .m0, .sm_out, .sign, .d, .code);

  always #5 clk = ~clk;

  function automatic int model(int dv, bit mm0, bit s, bit sm);
    int hi = mm0 ? 16383 : 6554;
    int lo = mm0 ? 15646 : 6111;
    int nx = s ? dv + (sm ? 2 : (mm0 ? 1 : 0)) : dv - (sm ? 2 : (mm0 ? 1 : 0));
    return (nx > hi) ? hi : (nx < lo) ? lo : nx;
  endfunction

  initial begin
    int dm;
    longint dsum;
    int csum;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    dm = 0;
    for (int mode = 0; mode < 2; mode++) begin
      m0 = ~mode[0];
      for (int blk = 0; blk < 4; blk++) begin
        dsum = 0; csum = 0;
        for (int t = 0; t < 4096; t++) begin
          sign = ((t / 496) % 2) == 0;
          sm_out = 1'($urandom_range(0, 1));
          dm = model(dm, m0, sign, sm_out);
          @(posedge clk); #1;
          checks++;
          if (d != 14'(dm)) begin failures++; if (failures < 10) $display("FAIL d=%0d exp=%0d", d, dm); end
          dsum += d;
          csum += int'(code) - 1;
        end
        checks++;
        // code lags d by two clocks; allow the edge terms
        if (csum * 16384 < dsum - 3 * 16384 || csum * 16384 > dsum + 3 * 16384) begin
          failures++;
          $display("FAIL block %0d: code sum %0d, D sum / 2^14 %0d", blk, csum, dsum / 16384);
        end
      end
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
