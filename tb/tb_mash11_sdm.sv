// tb_mash11_sdm: checks the MASH 1-1 modulator and modulus mapping.
//
// For several constant inputs x the sum of (code - 1) over 2^14 cycles must
// be within 2 of x (average x / 2^14), every code must lie in 0..3, and the
// output must match a two-accumulator reference model cycle by cycle. The
// error of the running sum stays bounded (second-order shaping).
module tb_mash11_sdm;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [13:0] x = '0;
  logic [1:0] code;
  int checks = 0, failures = 0;
  int s1, s2, c0, c2;

  mash11_sdm #(.W(14)) dut (.clk, .rst_n, .en, .x, .code);

  always #5 clk = ~clk;

  initial begin
    int xs[6] = '{16383, 15646, 6554, 6111, 8192, 1};
    int exp_code, y, c1, sum, n_code[4];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    s1 = 0; s2 = 0; c0 = 0; c2 = 0;
    n_code = '{default: 0};
    for (int i = 0; i < 6; i++) begin
      int max_err;
      x = 14'(xs[i]);
      sum = 0; max_err = 0;
      for (int t = 0; t < 16384; t++) begin
        // model: registered outputs computed from the state before the edge
        c1 = (s2 + s1) >= 16384;
        y = c0 + c1 - c2;
        exp_code = y + 1;
        c2 = c1;
        s2 = (s2 + s1) % 16384;
        c0 = (s1 + x) >= 16384;
        s1 = (s1 + x) % 16384;
        @(posedge clk); #1;
        n_code[code]++;
        checks++;
        if (code != 2'(exp_code)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d t=%0d code=%0d exp=%0d", x, t, code, exp_code);
        end
        sum += int'(code) - 1;
        if (((t + 1) * x) / 16384 - sum > max_err) max_err = ((t + 1) * x) / 16384 - sum;
        if (sum - ((t + 1) * x) / 16384 > max_err) max_err = sum - ((t + 1) * x) / 16384;
      end
      checks++;
      if (max_err > 3) begin failures++; $display("FAIL x=%0d running error %0d", x, max_err); end
    end
    checks++;
    if (n_code[0] == 0 || n_code[3] == 0) begin failures++; $display("FAIL extreme codes unused"); end
    $display("codes used: %0d %0d %0d %0d", n_code[0], n_code[1], n_code[2], n_code[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
