// tb_sdm1: checks the first-order sigma-delta modulator.
//
// For random constant inputs x the output must contain exactly x ones in
// every 2^8 consecutive cycles (after the first), and each output bit must
// equal the carry of an accumulator modelled here. A ramp input is also
// compared cycle by cycle with the model.
module tb_sdm1;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] x = '0;
  logic y;
  int checks = 0, failures = 0;
  int acc_m;

  sdm1 #(.W(8)) dut (.clk, .rst_n, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    acc_m = 0;
    for (int trial = 0; trial < 12; trial++) begin
      int ones;
      x = (trial == 0) ? 8'd248 : (trial == 1) ? 8'd0 : (trial == 2) ? 8'd255 : 8'($urandom_range(0, 255));
      ones = 0;
      for (int t = 0; t < 256; t++) begin
        bit exp_y;
        @(posedge clk); #1;
        exp_y = (acc_m + x) >= 256;
        acc_m = (acc_m + x) % 256;
        ones += y;
        checks++;
        if (y != exp_y) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d t=%0d y=%0d exp=%0d", x, t, y, exp_y);
        end
      end
      checks++;
      if (ones != x) begin
        failures++;
        $display("FAIL x=%0d ones=%0d in 256 cycles", x, ones);
      end
    end
    for (int t = 0; t < 600; t++) begin
      bit exp_y;
      x = 8'(t);
      @(posedge clk); #1;
      exp_y = (acc_m + x) >= 256;
      acc_m = (acc_m + x) % 256;
      checks++;
      if (y != exp_y) begin failures++; if (failures < 10) $display("FAIL ramp t=%0d", t); end
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
