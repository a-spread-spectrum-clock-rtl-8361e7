// tb_sm_counter: checks the slope counter against an independent model.
//
// The expected count is derived from the cycle index alone: with period 2*K
// the count is |K - (t mod 2K)| mirrored, i.e. K - t for the first K steps
// and t - K for the next K. Sign starts at 1 and must toggle exactly when the
// count returns to K, every 2*K cycles. A hold cycle with en = 0 is also
// checked. Run at the design's K = 248 and at a small K = 5.
module tb_sm_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int K = 248;
  localparam int KS = 5;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] count, count_s;
  logic sign, sign_s;
  int checks = 0, failures = 0;

  sm_counter #(.W(8), .K(K))  dut   (.clk, .rst_n, .en, .count, .sign);
  sm_counter #(.W(3), .K(KS)) dut_s (.clk, .rst_n, .en, .count(count_s[2:0]), .sign(sign_s));
  assign count_s[7:3] = '0;

  always #5 clk = ~clk;

  function automatic int exp_count(int t, int k);
    int p = t % (2 * k);
    return (p <= k) ? k - p : p - k;
  endfunction

  function automatic bit exp_sign(int t, int k);
    // Sign flips when the count comes back to K: at t = 2k, 4k, ...
    return ((t / (2 * k)) % 2) == 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    for (int t = 0; t < 5 * 2 * K; t++) begin
      checks++;
      if (count != 8'(exp_count(t, K)) || sign != exp_sign(t, K)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d exp=%0d sign=%0d exp=%0d", t, count, exp_count(t, K), sign, exp_sign(t, K));
      end
      if (t < 8 * KS) begin
        checks++;
        if (count_s != 8'(exp_count(t, KS)) || sign_s != exp_sign(t, KS)) begin
          failures++;
          $display("FAIL small t=%0d count=%0d exp=%0d", t, count_s, exp_count(t, KS));
        end
      end
      @(posedge clk); #1;
    end
    // hold
    en = 1'b0;
    begin
      logic [7:0] c0;
      c0 = count;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (count != c0) begin failures++; $display("FAIL hold"); end
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
