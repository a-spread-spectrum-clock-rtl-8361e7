// tb_slope_modulator: checks the slope modulator as a whole.
//
// Over one full counter triangle (2*K = 496 cycles) the number of 1s at the
// SDM output must equal the sum of the counter values divided by 2^8 (within
// one), i.e. the average is count / 2^8. The density must be higher in the
// quarter of the triangle around K than around 0, Sign must hold for 2*K
// cycles and toggle, and the modulation period (two Sign changes) must be
// 4*K = 992 cycles.
module tb_slope_modulator;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int K = 248;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic sm_out, sign;
  logic [7:0] count;
  int checks = 0, failures = 0;

  slope_modulator #(.W(8), .K(K)) dut (.clk, .rst_n, .en, .sm_out, .sign, .count);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ones, sum, ones_hi, ones_lo, t_edge[$];
    logic sign_q;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; en = 1'b1;
    sign_q = sign;
    for (int tri_n = 0; tri_n < 4; tri_n++) begin
      ones = 0; sum = 0; ones_hi = 0; ones_lo = 0;
      for (int t = 0; t < 2 * K; t++) begin
        sum += count;
        @(posedge clk); #1;
        ones += sm_out;     // bit produced from the count summed above
        if (t < K / 4 || t >= 2 * K - K / 4) ones_hi += sm_out;
        if (t >= K - K / 8 && t < K + K / 8) ones_lo += sm_out;
        if (sign != sign_q) t_edge.push_back(tri_n * 2 * K + t);
        sign_q = sign;
      end
      check(ones >= sum / 256 - 1 && ones <= sum / 256 + 1,
            $sformatf("ones %0d vs sum/256 %0d", ones, sum / 256));
      check(ones_hi > 4 * ones_lo, $sformatf("density near K (%0d) vs near 0 (%0d)", ones_hi, ones_lo));
    end
    check(t_edge.size() >= 3, "Sign toggled");
    if (t_edge.size() >= 3) begin
      check(t_edge[1] - t_edge[0] == 2 * K, "Sign half period 2K");
      check(t_edge[2] - t_edge[0] == 4 * K, "modulation period 4K");
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
