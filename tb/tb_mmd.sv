// tb_mmd: checks the multi-modulus divider.
//
// A new random modulus code is applied just after every rising edge of the
// divider output, as the modulator does. The code is sampled at the next
// reload, so the period that starts at output edge k must last
// N - 1 + code(set after edge k-1) input cycles. Each period is measured in
// input cycles and compared; the high time must be ceil(ratio / 2) and the
// ratio output must match. Both N = 5 and N = 8 are covered, with all codes.
module tb_mmd;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, m0 = 1'b0;
  logic [1:0] code = 2'd1;
  logic div_out;
  logic [3:0] ratio;
  int checks = 0, failures = 0;
  int ncyc = 0, nhigh = 0, n_ratio[16];
  int exp_next = -1;   // ratio of the period now running

  mmd dut (.clk, .rst_n, .m0, .code, .div_out, .ratio);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    #1;
    ncyc++;
    if (div_out) nhigh++;
  end

  initial n_ratio = '{default: 0};

  always @(posedge div_out) begin
    int r_done;
    #2;
    r_done = exp_next;
    if (r_done > 0) begin
      checks++;
      if (ncyc != r_done || nhigh != (r_done + 1) / 2) begin
        failures++;
        if (failures < 10) $display("FAIL period %0d (high %0d), expected %0d", ncyc, nhigh, r_done);
      end
      n_ratio[r_done]++;
    end
    // the reload at this edge used the code present before it
    checks++;
    if (int'(ratio) != (m0 ? 8 : 5) - 1 + int'(code_at_edge)) begin
      failures++;
      $display("FAIL ratio output %0d", ratio);
    end
    exp_next = int'(ratio);
    ncyc = 0; nhigh = 0;
    code = 2'($urandom_range(0, 3));
  end

  logic [1:0] code_at_edge;
  always @(posedge clk) code_at_edge <= code;

  initial begin
    repeat (3) @(posedge clk);
    #3 rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    @(posedge div_out); #3 m0 = 1'b1;
    repeat (3000) @(posedge clk);
    for (int r = 4; r <= 10; r++) begin
      checks++;
      if (n_ratio[r] == 0) begin failures++; $display("FAIL ratio %0d never seen", r); end
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
