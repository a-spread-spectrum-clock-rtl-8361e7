// tb_loop_path_sel: checks the feedback path selection.
//
// With M1 = 0 the divider input must have one rising edge per VCO rising
// edge; with M1 = 1 one per two, and a 50 % duty cycle.
module tb_loop_path_sel;
  timeunit 1ps;
  timeprecision 1fs;

  logic vco_clk = 1'b0, rst_n = 1'b0, m1 = 1'b0;
  logic clk_mmd;
  int checks = 0, failures = 0;
  int n_vco = 0, n_mmd = 0, n_high = 0;

  loop_path_sel dut (.vco_clk, .rst_n, .m1, .clk_mmd);

  always #925.925 vco_clk = ~vco_clk;          // 540 MHz
  always @(posedge vco_clk) n_vco++;
  always @(posedge clk_mmd) n_mmd++;
  always @(negedge vco_clk) if (clk_mmd) n_high++;

  task automatic measure(input logic mm1, input int div);
    m1 = mm1;
    repeat (4) @(posedge vco_clk);
    #1;
    n_vco = 0; n_mmd = 0; n_high = 0;
    repeat (1000) @(posedge vco_clk);
    #1;
    checks++;
    if (n_mmd * div != n_vco) begin
      failures++;
      $display("FAIL m1=%0d: %0d divider-input edges for %0d VCO edges", mm1, n_mmd, n_vco);
    end
    if (mm1) begin
      checks++;
      if (n_high != 500) begin failures++; $display("FAIL duty: high %0d of 1000", n_high); end
    end
  endtask

  initial begin
    #3000 rst_n = 1'b1;
    measure(1'b0, 1);
    measure(1'b1, 2);
    measure(1'b0, 1);
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
