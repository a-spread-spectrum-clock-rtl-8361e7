// tb_vco: checks the VCO model's tuning law: with 1.2 GHz/V and no offset,
// 0.45 V gives 540 MHz, 0.225 V 270 MHz and 0.135 V 162 MHz; the frequency
// is clamped to 1.2 GHz at the top; en = 0 stops the clock.
module tb_vco;
  timeunit 1ps;
  timeprecision 1fs;

  logic en = 1'b0, clk;
  real vctrl = 0.45;
  int checks = 0, failures = 0;

  vco dut (.en, .vctrl, .clk);

  task automatic measure(input real v, input real f_exp);
    real t0, f;
    vctrl = v;
    repeat (4) @(posedge clk);
    t0 = $realtime;
    repeat (1000) @(posedge clk);
    f = 1000.0 * 1.0e12 / ($realtime - t0);
    checks++;
    if (f < f_exp * 0.9999 || f > f_exp * 1.0001) begin
      failures++;
      $display("FAIL vctrl %.3f V: %.4f MHz, expected %.4f MHz", v, f / 1e6, f_exp / 1e6);
    end
  endtask

  initial begin
    int n;
    #1000 en = 1'b1;
    measure(0.45, 540.0e6);
    measure(0.225, 270.0e6);
    measure(0.135, 162.0e6);
    measure(2.0, 1.2e9);
    en = 1'b0;
    #10_000;
    n = 0;
    fork
      begin repeat (100) begin @(posedge clk); n++; end end
      #100_000;
    join_any
    disable fork;
    checks++;
    if (n != 0 || clk != 1'b0) begin failures++; $display("FAIL clock not stopped"); end
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
