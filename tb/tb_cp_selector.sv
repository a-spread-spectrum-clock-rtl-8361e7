// tb_cp_selector: checks the charge-pump current decode for all four switch
// settings: 00 -> 10 uA, 01 -> 20 uA, 11 -> 40 uA, and 10 -> 10 uA.
module tb_cp_selector;
  timeunit 1ps;
  timeprecision 1fs;
  import sscg_pkg::*;

  logic m1, m0;
  cp_sel_e sel;
  int checks = 0, failures = 0;

  cp_selector dut (.m1, .m0, .sel);

  initial begin
    logic [2:0] exp_sel [4] = '{3'b001, 3'b010, 3'b001, 3'b100};  // index {m1,m0}
    for (int rep = 0; rep < 3; rep++)
      for (int i = 0; i < 4; i++) begin
        {m1, m0} = 2'(i);
        #10;
        checks++;
        if (sel !== exp_sel[i] || !$onehot(sel)) begin
          failures++;
          $display("FAIL m1m0=%b sel=%b expected %b", 2'(i), sel, exp_sel[i]);
        end
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
