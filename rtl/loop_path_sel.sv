// loop_path_sel: feedback path selection in front of the multi-modulus divider.
//
// A toggle flip-flop divides the VCO clock by 2; the M1 switch picks either
// the VCO clock itself (M1 = 0, 162 and 270 MHz modes) or the halved clock
// (M1 = 1, 540 MHz mode) as the divider input. Halving the 540 MHz clock lets
// the 540 MHz mode reuse the 270 MHz division word.
// Interface: m1 is a static mode switch; changing it while running may give
// one short pulse on clk_mmd. The divide-by-2 and the mux are the design's;
// a plain toggle and a combinational clock mux are this implementation's.
module loop_path_sel (
  input  logic vco_clk,
  input  logic rst_n,
  input  logic m1,
  output logic clk_mmd
);
  timeunit 1ps;
  timeprecision 1fs;

  logic half;

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) half <= 1'b0;
    else        half <= ~half;
  end

  always_comb clk_mmd = m1 ? half : vco_clk;
endmodule
