// sdm1: first-order sigma-delta modulator of the slope modulator.
//
// A W-bit accumulator adds the input every enabled clock; the carry out of the
// addition is the 1-bit output. Over any 2^W cycles of constant input x the
// output is 1 exactly x times, so its average is x / 2^W (the design's AVS).
// Interface: x is sampled on each enabled clk edge; y is the carry of that
// addition, registered with the new accumulator value, so it is valid one clk
// after x. The accumulator structure is this implementation's; the design only
// gives the function and the 8-bit width.
module sdm1 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic         y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      y   <= 1'b0;
    end else if (en) begin
      {y, acc} <= {1'b0, acc} + {1'b0, x};
    end
  end
endmodule
