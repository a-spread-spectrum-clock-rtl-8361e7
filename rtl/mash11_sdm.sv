// mash11_sdm: second-order MASH 1-1 sigma-delta modulator with modulus mapping.
//
// Two first-order accumulators are cascaded. The first adds the W-bit input x
// to its residue s1 and produces carry C0; the second accumulates the residue
// s1 and produces carry C1, which is also delayed one cycle to give C2. The
// mapping circuit forms y = C0 + C1 - C2, in {-1, 0, 1, 2}, whose long-run
// average is x / 2^W with the quantisation error shaped by (1 - z^-1)^2.
// The 2-bit output is code = y + 1, so the divider ratio N - 1 + code spans
// N-1 .. N+2.
// Timing: the first accumulator registers its carry together with its residue,
// so C0 and the residue handed to the second stage belong to the same cycle
// and the first stage's error cancels; code is registered, valid one clk
// after the state it is computed from. Cascade, widths and the C0/C1/C2
// mapping follow the design; the carry register and output register are
// this implementation's.
module mash11_sdm #(
  parameter int unsigned W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [1:0]   code
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] s1, s2, s2_nxt;
  logic         c0, c1, c2;
  logic signed [2:0] y;

  always_comb begin
    {c1, s2_nxt} = {1'b0, s2} + {1'b0, s1};
    y = $signed({2'b00, c0}) + $signed({2'b00, c1}) - $signed({2'b00, c2});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= '0;
      c0   <= 1'b0;
      s2   <= '0;
      c2   <= 1'b0;
      code <= 2'd1;
    end else if (en) begin
      {c0, s1} <= {1'b0, s1} + {1'b0, x};
      s2       <= s2_nxt;
      c2       <= c1;
      code     <= 2'(y + 3'sd1);
    end
  end
endmodule
