// mmd: multi-modulus divider, ratios N-1, N, N+1 and N+2.
//
// A down-counter runs on the (pre-scaled) VCO clock. When it reaches 0 it
// samples the modulus code from the division modulator and reloads with
// ratio - 1, where ratio = N - 1 + code and N = N_LOW (M0 = 0) or N_HIGH
// (M0 = 1). The output is high for the first ceil(ratio/2) input cycles of
// each output period and low for the rest, so each output period lasts
// exactly `ratio` input cycles and its rising edge coincides with the reload.
// Interface: code and m0 are sampled only at the reload edge, so they may
// change anywhere inside an output period; div_out and ratio are registered.
// The ratio set and N values follow the design; the counter structure and
// the duty cycle are this implementation's.
module mmd #(
  parameter int unsigned N_LOW  = 5,
  parameter int unsigned N_HIGH = 8,
  parameter int unsigned CW     = 4     // counter width, holds N_HIGH + 2
) (
  input  logic          clk,      // pre-scaled VCO clock
  input  logic          rst_n,
  input  logic          m0,
  input  logic [1:0]    code,
  output logic          div_out,
  output logic [CW-1:0] ratio     // ratio of the period now running
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [CW-1:0] cnt, half, ratio_nxt;

  always_comb begin
    ratio_nxt = (m0 ? CW'(N_HIGH) : CW'(N_LOW)) - CW'(1) + CW'(code);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      half    <= '0;
      ratio   <= '0;
      div_out <= 1'b0;
    end else if (cnt == '0) begin
      cnt     <= ratio_nxt - CW'(1);
      half    <= ratio_nxt >> 1;
      ratio   <= ratio_nxt;
      div_out <= 1'b1;
    end else begin
      cnt <= cnt - CW'(1);
      if (cnt == half) div_out <= 1'b0;
    end
  end

  // The running ratio is always one of N-1 .. N+2 once the first period has
  // been loaded.
  a_ratio_range: assert property (@(posedge clk) disable iff (!rst_n || ratio == '0)
                                  ratio >= CW'(N_LOW - 1) && ratio <= CW'(N_HIGH + 2));

  initial assert (N_LOW >= 3 && (N_HIGH + 2) < (1 << CW))
    else $error("mmd: N out of range for the counter width");
endmodule
