// sm_counter: the slope counter of the slope modulator.
//
// An up/down counter that sweeps K, K-1, ..., 0, 1, ..., K and repeats, so its
// value is a triangle of period 2*K clock cycles. The value is the magnitude of
// the profile slope. Each time the count arrives back at K the Sign output
// toggles, so Sign has period 4*K cycles, the modulation period.
// Reset puts the counter at K, counting down, with Sign = 1 (rising profile),
// the starting point drawn in the profile-construction figure of the design.
// Interface: en advances the counter one step per clk; count and sign are
// registered outputs. Width and K follow the design (8 bits, K = 248); reset
// state and the enable are this implementation's choice.
module sm_counter #(
  parameter int unsigned W = 8,
  parameter int unsigned K = 248
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         sign
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] KV = W'(K);

  logic down;   // 1 while sweeping from K towards 0

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= KV;
      down  <= 1'b1;
      sign  <= 1'b1;
    end else if (en) begin
      if (down) begin
        count <= count - 1'b1;
        if (count == W'(1)) down <= 1'b0;
      end else begin
        count <= count + 1'b1;
        if (count == KV - 1'b1) begin
          down <= 1'b1;
          sign <= ~sign;
        end
      end
    end
  end

  // The count never leaves 0..K.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= KV);

  initial assert (K >= 2 && K < (1 << W)) else $error("sm_counter: K out of range");
endmodule
