// slope_modulator: slope counter followed by a first-order sigma-delta modulator.
//
// The counter value (0..K) is the magnitude of the Hershey-Kiss slope; the SDM
// turns it into a 1-bit stream whose density is count / 2^8, so the division
// counter downstream takes the large step more often when the slope is steep.
// Sign tells the division counter whether to count up (1) or down (0).
// Interface: all outputs change on enabled clk edges; sm_out lags count by one
// cycle (registered SDM), and sign is registered with count. Structure and
// widths follow the design; the one-cycle alignment is this implementation's.
module slope_modulator #(
  parameter int unsigned W = 8,
  parameter int unsigned K = 248
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic         sm_out,
  output logic         sign,
  output logic [W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  logic sign_cnt;

  sm_counter #(.W(W), .K(K)) u_cnt (
    .clk, .rst_n, .en, .count, .sign(sign_cnt)
  );

  sdm1 #(.W(W)) u_sdm (
    .clk, .rst_n, .en, .x(count), .y(sm_out)
  );

  // Delay Sign by one cycle so it stays aligned with the registered SDM bit
  // produced from the same counter value.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sign <= 1'b1;
    else if (en) sign <= sign_cnt;
  end
endmodule
