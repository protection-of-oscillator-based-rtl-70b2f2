// pair_eval - response of one loop for one challenge pair.
//
// Stores CNT(c) when the sequencer publishes the count of challenge c
// (valid_i with inv_i = 0); when it publishes CNT(~c) (inv_i = 1) it forms
// the signed difference diff_o = CNT(c) - CNT(~c) and the sign-based
// response bit resp_o = 1 for a negative difference, 0 otherwise.
// The difference is kept because it carries the magnitude that multi-valued
// and two-metric quantisers use. Difference and sign follow the design,
// which computes them off-chip; doing it next to the counter, and mapping a
// zero difference to 0, are this design's choices. Outputs are registered:
// valid_o pulses one cycle after the inverse count is presented.
module pair_eval #(
  parameter int unsigned CNT_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_i,
  input  logic               inv_i,
  input  logic [CNT_W-1:0]   cnt_i,
  output logic               valid_o,
  output logic               resp_o,
  output logic signed [CNT_W:0] diff_o
);
  timeunit 1ps; timeprecision 1ps;

  logic [CNT_W-1:0]      first_q;
  logic signed [CNT_W:0] d;

  assign d = $signed({1'b0, first_q}) - $signed({1'b0, cnt_i});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= '0;
      valid_o <= 1'b0;
      resp_o  <= 1'b0;
      diff_o  <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i && !inv_i) first_q <= cnt_i;
      if (valid_i && inv_i) begin
        diff_o  <= d;
        resp_o  <= d[CNT_W];
        valid_o <= 1'b1;
      end
    end
  end
endmodule
