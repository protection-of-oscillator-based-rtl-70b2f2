// irq_balancer - four balanced interrupt lines from one random bit.
//
// Hides the interrupt sequence from simple power analysis. Output 1 takes
// the random bit each clock. Signal a is high when output 1 changes in this
// cycle; when it is low, output 3 toggles instead, so in every cycle exactly
// one of outputs 1 and 3 changes. Outputs 2 and 4 are the inverses of 1 and
// 3 (a dual-rail style copy). With each line driving a quarter of the loops,
// half of all interrupt inputs toggle in every cycle and half of the loops
// are held at any time. The structure follows the design; the start state
// (outputs 1 and 3 low) and the clear/step controls are this design's own.
//
// irq_o[0..3] are outputs 1..4; they are register outputs (or inverses of
// them) and change one clock after step_i is sampled high. clr_i returns to
// the start state so a repeated seed gives a repeated pattern.
module irq_balancer
  import ilp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_i,
  input  logic             step_i,
  input  logic             rnd_i,
  output logic [N_IRQ-1:0] irq_o
);
  timeunit 1ps; timeprecision 1ps;

  logic out1_q, out3_q;
  logic a;  // high when output 1 changes

  assign a = rnd_i ^ out1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_q <= 1'b0;
      out3_q <= 1'b0;
    end else if (clr_i) begin
      out1_q <= 1'b0;
      out3_q <= 1'b0;
    end else if (step_i) begin
      out1_q <= rnd_i;
      out3_q <= out3_q ^ ~a;
    end
  end

  assign irq_o = {~out3_q, out3_q, ~out1_q, out1_q};
endmodule
