// lfsr_prng - pseudo-random source of the interrupt sequence.
//
// A 72-bit Fibonacci LFSR (72 flip-flops, as in the design) clocked by the
// interrupt clock. While load_i is high the state is held at the seed, so
// every evaluation that follows the same load starts the same sequence:
// this is how challenge c and its inverse are interrupted with an identical
// pattern. While run_i is high (and load_i low) the LFSR advances one step
// per clock; otherwise it holds. bit_o is the most significant state bit.
// Feedback taps 72, 66, 25, 19 give a maximal-length sequence; they, the
// output bit, and the replacement of an all-zero seed by 1 (the only state
// an XOR LFSR cannot leave) are this design's choices. One output bit per
// clock; load and run take effect at the next rising edge.
module lfsr_prng #(
  parameter int unsigned LFSR_W = 72
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic              run_i,
  input  logic [LFSR_W-1:0] seed_i,
  output logic              bit_o
);
  timeunit 1ps; timeprecision 1ps;

  logic [LFSR_W-1:0] state_q;
  logic              fb;

  // Tap positions are 1-based in the usual tables: bit n-1 here.
  assign fb = state_q[LFSR_W-1] ^ state_q[LFSR_W-7] ^ state_q[24] ^ state_q[18];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state_q <= LFSR_W'(1);
    else if (load_i) state_q <= (seed_i == '0) ? LFSR_W'(1) : seed_i;
    else if (run_i)  state_q <= {state_q[LFSR_W-2:0], fb};
  end

  assign bit_o = state_q[LFSR_W-1];
endmodule
