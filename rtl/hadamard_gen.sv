// hadamard_gen - challenge generator for the loop PUF.
//
// Turns a codeword index into a C_W-bit Hadamard (Sylvester) codeword and,
// when inv_i is set, its bitwise inverse. Bit j of word k is the parity of
// (k AND j). The sequencer steps k over 1..15 (the all-zero word 0 is left
// out because its Hamming weight differs from all others) and applies each
// word and then its inverse. Purely combinational; C_W must be a power of
// two. Using Hadamard words follows the design; this construction of them
// is the standard one.
module hadamard_gen #(
  parameter int unsigned C_W = 16
) (
  input  logic [$clog2(C_W)-1:0] idx_i,
  input  logic                   inv_i,
  output logic [C_W-1:0]         challenge_o
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    for (int j = 0; j < C_W; j++)
      challenge_o[j] = (^(idx_i & ($clog2(C_W))'(j))) ^ inv_i;
  end
endmodule
