// int_loop - one interruptible loop (ring oscillator) of the loop PUF
// (behavioural model of an FPGA ring oscillator).
//
// N_STAGES interruptible delay elements in a chain, closed by a NAND with
// the enable: while en_i is low the NAND output is 1, every stage settles at
// 1 and the loop stands still; while en_i is high the single inversion in
// the NAND makes the ring oscillate. Stage i receives challenge bit c_i[i],
// which selects one of that stage's two delay paths, so each challenge gives
// a slightly different period. All stages share the interrupt intr_i: while
// it is high every stage latch holds and the oscillation freezes with its
// phase kept, which is what blurs the power spectrum. ro_o, the last stage's
// output, drives the edge counter.
//
// The ring, the per-stage challenge and the shared interrupt follow the
// design. The delays are this model's own: a nominal path delay from ilp_pkg
// plus a reproducible offset of up to +-MISMATCH_PS from
// ilp_pkg::mismatch_ps(CHIP_ID, LOOP_ID, stage, path), standing in for
// manufacturing variation. With the defaults the loop runs near 38.5 MHz.
module int_loop
  import ilp_pkg::*;
#(
  parameter int unsigned N_STAGES    = 16,
  parameter int unsigned LOOP_ID     = 0,
  parameter int unsigned CHIP_ID     = 1,
  parameter int unsigned MISMATCH_PS = 8
) (
  input  logic                en_i,
  input  logic [N_STAGES-1:0] c_i,
  input  logic                intr_i,
  output logic                ro_o
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_STAGES-1:0] stage;
  logic nand_q;

  initial nand_q = 1'b1;

  always @(en_i or stage[N_STAGES-1]) nand_q <= #(D_NAND_PS) ~(en_i & stage[N_STAGES-1]);

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    localparam int D0 = int'(D_PATH_PS) + mismatch_ps(int'(CHIP_ID), int'(LOOP_ID), i, 0, int'(MISMATCH_PS));
    localparam int D1 = int'(D_PATH_PS) + mismatch_ps(int'(CHIP_ID), int'(LOOP_ID), i, 1, int'(MISMATCH_PS));
    int_delay_elem #(
      .D0_PS(D0), .D1_PS(D1), .DL_PS(D_LATCH_PS)
    ) u_elem (
      .in_i  (i == 0 ? nand_q : stage[(i == 0) ? 0 : i-1]),
      .c_i   (c_i[i]),
      .intr_i(intr_i),
      .out_o (stage[i])
    );
  end

  assign ro_o = stage[N_STAGES-1];
endmodule
