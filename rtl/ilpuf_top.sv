// ilpuf_top - interruptible loop PUF array.
//
// An array of N_LOOPS loop PUFs whose ring oscillators are randomly
// interrupted while they are measured, so that their frequencies, and with
// them both the sign and the magnitude of the challenge-pair frequency
// difference, do not show as peaks in the power spectrum.
//
// Structure: puf_ctrl (with its eval_timer) sequences 15 Hadamard
// challenge pairs; hadamard_gen forms the challenge; each loop is an
// int_loop of N_STAGES track-and-hold delay elements counted by its own
// edge_counter and followed by a pair_eval that forms CNT(c) - CNT(~c) and
// the sign response. irq_gen, clocked by the separate interrupt clock,
// runs a 72-bit LFSR, reloaded with the pair's seed before both the c and
// the ~c evaluation, and the four-line balancing circuit. Loop i takes
// interrupt line i mod 4, so each line drives a quarter of the loops.
//
// Interface: ref_clk is the 100 MHz reference clock of the timer and the
// sequencer, int_clk the interrupt clock (the design evaluates it at 1 to
// 5 times the loop frequency). start_i starts a readout of the loops
// selected in loop_en_i; irq_en_i selects interrupted (1) or continuous (0)
// operation. The top asks for a seed per pair with seed_req_o and takes
// seed_i in that cycle. After each evaluation cnt_valid_o pulses with all
// counters on cnt_o; after each ~c evaluation resp_valid_o pulses with
// resp_o / diff_o. With the defaults an evaluation lasts 2^19 - 1 cycles
// (5.24 ms) and a readout of 30 evaluations about 157.3 ms.
//
// The oscillators are behavioural models with transport delays (see
// int_loop); everything else is synthesizable. The loop enable is
// registered once, so loops run exactly EVAL_CYCLES reference cycles.
// Expected lint findings: the ring oscillators are intended combinational
// loops and their stages are intended latches; the counters' asynchronous
// clear comes from a registered sequencer state and is only raised while
// the loops stand still, so mixing it with the loop-clocked counters is
// safe by construction.
module ilpuf_top
  import ilp_pkg::*;
#(
  parameter int unsigned N_LOOPS     = 72,
  parameter int unsigned N_STAGES    = 16,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned LFSR_W      = 72,
  parameter int unsigned EVAL_CYCLES = 2**19 - 1,
  parameter int unsigned CHIP_ID     = 1,  // oscillator model: which "chip"
  parameter int unsigned MISMATCH_PS = 8   // oscillator model: delay spread
) (
  input  logic                              ref_clk,
  input  logic                              int_clk,
  input  logic                              rst_n,
  input  logic                              start_i,
  input  logic [N_LOOPS-1:0]                loop_en_i,
  input  logic                              irq_en_i,
  output logic                              seed_req_o,
  input  logic [LFSR_W-1:0]                 seed_i,
  output logic                              cnt_valid_o,
  output logic [3:0]                        cw_idx_o,
  output logic                              inv_o,
  output logic [N_STAGES-1:0]               challenge_o,
  output logic [N_LOOPS-1:0][CNT_W-1:0]     cnt_o,
  output logic                              resp_valid_o,
  output logic [N_LOOPS-1:0]                resp_o,
  output logic [N_LOOPS-1:0][CNT_W:0]       diff_o,
  output logic [N_IRQ-1:0]                  irq_o,
  output logic                              busy_o,
  output logic                              done_o
);
  timeunit 1ps; timeprecision 1ps;

  logic [LFSR_W-1:0]  seed_q;
  logic               cnt_clr, prng_load, prng_run, loop_en;
  logic [N_LOOPS-1:0] loop_run_q;
  logic [N_LOOPS-1:0] ro;
  logic [N_LOOPS-1:0] pe_valid;

  puf_ctrl #(
    .EVAL_CYCLES(EVAL_CYCLES),
    .LFSR_W     (LFSR_W)
  ) u_ctrl (
    .clk        (ref_clk),
    .rst_n      (rst_n),
    .start_i    (start_i),
    .busy_o     (busy_o),
    .done_o     (done_o),
    .seed_req_o (seed_req_o),
    .seed_i     (seed_i),
    .seed_o     (seed_q),
    .cw_idx_o   (cw_idx_o),
    .inv_o      (inv_o),
    .cnt_clr_o  (cnt_clr),
    .prng_load_o(prng_load),
    .prng_run_o (prng_run),
    .loop_en_o  (loop_en),
    .cnt_valid_o(cnt_valid_o)
  );

  hadamard_gen #(.C_W(N_STAGES)) u_had (
    .idx_i      (cw_idx_o[$clog2(N_STAGES)-1:0]),
    .inv_i      (inv_o),
    .challenge_o(challenge_o)
  );

  irq_gen #(.LFSR_W(LFSR_W)) u_irq (
    .clk     (int_clk),
    .rst_n   (rst_n),
    .load_i  (prng_load),
    .run_i   (prng_run),
    .irq_en_i(irq_en_i),
    .seed_i  (seed_q),
    .irq_o   (irq_o)
  );

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) loop_run_q <= '0;
    else        loop_run_q <= loop_en_i & {N_LOOPS{loop_en}};
  end

  for (genvar i = 0; i < N_LOOPS; i++) begin : g_loop
    int_loop #(
      .N_STAGES(N_STAGES),
      .LOOP_ID (i),
      .CHIP_ID (CHIP_ID),
      .MISMATCH_PS(MISMATCH_PS)
    ) u_loop (
      .en_i  (loop_run_q[i]),
      .c_i   (challenge_o),
      .intr_i(irq_o[i % N_IRQ]),
      .ro_o  (ro[i])
    );

    edge_counter #(.CNT_W(CNT_W)) u_cnt (
      .ro_i (ro[i]),
      .clr_i(cnt_clr),
      .cnt_o(cnt_o[i])
    );

    pair_eval #(.CNT_W(CNT_W)) u_pe (
      .clk    (ref_clk),
      .rst_n  (rst_n),
      .valid_i(cnt_valid_o),
      .inv_i  (inv_o),
      .cnt_i  (cnt_o[i]),
      .valid_o(pe_valid[i]),
      .resp_o (resp_o[i]),
      .diff_o (diff_o[i])
    );
  end

  assign resp_valid_o = &pe_valid;  // all instances pulse together
endmodule
