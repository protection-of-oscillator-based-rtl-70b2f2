// puf_ctrl - sequencer of the interruptible loop PUF.
//
// Runs one readout of all enabled loops: for each Hadamard codeword index
// 1..N_CW it requests a fresh PRNG seed (seed_req_o, seed_i captured in the
// same cycle), then evaluates challenge c and its inverse ~c with that one
// seed. Each evaluation is:
//   PREP  SETTLE_CYCLES cycles: counters cleared, PRNG held at the seed,
//         challenge applied, loops standing still;
//   RUN   the built-in timer (eval_timer) raises loop_en_o for exactly
//         EVAL_CYCLES cycles; prng_run_o follows it;
//   DRAIN DRAIN_CYCLES cycles for the loops to stop and counters to settle;
//   PUB   cnt_valid_o pulses with cw_idx_o / inv_o naming the challenge.
// done_o pulses after the last pair. Counting the cycle in which start_i
// is taken as 0, done_o is high in cycle
// 1 + N_CW * (1 + 2 * (SETTLE_CYCLES + EVAL_CYCLES + DRAIN_CYCLES + 4)). Reusing a seed for c and ~c and taking a new seed
// for every pair follow the design; where the seed comes from is left to
// the surrounding system, and the settle/drain margins are this design's.
module puf_ctrl
  import ilp_pkg::*;
#(
  parameter int unsigned EVAL_CYCLES   = 2**19 - 1,
  parameter int unsigned LFSR_W        = 72,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned DRAIN_CYCLES  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              seed_req_o,
  input  logic [LFSR_W-1:0] seed_i,
  output logic [LFSR_W-1:0] seed_o,      // seed held for the current pair
  output logic [3:0]        cw_idx_o,
  output logic              inv_o,
  output logic              cnt_clr_o,
  output logic              prng_load_o,
  output logic              prng_run_o,
  output logic              loop_en_o,
  output logic              cnt_valid_o
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WW = $clog2((SETTLE_CYCLES > DRAIN_CYCLES ? SETTLE_CYCLES : DRAIN_CYCLES) + 1);

  ctrl_state_e    state_q;
  logic [WW-1:0]  wait_q;
  logic           tmr_start, tmr_en, tmr_done;

  eval_timer #(.EVAL_CYCLES(EVAL_CYCLES)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .start_i(tmr_start),
    .en_o   (tmr_en),
    .done_o (tmr_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      wait_q   <= '0;
      cw_idx_o <= 4'd1;
      inv_o    <= 1'b0;
      seed_o   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_i) begin
          cw_idx_o <= 4'd1;
          state_q  <= S_SEED;
        end
        S_SEED: begin
          seed_o  <= seed_i;
          inv_o   <= 1'b0;
          wait_q  <= WW'(SETTLE_CYCLES);
          state_q <= S_PREP;
        end
        S_PREP: begin
          if (wait_q == WW'(0)) state_q <= S_RUN;
          else                  wait_q  <= wait_q - 1'b1;
        end
        S_RUN: if (tmr_done) begin
          wait_q  <= WW'(DRAIN_CYCLES);
          state_q <= S_DRAIN;
        end
        S_DRAIN: begin
          if (wait_q == WW'(0)) state_q <= S_PUB;
          else                  wait_q  <= wait_q - 1'b1;
        end
        S_PUB: begin
          if (!inv_o) begin
            inv_o   <= 1'b1;
            wait_q  <= WW'(SETTLE_CYCLES);
            state_q <= S_PREP;
          end else if (cw_idx_o == 4'(N_CW)) begin
            state_q <= S_DONE;
          end else begin
            cw_idx_o <= cw_idx_o + 1'b1;
            state_q  <= S_SEED;
          end
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The timer is started on the last PREP cycle; it raises its enable in
  // the first RUN cycle.
  assign tmr_start   = (state_q == S_PREP) && (wait_q == WW'(0));
  assign busy_o      = (state_q != S_IDLE);
  assign done_o      = (state_q == S_DONE);
  assign seed_req_o  = (state_q == S_SEED);
  assign cnt_clr_o   = (state_q == S_PREP);
  assign prng_load_o = (state_q == S_PREP);
  assign prng_run_o  = tmr_en;
  assign loop_en_o   = tmr_en;
  assign cnt_valid_o = (state_q == S_PUB);
endmodule
