// irq_gen - interrupt generator in the interrupt clock domain.
//
// Brings the sequencer's level signals load_i and run_i and the mode input
// irq_en_i into the interrupt clock domain with two-flop synchronisers.
// While load is high the LFSR is held at seed_i and the balancer returns to
// its start state; while run is high both advance once per clock and the
// four balanced lines are driven to the loops. The lines are forced low
// (no loop held) when run is low or in continuous mode (irq_en_i = 0), so
// the same hardware serves as the unprotected loop PUF. The synchronisers,
// the gating register and the mode input are this design's choices; the
// LFSR-plus-balancer chain follows the design.
//
// Timing: run reaches the LFSR three interrupt clocks after it changes in
// the reference domain. Because the same delay applies to every
// evaluation, c and its inverse see the same sequence up to the phase of
// the two clocks. seed_i must be stable while load_i is high.
module irq_gen
  import ilp_pkg::*;
#(
  parameter int unsigned LFSR_W = 72
) (
  input  logic              clk,       // interrupt clock
  input  logic              rst_n,
  input  logic              load_i,    // reference-domain level
  input  logic              run_i,     // reference-domain level
  input  logic              irq_en_i,  // 1 = interrupted mode
  input  logic [LFSR_W-1:0] seed_i,
  output logic [N_IRQ-1:0]  irq_o
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] load_s, run_s, en_s;
  logic       rnd;
  logic       gate_q;
  logic [N_IRQ-1:0] bal;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_s <= '0;
      run_s  <= '0;
      en_s   <= '0;
      gate_q <= 1'b0;
    end else begin
      load_s <= {load_s[0], load_i};
      run_s  <= {run_s[0], run_i};
      en_s   <= {en_s[0], irq_en_i};
      gate_q <= run_s[1] & en_s[1] & ~load_s[1];
    end
  end

  lfsr_prng #(.LFSR_W(LFSR_W)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(load_s[1]),
    .run_i (run_s[1]),
    .seed_i(seed_i),
    .bit_o (rnd)
  );

  irq_balancer u_bal (
    .clk   (clk),
    .rst_n (rst_n),
    .clr_i (load_s[1]),
    .step_i(run_s[1]),
    .rnd_i (rnd),
    .irq_o (bal)
  );

  assign irq_o = gate_q ? bal : '0;
endmodule
