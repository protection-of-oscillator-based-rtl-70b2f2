// tb_puf_ctrl - self-checking test of the sequencer with a short window.
//
// Runs a whole readout with EVAL_CYCLES = 40 and checks: 15 seed requests,
// 30 published evaluations in the order (1,c) (1,~c) (2,c) ... (15,~c),
// the seed held for each pair equal to the seed offered at its request,
// loop_en_o high for exactly EVAL_CYCLES cycles per evaluation and
// prng_run_o equal to it, counters cleared and PRNG loaded (and the loop
// stopped) before every evaluation, and done_o in the cycle given by
// 1 + 15 * (1 + 2 * (SETTLE + EVAL + DRAIN + 4)) after start.
module tb_puf_ctrl;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  localparam int E = 40, S = 16, D = 16, W = 72;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, seed_req, inv, clr, pload, prun, len, cvalid;
  logic [W-1:0] seed_in = '0, seed_held;
  logic [3:0] cw;
  int checks = 0, failures = 0;

  puf_ctrl #(.EVAL_CYCLES(E), .LFSR_W(W), .SETTLE_CYCLES(S), .DRAIN_CYCLES(D)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .busy_o(busy), .done_o(done),
    .seed_req_o(seed_req), .seed_i(seed_in), .seed_o(seed_held), .cw_idx_o(cw), .inv_o(inv),
    .cnt_clr_o(clr), .prng_load_o(pload), .prng_run_o(prun), .loop_en_o(len), .cnt_valid_o(cvalid));

  always #5000 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_done = -1, n_seed = 0, n_pub = 0, en_run = 0, n_clr_prev = 0;
  logic [W-1:0] offered;
  logic len_d = 1'b0, seen_clr = 1'b0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    seed_in = {$urandom, $urandom, $urandom};  // new offer, stable at the next edge
    if (seed_req) begin n_seed++; offered = seed_in; end
    if (clr) begin
      seen_clr = 1'b1;
      check(pload && !len, "PRNG loaded and loop stopped while counters clear");
    end
    if (len) en_run++;
    check(prun == len, "PRNG runs with the loops");
    if (len && !len_d) begin
      check(seen_clr, "clear before every evaluation");
      seen_clr = 1'b0;
    end
    if (!len && len_d) begin
      check(en_run == E, $sformatf("enable high %0d cycles", en_run));
      en_run = 0;
    end
    len_d = len;
    if (cvalid) begin
      check(cw == 4'(n_pub / 2 + 1) && inv == 1'(n_pub % 2),
            $sformatf("evaluation %0d published as (%0d,%0d)", n_pub, cw, inv));
      check(seed_held == offered, "seed held for the pair");
      n_pub++;
    end
    if (done) t_done = cyc;
  end

  initial begin
    int t_start;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy, "idle after reset");
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (t_done >= 0);
    @(negedge clk);
    check(n_seed == 15, $sformatf("%0d seed requests", n_seed));
    check(n_pub == 30, $sformatf("%0d evaluations", n_pub));
    check(t_done - t_start == 1 + 15 * (1 + 2 * (S + E + D + 4)),
          $sformatf("done after %0d cycles", t_done - t_start));
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
