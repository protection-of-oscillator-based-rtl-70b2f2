// tb_ilpuf_top - end-to-end test of the interruptible loop PUF array.
//
// Runs the array (4 loops, 3 of them enabled, evaluation window 2^11 - 1
// cycles instead of 2^19 - 1, delay spread 40 ps instead of 8 ps so that
// the short window still gives clear count differences) through two
// complete readouts of all 15 challenge pairs: first in continuous mode,
// then in interrupted mode with the interrupt clock at three times the
// nominal 40 MHz loop frequency.
//
// Expected values come from the oscillator timing: the period of loop i
// under challenge c is 2 * (sum of its selected stage delays + latch
// delays + NAND delay), so CNT(c) - CNT(~c) is predicted as
// W / T(c) - W / T(~c) for the window W. Checks:
//   continuous: each difference within 2 counts of the prediction,
//     response = sign, disabled loops count nothing;
//   interrupted: counts between 35 % and 65 % of the continuous ones,
//     at least 75 % of the responses with a clear prediction agree,
//     every c / ~c pair sees exactly the same interrupt sequence and
//     consecutive pairs see different ones (a fresh seed), exactly two of
//     the four lines toggle in every interrupt clock;
//   both: 15 seed requests, 30 evaluations in order, done rising
//     15 * (1 + 2 * (16 + W + 16 + 4)) reference cycles after the clock
//     edge that takes start.
// Each mechanism (continuous run, interrupted hold, seed reload, fresh
// seed, balanced toggling, sign 0 and sign 1) is counted and must occur.
module tb_ilpuf_top;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  localparam int NL = 4, NS = 16, CW = 32, LW = 72, E = 2**11 - 1;
  localparam logic [NL-1:0] MASK = 4'b1101;
  localparam int MM = 40, CHIP = 1;

  logic rclk = 1'b0, iclk = 1'b0, rst_n = 1'b0, start = 1'b0, irq_en = 1'b0;
  logic [LW-1:0] seed = '0;
  logic seed_req, cvalid, inv, rvalid, busy, done;
  logic [3:0] cw_idx;
  logic [NS-1:0] chal;
  logic [NL-1:0][CW-1:0] cnt;
  logic [NL-1:0] resp;
  logic [NL-1:0][CW:0] diff;
  logic [N_IRQ-1:0] irq;
  int checks = 0, failures = 0;

  ilpuf_top #(.N_LOOPS(NL), .N_STAGES(NS), .CNT_W(CW), .LFSR_W(LW), .EVAL_CYCLES(E), .CHIP_ID(CHIP),
              .MISMATCH_PS(MM)) dut (
    .ref_clk(rclk), .int_clk(iclk), .rst_n(rst_n), .start_i(start), .loop_en_i(MASK),
    .irq_en_i(irq_en), .seed_req_o(seed_req), .seed_i(seed), .cnt_valid_o(cvalid),
    .cw_idx_o(cw_idx), .inv_o(inv), .challenge_o(chal), .cnt_o(cnt), .resp_valid_o(rvalid),
    .resp_o(resp), .diff_o(diff), .irq_o(irq), .busy_o(busy), .done_o(done));

  always #5000 rclk = ~rclk;   // 100 MHz reference
  always #4167 iclk = ~iclk;   // 120 MHz interrupt clock

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model of the loop periods --------------------------------
  function automatic real period_ps(int loop, logic [NS-1:0] c);
    int s = 0;
    for (int i = 0; i < NS; i++)
      s += int'(D_PATH_PS) + mismatch_ps(CHIP, loop, i, c[i] ? 1 : 0, MM) + int'(D_LATCH_PS);
    return 2.0 * real'(s + int'(D_NAND_PS));
  endfunction

  function automatic logic [NS-1:0] hword(int k);
    logic [NS-1:0] w;
    for (int j = 0; j < NS; j++) w[j] = 1'($countones(k & j) % 2);
    return w;
  endfunction

  // ---- mechanism counters --------------------------------------------------
  int n_cont_eval = 0, n_int_eval = 0, n_hold_cycles = 0, n_unbal = 0, n_bal = 0;
  int n_same_pattern = 0, n_fresh_pattern = 0, n_resp0 = 0, n_resp1 = 0, n_seed = 0;

  // interrupt-sequence signature of each evaluation
  // (over the first 1024 active interrupt clocks: the number of interrupt
  // clocks in a window differs by one with the phase of the two clocks)
  logic [31:0] sig = '0;
  int sig_n = 0;
  logic [N_IRQ-1:0] irq_prev = '0;
  always @(posedge iclk) if (rst_n) begin
    if (irq != '0) begin
      if (sig_n < 1024) sig = {sig[30:0], 1'b0} ^ {28'h0, irq} ^ (sig >> 7);
      sig_n++;
      if (irq_prev != '0) begin
        if ($countones(irq ^ irq_prev) == 2) n_bal++;
        else n_unbal++;
      end
    end
    irq_prev = irq;
  end
  always @(posedge rclk) begin
    if ((dut.loop_run_q != '0) && (irq != '0)) n_hold_cycles++;
    if (seed_req) begin
      seed <= {8'($urandom), $urandom, $urandom};
      n_seed++;
    end
  end

  // per-readout results
  int  cnt_c  [2][NL][16];   // [mode][loop][cw] count of c
  int  cnt_ci [2][NL][16];   // count of ~c
  logic rsp   [2][NL][16];
  int  dif    [2][NL][16];
  logic [31:0] sig_c [16], sig_prev_pair;
  int  mode = 0, n_eval = 0, pair_idx = 0;

  always @(negedge rclk) if (rst_n) begin
    if (cvalid) begin
      check(cw_idx == 4'(n_eval / 2 + 1) && inv == 1'(n_eval % 2), "evaluation order");
      check(chal == (inv ? ~hword(int'(cw_idx)) : hword(int'(cw_idx))), "challenge applied");
      for (int l = 0; l < NL; l++) begin
        if (!inv) cnt_c[mode][l][cw_idx] = int'(cnt[l]);
        else      cnt_ci[mode][l][cw_idx] = int'(cnt[l]);
        if (!MASK[l]) check(cnt[l] == '0, "disabled loop counts nothing");
      end
      if (mode == 0) n_cont_eval++; else n_int_eval++;
      if (mode == 1) begin
        if (!inv) sig_c[cw_idx] = sig;
        else begin
          if (sig == sig_c[cw_idx]) n_same_pattern++;
          else check(0, $sformatf("pair %0d: c and ~c saw different interrupt sequences", cw_idx));
          if (cw_idx > 1 && sig != sig_prev_pair) n_fresh_pattern++;
          sig_prev_pair = sig;
        end
      end
      if (inv) pair_idx = int'(cw_idx);
      sig = '0;
      sig_n = 0;
      n_eval++;
    end
    if (rvalid) begin
      for (int l = 0; l < NL; l++) begin
        rsp[mode][l][pair_idx] = resp[l];
        dif[mode][l][pair_idx] = int'($signed(diff[l]));
        check(resp[l] == diff[l][CW], "response is the sign of the difference");
        if (MASK[l]) begin
          if (resp[l]) n_resp1++; else n_resp0++;
        end
      end
    end
  end

  task automatic readout(int m);
    int t0, t1;
    mode = m;
    n_eval = 0;
    irq_en = 1'(m);
    repeat (5) @(negedge rclk);
    start = 1'b1;
    @(posedge rclk);
    t0 = $time / 10000;
    @(negedge rclk);
    start = 1'b0;
    @(posedge done);
    t1 = $time / 10000;
    check(t1 - t0 == 15 * (1 + 2 * (16 + E + 16 + 4)), $sformatf("readout took %0d cycles", t1 - t0));
    check(n_eval == 30, "30 evaluations per readout");
    repeat (5) @(negedge rclk);
  endtask

  initial begin
    real w, pred;
    int agree, clear_pred, ratio_bad;
    w = real'(E) * 10000.0;
    repeat (4) @(negedge rclk);
    rst_n = 1'b1;
    readout(0);
    readout(1);
    // continuous mode against the timing prediction
    agree = 0; clear_pred = 0; ratio_bad = 0;
    for (int l = 0; l < NL; l++) begin
      if (!MASK[l]) continue;
      for (int k = 1; k <= 15; k++) begin
        pred = w / period_ps(l, hword(k)) - w / period_ps(l, ~hword(k));
        check(real'(dif[0][l][k]) - pred < 2.0 && pred - real'(dif[0][l][k]) < 2.0,
              $sformatf("loop %0d cw %0d: continuous diff %0d predicted %0.1f", l, k, dif[0][l][k], pred));
        if (cnt_c[1][l][k] * 100 < cnt_c[0][l][k] * 35 || cnt_c[1][l][k] * 100 > cnt_c[0][l][k] * 65)
          ratio_bad++;
        if (pred >= 6.0 || pred <= -6.0) begin
          clear_pred++;
          if (rsp[1][l][k] == (pred < 0.0)) agree++;
        end
      end
    end
    check(ratio_bad == 0, $sformatf("%0d interrupted counts outside 35..65 %% of continuous", ratio_bad));
    check(clear_pred > 10, $sformatf("%0d responses with a clear prediction", clear_pred));
    check(agree * 4 >= clear_pred * 3, $sformatf("interrupted responses agree %0d of %0d", agree, clear_pred));
    $display("interrupted agreement %0d of %0d", agree, clear_pred);
    // mechanisms
    check(n_cont_eval == 30, "continuous evaluations happened");
    check(n_int_eval == 30, "interrupted evaluations happened");
    check(n_hold_cycles > 1000, $sformatf("loops held in %0d cycles", n_hold_cycles));
    check(n_same_pattern == 15, $sformatf("%0d pairs reused the seed", n_same_pattern));
    check(n_fresh_pattern == 14, $sformatf("%0d pairs had a fresh seed", n_fresh_pattern));
    check(n_bal > 1000 && n_unbal == 0, $sformatf("balanced %0d unbalanced %0d", n_bal, n_unbal));
    check(n_seed == 30, $sformatf("%0d seed requests", n_seed));
    check(n_resp0 > 0 && n_resp1 > 0, "both response values occurred");
    $display("mechanisms: cont=%0d int=%0d hold=%0d same=%0d fresh=%0d bal=%0d seeds=%0d r0=%0d r1=%0d",
             n_cont_eval, n_int_eval, n_hold_cycles, n_same_pattern, n_fresh_pattern, n_bal, n_seed, n_resp0, n_resp1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
