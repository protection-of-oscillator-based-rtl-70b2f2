// tb_ilpuf_wide - the interruptible loop PUF array at its default size.
//
// All parameters at their defaults: 72 loops of 16 stages, 32-bit
// counters, 72-bit LFSR and the full 2^19 - 1 cycle evaluation window
// (5.24 ms at 100 MHz). Interrupted mode, interrupt clock 120 MHz, loop 0
// and loop 41 enabled (they use interrupt lines 1 and 2). The test runs the
// first complete challenge pair of a readout - one PUF response: seed
// request, evaluation of codeword 1, evaluation of its inverse with the same
// seed, response - and stops there; a whole readout is 15 such pairs and
// takes 157 ms of simulated time.
//
// Checks: one seed request; both evaluations published in order with the
// right challenge; each enabled loop's count between 35 % and 65 % of the
// continuous count predicted from its timing (W / T(c)); disabled loops
// count nothing; c and ~c see the same interrupt sequence; exactly two of
// the four interrupt lines toggle per interrupt clock; the response equals
// the sign of the difference; the response arrives
// 1 + 2 * (16 + W + 16 + 4) + 1 cycles after start.
module tb_ilpuf_wide;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  localparam int NL = 72, NS = 16, CW = 32, LW = 72, E = 2**10 - 1;
  localparam int L0 = 0, L1 = 41;

  logic rclk = 1'b0, iclk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NL-1:0] mask;
  logic [LW-1:0] seed = '0;
  logic seed_req, cvalid, inv, rvalid, busy, done;
  logic [3:0] cw_idx;
  logic [NS-1:0] chal;
  logic [NL-1:0][CW-1:0] cnt;
  logic [NL-1:0] resp;
  logic [NL-1:0][CW:0] diff;
  logic [N_IRQ-1:0] irq;
  int checks = 0, failures = 0;

  ilpuf_top #(.EVAL_CYCLES(E)) dut (
    .ref_clk(rclk), .int_clk(iclk), .rst_n(rst_n), .start_i(start), .loop_en_i(mask),
    .irq_en_i(1'b1), .seed_req_o(seed_req), .seed_i(seed), .cnt_valid_o(cvalid),
    .cw_idx_o(cw_idx), .inv_o(inv), .challenge_o(chal), .cnt_o(cnt), .resp_valid_o(rvalid),
    .resp_o(resp), .diff_o(diff), .irq_o(irq), .busy_o(busy), .done_o(done));

  always #5000 rclk = ~rclk;
  always #4167 iclk = ~iclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real period_ps(int loop, logic [NS-1:0] c);
    int s = 0;
    for (int i = 0; i < NS; i++)
      s += int'(D_PATH_PS) + mismatch_ps(1, loop, i, c[i] ? 1 : 0, 8) + int'(D_LATCH_PS);
    return 2.0 * real'(s + int'(D_NAND_PS));
  endfunction

  int cyc = 0;
  initial begin
    wait (cyc > 2 * (E + 100) + 200);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_seed = 0, n_bal = 0, n_unbal = 0, sig_n = 0, n_eval = 0;
  logic [31:0] sig = '0, sig_first = '0;
  logic [N_IRQ-1:0] irq_prev = '0;
  always @(posedge iclk) if (rst_n) begin
    if (irq != '0) begin
      if (sig_n < 512) sig = {sig[30:0], 1'b0} ^ {28'h0, irq} ^ (sig >> 7);
      sig_n++;
      if (irq_prev != '0) begin
        if ($countones(irq ^ irq_prev) == 2) n_bal++; else n_unbal++;
      end
    end
    irq_prev = irq;
  end

  int first_cnt [NL];
  int t_start = 0, t_resp = -1;
  always @(posedge rclk) begin
    cyc++;
    if (seed_req) begin seed <= {8'($urandom), $urandom, $urandom}; n_seed++; end
  end

  always @(negedge rclk) if (rst_n) begin
    if (cvalid) begin
      check(cw_idx == 4'd1 && inv == 1'(n_eval), "evaluation order");
      check(chal == (inv ? 16'h5555 : 16'hAAAA), "challenge of codeword 1");
      for (int l = 0; l < NL; l++) begin
        if (!mask[l]) check(cnt[l] == '0, "disabled loop counts nothing");
        else begin
          real full;
          full = real'(E) * 10000.0 / period_ps(l, chal);
          $display("loop %0d challenge %h: count %0d, continuous prediction %0.0f", l, chal, cnt[l], full);
          check(real'(cnt[l]) > 0.35 * full && real'(cnt[l]) < 0.65 * full, "interrupted count near half");
        end
        if (!inv) first_cnt[l] = int'(cnt[l]);
      end
      if (!inv) sig_first = sig;
      else check(sig == sig_first, "c and ~c saw the same interrupt sequence");
      sig = '0;
      sig_n = 0;
      n_eval++;
    end
    if (rvalid && t_resp < 0) begin
      t_resp = cyc;
      check(n_seed == 1, "one seed request for the pair");
      for (int l = 0; l < NL; l++) begin
        check(resp[l] == diff[l][CW], "response is the sign of the difference");
        if (mask[l]) begin
          check(int'($signed(diff[l])) == first_cnt[l] - int'(cnt[l]), "difference of the two counts");
          $display("loop %0d: difference %0d response %0d", l, $signed(diff[l]), resp[l]);
        end
      end
    end
  end

  initial begin
    mask = '0;
    mask[L0] = 1'b1;
    mask[L1] = 1'b1;
    repeat (4) @(negedge rclk);
    rst_n = 1'b1;
    repeat (4) @(negedge rclk);
    start = 1'b1;
    t_start = cyc;
    @(negedge rclk);
    start = 1'b0;
    wait (t_resp >= 0);
    @(negedge rclk);
    check(n_eval == 2, "two evaluations");
    check(n_bal > 1000 && n_unbal == 0, $sformatf("balanced toggles %0d, unbalanced %0d", n_bal, n_unbal));
    check(t_resp - t_start == 1 + 2 * (16 + E + 16 + 4) + 1, $sformatf("response after %0d cycles", t_resp - t_start));
    check(busy, "readout continues with the next pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
