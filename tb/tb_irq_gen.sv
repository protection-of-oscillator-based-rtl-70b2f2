// tb_irq_gen - self-checking test of the interrupt generator.
//
// Drives load/run from a separate 100 MHz reference clock as the
// sequencer does. Checks that the lines stay low in continuous mode and
// while not running, that in interrupted mode exactly half of the lines
// toggle in every interrupt clock while running, that two runs after
// loading the same seed give the same line pattern, that a different seed
// gives a different one, and that output 1 reproduces the LFSR stream
// predicted from the feedback polynomial.
module tb_irq_gen;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  localparam int W = 72;
  logic rclk = 1'b0, iclk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, run = 1'b0, en = 1'b0;
  logic [W-1:0] seed = '0;
  logic [N_IRQ-1:0] irq, prev;
  int checks = 0, failures = 0;

  irq_gen #(.LFSR_W(W)) dut (.clk(iclk), .rst_n(rst_n), .load_i(load), .run_i(run),
    .irq_en_i(en), .seed_i(seed), .irq_o(irq));

  always #5000 rclk = ~rclk;
  always #4167 iclk = ~iclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record line 1 over each interrupt clock while lines are active
  logic pat [3][400];
  int   npat [3] = '{0, 0, 0};
  int   cur = 0;
  int   nonzero = 0, unbalanced = 0;
  always @(posedge iclk) begin
    if (irq != '0) begin
      nonzero++;
      if (prev != '0 && $countones(irq ^ prev) != 2) unbalanced++;
      if (npat[cur] < 400) begin pat[cur][npat[cur]] = irq[0]; npat[cur]++; end
    end
    prev = irq;
  end

  task automatic evaluation(int cycles);
    @(negedge rclk) load = 1'b1;
    repeat (10) @(negedge rclk);
    load = 1'b0; run = 1'b1;
    repeat (cycles) @(negedge rclk);
    run = 1'b0;
    repeat (10) @(negedge rclk);
  endtask

  initial begin
    logic [W:1] r;
    int errs, same;
    repeat (3) @(posedge rclk);
    rst_n = 1'b1;
    seed = {$urandom, $urandom, $urandom};
    // continuous mode: nothing interrupts
    en = 1'b0;
    evaluation(300);
    check(nonzero == 0, "no interrupts in continuous mode");
    repeat (5) @(negedge rclk);
    en = 1'b1;
    repeat (5) @(negedge rclk);
    cur = 0; evaluation(300);
    check(irq == '0, "lines low after run");
    cur = 1; evaluation(300);
    seed = seed ^ 72'h1;
    cur = 2; evaluation(300);
    check(npat[0] > 300 && npat[1] > 300 && npat[2] > 300, "lines active while running");
    check(unbalanced == 0, $sformatf("%0d cycles with unbalanced toggles", unbalanced));
    errs = 0; same = 0;
    for (int i = 0; i < 300; i++) begin
      if (pat[0][i] != pat[1][i]) errs++;
      if (pat[0][i] == pat[2][i]) same++;
    end
    check(errs == 0, "same seed gives the same pattern");
    check(same < 280, "a different seed gives a different pattern");
    // line 1 is the LFSR output delayed by one register
    r = seed ^ 72'h1;
    errs = 0;
    for (int i = 0; i < 300; i++) begin
      logic nb;
      if (pat[0][i] != r[72]) errs++;
      nb = r[72] ^ r[66] ^ r[25] ^ r[19];
      r = {r[71:1], nb};
    end
    check(errs == 0, $sformatf("line 1 against the LFSR stream: %0d errors", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
