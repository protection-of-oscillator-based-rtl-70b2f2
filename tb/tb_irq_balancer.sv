// tb_irq_balancer - self-checking test of the four-line interrupt
// balancer.
//
// Feeds random bits and checks in every step: output 1 equals the bit fed
// one step earlier, exactly one of outputs 1 and 3 toggles, outputs 2 and
// 4 are the inverses of 1 and 3, so exactly two of the four lines toggle
// and exactly two are high. Also checks hold without step and clear.
module tb_irq_balancer;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, step = 1'b0, rnd = 1'b0;
  logic [N_IRQ-1:0] irq, prev;
  int checks = 0, failures = 0;

  irq_balancer dut (.clk(clk), .rst_n(rst_n), .clr_i(clr), .step_i(step), .rnd_i(rnd), .irq_o(irq));

  always #4000 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic fed;
    int o3_toggles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(irq == 4'b1010, "start state");
    step = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      prev = irq;
      fed = 1'($urandom);
      rnd = fed;
      @(negedge clk);
      check(irq[0] == fed, "output 1 follows the random bit");
      check((irq[0] ^ prev[0]) != (irq[2] ^ prev[2]), "exactly one of outputs 1 and 3 toggles");
      check(irq[1] == ~irq[0] && irq[3] == ~irq[2], "outputs 2 and 4 inverted");
      check($countones(irq ^ prev) == 2 && $countones(irq) == 2, "half the lines toggle, half high");
      if (irq[2] ^ prev[2]) o3_toggles++;
    end
    check(o3_toggles > 800 && o3_toggles < 1200, "output 3 toggles about half the time");
    step = 1'b0;
    prev = irq;
    repeat (5) begin rnd = ~rnd; @(negedge clk); end
    check(irq == prev, "holds without step");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(irq == 4'b1010, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
