// tb_eval_timer - self-checking test of the evaluation timer at its
// default window of 2^19 - 1 cycles and at a short one.
//
// Counts the cycles en_o is high (must equal EVAL_CYCLES), checks that
// done_o pulses once in the cycle after en_o falls, and that a start
// while running is ignored.
module tb_eval_timer;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic en_l, done_l, en_s, done_s;
  int checks = 0, failures = 0;

  eval_timer                    dut_l (.clk(clk), .rst_n(rst_n), .start_i(start), .en_o(en_l), .done_o(done_l));
  eval_timer #(.EVAL_CYCLES(7)) dut_s (.clk(clk), .rst_n(rst_n), .start_i(start), .en_o(en_s), .done_o(done_s));

  always #5000 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_l = 0, n_s = 0, d_l = 0, d_s = 0;
  logic en_l_d = 1'b0, en_s_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (en_l) n_l++;
    if (en_s) n_s++;
    if (done_l) begin d_l++; check(en_l_d && !en_l, "long done right after enable"); end
    if (done_s) begin d_s++; check(en_s_d && !en_s, $sformatf("short done right after enable %0d %0d %0t", en_s_d, en_s, $time)); end
    en_l_d <= en_l;
    en_s_d <= en_s;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (3) @(negedge clk);
    start = 1'b1;            // ignored: both running
    @(negedge clk) start = 1'b0;
    repeat (20) @(negedge clk);
    check(n_s == 7 && d_s == 1, $sformatf("short window %0d cycles, %0d done", n_s, d_s));
    repeat (2**19 + 10) @(negedge clk);
    check(n_l == 2**19 - 1, $sformatf("long window %0d cycles", n_l));
    check(d_l == 1, "one done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
