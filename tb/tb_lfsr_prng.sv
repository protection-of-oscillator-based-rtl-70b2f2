// tb_lfsr_prng - self-checking test of the interrupt PRNG.
//
// A reference model written here from the feedback polynomial
// x^72 + x^66 + x^25 + x^19 + 1 predicts the bit stream after a load.
// Checks: the stream for several random seeds, that the state holds while
// neither load nor run is set, that reloading the same seed repeats the
// stream, that an all-zero seed still gives a running sequence, and that
// ones make up close to half of a long stream.
module tb_lfsr_prng;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 72;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, run = 1'b0;
  logic [W-1:0] seed = '0;
  logic b;
  int checks = 0, failures = 0;

  lfsr_prng #(.LFSR_W(W)) dut (.clk(clk), .rst_n(rst_n), .load_i(load), .run_i(run), .seed_i(seed), .bit_o(b));

  always #4000 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: state bit numbering 1..72, output is bit 72
  logic [W:1] ref_s;
  function automatic void ref_step();
    logic nb;
    nb = ref_s[72] ^ ref_s[66] ^ ref_s[25] ^ ref_s[19];
    ref_s = {ref_s[71:1], nb};
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s;
    logic first [64];
    int ones, errs;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      s = (k == 5) ? '0 : {$urandom, $urandom, $urandom};
      @(negedge clk); seed = s; load = 1'b1;
      @(negedge clk); load = 1'b0;
      ref_s = (s == '0) ? W'(1) : s;
      errs = 0;
      check(b == ref_s[72], "first bit after load");
      // hold while idle
      repeat (5) @(negedge clk);
      check(b == ref_s[72], "state holds while idle");
      run = 1'b1;
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        ref_step();
        if (b != ref_s[72]) errs++;
        if (i < 64) first[i] = b;
      end
      run = 1'b0;
      check(errs == 0, $sformatf("seed %0d: %0d stream mismatches", k, errs));
      // reload same seed: same stream
      @(negedge clk); load = 1'b1;
      @(negedge clk); load = 1'b0; run = 1'b1;
      errs = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        if (b != first[i]) errs++;
      end
      run = 1'b0;
      check(errs == 0, "reloaded seed repeats the stream");
    end
    // balance over a long stream
    ones = 0;
    run = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      ones += int'(b);
    end
    run = 1'b0;
    check(ones > 9600 && ones < 10400, $sformatf("ones %0d of 20000", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
