// tb_int_loop - self-checking test of the interruptible loop model.
//
// 1. Continuous operation: for four challenges the measured oscillation
//    period must equal 2 * (sum of the selected path delays + latch delays
//    + NAND delay), computed here from the mismatch table, to the ps.
// 2. A stopped loop (en_i low) must produce no edges.
// 3. Holding: with intr_i high for a long time the output must not toggle,
//    and after release the loop must resume.
// 4. Random interruption at three times the loop frequency with a 50 %
//    duty pattern must leave between 35 % and 65 % of the continuous edge
//    count in the same window.
module tb_int_loop;
  timeunit 1ps; timeprecision 1ps;
  import ilp_pkg::*;

  localparam int NS = 16, LID = 5, CID = 3, MM = 8;

  logic en = 0, intr = 0, ro;
  logic [NS-1:0] c = '0;
  int checks = 0, failures = 0;
  int edges = 0;
  time last_rise = 0, period = 0;

  int_loop #(.N_STAGES(NS), .LOOP_ID(LID), .CHIP_ID(CID), .MISMATCH_PS(MM)) dut (
    .en_i(en), .c_i(c), .intr_i(intr), .ro_o(ro));

  always @(posedge ro) begin
    edges++;
    period = $time - last_rise;
    last_rise = $time;
  end

  function automatic int exp_period(logic [NS-1:0] ch);
    int s = 0;
    for (int i = 0; i < NS; i++)
      s += int'(D_PATH_PS) + mismatch_ps(CID, LID, i, ch[i] ? 1 : 0, MM) + int'(D_LATCH_PS);
    return 2 * (s + int'(D_NAND_PS));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NS-1:0] chs [4] = '{16'h0000, 16'hFFFF, 16'h5555, 16'h0F0F};
    int cont_edges;
    #1000;
    // stopped loop
    edges = 0;
    #20_000;
    check(edges == 0, "edges while disabled");
    foreach (chs[k]) begin
      c = chs[k];
      #20_000;
      en = 1;
      #200_000;
      check(period == exp_period(c), $sformatf("period %0d expected %0d for c=%h", period, exp_period(c), c));
      en = 0;
      #20_000;
    end
    // hold
    c = 16'h3C3C;
    en = 1;
    #50_000;
    intr = 1;
    #2_000;
    edges = 0;
    #100_000;
    check(edges == 0, "edges while held");
    intr = 0;
    #100_000;
    check(edges > 0, "loop resumes after hold");
    en = 0;
    #20_000;
    // continuous reference count
    edges = 0; en = 1;
    #1_000_000;
    en = 0; #20_000;
    cont_edges = edges;
    // interrupted with random pattern, clock 3 x 38.5 MHz ~ 8.7 ns
    edges = 0; en = 1;
    fork
      begin #1_000_000; en = 0; end
      begin
        while (en) begin
          intr = 1'($urandom);
          #8_700;
        end
        intr = 0;
      end
    join
    #20_000;
    $display("continuous %0d interrupted %0d", cont_edges, edges);
    check(edges * 100 > cont_edges * 35 && edges * 100 < cont_edges * 65, "interrupted edge ratio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
