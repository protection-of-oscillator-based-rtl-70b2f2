// tb_edge_counter - self-checking test of the edge counter.
//
// Applies random numbers of pulses on ro_i, with clears in between, and
// compares the count with the number of pulses sent; also checks that a
// clear wins while held and that the counter wraps at 2^CNT_W.
module tb_edge_counter;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 12;
  logic ro = 1'b0, clr = 1'b0;
  logic [W-1:0] cnt;
  int checks = 0, failures = 0;

  edge_counter #(.CNT_W(W)) dut (.ro_i(ro), .clr_i(clr), .cnt_o(cnt));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulses(int n);
    repeat (n) begin #1300 ro = 1'b1; #1300 ro = 1'b0; end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1000;
    clr = 1'b1;
    #1000;
    clr = 1'b0;
    #1000;
    check(cnt == 0, "cleared at start");
    for (int k = 0; k < 20; k++) begin
      n = 1 + int'($urandom_range(0, 700));
      pulses(n);
      #100;
      check(cnt == W'(n), $sformatf("count %0d expected %0d", cnt, n));
      clr = 1'b1;
      #100;
      check(cnt == 0, "clear");
      pulses(3);
      check(cnt == 0, "no count while clear held");
      clr = 1'b0;
      #100;
    end
    pulses(2**W + 5);
    check(cnt == W'(5), "wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
