// tb_int_delay_elem - self-checking test of one interruptible delay element.
//
// Checks the delay for both challenge values (D0 + DL and D1 + DL), that
// the output holds while the interrupt is high even when the input
// changes, that it takes the new input DL after the interrupt falls, and
// that an edge already inside the latch when the interrupt rises still
// arrives (the phase quantisation of one stage).
module tb_int_delay_elem;
  timeunit 1ps; timeprecision 1ps;

  localparam int D0 = 650, D1 = 710, DL = 100;

  logic a = 1'b1, c = 1'b0, intr = 1'b0, y;
  int checks = 0, failures = 0;
  time t_edge;

  int_delay_elem #(.D0_PS(D0), .D1_PS(D1), .DL_PS(DL)) dut (
    .in_i(a), .c_i(c), .intr_i(intr), .out_o(y));

  always @(posedge y or negedge y) t_edge = $time;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    #1000;
    for (int k = 0; k < 8; k++) begin
      c = 1'(k % 2);
      #1000;
      t0 = $time;
      a = ~a;
      #3000;
      check(y == a, "output follows input");
      check(t_edge - t0 == time'(c ? D1 + DL : D0 + DL),
            $sformatf("delay %0t for c=%0d", t_edge - t0, c));
    end
    // hold: interrupt high, input changes, output must stay
    c = 1'b0;
    intr = 1'b1;
    #100;
    a = ~a;
    #5000;
    check(y != a, "output held while interrupted");
    t0 = $time;
    intr = 1'b0;
    #2000;
    check(y == a && t_edge - t0 == time'(DL), "output released DL after interrupt falls");
    // edge inside the latch when the interrupt rises still arrives
    t0 = $time;
    a = ~a;
    #(D0 + DL / 2);
    intr = 1'b1;
    #2000;
    check(y == a && t_edge - t0 == time'(D0 + DL), "edge in flight passes the latch");
    // edge still in the LUT when the interrupt rises is held back
    intr = 1'b0;
    #2000;
    a = ~a;
    #(D0 / 2);
    intr = 1'b1;
    #3000;
    check(y != a, "edge in the LUT held back");
    intr = 1'b0;
    #1000;
    check(y == a, "held edge released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
