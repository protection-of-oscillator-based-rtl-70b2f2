// tb_pair_eval - self-checking test of the per-loop response unit.
//
// Presents random pairs of counts CNT(c), CNT(~c), with equal, larger and
// smaller second counts, and checks diff_o = CNT(c) - CNT(~c), resp_o = 1
// exactly for a negative difference, and valid_o one cycle after the
// inverse count.
module tb_pair_eval;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, inv = 1'b0;
  logic [W-1:0] cnt = '0;
  logic vo, resp;
  logic signed [W:0] diff;
  int checks = 0, failures = 0;

  pair_eval #(.CNT_W(W)) dut (.clk(clk), .rst_n(rst_n), .valid_i(valid), .inv_i(inv),
    .cnt_i(cnt), .valid_o(vo), .resp_o(resp), .diff_o(diff));

  always #5000 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      a = longint'($urandom);
      case (k % 3)
        0: b = a;
        1: b = a + longint'($urandom_range(0, 1000));
        default: b = a - longint'($urandom_range(0, 1000));
      endcase
      if (b < 0) b = 0;
      if (b > 64'hFFFF_FFFF) b = 64'hFFFF_FFFF;
      @(negedge clk); valid = 1'b1; inv = 1'b0; cnt = W'(a);
      @(negedge clk); valid = 1'b0;
      check(!vo, "no valid after the first count");
      repeat (2) @(negedge clk);
      valid = 1'b1; inv = 1'b1; cnt = W'(b);
      @(negedge clk); valid = 1'b0;
      check(vo, "valid one cycle after the inverse count");
      check(longint'(diff) == a - b, $sformatf("diff %0d expected %0d", diff, a - b));
      check(resp == (a < b), "sign response");
      @(negedge clk);
      check(!vo, "valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
