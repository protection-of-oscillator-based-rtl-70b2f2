// tb_hadamard_gen - self-checking test of the challenge generator.
//
// Builds the 16 x 16 Hadamard matrix by the Sylvester doubling rule
// H(2n) = [H H; H ~H] and compares every row and its inverse with the
// generator; also checks that the rows 1..15 used as challenges all have
// Hamming weight 8 and pairwise distance 8.
module tb_hadamard_gen;
  timeunit 1ps; timeprecision 1ps;

  localparam int CW = 16;
  logic [3:0]    idx;
  logic          inv;
  logic [CW-1:0] ch;
  logic [CW-1:0] h [CW];
  int checks = 0, failures = 0;

  hadamard_gen #(.C_W(CW)) dut (.idx_i(idx), .inv_i(inv), .challenge_o(ch));

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
    // Sylvester construction, bit j of row r; 0 stands for +1
    h[0] = '0;
    for (int n = 1; n < CW; n *= 2)
      for (int r = 0; r < n; r++) begin
        logic [CW-1:0] top, bot;
        top = h[r];
        bot = h[r];
        for (int j = 0; j < n; j++) begin
          top[n + j] = h[r][j];
          bot[n + j] = ~h[r][j];
        end
        h[r] = top;
        h[r + n] = bot;
      end
    for (int k = 0; k < CW; k++) begin
      for (int v = 0; v < 2; v++) begin
        idx = 4'(k);
        inv = 1'(v);
        #10;
        check(ch == (v ? ~h[k] : h[k]), $sformatf("idx %0d inv %0d: %h", k, v, ch));
      end
    end
    for (int a = 1; a < CW; a++) begin
      check($countones(h[a]) == CW / 2, "weight of used codeword");
      for (int b = a + 1; b < CW; b++)
        check($countones(h[a] ^ h[b]) == CW / 2, "distance between codewords");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
