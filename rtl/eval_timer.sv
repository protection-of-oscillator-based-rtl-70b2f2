// eval_timer - evaluation timer of the loop PUF.
//
// A pulse on start_i raises en_o at the next clock edge and keeps it high
// for exactly EVAL_CYCLES reference-clock cycles (2^19 - 1 at 100 MHz, about
// 5.24 ms, in the design's main configuration). done_o pulses for one
// cycle in the cycle after en_o falls. The loops oscillate and the interrupt
// PRNG runs only while en_o is high, so the count of a loop is its number of
// oscillations in this fixed window. A start while running is ignored.
module eval_timer #(
  parameter int unsigned EVAL_CYCLES = 2**19 - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic en_o,
  output logic done_o
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TW = $clog2(EVAL_CYCLES + 1);
  logic [TW-1:0] left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q <= '0;
      en_o   <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (en_o) begin
        if (left_q == TW'(1)) begin
          en_o   <= 1'b0;
          done_o <= 1'b1;
        end
        left_q <= left_q - 1'b1;
      end else if (start_i) begin
        en_o   <= 1'b1;
        left_q <= TW'(EVAL_CYCLES);
      end
    end
  end
endmodule
