// edge_counter - counter of oscillation edges of one loop.
//
// Counts the rising edges of the loop output ro_i; the loop output is the
// counter's clock, as in a frequency counter. clr_i clears it
// asynchronously; the sequencer raises clr_i only while the loop stands
// still, and reads cnt_o only after the loop has stopped and settled, so
// the value crosses into the reference clock domain without a synchroniser.
// clr_i is a register output of the reference-clock sequencer used as an
// asynchronous clear, which lint reports as a sync/async mix; it is
// intended, because the counter's own clock (the loop) is stopped then.
// The 32-bit width is the design's; one 2^19 - 1 cycle window at 100 MHz
// gives a loop near 40 MHz about 2^18 edges, far below wrap-around.
module edge_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             ro_i,
  input  logic             clr_i,
  output logic [CNT_W-1:0] cnt_o
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge ro_i or posedge clr_i) begin
    if (clr_i) cnt_o <= '0;
    else       cnt_o <= cnt_o + 1'b1;
  end
endmodule
