// int_delay_elem - interruptible delay element with a forward D-latch
// (behavioural model; the real element is an FPGA LUT plus a latch primitive).
//
// One stage of an interruptible loop. The challenge bit c_i selects one of
// two nominally identical delay paths through the LUT (D0_PS or D1_PS; they
// differ only by the mismatch the loop assigns). Behind the LUT sits a
// D-latch that is transparent while intr_i is low and holds its output while
// intr_i is high, so an interrupted oscillation keeps its phase and resumes
// where it stopped. An edge already inside the LUT when intr_i rises still
// reaches the latch input but not the output; an edge already inside the
// latch delay still reaches the output. That reproduces the phase
// quantisation error of one stage per interrupt that the latch variant has.
// The latch-in-the-forward-path variant is the one the design uses; the
// delay numbers are this model's own choice.
//
// Ports: in_i from the previous stage, c_i challenge bit, intr_i interrupt
// (high = hold), out_o to the next stage. Delays are transport delays in ps.
// Both internal nodes start at 1, which is the settled state of a stopped
// loop, so no stray wavefront exists at time zero.
module int_delay_elem #(
  parameter int unsigned D0_PS = 680,  // path delay for c_i = 0
  parameter int unsigned D1_PS = 680,  // path delay for c_i = 1
  parameter int unsigned DL_PS = 120   // latch D-to-Q delay
) (
  input  logic in_i,
  input  logic c_i,
  input  logic intr_i,
  output logic out_o
);
  timeunit 1ps; timeprecision 1ps;

  logic lut_q;  // LUT output through the path the challenge bit selects
  logic lat_q;  // latch output

  initial begin
    lut_q = 1'b1;
    lat_q = 1'b1;
  end

  // One transport-delay process whose delay is chosen by c_i; the challenge
  // is static during an evaluation, so this equals two paths and a mux.
  always @(in_i) lut_q <= #(c_i ? D1_PS : D0_PS) in_i;

  // Transparent-low latch: follows the LUT output only while not interrupted.
  always @(lut_q or intr_i) if (!intr_i) lat_q <= #(DL_PS) lut_q;

  assign out_o = lat_q;
endmodule
