// ilp_pkg - shared constants and types of the interruptible loop PUF.
//
// Holds the challenge width and codeword count (16-bit Hadamard challenges,
// the all-zero word left out, so 15 challenge pairs per loop), the number of
// interrupt lines produced by the balancing circuit, the sequencer's state
// type, and the timing constants of the behavioural oscillator model.
// The model constants are this design's own choice: they give a loop of
// 16 latch-based stages a continuous frequency near 38.5 MHz, which is the
// frequency reported for the latch variant of the delay element.
// mismatch_ps() is a fixed integer hash that stands in for manufacturing
// variation: every (chip, loop, stage, path) gets a reproducible delay
// offset, so simulations of "different chips" differ only in CHIP_ID.
package ilp_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned C_W   = 16;  // challenge width = stages per loop
  localparam int unsigned N_CW  = 15;  // non-zero Hadamard codewords used
  localparam int unsigned N_IRQ = 4;   // interrupt lines (outputs 1..4)

  // Behavioural timing of one delay element and of the loop's enable gate.
  localparam int unsigned D_PATH_PS  = 680;  // LUT path delay, nominal
  localparam int unsigned D_LATCH_PS = 120;  // forward D-latch delay
  localparam int unsigned D_NAND_PS  = 200;  // enable NAND delay

  typedef enum logic [2:0] {
    S_IDLE,   // waiting for start
    S_SEED,   // take a new PRNG seed for the next challenge pair
    S_PREP,   // clear counters, load PRNG, let challenge and loops settle
    S_RUN,    // timer enables the loops, PRNG interrupts them
    S_DRAIN,  // loops stopped, wait until counters are stable
    S_PUB,    // publish counter values
    S_DONE    // all pairs evaluated
  } ctrl_state_e;

  // Reproducible pseudo-random offset in [-range, +range] picoseconds.
  function automatic int mismatch_ps(int chip, int loop, int stage, int path, int range);
    logic [31:0] x;
    x = 32'h9E37_79B9 ^ (32'(chip) * 32'd1000003) ^ (32'(loop) * 32'd7919)
        ^ (32'(stage) * 32'd104729) ^ (32'(path) * 32'd15485863);
    for (int r = 0; r < 4; r++) begin
      x = x ^ (x << 13);
      x = x ^ (x >> 17);
      x = x ^ (x << 5);
    end
    if (range <= 0) return 0;
    return int'(x % 32'(2 * range + 1)) - range;
  endfunction
endpackage
