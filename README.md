# Interruptible loop PUF

A loop PUF derives a secret from tiny, chip-specific differences in ring
oscillator speed. Each oscillator ("loop") is a chain of delay elements. A
challenge bit per stage picks one of two delay paths. The response bit for
a challenge `c` is the sign of `CNT(c) - CNT(~c)`, the difference between
the edges counted in a fixed window with `c` applied and with its bitwise
inverse applied. A negative difference gives 1, and zero or positive gives 0.

The weakness is that a free-running oscillator is a clean tone. Its
frequency shows as a peak in the chip's power or EM spectrum. An attacker who
sees the two peaks for `c` and `~c` reads the response bit directly, and
learns from their distance how reliable that bit is.

This design blurs those peaks. While a loop is being measured, a
pseudo-random bit stream running on a separate, faster interrupt clock
repeatedly freezes it. Every delay element is a track-and-hold stage. It
passes edges while the interrupt is low. While the interrupt is high it holds
its output, so the oscillation stops with its phase intact and later picks
up where it stopped. The edges now come at random times, and the spectrum
no longer has a sharp line.

The response still works because both evaluations of a pair (`c` and `~c`)
use the same seed and therefore the same interrupt pattern. Both therefore
lose the same running time, and the sign of the count difference is kept.
Each pair gets a fresh seed.

## Block diagram

```
                ref_clk (100 MHz)                     int_clk (1..5 x loop frequency)
                     |                                        |
  start_i --> puf_ctrl ----- seed_req_o / seed_i ---------> irq_gen
               |  (eval_timer)    prng_load, prng_run -->  |  lfsr_prng (72 bit)
               |                                          |  irq_balancer
               | cw_idx, inv                              |
               v                                          | irq[3:0]
          hadamard_gen --- challenge[15:0] ---+           |
               |                              v           v
               | loop_en & loop_en_i   int_loop[i] (16 x int_delay_elem + NAND)
               +----------------------------> |      line i mod 4
                                              v
                                      edge_counter[i] (32 bit)
                                              v
                                        pair_eval[i] --> resp_o[i], diff_o[i]
```

| File | Role |
|---|---|
| `rtl/ilp_pkg.sv` | shared constants, the sequencer state type, and the oscillator mismatch function |
| `rtl/ilpuf_top.sv` | the array: sequencer, challenge generator, interrupt generator, N_LOOPS loop/counter/pair-evaluator slices |
| `rtl/int_delay_elem.sv` | one track-and-hold stage: a LUT with two paths, then a D-latch (behavioural model) |
| `rtl/int_loop.sv` | one ring of N_STAGES stages closed by an enable NAND (behavioural model) |
| `rtl/edge_counter.sv` | counts rising edges of a loop output |
| `rtl/hadamard_gen.sv` | 16-bit Hadamard codeword `k` or its inverse |
| `rtl/eval_timer.sv` | measurement window of exactly EVAL_CYCLES reference cycles |
| `rtl/puf_ctrl.sv` | sequencer for the 15 challenge pairs, including seed requests and PRNG reloads |
| `rtl/lfsr_prng.sv` | 72-bit LFSR, one random bit per interrupt clock |
| `rtl/irq_balancer.sv` | turns the random bit into four balanced interrupt lines |
| `rtl/irq_gen.sv` | the interrupt clock domain: synchronisers, LFSR, balancer, output gating |
| `rtl/pair_eval.sv` | signed difference and sign response of one loop |

## The track-and-hold delay element

Where the element holds matters. With the latch in the forward path behind
the LUT (`int_delay_elem`), an edge that has already entered the LUT when the
interrupt arrives still reaches the latch input, but it waits there. An edge
that has already passed the latch gate completes. When the interrupt drops,
everything continues from exactly this state. The loss per interrupt is at
most one stage delay of phase. Because `c` and `~c` see the same interrupt
pattern, this error is the same size in both evaluations and cancels to
first order.

Two other holding variants exist: a latching LUT and a flip-flop per stage.
This design has only the forward D-latch variant.

The latch is transparent while `intr_i` is low. A real FPGA latch primitive
that is transparent on a high gate needs an inverter in front of it, and
the function is the same.

## Interrupt generation and balancing

The interrupt clock domain (`irq_gen`) holds a 72-bit Fibonacci LFSR with
taps 72, 66, 25 and 19, which is a maximal-length polynomial. It gives one
bit per `int_clk` cycle. A single random line that drives every loop
would make the supply current itself depend on the random data, and a
power trace would then show the pattern. The balancer
(`irq_balancer`) avoids this by making four lines:

- `irq[0]` (output 1) is the random bit, registered.
- `irq[2]` (output 3) toggles in every cycle in which output 1 does *not*
  change.
- `irq[1]` and `irq[3]` are the inverses of outputs 1 and 3.

As a result, in every cycle exactly one of the two complementary pairs
switches, and exactly half of the lines are high. Loop `i` uses line
`i mod 4`. So at any time half of the loops are held, and the number of
lines that switch per cycle does not depend on the random data.

A side effect is that each loop runs for about half of the window, so its
count is about half of the continuous count.

The sequencer's `prng_load` and `prng_run` levels, and the mode input
`irq_en_i`, are brought into the interrupt domain through two-flop
synchronisers. While loading the seed, the LFSR takes the seed and the
balancer clears. Outside the evaluation window, and in continuous mode, all
four lines are low. The delay through the synchronisers means the pattern
can start one interrupt clock earlier or later relative to the loop enable.
The `c` and `~c` evaluations therefore see the same sequence, but possibly
shifted by one interrupt clock at its start and end.

## Sequencing and timing

`puf_ctrl` runs a readout of all loops selected in `loop_en_i` for the
codewords 1..15. The all-zero word is left out: its Hamming weight differs
from that of all the other words, so it would bias the responses.
Each codeword is handled as follows:

1. **SEED** (1 cycle): `seed_req_o` is high and `seed_i` is captured.
2. For `c` and then for `~c`:
   - **PREP** (`SETTLE_CYCLES + 1`): counters are cleared, the PRNG is
     reloaded with the held seed, the challenge is applied, and the loops
     stand still.
   - **RUN** (`EVAL_CYCLES + 1`): the loops are enabled and the PRNG steps
     for exactly `EVAL_CYCLES` cycles, then the timer reports done.
   - **DRAIN** (`DRAIN_CYCLES + 1`): the loops stop and the counters settle.
   - **PUB** (1): `cnt_valid_o` pulses, with `cw_idx_o`/`inv_o` naming the
     challenge. After `~c`, `pair_eval` then gives `resp_valid_o`, `resp_o`
     and the signed `diff_o` one cycle later.

`done_o` rises `1 + 15 * (1 + 2 * (SETTLE + EVAL + DRAIN + 4))` cycles after
the cycle that takes `start_i`. With the defaults (`EVAL_CYCLES = 2^19 - 1`,
margins of 16) that is 15,729,706 cycles, or 157.3 ms at 100 MHz. The timer
window is 5.24 ms.

The loop enable is registered once more in the top, so a loop runs exactly
`EVAL_CYCLES` reference cycles.

`edge_counter` is clocked by the loop itself and cleared asynchronously by
the sequencer, only while the loop is stopped. It is read only after
DRAIN. Because nothing moves at either point, no synchroniser is needed.
Lint reports this clock/clear mix, the ring oscillators as combinational
loops, and the stage latches. All three are intended.

## The oscillator model and how far it can be trusted

`int_loop` and `int_delay_elem` are behavioural models with transport
delays. A ring oscillator made of LUTs cannot be written as portable
synthesizable RTL: it has to be placed and routed by hand on the target
FPGA. Elsewhere the design is synthesizable.

- **Delays.** The model uses 680 ps per LUT path, 120 ps per latch and
  200 ps for the closing NAND. For 16 stages this gives a loop near
  38.5 MHz.
- **Chip-specific variation.** Each path adds a fixed offset of up to
  `±MISMATCH_PS` (default 8 ps, about 1 %). The offset comes from a hash of
  `(CHIP_ID, loop, stage, path)`, so different `CHIP_ID`s behave like
  different chips.
- **Not modelled.** The model has no jitter, temperature, voltage,
  metastability, or glitches at the latch gate. Simulated responses are
  therefore fully reproducible. Reliability figures, and any claim about
  the power spectrum, cannot be checked with this model.

The models do check the logic of the scheme:

- Counts follow the path delays exactly.
- An interrupted loop holds its phase and resumes.
- Interrupted pairs give the same sign as continuous pairs.

## Departures from the reference scheme and open ends

- **Response computation on-chip.** The reference scheme reads out the
  counters and forms the sign off-chip. Here `pair_eval` does it on-chip.
  All counters are still brought out (`cnt_o` with `cnt_valid_o`), so an
  off-chip evaluation is still possible.
- **Seed source.** The seed source is not part of the design. The top asks
  for a fresh 72-bit seed per pair, and a TRNG or host must supply it.
- **Interrupt clock and fan-out.** The interrupt clock (a PLL output, 1 to
  5 times the loop frequency) and the buffer tree that spreads the four
  lines over the array are also outside the design.
- **Helper data.** The helper-data scheme that turns count differences into
  a stable key, with multi-level quantisation and error correction, is not
  included.
- **Window length.** The window length is a parameter, not a register. The
  shorter 2^16 - 1 window needs `EVAL_CYCLES = 65535` at build time.
- **Number of challenges.** The sequencer always steps through 15
  codewords of a 16-bit Hadamard code. A 64-stage loop can be built
  (`N_STAGES = 64`, and `hadamard_gen`'s width follows). It would still
  only see those 15 pairs, because the codeword index is 4 bits wide.
- **Design choices.** The following are this design's own choices: the
  settle and drain margins, the order of the codewords, the mapping of
  loops to interrupt lines, the LFSR polynomial, the bit-to-stage mapping
  of the challenge, and the reset behaviour.

## Parameters of `ilpuf_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N_LOOPS` | 72 | loops in the array, each giving 15 response bits (1080 in total) |
| `N_STAGES` | 16 | delay elements per loop, which is also the challenge width |
| `CNT_W` | 32 | counter width |
| `LFSR_W` | 72 | PRNG and seed width |
| `EVAL_CYCLES` | 2^19 - 1 | measurement window in `ref_clk` cycles |
| `CHIP_ID` | 1 | oscillator model only: selects a set of delay offsets |
| `MISMATCH_PS` | 8 | oscillator model only: largest delay offset per path |

## Simulating

Any testbench runs with Verilator 5 (`--timing` is required for the
oscillator models):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/ilp_pkg.sv tb/tb_ilpuf_top.sv --top-module tb_ilpuf_top
./obj_dir/Vtb_ilpuf_top
```

Every testbench checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

### Block testbenches

| Testbench | What it checks |
|---|---|
| `tb_int_delay_elem` | path delays for both challenge values, holding while the input changes, resuming, an edge already inside the latch still arriving |
| `tb_int_loop` | exact period for every stage/path mix against the mismatch table, freeze and resume, duty under random interrupts |
| `tb_edge_counter` | counting, clearing, clear priority, wrap-around |
| `tb_hadamard_gen` | all codewords against a Sylvester-built reference, inversion, weight 8 and pairwise distance 8 |
| `tb_eval_timer` | a window of exactly 2^19 - 1 cycles at the default, and a short instance |
| `tb_lfsr_prng` | sequence against a reference model, seed reload, zero seed |
| `tb_irq_balancer` | the balancing rules in every step: two lines high, exactly one pair toggling; hold and clear |
| `tb_irq_gen` | gating in continuous mode and outside the window, two lines toggling per cycle, same seed gives the same pattern, output 1 follows the LFSR stream |
| `tb_puf_ctrl` | the full state sequence, seed handling and the done-cycle formula |
| `tb_pair_eval` | sign and difference against random count pairs |

### Whole-array testbenches

`tb_ilpuf_top` runs a complete readout in continuous mode and then a second
one with interrupts, using 4 loops (one of them disabled) and a 2^11 - 1
window. It checks the following:

- continuous count differences against the model's delays;
- that interrupted responses agree with the continuous ones;
- the total cycle count;
- that every mechanism occurred: seed requests, PRNG reloads, interrupts,
  frozen loops, and disabled loops staying at zero.

`tb_ilpuf_wide` runs the array at all default sizes (72 loops, 16 stages,
32-bit counters, 72-bit LFSR) with only the window shortened to 2^10 - 1. It
follows one interrupted challenge pair up to its first response.

### Largest size simulated

A full readout at the default parameters covers 157 ms of circuit time
with 72 event-driven oscillators. At about 2 µs of circuit time per second
of simulation, even one default-size pair would take more than an hour.
The largest configurations simulated are:

- **Full array size:** all 72 loops with a 2^10 - 1 cycle window, for one
  challenge pair (`tb_ilpuf_wide`).
- **Complete readouts:** all 30 evaluations on 4 loops with a 2^11 - 1
  window (`tb_ilpuf_top`).

The default 2^19 - 1 window is checked on its own in `tb_eval_timer`.
