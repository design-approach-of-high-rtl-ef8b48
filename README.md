# Parallel pipelined Viterbi codec: K = 9, rate 1/3, 3-bit soft decision

This is a forward error correction chain for short frames. A 12-bit data frame goes through a
rate 1/3 convolutional encoder with constraint length 9, which turns it into 36 code bits. The
code bits become 3-bit soft symbols in the range -3..+3, and a channel disturbance can be added
at that point. A Viterbi decoder then recovers the most likely frame. The decoder is built for
throughput. Its trellis is unrolled into one hardware stage per data bit. Each stage updates all
eight trellis states at once (parallel processing), and ends in a register (pipelining). A new
frame can enter the decoder on every clock, and its result appears 13 cycles later.

## The code

The encoder (`conv_encoder`) is an 8-stage shift register FF1..FF8 behind the current input bit.
Call the input bit b0, FF1 b1, FF2 b2, and so on up to b8. Each input bit gives three code bits:

| output | taps          |
|--------|---------------|
| i1     | b0 ^ b2       |
| i2     | b0 ^ b1 ^ b2  |
| i3     | b0 ^ b1 ^ b2  |

The taps are held as 9-bit masks `GEN1..GEN3` in `vit_pkg`. Two properties of this code shape
the rest of the design:

* No output taps b3..b8. FF3..FF8 exist, so the constraint length is 9, but they never affect
  the code. The decoder therefore only has to track b0..b2, which gives **8 trellis states**
  instead of 256.
* i3 repeats i2. So the code really has two independent generators, 101 and 111, with the
  second one sent twice.

These taps are one reading of the source material, which disagrees with itself on i1: one place
gives b0 ^ b1 and another gives b0 ^ b2. This design uses b0 ^ b2. To use other taps, edit the
masks. If a new mask reaches past b2, `STATE_BITS` and the trellis wiring must grow as well.

## State numbering and the trellis

A state is the three newest bits, numbered s = {b0, b1, b2}, with the **newest bit as the MSB**.
This numbering makes both trellis directions simple shifts:

* The next state after input bit u is `{u, s[2:1]}`.
* The two predecessors of s are `{s[1:0], 0}` and `{s[1:0], 1}`. Going back one step shifts the
  state number left and brings in one decision bit. The trace-back uses this rule.
* The code word on a branch depends only on the state it enters: `state_codeword(s)` in
  `vit_pkg`. So both branches into a state carry the same branch metric.

Every frame starts in state 0, because the encoder register is cleared before each frame.
Frames carry no tail bits, so a frame can end in any of the eight states.

## Metrics

Soft symbols are 3-bit two's complement numbers, from -3 to +3. A positive value means "1". The
branch metric unit (`bmu`) computes all eight code words' metrics by adding and subtracting the
three symbols:

    bm[c] = sum over j of ( c_j ? -r_j : +r_j )      c = {i1,i2,i3}

The sign patterns go from `+++` for code word 000 to `---` for 111. A symbol that agrees with the
code bit makes the sum more negative. **Smaller is better**: a clean symbol triple scores -9
against its own code word. Each `acs_unit` adds the branch metric to both predecessor metrics,
compares the two sums, and keeps the smaller one. On a tie it keeps branch 0. Its decision bit
records which predecessor won.

Path metrics are 8-bit signed numbers and are never renormalised. This is safe because a metric
moves by at most 9 per step: over 12 steps it stays within -108..+108. A clean frame ends with
-108 in its true end state. Frames longer than 14 bits need a wider `PM_W`; the decoder refuses to
elaborate otherwise.

Before the first step, only state 0 is marked reachable. Each ACS unit carries a valid bit and
never picks an unreachable predecessor. After three steps all eight states are reachable.

## Decoder pipeline (`viterbi_decoder`)

```
soft_i ─► [acs_stage 0] ─► [acs_stage 1] ─► ... ─► [acs_stage 11] ─► smu_traceback ─► output regs
           BMU + 8 ACS      BMU + 8 ACS             BMU + 8 ACS       8 traces + min
           │ reg            │ reg                   │ reg
```

* `acs_stage` (step t) takes the three soft symbols of data bit t. It computes the eight branch
  metrics and runs eight ACS units side by side. Its register holds the new state metrics, the
  reachability bits and the eight decision bits. This register is the step's path metric memory
  and also its pipeline register.
* The frame's soft symbols and the decisions of earlier steps travel down the pipeline with the
  frame. Stage t reads only the symbols of step t and writes only decision row t. Synthesis
  removes the parts of these copies that are never read.
* `smu_traceback` is the survivor memory. For each end state f it walks back through the stored
  decisions: the decoded bit at step t is `s[2]`, and the previous state is
  `{s[1:0], dec[t][s]}`. All eight traces run in parallel and are combinational, N mux levels
  deep. The end state with the smallest metric is chosen; on a tie the lowest state number wins.
  Its survivor is the decoded frame.

Timing of the decoder:

* `valid_i` may be high on every cycle.
* `valid_o` follows **N + 1 = 13 cycles** later, with `metric_o[0..7]`, `survivor_o[0..7]`,
  `best_state_o` and `decoded_o`.
* Survivors and the decoded frame hold the first data bit in the MSB, so they read like the
  input frame.
* The last three bits of `survivor_o[f]` always spell out f. They are constant by construction.

## Encoder side and the full chain (`vit_codec_top`)

`frame_encoder` loads a 12-bit frame and clears the encoder. It then shifts the frame out MSB
first, one bit per clock, and collects the 36 code bits. `done_o` pulses N + 1 cycles after the
start. `soft_mapper` turns each code bit into +3 or -3, adds a signed 4-bit noise value, and
clips the result to -3..+3. The noise input stands in for a channel.

`vit_codec_top` connects these parts to the decoder.

* **Handshake.** A frame and its 36 noise values are taken when `frame_valid_i` and `ready_o`
  are both high.
* **Throughput.** The serial encoder limits the chain to one frame every N + 1 = 13 cycles.
* **Latency.** Results come out 2N + 2 = 26 cycles after the accepting edge.
* **Overlap.** Consecutive frames are in the decoder at the same time.
* **Clipping flags.** `clipped_o` shows which symbols were clipped, in the cycle the encoder
  finishes.

The metric and survivor outputs, one per state, follow the decoder's reference simulation:
eight 8-bit metrics and eight 12-bit outputs. In that simulation the frame `001100111110` is read
from output 3, the state with the least metric. This design gives the same result: that frame
ends in state {0,1,1} = 3.

## Where this design makes its own choices

These points are decided here rather than taken from the source material:

* **Pipeline structure.** There is one register stage per trellis step, and all eight ACS units
  and one BMU per step work in parallel. The source describes pipelining and parallel processing
  only in general terms.
* **Handshake and reset.** The ready/valid handshake, the asynchronous active-low reset and the
  per-frame clear of the encoder are all this design's own.
* **Symbol mapping.** Mapping a 1 to +3 and a 0 to -3, and which soft symbol each adder sign
  belongs to, were chosen so that "keep the smaller metric" selects the right path.
* **Start state and reachability.** Only state 0 is reachable at the start, tracked by valid
  bits.
* **End of frame.** The trace-back starts from the least-metric end state, and all eight traces
  run in parallel.
* **Extra outputs.** `best_state_o`, `decoded_o`, `clipped_o` and the noise input are additions.

Not built:

* **Bit-serial branch metric path.** The source mentions converting the branch metrics to a
  bit-serial stream before the ACS. No bit-serial ACS is described to consume that stream, and
  the ACS described elsewhere adds whole 8-bit words. So the metrics stay word-parallel here.
* **Normal decoder.** The slower, non-pipelined decoder that the source compares against is not
  part of this design.

Not reproduced:

* **FPGA figures.** The reported timing, area and power come from an FPGA build.
* **Example metrics.** The metric values printed for the example run (least value -84) depend on
  soft levels and noise that are not stated.

## Files

| file | role |
|------|------|
| `rtl/vit_pkg.sv` | sizes, types, generator masks, `encode_window`, `state_codeword` |
| `rtl/conv_encoder.sv` | K = 9 shift register encoder |
| `rtl/frame_encoder.sv` | frame load, serial encoding, code collection |
| `rtl/soft_mapper.sv` | bits to soft symbols with noise and clipping |
| `rtl/bmu.sv` | eight branch metrics |
| `rtl/acs_unit.sv` | add-compare-select for one state |
| `rtl/acs_stage.sv` | one pipelined trellis step |
| `rtl/smu_traceback.sv` | trace-back survivor memory and least-metric choice |
| `rtl/viterbi_decoder.sv` | 12-stage decoder |
| `rtl/vit_codec_top.sv` | complete chain |
| `tb/vit_ref_pkg.sv` | reference encoder and exhaustive ML search |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench checks its module against a model written separately from the RTL. Each one ends
by printing `TB_RESULT checks=N failures=M`.

* **Exhaustive search reference.** The decoder and top-level tests compare every frame against a
  search over all 4096 possible frames. The search gives the best metric for each end state. The
  tests check each state's metric, check that each survivor really scores that metric and ends
  in its state, check the best state, and check that clean frames decode to the data sent.
* **Disturbed frames.** Frames are sent clean, with small offsets, and with flipped symbols.
  Frames whose hard bit errors were corrected are counted.
* **Timing and mechanisms.** The tests check the 13-cycle decoder latency and the 26-cycle chain
  latency, and back-to-back input. The top-level test fails if any of these never happened:
  back-pressure, clipping, error correction, or overlapping frames.
* **Parameters.** `vit_codec_top_tb` runs the top with its default parameters. It finishes in a
  few seconds.

To simulate with Verilator, for example the full chain:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/vit_pkg.sv tb/vit_ref_pkg.sv tb/vit_codec_top_tb.sv --top-module vit_codec_top_tb
./obj_dir/Vvit_codec_top_tb
```

Replace the testbench name to run any other test.
