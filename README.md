# Rate 8/10 matched-spectral-null trellis codec for a dicode channel

A partial-response channel with transfer polynomial 1 − D (the "dicode"
channel, a common model of magnetic recording) turns binary code bits
u ∈ {0,1} into outputs v_i = u_i − u_{i−1} ∈ {−1, 0, +1}. Its spectrum has a
null at dc. A *matched-spectral-null* (MSN) code puts a null at the same
frequency in the code's own spectrum, by keeping the running digital sum of
the coded sequence bounded. That enlarges the distance between output
sequences that a maximum-likelihood detector must tell apart, worth close to
3 dB of noise tolerance over an uncoded channel.

This RTL is a complete codec for such a channel:

* a rate 8/10 **encoder** (a byte becomes a 10-bit code word),
* a six-state **Viterbi detector** that turns the noisy 6-bit channel
  samples back into code bits,
* a **decoder** that turns the code bits back into bytes,
* an on-chip noiseless **1 − D test channel** that closes the loop for
  self-test.

The detector is the substance of the design. Its six states are folded onto
only **two** four-input add-compare-select (ACS) units, each pipelined three
deep, and its path metrics use **modulo normalization**, so no metric is
ever rescaled. One trellis stage (two code bits) takes four clocks. At
30 MHz that is 7.5 M stages/s, 15 Mb/s of code bits and 12 Mb/s of user
data. A class-IV (1 − D²) channel is an interleaved pair of dicode channels,
so two of these codecs behind an interleaver serve it at 24 Mb/s. The
interleaver is not part of this RTL.

## The trellis

A stage carries two code bits u1u2. A detector state is the pair
(level, last code bit). The *level* is the running digital sum at the stage
boundary, kept in 0..2:

| state | level | last bit |   | state | level | last bit |
|-------|-------|----------|---|-------|-------|----------|
| 1     | 0     | 1        |   | 2     | 0     | 0        |
| 3     | 1     | 1        |   | 4     | 1     | 0        |
| 5     | 2     | 1        |   | 6     | 2     | 0        |

The stage `11` raises the level by one and `00` lowers it by one. The stages
`01` and `10` keep it. The noiseless outputs of a branch are
v1 = u1 − u_prev and v2 = u2 − u1. This gives the following branches:

* An odd state (level l, last bit 1) is entered with `11` from level l−1
  (labels (0,0) from the odd state, (+1,0) from the even state), or with `01`
  from level l (labels (−1,+1) and (0,+1)).
* An even state (level l, last bit 0) is entered with `10` from level l
  (labels (0,−1) and (+1,−1)), or with `00` from level l+1 (labels (−1,0)
  and (0,0)).

States 2–5 therefore have four predecessors. States 1 and 6 have two each:
state 1 is reached only from states 1 and 2, and state 6 only from states 5
and 6. For example, new pm1 = min(pm1 + bm(−1,+1), pm2 + bm(0,+1)).

## Branch metrics

For a branch with outputs v1,v2 and received samples s1,s2, the squared
distance is (L·v1 − s1)² + (L·v2 − s2)². Here L is the sample value of a
noiseless +1 (`LEVEL` = 16 LSB of the 6-bit signed samples). Drop the s²
terms, which all branches share, and divide by L. What remains is

    bm(v1,v2) = L·(v1² + v2²) − 2·v1·s1 − 2·v2·s2

This needs only a one-bit shift and adders. `branch_metric_calc` computes all
seven labels in parallel, once per stage. The metrics range from −94 to +158
and are 9 bits wide.

Because the trellis looks the same on every level, each ACS unit uses the
same four branch metrics in every minor cycle. No branch-metric multiplexing
is needed.

## Six states on two pipelined ACS units

This is the part that needs the most care.

**Folding.** Unit P1 serves the states that end in a 1 (1, 3, 5). Unit P2
serves those that end in a 0 (2, 4, 6). Each unit also gets one dummy state
(7 and 8), so a stage is four clocks, called minor cycles:

| minor cycle | 0 | 1 | 2 | 3 |
|-------------|---|---|---|---|
| P1 state    | 1 | 3 | 5 | 7 (dummy) |
| P2 state    | 8 (dummy) | 2 | 4 | 6 |

**Pipelining.** `pipelined_acs` has three register stages:

1. four adders (pm + bm), then a register;
2. two compare-selects, (A,C) and (B,D), then a register;
3. a final compare-select, then a register.

A new state enters every clock, and its new metric is on the unit's output
three clocks later.

**Fixed feedback nets.** In minor cycle m both units need the old metrics of
states 2m−1 and 2m+1 (odd) and 2m and 2m+2 (even). With the schedule and the
three-clock latency, these metrics are always on the same four nets:

| net | source | carries in minor cycle m |
|-----|--------|--------------------------|
| A | P1 output, two clocks ago | state 2m−1 |
| B | P1 output, one clock ago  | state 2m+1 |
| C | P2 output, one clock ago  | state 2m   |
| D | P2 output, now            | state 2m+2 |

The feedback is therefore plain wiring plus three delay registers
(`viterbi_detector`). Each unit's candidate inputs are:

| unit | A | C | B | D |
|------|---|---|---|---|
| P1 | bm(0,0) | bm(+1,0) | bm(−1,+1) | bm(0,+1) |
| P2 | bm(0,−1) | bm(+1,−1) | bm(−1,0) | bm(0,0) |

Pair (A,C) holds the predecessors on the lower of the two levels and pair
(B,D) those on the upper one.

**Why the dummy states, and C1/C2.** In minor cycle 0, nets A and C carry
the dummy states 7 and 8, which belong to the previous stage. State 1 needs
only B and D, so control C1 makes P1's last compare-select take the (B,D)
pair. In minor cycle 3, nets B and D carry dummy states of the next stage.
State 6 needs only A and C, so C2 makes P2 take (A,C). The dummy metrics are
computed but never selected. The end-to-end testbench counts how often C1
and C2 actually overrule a compare.

**Decisions.** Each ACS reports a 2-bit decision: `pair` (the (B,D) pair
won) and `even` (the even-numbered, last-bit-0 member won). The detector
holds the decisions and metrics of states 1–5 until state 6 leaves P2,
two clocks into the next stage. It then updates the path memory for the
whole stage at once.

## Modulo normalization

Path metrics are `PM_W` = 11-bit unsigned numbers that wrap freely. They are
never normalized. The live metrics always lie within a bounded spread Δ, so
they are like runners on a circular track who are never more than half a lap
apart. The leader can be found from the difference alone: x < y exactly when
the 11-bit difference x − y, read as signed, is negative (`msn_pkg::pm_lt`).
This keeps normalization out of the ACS loop and needs no global minimum.

The width follows from a bound. Any state can be reached from any other in
two stages, so Δ ≤ 2 × (158 − (−94)) = 504. Two compared candidate sums
differ by at most Δ + 252 = 756, which is below 1024, half of 2¹¹. In
simulation with heavy noise, the largest spread actually seen was about 200.
A tighter, exact Δ would allow a narrower word, but that is not attempted
here.

## Path memory and output

`path_memory` uses register exchange. There are six registers of 32 stages
(64 bits), and register i always holds the survivor of state i. On each
update, every register is replaced at once by its chosen predecessor's
register, shifted by one stage, with the branch's two code bits appended.
The output is the oldest stage of one survivor.

The detector reads the survivor of the state with the **smallest** metric
(modulo compare, lowest state number on ties), not a fixed state. This
matters for this trellis. Two paths whose bits are identical but whose
levels differ by one stay apart for as long as both levels stay legal. Their
metric difference is fixed where they split. So the survivor of a fixed
state can disagree with the transmitted sequence more than 32 stages back,
even without noise. This was observed in simulation.

## The code

The encoder and decoder tables of the original rate 8/10 code are not
reproduced. `msn_pkg` defines a **substitute** rate 8/10 code that follows
exactly the same six-state trellis. Every 10-bit word is a five-stage path
that keeps the level in 0..2. The encoder state is the level at the word
boundary, and the encoder starts on level 1. Bytes map to words as follows:

| bytes | words |
|-------|-------|
| 0–31 | the 32 words built only from `01`/`10` stages, legal from any level. Bit 4..0 of the byte selects `10` (1) or `01` (0) for stages 1..5. |
| 32–242 | the 211 words whose level offset stays in 0..+1, in ascending numeric order. Levels 0 and 1 use the word; level 2 uses its bit complement. |
| 243–255 | the first 13 words, in ascending order, that use the full offset range 0..+2 (level 0; level 2 uses the complement), or that reach both −1 and +1 (level 1). |

The rule guarantees that a word decodes to the same byte from whichever
level it was sent. The decoder therefore needs no state and looks at a
single word. Words that are not code words decode to 0x00. Both tables are
computed by constant functions at elaboration and become ROM logic.

How much this code gains is limited by its level statistics. A wrong path
that runs one level above or below the true one carries the same bits. Only
the trellis boundaries can eliminate it: it dies when the true path touches
level 2 (for the path above) or level 0 (for the path below). Until then it
trails the true path by just the distance of one bit flip.

The substitute code lets the level stay in 1..2 for long stretches. The
detector then often decides before such a path has died. With Gaussian
noise, its byte error rate is close to what an uncoded maximum-likelihood
detector would give, and well below a symbol-by-symbol slicer (see the
class-IV test below). A deeper path memory helps only a little: 96 stages
instead of 32 lowered the byte error rate at σ = 4.5 LSB from 5.5 % to
3.8 %. A code that forces the level to both boundaries often would gain
more. Its table can replace `build_enc_table` and `build_dec_table` without
touching the detector.

This departs from the original in three ways:

* The encoder has three states instead of four.
* The decoder window is one code word instead of two adjacent words.
* Coding-gain figures of the original code (about 2.8 dB over uncoded PRML
  at a bit-error rate of 10⁻⁷) are not established for the substitute code.

## Chip top, timing and test mode

`trellis_codec_chip` connects `codec_timing`, `msn_encoder`, `test_channel`,
`viterbi_detector` and `sliding_block_decoder`. A single clock runs
everything.

| signal | direction | meaning |
|--------|-----------|---------|
| `din[7:0]`, `din_req` | in, out | a byte is taken in the clock where `din_req` is high, once per 20 clocks |
| `code_out[9:0]`, `code_valid` | out | the new code word; the first bit to send is `code_out[9]` |
| `s1_in`, `s2_in` [5:0], `frame_in` | in | the samples of one stage, signed; `frame_in` marks the first stage of a code word |
| `sample_req` | out | the samples are taken in this clock, once per 4 clocks (minor cycle 3) |
| `dout[7:0]`, `dout_valid` | out | the decoded byte |
| `test_mode` | in | 1: the detector is fed by the internal noiseless 1 − D channel instead of the pins |

In test mode, `dout` repeats `din` exactly **153 clocks** later. The
testbench checks this figure cycle by cycle. It is made up as follows:

* 1 clock for the encoder register;
* 3 clocks to the first sample strobe;
* 7 clocks until the first stage's decisions are complete;
* 16 clocks until the last stage of the word has its decisions;
* 124 clocks (31 stages) through the path memory;
* 2 output registers.

Serial/parallel conversion of code words and samples, word synchronization
on the read side (here the `frame_in` pin), class-IV interleaving, and the
analog front end (AGC, equalizer, timing recovery, A/D) are outside this
block.

## Files

| file | contents |
|------|----------|
| `rtl/msn_pkg.sv` | constants (`LEVEL`, `PM_W`, `BM_W`, `PATH_LEN`), types, the modulo compare, the code tables |
| `rtl/codec_timing.sv` | minor-cycle and code-word counters |
| `rtl/branch_metric_calc.sv` | the seven branch metrics |
| `rtl/pipelined_acs.sv` | the four-input, three-stage ACS unit |
| `rtl/path_memory.sv` | register-exchange survivor memory |
| `rtl/viterbi_detector.sv` | the folded detector: feedback nets, C1/C2, decision gathering, best-state choice |
| `rtl/msn_encoder.sv`, `rtl/sliding_block_decoder.sv` | the code |
| `rtl/test_channel.sv` | the on-chip 1 − D channel |
| `rtl/trellis_codec_chip.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `class_iv_awgn_tb` (two chips on an interleaved 1 − D² channel with Gaussian noise) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
To build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/msn_pkg.sv rtl/*.sv tb/trellis_codec_chip_tb.sv \
        --top-module trellis_codec_chip_tb -o sim
    ./obj_dir/sim

Use the same command for the other testbenches, with their names. Each
testbench runs in well under a second.

## What the testbenches establish

* **`viterbi_detector_tb`.** Random legal trellis paths are sent with noise
  whose amplitude varies from 0 to 24 LSB. Every ACS decision and every
  output stage must match a straightforward reference Viterbi. The reference
  uses exact integer metrics from full squared distances, derives the
  predecessors from the trellis definition, and traces back from the best
  state. On noise-free stretches, the output must also equal the transmitted
  bits. This ties the folded, pipelined, modulo-arithmetic detector to the
  plain algorithm.
* **`pipelined_acs_tb`.** Checks the three-clock latency, the tie rule, the
  half-disables, and operands that wrap around the modulo range.
* **`path_memory_tb`.** Checks the register exchange against a trace-back.
* **`branch_metric_calc_tb`.** Checks the metrics against the full squared
  distance.
* **`msn_encoder_tb`.** Checks that every word is legal, that the state
  follows the level, and that the map is one-to-one.
* **`sliding_block_decoder_tb`.** Checks that every table entry decodes back
  to its byte.
* **`test_channel_tb`** and **`codec_timing_tb`.** Check the channel
  samples and the strobes.
* **`trellis_codec_chip_tb`.** Runs the top at its default parameters.
  Random bytes go through the codec in test mode, then in normal mode, then
  in test mode again. In normal mode, an external dicode channel adds small
  noise plus isolated impulses that make a symbol-by-symbol slicer fail.
  Every byte must come back after 153 clocks. The testbench also requires
  that C1 and C2 overrule compares, that metrics wrap, that all three
  encoder levels occur, and that slicer errors are corrected.

* **`class_iv_awgn_tb`.** The system the codec is meant for. Two chips
  are interleaved bit by bit onto one 1 − D² channel with Gaussian noise
  and deinterleaved back. It checks two bytes per 20 clocks (24 Mb/s at
  30 MHz) and the 153-clock latency. It also checks that no byte is lost at
  σ = 2.5 LSB, and that the byte error rate stays below the slicer's
  code-word error rate. One run gave:

  | σ (LSB, +1 = 16) | byte errors | slicer symbol errors | slicer word errors |
  |------------------|-------------|----------------------|--------------------|
  | 2.5 | 0 / 2980 | 1.1·10⁻³ | 1.1·10⁻² |
  | 4.5 | 5.5·10⁻² | 5.2·10⁻² | 4.1·10⁻¹ |
  | 5.5 | 1.6·10⁻¹ | 1.0·10⁻¹ | 6.6·10⁻¹ |

The following are not established:

* the 30 MHz clock in any technology;
* bit-error rates under Gaussian noise;
* any property of the original codebook.
