# Low-noise GALS 64-point FFT test chip

A digital chip draws its supply current in sharp spikes right after each
clock edge. When every flip-flop shares one clock, those spikes line up and
produce strong supply noise and electromagnetic emission at the clock
frequency and its harmonics. This design shows a way around that on a
working datapath: a pipelined 64-point FFT. The pipeline is split into four
blocks, and each block gets its own clock. The four clocks can be:

- independent, free-running and pausable, which is GALS (globally
  asynchronous, locally synchronous) operation;
- shifted against each other by a quarter period each, so their current
  spikes interleave;
- frequency-modulated with a triangular jitter, so the spectral lines spread
  into bands.

The same chip can also run as a plain synchronous design, with or without
jitter. This makes it easy to compare all the clocking schemes on identical
logic. A built-in self-test (BIST) checks the arithmetic in every mode.

Everything is SystemVerilog. The FFT datapath, the asynchronous channels, the
counters and the BIST are synthesizable RTL. The clock sources are
behavioural models written with delays: the ring oscillator, the
quarter-period delay line and the jitter delay line.

## The FFT pipeline

The 64-point FFT is computed as two 8-point FFTs in cascade, with one general
complex multiplier between them. That multiplier applies the twiddle factors
W64^(n·k). Each 8-point FFT uses the radix-2^3 factorisation: three radix-2
butterfly stages with trivial rotations between them. Only the one
multiplier between the two halves needs real coefficient arithmetic.

Each butterfly stage is a single-path delay-feedback (SDF) stage
(`sdf_bf_stage`), with delays of 32, 16, 8, 4, 2 and 1 for stages 1 to 6. A
stage works in two phases:

- In the first half of a group of 2·D samples it stores the incoming samples
  in its delay line. It also sends out the differences left over from the
  previous group.
- In the second half it adds and subtracts each new sample with the stored
  one. It sends out the sum and stores the difference for later.

Every stage halves its result, so the output is X[k]/64 and cannot overflow.

The rotations follow each stage. In the table, t is the sample's position in
its 64-sample frame.

| after stage | operation | applied when |
|---|---|---|
| 1 | multiply by -j | t[5] & t[4] |
| 2 | multiply by W8^(t[5]+2·t[4]) | t[3] |
| 3 | multiply by W64^(n·k), with n = t[2:0] and k = bitrev3(t[5:3]) | always (general multiplier) |
| 4 | multiply by -j | t[2] & t[1] |
| 5 | multiply by W8^(t[2]+2·t[1]) | t[0] |

These rotations are implemented in two modules:

- `r23_rotator` handles the -j and W8 rotations. W8 needs only swaps,
  negations and a multiplication by 1/√2, which is stored as 11585/2^14.
- `twiddle_cmult` is the general multiplier. It reads a 17-entry
  quarter-wave cosine table, with entries round(2^14·cos(2πi/64)), and uses
  quadrant symmetry for the rest of the circle.

**Output order.** Results come out bit-reversed: output word t of a frame is
X[bitrev6(t)].

**Latency.** The pipeline holds 63 samples. A frame's first result appears
as that frame's 64th sample is accepted. The rest of its results come out
while the next frame goes in. To drain the last frame, feed a frame of
zeros.

**Flow control.** All arithmetic is combinational between the delay lines.
A stage's state moves only when a sample is accepted, so a pipeline that
stalls loses nothing.

**Partition.** The six stages and the multiplier are split into four blocks
of similar size:

| block | contents | delay-line words |
|---|---|---|
| `sync_block1` | stage 1, -j rotation | 32 |
| `sync_block2` | stage 2, W8 rotation, stage 3 | 24 |
| `sync_block3` | twiddle multiplier | 0 |
| `sync_block4` | stage 4, -j, stage 5, W8, stage 6 | 7 |

Each block has a valid/ready stream on each side, with
`in_ready = out_ready`. A sample moves through a block only when the next
channel can take its result.

Words are 16-bit signed real and imaginary parts (`fft_pkg::cplx_t`).
Coefficients are 16-bit with 14 fraction bits. Products are rounded and
saturated.

## Channels between clock domains

Neighbouring blocks are joined by a two-phase bundled-data channel:

- `gals_dport` is the sender. When it takes a word, it holds it on `data`
  and toggles `req`.
- `gals_pport` is the receiver. It passes `req` through two flip-flops, and
  offers the word to its block once the synchronized request differs from
  its own `ack`. It toggles `ack` when the block takes the word.
- The sender synchronizes `ack` the same way. It is free again once the
  synchronized `ack` matches its `req`.

Both ports check their rule with assertions: the sender never changes
`data` while a transfer is open, and the receiver's word is stable.

**Pausable clocks.** A sender raises `pause_req` when three things are true
at once:

- its block has a word waiting (`want`);
- the port is still busy;
- the raw, unsynchronized `ack` shows that the receiver has not answered.

The block's ring oscillator then stops before its next rising edge. It
restarts when the acknowledge arrives. A blocked block therefore burns no
clock power and does not spin. This pause condition is this design's own
choice.

There are five channels in all:

- ext_clk → block 1;
- block 1 → 2;
- block 2 → 3;
- block 3 → 4;
- block 4 → ext_clk.

The chip's `din` and `dout` are therefore ordinary valid/ready streams on
`ext_clk` in every mode. The channels stay in place in the synchronous modes
too; there they simply connect equal clocks. One word takes about five to
six clocks to cross a channel, and this sets the throughput.

## Local clock generation

Each block's clock comes from `local_clock_gen`, which chains three parts:
ring oscillator → shift generator → jitter generator. In the synchronous
modes it passes the chip clock through instead.

**`ring_osc`.** This is a pausable oscillator whose period is set by a 5-bit
code, `cc_fft`. The measured settings span 88.44 MHz (code 10100) down to
61.25 MHz (code 11111). Lower codes continue the first step of
2.8125 MHz per code. `en = 0` stops the clock low. `pause_req` is sampled
before each rising edge, so a pause never cuts a high phase short. The four
block oscillators differ by 0, 200, 400 and 600 ppm, so they drift apart the
way real oscillators do.

**`shift_gen`.** This is a delay line of three 3162 ps cells. Each cell is a
quarter period at 79.06 MHz, the setting used for the measurements. The
select input picks a shift of 0, T/4, T/2 or 3T/4. In skew modes, block i
uses `shift_sel[i]`; 0, 1, 2, 3 is the intended setting. The step is fixed
in picoseconds. At other `cc_fft` settings it is not exactly a quarter
period.

**`jitter_gen`.** This part is the least obvious. The clock passes a chain
of seven delay cells of 1, 2, 3, 4, 3, 2 and 1 × Δ, where Δ = 150 ps. That
gives taps at cumulative delays of 0, 1, 3, 6, 10, 13, 15 and 16 Δ. A 16:1
multiplexer selects one tap, with inputs i and 15-i wired to the same tap. A
one-hot ring counter (`single_hot_counter`) steps the select once per output
clock. It is clocked by the multiplexer output delayed by a further 4Δ and
inverted. The select therefore changes just after a falling edge, while
both the old and the new tap are low, so switching cannot glitch the
clock.

As the select walks through the taps, the extra delay between consecutive
rising edges follows the tap differences +1, +2, +3, +4, +3, +2, +1, 0,
then the same sequence negated. So the output period swings in a triangle
between T-4Δ and T+4Δ over 16 clocks.

The four block generators start their counters at positions 0, 4, 8 and 12.
Their modulations are therefore out of step with each other. The chain
layout is this design's reading of the drawn delay cells: it is the one that
gives exactly the ±4Δ swing.

Every delay cell is shorter than half the shortest clock period (5.65 ns),
so no cell ever holds two edges.

## Modes

`mode` is {gals, skew, jitter}:

| mode | code | block clocks |
|---|---|---|
| S_N | 000 | ext_clk |
| S_J | 001 | ext_clk through one shared jitter generator |
| G_N | 100 | four pausable ring oscillators |
| G_J | 101 | oscillators, each with its own jitter |
| G_S | 110 | oscillators, shifted by `shift_sel` |
| G_SJ | 111 | shift and jitter |

**Other controls:**

- `core_en = 0` stops all four block clocks. This lets the core's dynamic
  power be switched off while other parts of a chip are measured.
- `tcg_*` is a separate ring oscillator with its own enable, pause and
  output pins. It lets the clock generator be tested on its own: running,
  pausing and stopping.
- Change `mode`, `cc_fft` and `shift_sel` only while `rst_n` is low. Reset
  also holds the oscillators, so the four clocks start together.

## Built-in self-test

With `bist_en` high when reset is released:

- `bist_pattern_gen` feeds the FFT instead of `din`. It sends BIST_FRAMES
  frames (default 4) of pseudo-random samples from a 32-bit Galois LFSR
  (mask 0x80200003, seed 1, 15-bit signed values), then one frame of zeros
  to flush the pipeline.
- `bist_misr` folds the first BIST_FRAMES·64 results into a 32-bit MISR
  signature (feedback from bits 31, 21, 1 and 0) and compares it with
  `bist_expected`.
- `bist_done` and `bist_pass` report the result.

The fixed-point results do not depend on clock timing, so the signature is the same in every
clocking mode. The top-level testbench relies on this. It learns the
signature in S_N and checks that G_SJ reproduces it. It also checks that a
wrong `bist_expected` makes the BIST fail. To get the expected value for
other parameter settings, run the BIST once in S_N.

## Where this departs from or adds to the original chip

**What follows the original chip:**

- the GALS partition into four blocks;
- two 8-point radix-2^3 FFTs with a single complex multiplier;
- pausable ring-oscillator clocks set by a 5-bit code, with the measured
  frequency table;
- phase offsets of 0, T/4, T/2 and 3T/4 per block;
- the delay-line and one-hot-counter jitter generator with Δ = 0.15 ns and
  a ±4Δ triangle;
- the six test modes;
- BIST as the pass/fail monitor;
- a way to stop the core clocks;
- a separate clock generator for testing.

**This design's own choices:**

- word widths, rounding and the 1/2 per-stage scaling;
- SDF stages, bit-reversed output and the valid/ready interfaces;
- the two-phase channel protocol and the exact pause condition;
- the mode encoding and the oscillator mismatch;
- the fixed-picosecond shift step;
- the LFSR/MISR BIST and the chip pin interface;
- the two channels at the chip edge (into block 1 and out of block 4).
  The original design pairs ports only between neighbouring blocks. The
  two extra channels keep `din` and `dout` synchronous to `ext_clk` while
  the blocks run on their own clocks.

The flip-flop counts of the original blocks are not reproduced. The delay
lines here hold whole 32-bit words.

**Not modelled:**

- the custom C-element and mutex cells inside the original clock generator
  (their arbitration is reduced to sampling the pause before each rising
  edge);
- pads, package and supply probing;
- the separate low-power PLL test circuit, which is analog.

**How far to trust it.** Every module has a self-checking testbench that
compares against values computed independently in the testbench:

- a floating-point DFT for the FFT;
- direct complex rotations for the rotators and the multiplier;
- measured edge times for the clock models.

Each testbench has been shown to fail on a deliberately broken copy of its
module. The clock generators are timing models for simulation, not
synthesizable circuits.

## Simulating

All files carry `` `timescale 1ps/1ps ``. Put the package first. For example,
the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/fft_pkg.sv rtl/*.sv tb/tb_fft_gals_top.sv --top-module tb_fft_gals_top
    ./obj_dir/Vtb_fft_gals_top

**What the end-to-end test does** (`tb_fft_gals_top`, default parameters,
about two seconds):

- It runs all six modes with random back-pressure on `dout`. It runs G_SJ
  once more at the fastest and once at the slowest ring setting.
- It checks every output of several random frames against a reference DFT,
  within 8 LSB.
- It runs the BIST with the correct and a wrong expected signature.
- It exercises `core_en` and the test clock generator. It also checks that
  a chip held in reset runs no block clock and moves no data.
- It counts how often each mechanism happened: clock pauses, input and
  output stalls, jitter and skew measurements, and the BIST outcomes. A
  mechanism that never happened counts as a failure.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

**Block-level testbenches:**

- `tb_sdf_bf_stage`
- `tb_r23_rotator`
- `tb_twiddle_cmult`
- `tb_sync_blocks` (all four blocks in a chain)
- `tb_gals_channel` (D and P port)
- `tb_ring_osc`
- `tb_shift_gen`
- `tb_single_hot_counter`
- `tb_jitter_gen`
- `tb_local_clock_gen`
- `tb_bist`

To change the FFT word width, edit `DATA_W` in `rtl/fft_pkg.sv`. The
coefficient table there holds round(2^14·cos(2πi/64)) for i = 0 to 16. Clock
figures are parameters of the clock modules (`STEP_PS`, `DELTA_PS`,
`MISMATCH_PPM`, `INIT_POS`).
