# Reconfigurable radix-4 pipelined FFT (1024 / 256 / 64 / 16 points)

In an OFDM or MC-CDMA receiver the number of sub-carriers, and so the FFT
size, only has to be as large as the channel's delay spread demands. A
receiver built for the worst case runs a 1024-point FFT all the time. This
design runs a 1024-point FFT when it has to, and otherwise cuts itself down
to 256, 64 or 16 points. It does not use a separate smaller FFT for this.
It feeds the input samples into a later stage of the same pipeline and stops
the clocks of the stages it skips.

The processor is a single-path radix-4 decimation-in-frequency pipeline of
five stages. It takes one complex sample per clock and delivers one result
per clock. The smaller sizes reuse the last stages of the 1024-point
pipeline unchanged, because the last *m* radix-4 stages of a 4^5-point
pipeline form a complete 4^m-point FFT.

The RTL follows the reconfigurable FFT processor of "A Delay Spread Based
Low Power Reconfigurable FFT Processor Architecture for Wireless Receivers".
That architecture builds on the Bi & Jones radix-4 pipeline. Word lengths,
scaling, the handshake, the control encodings and the output indexing are
not fixed by the architecture. Those are this implementation's choices, and
they are listed in the section on choices below.

## Block structure

```
             +---------+   MUX I   +---------+  MUX II   +---------+  MUX III  +---------+   +---------+
 in_data --->| stage 1 |--->|\ --->| stage 2 |--->|\ --->| stage 3 |--->|\ --->| stage 4 |-->| stage 5 |--> out_data
         |   | Nt=256  |    |/     | Nt=64   |    |/     | Nt=16   |    |/     | Nt=4    |   | Nt=1    |
         |   +---------+     ^     +---------+     ^     +---------+     ^     +---------+   +---------+
         |       ^ G_ck1     |         ^ G_ck2     |         ^ G_ck3     |
         +-------------------+---------------------+---------------------+
                                      ffsm: S_256, S_64, S_16, G_ck enables, C1..C7 per stage
```

| size | entry point | selects | clocks switched off | latency (samples) |
|------|-------------|---------|---------------------|-------------------|
| 1024 | stage 1 | none | none | 1032 |
| 256 | stage 2 via MUX I | S_256 | G_ck1 | 262 |
| 64 | stage 3 via MUX II | S_64 | G_ck1, G_ck2 | 68 |
| 16 | stage 4 via MUX III | S_16 | G_ck1, G_ck2, G_ck3 | 18 |

Stages 1 to 4 each hold a commutator, a butterfly and a twiddle multiplier.
Stage 5 holds only a commutator and a butterfly, because its twiddle factors
are all 1. Stage t works on sub-transforms of 4·N_t points, where
N_t = 4^(5−t) is the length of each of the commutator's six FIFOs. That makes
the FIFO lengths 256, 64, 16, 4 and 1, so almost all of the storage sits in
stage 1, and turning stage 1 off saves the most.

Latency is counted in accepted input samples. It runs from the first sample
of a frame to the clock on which its first result is flagged. It is the sum
of 3·N_t + 2 over the active stages, with 3·1 + 1 for the last stage.

## The commutator: how one serial stream feeds a radix-4 butterfly

This is the least obvious part of the design (`commutator.sv`). A radix-4 DIF
butterfly of span N = N_t needs the four samples x(n), x(n+N), x(n+2N) and
x(n+3N) of one group at the same time. It produces four outputs:

    X_q(n) = sum_{e=0..3} x(n+eN) · (−j)^(e·q),   q = 0..3

The stage has to output X_0(n) for all n, then X_1(n), then X_2(n), then
X_3(n), one word per clock. The group is complete when x(n+3N) arrives. From
then on the four outputs leave one per N-sample quarter. So every group has
to stay available for a further 3N samples.

Six FIFOs of N words do this. Three are chained from the input and give taps
delayed by 0, N, 2N and 3N. Three more hang off the 3N tap and give 4N, 5N
and 6N. O1 is always the 3N tap. Three 2:1 multiplexers choose the other
operands:

| operand | select | select = 0 | select = 1 |
|---------|--------|------------|------------|
| O1 | – | 3N | 3N |
| O2 | C1 | 0 | 4N |
| O3 | C2 | N | 5N |
| O4 | C3 | 2N | 6N |

Let q be the output being formed. In quarter q, O(i+1) carries element
(q − i) mod 4 of the group. This holds when the selects are the thermometer
code C1 = (q ≥ 1), C2 = (q ≥ 2), C3 = (q = 3).

An example with q = 2. O1 (3N) holds element 2, O2 (4N) element 1, O3 (5N)
element 0 and O4 (2N) element 3.

The butterfly (`r4_butterfly.sv`) then forms only the one output X_q. It
applies to operand i the rotation (−j)^(((q−i) mod 4)·q). That rotation is a
swap of the real and imaginary parts and/or a negation, so the butterfly
needs no multiplier. It then adds the four operands.

The twiddle multiplier (`twiddle_mult.sv`) rotates X_q(n) by W^(q·n), where
W = exp(−j2π/(4N)). Its output is the input stream of the next stage, which
works on four independent N-point sub-transforms.

The FIFOs (`delay_fifo.sv`) are dual-port RAMs. Each has N−1 words of RAM
addressed by one circular pointer, which reads the oldest word and writes
the new one at the same address. The registered read port is the N-th
place. So a FIFO stores exactly N words and has one write and one read per
sample.

## Control: the FFT state machine

`ffsm.sv` holds the selected size. From it, it derives:

- the three entry-multiplexer selects;
- the enables of the clock gates of stages 1 to 3;
- one `stage_fsm` per stage.

Each `stage_fsm` is a modulo-4N_t counter of the samples entering its
stage. From it the stage's seven control signals are decoded:

- C1..C3: the commutator selects above.
- C4..C7: q in one-hot form, for the butterfly.
- The twiddle exponent q·n, where q = (c/N_t + 1) mod 4 and n = c mod N_t.

On a size change, every counter is loaded with minus the latency of the
active stages in front of its stage. Count 0 therefore meets the first
sample of the first frame exactly when that sample reaches the stage. The
counters of stages that are switched off hold still.

The clock gates (`clock_gate.sv`) are latch-and-AND cells. Synthesis reports
the latch, and it is intended. A standard-cell flow would swap in the
library's integrated clock-gating cell.

## Interface and timing (`rfft_top.sv`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (reset selects 1024 points) |
| `size_load`, `size_sel[1:0]` | in | load a new size: 0 = 16, 1 = 64, 2 = 256, 3 = 1024 points |
| `in_valid`, `in_ready`, `in_data` | in/out/in | one complex sample (`{re, im}`, 16 + 16 bits) taken per clock with both valid and ready high |
| `out_valid`, `out_data`, `out_bin[9:0]` | out | a new result, and its frequency bin |
| `size[1:0]`, `stage_clk_on[2:0]`, `entry_sel[2:0]` | out | size in use, enables of G_ck1..G_ck3, selects {S_256, S_64, S_16} |

- **Size change.** A `size_load` pulse takes effect on the next clock. That
  clock is a restart cycle: `in_ready` is low, the counters are reloaded,
  and the data still in the pipeline is dropped. The next accepted sample
  is sample 0 of a frame. Frames follow back to back without gaps.
- **Flow.** The pipeline moves only when a sample is accepted. Gaps in
  `in_valid` stall it and lose nothing. The last frame comes out as the
  next frame is fed in, or as zero padding is fed in.
- **Output order.** Results leave in base-4 digit-reversed order, which is
  the natural order of a radix-4 DIF pipeline. `out_bin` gives each
  result's bin index.
- **Scaling.** Each butterfly divides by 4, so the result is DFT/points.
  This keeps 16 bits throughout without overflow. It costs dynamic range
  for small inputs.

## Number format and rounding

- Samples are 16-bit two's complement for the real and the imaginary part
  (`fft_pkg::DATA_W`).
- Twiddle factors are 16-bit with 14 fraction bits (`TW_W`, `TW_FRAC`), so
  +1.0 is exact.
- Each stage's twiddle ROM holds W^k for k = 0..4N_t−1:
  cos(2πk/(4N_t)) and −sin(2πk/(4N_t)), rounded to 14 fraction bits. It is
  computed at elaboration by a constant function, so no data files are
  needed.
- The butterfly and the multiplier round half up and saturate.
- With full-scale random input, results match a floating-point DFT/N to
  within 1 LSB at every size.

## Choices made here, and departures from the source architecture

- **N_t.** The source gives the FIFO length as N_t = 4^(t−1). It also
  states that stage 1 has the longest FIFOs and that FIFO sizes shrink from
  stage 1 to stage 5. This RTL uses N_t = 4^(5−t), with stage 1 at the
  input, which is what a 1024-point DIF pipeline needs.
- **Number of control FSMs.** The source speaks of four control FSMs, "one
  per stage", but the pipeline has five stages, each with its own C1..C7.
  Here there are five.
- **Control signals.** What C1..C7 mean is this design's choice: commutator
  selects and a one-hot butterfly output index. The twiddle exponent is an
  eighth, separate output of each stage FSM.
- **Commutator wiring.** The tap assignment of the three commutator
  multiplexers was derived from the radix-4 equations. It agrees with the
  published structure: six FIFOs, three 2:1 multiplexers, O1 unswitched.
- **Select decoding.** The entry-multiplexer selects are decoded from a
  2-bit size input inside the FFSM. They are not driven directly from
  outside.
- **Own additions.** The valid/ready handshake, the restart cycle,
  `out_valid`/`out_bin`, the pipeline registers, the word lengths, the
  rounding and the per-stage scaling are all additions of this design.
- **Not included.** The delay-spread estimator that would choose the size
  is not included; the size is an input. The rest of the receiver
  (combiner, Viterbi decoder, front end) is not included either.
- **Not reproduced.** The power results are not reproduced. They need a
  gate-level netlist in a 0.18 µm library at 20 MHz.
  `tb_workload_4000` reports, as the RTL-level counterpart, the clock edges
  each gated stage receives at each size.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | widths, complex type, size enum, control word, N_t and latency functions |
| `rtl/rfft_top.sv` | top level: stages, entry multiplexers, clock gates, FFSM |
| `rtl/fft_stage.sv` | one pipeline stage |
| `rtl/commutator.sv`, `rtl/delay_fifo.sv` | commutator and its RAM FIFOs |
| `rtl/r4_butterfly.sv` | one-output radix-4 butterfly |
| `rtl/twiddle_mult.sv` | twiddle ROM and complex multiplier |
| `rtl/ffsm.sv`, `rtl/stage_fsm.sv` | FFT state machine and per-stage FSM |
| `rtl/clock_gate.sv`, `rtl/bypass_mux.sv` | stage clock gate, entry multiplexer |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. Two more testbenches run
the whole processor:

- `tb/tb_rfft_top.sv` uses the default 1024-point configuration. It runs
  16 → 64 → 256 → 1024 → 16 points, a few frames each, with random input
  gaps. It checks every result against a direct DFT, and also checks the
  bin order, the latencies, the selects and the clock-gate enables. It also
  counts the size switches, stalls, entry-multiplexer uses and gated-off
  clocks, and fails if any of these never happens.
- `tb/tb_workload_4000.sv` streams 4000 uniformly distributed random samples
  through each size and checks every complete frame. It reports how many
  clock edges stages 1 to 3 receive.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_rfft_top.sv \
          --top-module tb_rfft_top -o sim
./obj_dir/sim
```

Replace `tb_rfft_top` by any other testbench name. Each one finishes in
well under a second of simulation time.
