# Streaming MLP amplitude reconstruction for a calorimeter read-out channel

A calorimeter channel is sampled once per bunch crossing (BC, every 25 ns).
When collisions pile up, pulses from neighbouring crossings overlap and the
sample at the pulse peak no longer gives the deposited energy. This design
takes the stream of samples of one channel and, for every BC, estimates the
true amplitude of that crossing from a window of nine consecutive samples
centred on it. The estimator is a very small neural network (one hidden
neuron with a tanh activation, one linear output neuron) in fixed-point
arithmetic. Samples arrive and results leave as AXI4-Stream beats, one per
BC, so the core can sit behind a DMA engine and process buffers of recorded
data at the real-time rate of 40 MHz.

The RTL is SystemVerilog-2017: synthesizable modules in `rtl/`, one
self-checking testbench per module in `tb/`.

## Data path

```
 s_axis ─► slave reg ─► pre-process ─► BC8 BC7 ... BC1 BC0 ─► MLP ─► capture ─► post-process ─► out reg ─► master reg ─► m_axis
  (DMA)     [BC]        [PROC]         9-slot window [BC]    [PROC]   [BC]       [PROC]          [BC]       [BC]        (DMA)
                                        x8 ...        x0
```

`[BC]` marks registers on the 40 MHz BC clock, `[PROC]` arithmetic on the
400 MHz processing clock.

| Stage | Module | What it does |
|---|---|---|
| stream input | `sr_axis_slave` | registers one 32-bit signed sample per beat |
| pre-process | `sr_preprocess` | maps ADC counts `[ADC_MIN, ADC_MAX]` linearly to `[-1, 1]`, Q6.10 |
| window | `sr_bc_fifo` | serial-in, parallel-out shift register of the last 9 BCs; BC8 newest, BC0 oldest |
| network | `sr_mlp` = `sr_neuron` (9 inputs) → `sr_tanh_lut` → `sr_neuron` (1 input) | `h = Σ x_i·w_i + b1`, `y = tanh(h)·w9 + b2` |
| post-process | `sr_postprocess` | maps `y` back to ADC counts, 32-bit signed |
| stream output | `sr_axis_master` | output register, drives `tready` of the whole pipeline |
| core | `sr_core` | the stages above with their BC-clock capture registers |
| clock gate | `sr_clock_gate` | model of a clock buffer with enable: the processing clock runs only while `s_axis_tvalid OR core_valid` |
| top | `sr_pl_top` | core plus clock gate, plain-signal ports |

`sr_pkg` holds the number formats, shared structs, pipeline depths and the
default network; `axis_if` is the AXI4-Stream bundle with an assertion for
the handshake rule (a waiting beat must stay unchanged until `tready`).

## Number formats

All arithmetic is two's-complement fixed point, written Qi.f (i integer bits
including sign, f fraction bits):

| Quantity | Width | Format |
|---|---|---|
| neuron input (normalised sample, tanh value) | 16 | Q6.10 |
| weight | 14 | Q6.8 |
| bias | 30 | Q12.18 |
| neuron output | 31 | Q13.18 |

A product of input and weight is exactly 30 bits Q12.18, the bias format, so
the neuron adds products and bias without any shifting. The sum is kept
exact in a 35-bit accumulator and only the final result is saturated to 31
bits. Bits are dropped in three places only: normalisation, the tanh table,
and denormalisation. Normalisation and denormalisation truncate towards
zero, so a negative normalised sample comes out slightly larger than the
exact value. Most samples are small and normalise to values between -1 and
0, so the fixed-point result tends to sit slightly above a floating-point
reference. On 20000 pile-up BCs, `tb_sr_fixed_vs_float` measures the
difference (real minus fixed) at -0.7 counts on average, between -4.6 and
+5.4 counts.

## Two clocks, one pipeline: the timing

This is the least obvious part of the design. The 400 MHz processing clock is
exactly ten times the BC clock and derived from it, so the rising edges of
the two line up. Every value that has to survive from one BC to the next sits
in a BC-clock register. Between two such registers there is one free-running
processing-clock pipeline, which has no enables and no reset:

- its input changes only at a BC edge and then holds for ten processing
  cycles;
- it is at most 8 processing cycles deep (pre-process 2, network 3 + 2 + 3,
  post-process 2);
- so its output has settled, and is read, at the next BC edge.

So each arithmetic stage costs exactly one BC cycle, and no synchroniser is
needed anywhere. `sr_core` refuses to elaborate if a stage is made deeper
than `CLK_RATIO` (10) processing cycles. This depends on the two clocks
being related. It does not work with independent oscillators.

The schedule of one sample, in BC cycles, counting the cycle in which it is
on the input bus as cycle 0:

| Cycle | Where the sample is |
|---|---|
| 0 | on `s_axis`, accepted at the end of the cycle |
| 1 | slave register; pre-process runs |
| 2 | BC8 of the window |
| 6 | BC4, the centre: the network computes its amplitude |
| 7 | capture register; post-process runs |
| 8 | core output register |
| 9 | master register, on `m_axis` |

The total latency is **9 BC cycles**. Two of them are the stream registers.
Without those, the core takes 7, which meets an 8-BC budget. Four of the
seven are spent waiting for the four samples that follow the centre of the
window.

## Flow control, bubbles and the end of a stream

All BC-clock registers move together on one enable, `adv`. `adv` is high
when the master register is empty or its beat is being taken. It is also
`s_axis_tready`. When the receiver holds `m_axis_tready` low, the whole core
freezes, and since its arithmetic inputs do not change, nothing is lost.

A BC cycle that advances without an input beat inserts a *bubble*: a slot
marked invalid. In every window it is part of, its value is that of a
0-count sample (a quiet channel, normalised code -1023 by default).
Bubbles produce no output beat. Because the pipeline
keeps advancing when input stops, the last four samples of a stream are
flushed out by the bubbles behind them. Every input sample gives exactly one
output beat, in order, and `tlast` is carried from a sample to its
amplitude.

## Clock gating

The processing clock goes through `sr_clock_gate`. This models a global
clock buffer with a clock-enable input: a latch that is open while the clock
is low, followed by an AND gate. The enable is
`s_axis_tvalid | core_valid_o`. `core_valid_o` is high while any valid
sample is anywhere in the core, output register included. With that
definition the arithmetic is clocked whenever a real sample needs it, even
for a stream shorter than the pipeline, and it stops entirely a few cycles
after the last beat has gone out. While the clock is stopped, the
processing-clock registers hold stale values, but these are only ever read
for bubbles.

## The tanh table

`sr_tanh_lut` holds 5000 entries spaced evenly from -0.7 to 0.8 inclusive.
Entry `i` is `round(tanh(-0.7 + i·1.5/4999) · 1024)` in Q6.10. A constant
function computes the table during elaboration into a ROM array, so no data
file is needed. The Q13.18 input is offset by -0.7, clamped to the table
range and scaled to the nearest entry with one constant multiply:
`idx = (d·K + 2^29) >> 30` with `K = round(4999·2^30 / span)`. Hidden sums
below -0.7 or above 0.8 therefore give tanh(-0.7) or tanh(0.8). With the
example network this happens for large pulses, and the testbenches exercise
it.

## The network weights

The trained weights of the original network are not available. The
defaults in `sr_pkg` are an example network chosen by hand, so that a clean
pulse maps roughly to its amplitude with the default normalisation (ADC
range 0..4095):

| | x0 | x1 | x2 | x3 | x4 | x5 | x6 | x7 | x8 | b1 | w9 | b2 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| value | 0 | 0 | -0.0625 | -0.125 | 0.75 | -0.125 | -0.0625 | 0 | 0 | -0.225 | 1.890625 | 0.015 |
| code | 0 | 0 | -16 | -32 | 192 | -32 | -16 | 0 | 0 | -58982 | 484 | 3932 |

On a 50-BC pile-up train the example network is off by about 90 ADC
counts on average (mean absolute error, printed by `tb_sr_pl_top`). Treat it
as a functional stand-in, not as a physics result. Load real weights
through the `W1`, `B1`, `W2`, `B2` parameters of `sr_pl_top`, `sr_core` or
`sr_mlp`. Each is given as raw fixed-point codes: `W1` is 9 Q6.8 codes
ordered x0..x8, `W2` is one Q6.8 code, and the biases are Q12.18. Set the
normalisation range with `ADC_MIN` and `ADC_MAX`.

## Choices made by this design

The following are not fixed by the description this RTL was built from. They
are decisions of this implementation:

- **Normalisation:** min-max over `[ADC_MIN, ADC_MAX]`, default 0..4095 (a
  12-bit converter), with the exact inverse for denormalisation.
- **Weights:** the example network above.
- **Saturation:** the neuron sum is kept exact and saturated once at the
  output; samples outside the ADC range saturate after normalisation.
- **tanh addressing:** nearest entry and clamping, as described above.
- **Stall and bubbles:** the stall scheme, bubble handling and `tlast`
  propagation.
- **Clock-enable source:** the description ORs the stream valid signals
  into the clock-buffer enable. Here the input `tvalid` is ORed with
  `core_valid_o`, which covers the whole core and not only its output, so
  that samples still inside the pipeline are always clocked.
- **Stage depths:** the split of the 7 core cycles into stages, and the
  processing-clock depths.
- **Resources:** the network uses 10 multiplies by constants (weights are
  parameters) plus 3 constant multiplies for normalisation, table addressing
  and denormalisation. The DSP count after mapping depends on the synthesis
  tool. The description's figure of 7 DSP slices per core was not
  reproduced or checked.
- **Flip-flops and LUTs:** a generic synthesis of `sr_pl_top` gives about
  350 flip-flops. The description reports 975 flip-flops and 825 LUTs for
  its core on the target FPGA. The two counts come from different tools
  and pipelines, so they are not directly comparable.
- **Rounding:** normalisation and denormalisation truncate towards zero,
  which matches the bias the description reports. The tanh entries are
  rounded to nearest.
- **Table memory:** 80 kbit (5000 × 16 bits). The description reports
  216 kbit of memory for its whole core, and does not say what the rest
  holds.

Outside the RTL are the processor system, the PCIe/XDMA path, the NoC and
the DDR memory, the AXI DMA, the clocking wizard and the reset synchroniser.
`sr_pl_top` brings out the signals where these connect: both clocks, a
reset synchronous to `clk_bc`, the two AXI4-Stream channels of the DMA, and
the gated clock and core-valid signal for observation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog counts a failure if the test hangs. The testbenches
use delays in nanoseconds, so give Verilator a timescale. For example, the
end-to-end test at default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    -y rtl -y tb +libext+.sv rtl/sr_pkg.sv tb/sr_ref_pkg.sv \
    tb/tb_sr_pl_top.sv --top-module tb_sr_pl_top -o sim
./obj_dir/sim
```

For the other tests, replace the testbench name. For lint only:
`verilator --lint-only -Wall -Irtl rtl/sr_pkg.sv rtl/sr_pl_top.sv -y rtl`.
Building the tanh table takes Verilator about 2 s during elaboration.

`tb/sr_ref_pkg.sv` is an independent reference model. It uses 64-bit
integers and real arithmetic and does not reuse the RTL. The testbenches
compare against it bit for bit.

| Testbench | What it establishes |
|---|---|
| `tb_sr_preprocess`, `tb_sr_postprocess` | formulas, truncation, saturation, 2-cycle latency |
| `tb_sr_neuron` | 9- and 1-input neurons, both saturation directions, 3-cycle latency |
| `tb_sr_tanh_lut` | sweep across and beyond the table range, monotonic, 2-cycle latency |
| `tb_sr_mlp` | clean pulses, pile-up and random windows, 8-cycle latency |
| `tb_sr_bc_fifo` | shift order, centre flags, bubbles as 0-count samples, stalls |
| `tb_sr_axis_slave`, `tb_sr_axis_master` | handshake under random `tvalid`/`tready`, no loss or duplication |
| `tb_sr_clock_gate` | gated edges follow the enable, no glitches |
| `tb_sr_core` | pulse trains with gaps and back-pressure, 9-cycle latency (7 between the core's own input and output registers), `tlast` |
| `tb_sr_pl_top` | end to end at default parameters, with clock gating |
| `tb_sr_fixed_vs_float` | 20000 pile-up BCs through the top, against the network in real arithmetic: the difference is within ±10 counts and its mean is below 0 |

`tb_sr_pl_top` sends four workloads. The first is a 12-sample sequence
around a 1486-count peak. The second is a 50-BC pile-up train. The third is
five long trains with random input gaps and output back-pressure. The fourth
is near full-scale samples with single-BC dips to 0. Workload 2 has no
gaps and no back-pressure, and the test checks that its 50 samples go in
and come out at one beat per BC cycle: 4 bytes every 25 ns, 160 MB/s each
way. The test fails unless each of these happened at least once:

- an output stall;
- an input bubble;
- a `tlast` beat;
- the processing clock stopped for a whole idle BC;
- the processing clock running;
- a hidden sum outside the tanh table.

It is also the full-size test: it runs the top at its default parameters
and finishes in well under a second.
