# 17-coefficient transversal FIR low-pass filter

A fixed-coefficient FIR low-pass filter in direct (transversal) form. Every clock, one 8-bit
sample comes in and one 18-bit result comes out:

    Y[n] = sum over k = 0..16 of h[k] * X[n-k]

There are 17 coefficient positions, X[n] down to X[n-16]. One coefficient is zero, so 16 taps
do real work: a 16-tap, order-16 filter. The hardware is only a row of sample registers,
multipliers and adders. It has no coefficient memory, no address generation and no tap-length
control. All arithmetic is built from two cells: a ripple-carry adder and an array multiplier
made of ripple-carry adder rows.

## Structure

```
 x_in ──┬──[z^-1]──┬──[z^-1]──┬── ... ──[z^-1]──┐        delay_line (16 stages)
        │X[n]      │X[n-1]    │X[n-2]           │X[n-16]
      (h0)       (h1)       (h2)      ...     (h16)      tap_multiplier x 17
        │          │          │                 │
  0 ──(+)───────(+)────────(+)──── ... ───────(+)──[reg]── out1   adder_chain, output register
```

| module | role |
|---|---|
| `fir_filter` | top: delay line, 17 taps, adder chain, output register |
| `delay_line` | 16 registers of 8 bits; `taps[0]` is the input wire, `taps[k]` is X[n-k] |
| `tap_multiplier` | unsigned sample times sign-magnitude coefficient, 16-bit signed product |
| `array_multiplier` | unsigned AW x BW array multiplier, one ripple-carry row per multiplier bit |
| `adder_chain` | sign-extends the 17 products to 18 bits and adds them in a cascade |
| `ripple_carry_adder`, `full_adder` | the adder cell used everywhere |
| `fir_pkg` | widths, types, the coefficient set and a sign-magnitude helper |

Ports of `fir_filter`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `n` | in | 1 | synchronous active-low reset. It clears the delay line and `out1` |
| `x_in` | in | 8 | unsigned sample |
| `out1` | out | 18 | two's-complement result |

The port names and widths come from the filter's published block symbol. Together they make
28 I/O bits, which matches the 28 bonded I/O pins reported for the FPGA build.

## Coefficients and number format

The default coefficient set, `fir_pkg::COEFS_DEFAULT`, in hex with entry k multiplying X[n-k]:

    81 01 00 82 81 03 01 85 86 03 0C 02 96 96 1C 64 7F

These are **sign-magnitude** bytes. Bit 7 is the sign and bits 6:0 are the magnitude. So
`81` = -1, `96` = -22, `1C` = +28, `64` = +100, `7F` = +127. As integers:

    -1 +1 0 -2 -1 +3 +1 -5 -6 +3 +12 +2 -22 -22 +28 +100 +127

The source publishes only the hex values. The sign-magnitude reading is this design's own
inference. It is the only reading found under which the published simulation values can be
reproduced (see below). Samples are treated as **unsigned**. The sum of coefficient magnitudes
is 336, and 255 x 336 needs exactly 17 magnitude bits plus a sign, which is the published
18-bit output width. With this set the output always lies in -15045 .. +70635. No overflow
can occur, so no saturation is built.

The tap multiplier feeds the 7-bit magnitude and the 8-bit sample into the array multiplier,
which gives a 15-bit magnitude. When the sign bit is set, it negates that magnitude (invert,
then a ripple-carry adder adds one). `80` (negative zero) behaves like `00`.

## Timing

- Throughput: one sample and one result per clock. Nothing stalls.
- Latency: the sample on `x_in` at rising edge t is already in the `out1` value that appears
  after edge t. The X[n] tap is taken straight from the input, and only the final sum is
  registered. This matches the published waveform, where the first result after reset is
  8 x 100 = 0x320 for an input of 8.
- The critical path goes through an 8 x 7 array multiplier, a 16-bit negation and 17 chained
  18-bit ripple-carry adders. It is long. The source gives no clock frequency.
- Reset: `n` is sampled on the clock edge. While it is low, every stage and `out1` become
  zero. The source gives only the port's name. Its meaning as a synchronous active-low reset
  is this design's choice. It is consistent with the published waveform, where `n` starts low
  and `out1` stays undefined until the first clock edge.

## Coefficient order: equation versus published simulation

The published filter equation and the published architecture diagram both put `81` on X[n]
and `7F` on X[n-16]. That order is the default here. The published timing simulation
disagrees. It shows the inputs 8 and then 5 producing 0x320, 0x2D4, 0x1D0 and 0x162. Those
numbers come out only if the newest sample meets `64`, the next one `1C`, then `96`, `96` and
so on. In other words, the list is applied in reverse, h[k] = list[(15 - k) mod 17]. With the
equation order, the same input gives -8 at the first edge.

The order is the `COEFS` parameter of `fir_filter`, so either order can be used.
`tb_fir_fig6` sets the reversed order and checks all four published values.

## Departures and open points

- The reported FPGA build used 260 flip-flops and 4 dedicated 18 x 18 multipliers. This RTL
  has 16 x 8 + 18 = 146 flip-flops, and every tap uses the LUT-style array multiplier. The
  source does not explain the extra registers, so none were added.
- The source describes the filter as the basis of an adaptive filter, with a weight-update
  part driven by an envelope error. No update algorithm, step size or word widths are given.
  The filter built here has fixed coefficients and no update logic.
- Arrows drawn between the multipliers in the architecture diagram have no stated meaning.
  Nothing is built for them.
- Power figures (about 35 mW in total) belong to the FPGA implementation. They say nothing
  about this RTL.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ripple_carry_adder` | corner cases and random operands at 18 and 8 bits |
| `tb_array_multiplier` | all 8 x 7 operand pairs, plus a 5 x 4 instance |
| `tb_tap_multiplier` | all 256 x 256 sample/coefficient pairs |
| `tb_delay_line` | every tap against a software history each clock, and a mid-stream reset |
| `tb_adder_chain` | extreme and random signed products (compared modulo 2^18) |
| `tb_fir_filter` | the whole filter at its default parameters against a convolution model, each clock |
| `tb_fir_fig6` | the published timing simulation (200 ns clock), with the reversed coefficient order |

`tb_fir_filter` runs the following in sequence:

- an impulse, which reads back all 17 coefficients in order, including the zero tap
- a 255 step
- 2000 random samples
- the two extreme patterns, which drive the output to +70635 and -15045
- a reset in the middle of a stream

It counts resets, negative outputs, outputs that need all 18 bits, and the zero tap. If any of
these never happens, that counts as a failure.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert rtl/fir_pkg.sv rtl/full_adder.sv \
  rtl/ripple_carry_adder.sv rtl/array_multiplier.sv rtl/tap_multiplier.sv \
  rtl/delay_line.sv rtl/adder_chain.sv rtl/fir_filter.sv tb/tb_fir_filter.sv \
  --top-module tb_fir_filter -o sim && ./obj_dir/sim
```

For another test, swap in its testbench file and `--top-module`. Each test finishes in well
under a second.

## Changing the design

- Other coefficients: override `COEFS` on `fir_filter`, as sign-magnitude bytes with X[n]
  first. If the magnitude sum times 255 exceeds 2^17, widen `YW` in `fir_pkg`.
- Another filter length: change `TAPS` in `fir_pkg`. The delay line gets `TAPS - 1` stages and
  the adder chain gets `TAPS` inputs.
- Signed samples would need a signed multiplier in `tap_multiplier`. The array multiplier is
  unsigned.
