# Multiplierless half-band FIR filter by distributed arithmetic

A half-band filter is a linear-phase FIR low-pass filter whose cut-off sits at
a quarter of the sample rate (pi/2). Its pass-band and stop-band ripples are
equal and its band edges are mirror images about pi/2. As a result, every
coefficient at an even, non-zero distance from the centre tap is zero, and the
centre coefficient is exactly 1/2. Almost half of the multiplications vanish.

This design goes one step further and uses no multipliers at all. Each filter
stage is built with **distributed arithmetic (DA)**: the products `h[k]*x[n-k]`
are never formed. The samples are read one bit at a time, and a small
read-only table holds every possible sum of the coefficients. A shift-and-add
accumulator puts the bit-level results back together. The default filter has
five taps,

    h = 0, 4, 8, 4, 0        (0, 1/4, 1/2, 1/4, 0 scaled by 2^4)
    y[n] = 4 x[n-1] + 8 x[n-2] + 4 x[n-3]

Two such stages are chained in the top module, `hbf_cascade`.

## How distributed arithmetic replaces the multipliers

Write each B-bit two's-complement sample by its bits, `x = -x_{B-1} 2^{B-1} + sum_{b<B-1} x_b 2^b`. Then

    y = sum_k h[k] x_k
      = sum_{b<B-1} 2^b * T(x_{0,b}, x_{1,b}, ...)  -  2^{B-1} * T(x_{0,B-1}, x_{1,B-1}, ...)

where `T(a_0, a_1, ...) = sum_k a_k h[k]` is the sum of the coefficients whose
address bit is 1. `T` has only 2^L possible values for L taps, so it is
precomputed into a table. One output then takes B table reads and B
shift-adds. The word read for the sign bit is subtracted, not added.

For the default filter only three taps have non-zero coefficients. The two
zero taps are kept in the delay line but give no table input, so the table
has 2^3 = 8 words:

| address (x[n-1] x[n-2] x[n-3] bits) | word |
|---|---|
| 000 | 0 |
| 001 | 4 |
| 010 | 8 |
| 011 | 12 |
| 100 | 4 |
| 101 | 8 |
| 110 | 12 |
| 111 | 16 |

The most significant address bit belongs to the first (lowest-index) non-zero
coefficient. Entry `a` is `sum_i a[K-1-i] * c_i`. It is computed from the
coefficient parameter when the design is elaborated, so changing the
coefficients regenerates the table.

## One filter stage, step by step (`hbf_da_filter`)

```
 x_in ──► da_tap_sreg ──bits──► da_lut_bank ──word──► da_scaling_accumulator ──► y_out
          (tap line,            (2^3-word             (acc >>> 1, ± word·2^(B-1))
           words rotate)         table)
                     ▲                                     ▲
                     └──────── da_controller: load / step / first / sign_step
```

1. **Load.** When the stage is idle and its result register is free, a sample
   offered with `in_valid` is taken. The tap line shifts by one word: tap 0
   gets the new sample and tap k gets tap k-1.
2. **Bit steps.** For B cycles (B = input width, 8 by default), every tap word
   rotates right by one bit. The low bit of each word is therefore bit 0, 1,
   ..., B-1 in turn. The bits of the non-zero taps address the table.
3. **Accumulate.** Each cycle, the accumulator shifts its sum right by one bit
   and adds the table word at weight 2^(B-1). In the last step the word is
   subtracted (sign control). The first step starts from zero.
4. **Result.** After the B-th step the accumulator holds `y` exactly.
   `out_valid` rises and stays high until `out_ready` takes the result. After
   B rotations the tap words are back where they started, ready for the next
   load.

### Why the right-shifting accumulator is exact

A right-shifting accumulator seems to discard the low bit every cycle. Here
each word enters at the *top* (weight 2^(B-1)), and only then does the sum
move right. After step t the sum is `sum_{s<=t} ±T_s 2^(B-1-t+s)`. Before
every later shift (t <= B-2) the smallest exponent is at least 1, so the sum
is even and the bit shifted out is zero. After B steps the sum equals
`sum_s ±T_s 2^s = y` with no rounding. The accumulator is two bits wider than
the output for headroom on running sums; the final value always fits the
output width.

A pitfall in writing this register: `clear ? '0 : acc >>> 1` is an unsigned
expression in SystemVerilog (the `'0` makes it so), which turns the
arithmetic shift into a logical one. The RTL uses an `if` for that reason.

### Timing

* With the input accepted on clock edge E, `out_valid` is high after edge
  E + B/BPC.
* With `out_ready` held high, a stage takes one sample every B/BPC + 1
  cycles: 9 cycles for the default 8-bit serial stage.
* `y_out` is stable while `out_valid` is high.
* Reset is synchronous and active low, and clears every register.

### Word widths

| signal | width | rule |
|---|---|---|
| input | `X_W` = 8 | parameter |
| table word | 6 | smallest signed width holding the sum of the coefficient magnitudes (16) |
| output | `X_W + clog2(S) + 1` = 13 | S = sum of coefficient magnitudes; `abs(y) <= S * 2^(X_W-1)` |

The output is the full-precision integer sum. It is not divided by the 2^4
coefficient scale, so the sequence 39, 19, 8, 5, -33 produces 0, 156, 388,
340, 160, -60, -244, -132, 0.

## Variants selected by parameters

* **Parallel DA, `BPC = 2`.** Two bits of every tap are used per cycle. There
  are two copies of the table, one for the even bit and one for the odd bit.
  The accumulator shifts by two and adds the odd-bit word at twice the weight.
  This halves the number of steps at the cost of doubling the table. An odd
  input width is sign-extended by one bit.
* **Split table, `LUT_K < number of non-zero taps`.** A table over L inputs
  has 2^L words, which is impractical for long filters. `da_lut_bank` splits
  the inputs into groups of `LUT_K` (the last group may be smaller). Each
  group gets its own 2^LUT_K-word table, and an adder sums the outputs. The
  sum equals the word of the single large table.
* **Other coefficient sets.** `NTAPS` and `COEFFS` (a `hbf_pkg::coef_list_t`,
  up to 32 entries, entry 0 multiplying the newest sample) can describe any
  FIR filter. Zero coefficients are dropped from the table automatically, and
  table and output widths follow from the coefficients.

## The cascade (`hbf_cascade`)

Reducing the bandwidth by more than one octave is done by chaining half-band
filters. `hbf_cascade` chains two identical stages:

* Stage 1 filters the 8-bit input. Its 13-bit full-precision output goes both
  to the `y1` port and to stage 2.
* Stage 2 is built for 13-bit input, so it needs 13 bit steps per sample.
* The stages are joined by valid/ready. Stage 1 holds its result, and stops
  taking samples, while stage 2 is busy.
* In steady state the cascade takes one sample every 14 cycles.
* `y1_valid` pulses once for each stage-1 result that moves to stage 2.
* No decimation is done: each input sample gives one output from each stage.

For the input sequence 39, 19, 8, 5, -33, 0, ... the outputs are:

* stage 1: 0, 156, 388, 340, 160, -60, -244, -132, 0
* stage 2: 0, 0, 624, 2800, 5088, 4912, 2400, -816, -2720, ...

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | input handshake |
| `x_in` | in | 8 | input sample, two's complement |
| `y1_valid` | out | 1 | strobe: `y1` moves from stage 1 to stage 2 |
| `y1` | out | 13 | stage-1 output |
| `out_valid` / `out_ready` | out / in | 1 | output handshake |
| `y_out` | out | 18 | stage-2 output |

## Files

| file | content |
|---|---|
| `rtl/hbf_pkg.sv` | coefficient list type, default coefficients, width and tap-selection functions, controller state enum |
| `rtl/hbf_cascade.sv` | top: two stages in series |
| `rtl/hbf_da_filter.sv` | one DA filter stage |
| `rtl/da_controller.sv` | idle/busy sequencer, step counter, handshake |
| `rtl/da_tap_sreg.sv` | tap delay line with rotating bit-serial read-out |
| `rtl/da_lut_bank.sv` | table split into groups plus adder |
| `rtl/da_lut.sv` | one table of 2^K coefficient sums |
| `rtl/da_scaling_accumulator.sv` | shift-right accumulator with add/subtract |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/hbf_pkg.sv tb/tb_hbf_cascade.sv --top-module tb_hbf_cascade
./obj_dir/Vtb_hbf_cascade
```

Replace the testbench name to run any of the others.

| testbench | what it checks |
|---|---|
| `tb_hbf_cascade` | the whole design at its default parameters: the known sequence through both stages, the 14-cycle sample period, then 400 random samples with random gaps and output back-pressure, against a reference model; it also counts input stalls, stage-1 holds, output back-pressure and sign-bit subtractions, and fails if any never happened |
| `tb_hbf_cascade_parallel` | the same end-to-end test with both stages built as two-bit parallel DA (sample period 8 cycles) |
| `tb_hbf_da_filter` | three stage configurations side by side (serial default; parallel with a split table; a 7-tap filter -1, 0, 9, 16, 9, 0, -1 with negative coefficients): known sequence, exact latency and sample period, random traffic with back-pressure |
| `tb_da_controller` | cycle-exact comparison with a reference state machine under random handshakes |
| `tb_da_tap_sreg` | shifting, bit order of the read-out and restoration after a full rotation, for 1 and 2 bits per step |
| `tb_da_lut`, `tb_da_lut_bank` | every address of several tables, including split ones |
| `tb_da_scaling_accumulator` | random and extreme words, including negative ones, for 1 and 2 bits per step |

## What follows the source design and what is chosen here

These follow the source design:

* the half-band coefficients 0, 4, 8, 4, 0 (1/2 in the centre, scaled by 2^4)
* the DA structure: bit shift registers, a table of coefficient sums, and a
  shifting add/subtract accumulator whose sign-bit word is subtracted
* LSB-first processing
* the 2^3-word table for three coefficients
* the two-bit parallel DA with a doubled table
* splitting a table of 2^L words into m tables of 2^k words
* the two-stage cascade and its expected output values

These are choices made here, where the source design does not say:

* 8-bit input width, and the table and output widths
* no table inputs for zero taps
* tap words that rotate, so the delay line doubles as the bit shift register
* where the words enter the accumulator
* the controller and the valid/ready handshakes
* synchronous reset
* the latency and sample rate above
* full-precision outputs with no rescaling

Not included:

* the direct-form and transposed-form realisations, which serve only as
  comparisons for the DA design
* decimation by two after a stage, mentioned only as an application
* any claim about clock frequency or FPGA resource use, which simulation
  cannot check
