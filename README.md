# Bit-serial FIR filters built from one recursive convolution structure

An FIR filter computes a convolution of words: `y(n) = Σ f(i)·x(n−i)`.
Multiplying two binary numbers is also a convolution, of their bit strings,
followed by carrying: column `k` of the partial-product array is
`Σ x_j·f_(k−j)`, and the carries turn those column sums into binary. So the
structure that convolves words at the filter level can be used again, at bit
level, for each multiplier in it. Only two things change: the multiply
becomes a 2-input AND, and the add becomes a one-bit full adder whose carry
goes back into the same adder on the next bit.

This repository holds two filters built this way. Each has one 1-bit data
input and one 1-bit data output:

* **Transposed filter** (`rsb_transposed_fir`). This is the word-level
  transposed FIR. Each tap multiplier is a *convolution-carrying multiplier*,
  which is itself a transposed FIR over the coefficient's bits. Each word
  delay `z⁻¹` is a shift register that is one word long.
* **Super-systolic filter** (`rsb_systolic_fir`). This is the word-level
  systolic FIR, with x flowing right and y flowing left. Each cell's
  multiplier is itself a bit-level systolic array. Two input sequences are
  interleaved bit by bit, so that no clock is wasted.

`rsb_fir_top` places the two filters side by side. They share the clock,
the reset and the coefficients.

All numbers are unsigned. Samples are `N` bits and coefficients `M` bits,
and the filter has `L` taps. `K = ⌈log2 L⌉` guard bits are added, so every
result fits in a word of `W = N+M+K` bits. The defaults are `N = M = 16`,
`L = 4` and `K = 2`, which gives `W = 34`.

## Words on a wire: framing and timing

This is the part to get right before anything else. Everything is sent
least significant bit first. A clock carries exactly one bit.

### Transposed filter: slots of W clocks

```
clock in slot n:   0        1       ...  N-1        N ... W-1
tf x_in        :   x(n)_0   x(n)_1  ...  x(n)_N-1   0 ... 0
tf y_out       :   y(n)_0   y(n)_1  ...  ...            y(n)_W-1
```

* Slots follow each other with no gap. One sample goes in and one result
  comes out every `W` clocks.
* The `M+K` zero bits at the end of each input slot are required. They give
  the product and the sum room to grow to `W` bits.
* `y(n)` comes out in the same slot as `x(n)`, and bit `k` of it in the same
  clock as input position `k`. The latency is zero.
* The path from `x_in` through one AND gate and two full adders to `y_out`
  is combinational. Drive `x_in` early in the clock and sample `y_out` before
  the next rising edge.

### Systolic filter: word-pair slots of 2W clocks

```
clock in slot n:   0        1        2        3       ...  2N-1      2N ... 2W-1
sf x_in        :   x1(n)_0  x2(n)_0  x1(n)_1  x2(n)_1 ...  x2(n)_N-1  0  ...  0
sf y_out       :   (prev)   y1(n)_0  y2(n)_0  y1(n)_1 ...
```

* Bit `b` of `y1(n)` comes out in clock `2b+1` of slot `n`, and bit `b` of
  `y2(n)` in clock `2b+2`.
* The last bit of `y2(n)` falls on clock 0 of the next slot. That clock is
  free, because `y1(n+1)` starts in clock 1.
* The output lags the input by one clock and is driven from flip-flops
  through one full adder.
* Per sequence, this filter takes one sample every `2W` clocks. With two
  sequences, it moves as many samples per clock as the transposed filter.
* If only one sequence is needed, drive the other with zeros.

### Why the carries clear between words

Every adder keeps its carry in a flip-flop, and none of them is reset
between words. Think of a stream's registers as holding the part of the
result that has not come out yet. That part is never negative. When a slot
has emitted the whole result, which fits in `W` bits, the part left over is
zero, so every carry and delay bit is zero again.

This only holds if the input bits at positions `N` and above are zero. It
also only holds if the coefficients stay constant while data is in flight.
When the coefficients change, let `L` slots of zeros pass, or reset.

## The convolution-carrying multiplier (`conv_carry_mult`)

```
 x_in ──┬──────────┬──────────┬──────── ... ──┬
      f[M-1]&    f[M-2]&    f[M-3]&         f[0]&
        │          │          │               │
        └─[D]─→ (FA)─[D]─→ (FA)─[D]─ ... ─→ (FA)──→ p_out
                 ↺c         ↺c               ↺c
```

The multiplier is the transposed FIR of the top level, applied to bits:

* `x_in` is broadcast to `M` AND gates, one per coefficient bit.
* The AND term of the top bit `f[M−1]` enters a one-clock delay `D`.
* Each later stage `j` adds its AND term to the delayed partial sum in a
  full adder. The adder's carry (`↺c`) returns on the next clock.

Let `S_j` be the number carried by the stream out of stage `j`. Then
`S_j = f_j·X + 2·S_(j+1)`, so the last stage gives `F·X`, least significant
bit first. `p_out` has no register. It needs `M` zero bits after `X`.

## The transposed filter (`rsb_transposed_fir`)

```
x_in ─┬──────────────┬───────────────┬──── ... ──┬
   mult f(L-1)    mult f(L-2)     mult f(L-3)   mult f(0)
      │              │               │           │
      └─[W-bit SR]─→(FA)─[W-bit SR]─→(FA)─ ... ─→(FA)──→ y_out
```

* Each `mult` box is a `conv_carry_mult` with coefficient `f(i)`.
* Each `W-bit SR` is a shift register of `W = N+M+K` flip-flops, exactly
  one word slot. At the word level it is `z⁻¹`.
* The adder of tap `i` adds the product `f(i)·x(n)` to the partial sum of
  `x(n−1)` from tap `i+1`.
* Tap `L−1` has no adder: its product goes straight into the first shift
  register.

Flip-flops: `L·2(M−1) + (L−1)(W+1)`, which is 225 at the defaults.

## The super-systolic filter (`rsb_systolic_fir`)

```
          y_out ←(FA)←───── y SR (N+M+2K) ←────(FA)←── ... ←── 0
                  ↑                              ↑
x_in →  [systolic mult f(0)] → x SR (N) → [systolic mult f(1)] → ... → (unused)
```

Each cell (`systolic_fir_cell`) holds two parts:

* A bit-level systolic multiplier (`systolic_mult`).
* A full adder that adds the product to the partial-sum stream coming from
  the right.

The multiplier is a row of `M` sub-cells (`sys_mult_cell`), with `f[0]` at
the left. In each sub-cell:

* `x` passes left to right through one flip-flop.
* The partial product passes right to left through one flip-flop.
* The sub-cell ANDs `x` with its coefficient bit and adds it into the
  passing partial product.

Bit `i` of `X` meets coefficient bit `j` in sub-cell `j`. Its contribution
leaves the left end `2(i+j)+1` clocks after bit `i` entered, which puts it
at weight `i+j`. So the array computes the bit convolution, and the
sub-cell adders do the carrying.

### Interleaving, and why the carries wait two clocks

Because x and p move in opposite directions, a bit of one stream only meets
partial sums that are two clocks apart. A single sequence would leave every
other clock unused. The unused clocks carry the second sequence.

The two sequences never mix, with one condition: every carry must wait two
clocks, so that it comes back on the next bit of *its own* sequence. That is
why every adder in this filter is `serial_adder #(.CARRY_DELAY(2))`.

### Delay balance between cells

Between cells, x passes an `N`-bit shift register and y passes one of
`N+M+2K` bits. Add the `M` clocks that x spends inside a cell's multiplier,
and a round trip between neighbouring cells takes

    (M + N) + (N + M + 2K) = 2W clocks,

which is exactly one word-pair slot. So the product of `x(n)` formed in
cell `i` arrives at cell 0 inside the slot of `y(n+i)`. That is the
systolic convolution.

When `N = M`, the y register is `2M+2K` bits long. The general form
`N+M+2K` is used here so that unequal widths also work; the testbenches
check `N = 5`, `M = 3`.

Flip-flops: `L(4M+2) + (L−1)(2N+M+2K) − 1`, which is 419 at the defaults.
The `−1` is the x output register of the last cell, which drives nothing.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | sample width |
| `M` | 16 | coefficient width (`conv_carry_mult`, `systolic_mult` require `M ≥ 2`) |
| `L` | 4 | taps (`L ≥ 2`) |
| `K` | `⌈log2 L⌉` | guard bits. Override only with a larger value; a smaller one lets sums overflow the word. |
| `DEPTH` (`shift_reg`) | 34 | delay in clocks |
| `CARRY_DELAY` (`serial_adder`) | 1 | clocks until a carry returns: 1 for dense streams, 2 for two interleaved streams |

Ports of `rsb_fir_top`:

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | input | 1 | clock |
| `rst` | input | 1 | synchronous, active high; clears every flip-flop |
| `coef` | input | `[L-1:0][M-1:0]` | `coef[i]` is `f(i)`; hold it constant while data is in flight |
| `tf_x_in`, `tf_y_out` | input, output | 1 | transposed filter |
| `sf_x_in`, `sf_y_out` | input, output | 1 | systolic filter, X1/X2 and Y1/Y2 interleaved |

## Files

| file | contents |
|---|---|
| `rtl/rsb_fir_pkg.sv` | full-adder function, `fa_t` sum/carry type, `guard_bits()` |
| `rtl/serial_adder.sv` | bit-serial full adder with carry register(s) |
| `rtl/shift_reg.sv` | one-bit delay line |
| `rtl/conv_carry_mult.sv` | convolution-carrying multiplier |
| `rtl/rsb_transposed_fir.sv` | bit-level transposed filter |
| `rtl/sys_mult_cell.sv`, `rtl/systolic_mult.sv` | systolic multiplier sub-cell and array |
| `rtl/systolic_fir_cell.sv`, `rtl/rsb_systolic_fir.sv` | systolic filter cell and array |
| `rtl/rsb_fir_top.sv` | both filters side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tf_harness.sv`, `tb/sf_harness.sv` | stimulus and reference models for the two filters at any size |

## Verification

Every testbench checks the outputs against values computed independently in
the testbench, such as `a+b`, `F·X`, or the convolution sum in 64-bit
arithmetic. Each testbench ends with the line
`TB_RESULT checks=<n> failures=<n>` and has a clock-count watchdog.

* **Filters.** Both filter testbenches run three sizes at once:
  * `N = M = L = 4`, with the example data `f = F,7,A,C` and
    `x = 5,9,B,3` (hexadecimal);
  * `N = 5, M = 3, L = 3`;
  * the full size, `N = M = 16, L = 4`.

  They also run all-ones data, which needs the guard bits, and random data.
  For the example, the transposed filter must return
  `y = 75, 170, 278, 272, 239, 162, 36` (decimal).
* **Timing.** Output bits are read at the exact clock the framing above
  gives, so a wrong latency or rate shows up as wrong data.
* **Top level.** `tb_rsb_fir_top` runs the top with default parameters and
  drives both filters at once. It also resets in the middle of a stream and
  changes a coefficient between runs. It counts each mechanism (guard bits
  used, second sequence active, back-to-back words, mid-stream reset) and
  fails if any never happened.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rsb_fir_pkg.sv \
    tb/tb_rsb_fir_top.sv --top-module tb_rsb_fir_top -o sim
./obj_dir/sim
```

Give the package first. The other files are found through `-I` by module
name. Every testbench finishes in well under a second.

The testbench reference models use 64-bit numbers, so they need `W ≤ 64`.
The RTL itself has no such limit.

## Design choices and departures

* **Coefficients are parallel input ports** that must be held constant.
  There is no coefficient-loading interface. A serial load, or fixed
  coefficients as parameters, would be easy to add.
* **Reset** is synchronous and active high, and clears every register.
  After power-up it is needed once; after that, words clear themselves (see
  above).
* **Unsigned arithmetic only.** Two's-complement samples would need sign
  extension into the guard bits, and a coefficient sign-bit correction.
* **Combinational input-to-output path in the transposed filter.** It runs
  through one AND gate and two full adders, and keeps the zero-latency
  framing. If the filter's input and output must both be registered, add a
  flip-flop at either port and shift the framing by one clock.
* **Carry delay of two** in the systolic filter, and a **y shift register
  of `N+M+2K`**. Both are derived above from the interleaved data flow, and
  both are checked by simulation.
* **The last cell's x output is unused.** Verilator's lint reports it as an
  unused signal.
* **Not included:** the word-level reference filters (bit-parallel
  multipliers and adders) and bit-parallel array multipliers. They are the
  conventional designs this approach replaces.
