# Radix-2 FFT hardware on low-gate-count adders: a 16-point SDF/SDC pipeline and four compressor butterflies

Most of the silicon in an FFT goes into two things: the adders of the radix-2
butterflies and the real multipliers inside the complex twiddle multiplications.
This RTL attacks both, in two independent pieces that share clock and reset in
the top module `r2_top`:

1. **A 16-point pipelined FFT** (`fft16`): a streaming processor that takes one
   complex sample per clock. Its first stage is a single-path delay *feedback*
   (SDF) stage, and the three stages after it are single-path delay *commutator*
   (SDC) stages. Every butterfly adder in it is a **modified carry-select adder**
   built from a **reduced full adder**: a full adder made of one OR, two ANDs,
   two inverters and a multiplexer.
2. **Four radix-2 decimation-in-time butterflies** (`bfly_a` … `bfly_d`). Each
   computes `C = A + W·B` and `D = A − W·B` for 16-bit complex operands. They
   differ in how the complex product is factored: four real multipliers (A) or
   three (B, C, D). None of them forms `W·B` on its own. Each output is instead
   one multi-operand sum (for example `Ar + BrWr − BiWi`), reduced by a row of
   **3:2 or 4:2 adder compressors** and a single carry-propagate adder. Each
   structure can be built with one or two pipeline levels.

Everything is synthesizable SystemVerilog. Each module has a self-checking
testbench that compares against independent integer (and, for the FFT,
floating-point) models.

## Adders built from the reduced full adder

`rfa` computes sum and carry of `a + b + cin`. From `b` and `cin` alone it forms
four candidates: `b|cin`, `b&cin`, `b^cin` (as `(b|cin) & ~(b&cin)`) and its
complement. `a` then picks one candidate pair through a two-output 2:1
multiplexer:

| a | sum | carry |
|---|-----|-------|
| 0 | b ^ cin | b & cin |
| 1 | ~(b ^ cin) | b \| cin |

`rca4_rfa` chains four of these into a 4-bit ripple adder. `mcsla` is the
carry-select adder built on those 4-bit groups:

* The lowest group adds with the real carry-in.
* Every higher group holds two 4-bit adders, one working with carry-in 0 and
  one with carry-in 1, both at once.
* The carry out of the group below selects the right result through a
  multiplexer.

`WIDTH` must be a multiple of 4. Its default is 16; the FFT uses 24 and the
compressor adders use 40. Subtraction everywhere is `a + ~b` with `cin = 1`.

## The 16-point FFT pipeline

```
in ─► SDF (8) ─► ×W16^k ─► SDC (4) ─► ×W16^2k ─► SDC (2) ─► ×W16^4k ─► SDC (1) ─► out
```

The delays shrink 8, 4, 2, 1, which is the decimation-in-frequency ordering.
A stage with delay `D` pairs sample `x[j]` with `x[j+D]` in each block of `2D`
samples. It emits the `D` sums first and then the `D` differences, and the
multiplier that follows rotates difference number `j` by `W_(2D)^j`.

**SDF stage** (`sdf_stage`): a single `D`-word feedback delay line.

* First half of each block: input samples go into the line, and the differences
  of the previous block come out of it.
* Second half: the butterfly combines the line's output with the input. The sum
  goes out and the difference goes back into the line.

**SDC stage** (`sdc_stage`): two `D`-word delay lines, one before the butterfly
and one after it, with multiplexers around them.

* The input line lines `x[j]` up with `x[j+D]`.
* The sum leaves at once.
* The difference waits `D` clocks in the output line, and the output multiplexer
  passes it during the next block's first half.

Both stage types have the same timing (latency `D` plus one output register),
so they can be mixed freely.

**Twiddle multipliers** (`twiddle_mult`): a parallel complex multiplier with four
real products. Twiddles are 16-bit with 14 fraction bits. The table in `fft_pkg`
holds `round(2^14·cos(2πk/16))` and `round(−2^14·sin(2πk/16))` for `k = 0…7`.
The product is rounded half-up back to the data width. `k = 0` is exactly 1, so
sums simply pass with `k = 0`.

**Control.** `fft16` has one 4-bit counter of accepted samples. Each stage's
half-select bit and each multiplier's twiddle index is that counter minus a
fixed offset, taken from the pipeline depth in front of the stage:

| stage input | offset |
|---|---|
| stage 2 | 10 |
| stage 3 | 16 |
| stage 4 | 20 |
| output word | 21 |

**Timing and interface.**

* `in_valid` is the clock enable of every register in the FFT. Gaps in the input
  pause the whole pipeline and do not corrupt it.
* Frames of 16 samples follow each other with no framing signal. The first
  sample after reset is sample 0 of frame 0.
* The word loaded into the output register on the enabled clock that accepts
  sample `n` is stream position `n − 21`. So a frame's first result appears 21
  samples after its first sample.
* `out_valid` marks each new output word. The last frame is pushed out by the
  input samples that follow it (feed 21 filler samples to flush).
* Outputs come in bit-reversed order, and `out_bin` gives each word's frequency
  index. There is no reorder buffer.

**Number format.** Inputs are 16-bit signed. Internal words and outputs are
24-bit signed, with no scaling between stages. `X[k] = Σ x[n]·W16^(nk)` appears
at full magnitude, with room for the 4 bits of growth and the rounding.
Results agree bit for bit with an integer model of the same algorithm, and lie
within a few LSB of the exact DFT. The testbench bound is 8 LSB.

## The compressor butterflies

All four compute `C = A + W·B` and `D = A − W·B`. The real products are:

| structure | real products | Re(W·B) | Im(W·B) | reducers (Cr, Dr / Ci, Di) |
|---|---|---|---|---|
| A (`bfly_a`) | BrWr, BiWi, BrWi, BiWr | BrWr − BiWi | BrWi + BiWr | 3:2 / 3:2 |
| B (`bfly_b`) | m1=(Br+Bi)Wr, m2=(Wr+Wi)Bi, m3=(Br−Bi)Wi | m1 − m2 | m2 + m3 | 3:2 / 3:2 |
| C (`bfly_c`) | p=(Wr+Wi)(Br+Bi), k1=BrWr, k2=BiWi | k1 − k2 | p − k1 − k2 | 3:2 / 4:2 |
| D (`bfly_d`) | P1=(Wr−Wi)(Br+Bi), M=BrWi, P3=(Bi−Br)(Wr+Wi) | P1/2 − P3/2 | P1/2 + P3/2 + 2M | 3:2 / 4:2 |

Each output is one sum of three or four terms, some of them subtracted.
`madd3` and `madd4` do these sums:

* **Compressor row.** Each is a row of compressor cells followed by the modified
  carry-select adder. Subtracted operands enter the row inverted.
* **The +1 corrections.** The "+1" of each inversion costs no extra hardware. It
  goes into a carry input that would otherwise be idle:
  * bit 0 of the shifted carry vector;
  * the final adder's carry-in;
  * for 4:2, also the first cell's carry-in.
* **Limits.** `madd3` accepts up to two subtracted operands and `madd4` up to
  three, set by the `NEG` parameter. Elaboration stops with an error beyond that.

**Compressor cells.** `comp32` is two XORs and a multiplexer: `x = α^β`,
`sum = x^γ`, and `carry = x ? γ : α`. `comp42` uses `x1 = α^β`, `x2 = γ^δ`,
`x3 = x1^x2`, `sum = x3^cin`, `cout = x1 ? γ : α` and `carry = x3 ? cin : δ`.
Its `cout` does not depend on `cin`, so a row of 4:2 cells does not ripple. The
`δ` on the carry multiplexer matters: with `α` in that place the cell gives the
wrong count, for example for `α=β=0, γ=δ=1`.

**Number format.**

* `A` and `B` are 16-bit signed integers.
* `W` is 16-bit signed with 14 fraction bits (Q2.14), so `W = 1` is exact.
* The sums are exact at 40 bits. Each output is
  `floor((A·2^14 + W·B) / 2^14)` in 18 bits.
* Outputs are correct for `|W| ≤ 1`, which covers every twiddle factor. Larger
  `W` can overflow the 18-bit outputs.

**Structure D's halvings** lose nothing. The whole sum is formed one binary place
higher: `A` is shifted by 15 instead of 14, `P1` and `P3` are taken as they are,
and `2M` becomes `M << 2`. The extra place is then dropped at the output. `P1`
and `P3` always have the same parity, so that place is always zero.

**Pipelining.** The products are always registered, and so are the outputs.
`PIPES = 2` adds a register in front of the multipliers (after the pre-adders;
in A, on the multiplier operands). Latency is `PIPES + 1` clocks, with one
butterfly per clock. `out_valid` follows `in_valid`. The defaults are the
lighter setting for A (`PIPES = 1`) and the deeper one for B, C and D
(`PIPES = 2`): with compressors these are the reported lowest-power
choices for each structure. Since B, C and D share a latency and a number
format, they give identical results, and the top-level test checks that.

## Where this RTL makes its own choices

These points are not fixed by the architecture description and were decided
here:

* **Formats and rounding.** The fixed-point formats, rounding (half-up in the
  twiddle multiplier, floor in the butterflies) and internal widths.
* **Pipeline registers.** Where the butterflies' pipeline registers sit. The
  reference drawings show one or two register levels but not legibly where.
* **SDC stage layout.** The commutator stage is built with one `D`-word line
  before and one after the butterfly. The reference drawing shows four delay
  boxes per commutator stage around input and output switches. The stage
  function and its position in the pipeline are the same, but the register
  count and latency differ from such a layout.
* **Twiddle multipliers.** They are placed between every pair of stages, three
  in all.
* **Output order.** The FFT output stays in bit-reversed order.
* **Final adder.** The final carry-propagate adder after the compressor rows is
  the modified carry-select adder.
* **Flow control and reset.** Flow control is a plain valid/enable with no
  back-pressure. Reset is asynchronous and active-low. Delay-line contents are
  not reset.
* **Logic-level cells.** The XOR gates are ordinary logic XORs. A special
  transistor-level XOR cell was part of the original low-power motivation; its
  circuit is not available and only matters below the logic level.
* **Area and power.** Nothing here reproduces the area or power results. Those
  depend on a 0.18 µm cell library and synthesis flow.

## Files

| module | role |
|---|---|
| `r2_top` | top: FFT and four butterflies side by side |
| `fft16`, `sdf_stage`, `sdc_stage`, `twiddle_mult`, `delay_line`, `fft_pkg` | FFT pipeline |
| `mcsla`, `rca4_rfa`, `rfa` | modified carry-select adder and its cells |
| `bfly_a`…`bfly_d`, `bfly_pkg` | compressor butterflies |
| `madd3`, `madd4`, `comp32`, `comp42` | compressor adders and cells |

Testbenches are in `tb/`, one per module (`tb_<module>.sv`). Also in `tb/`:

* `tb_bfly_workload.sv` streams 10,000 random vectors through all eight
  butterfly configurations.
* `fft_ref_pkg.sv` holds the FFT reference models.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv rtl/bfly_pkg.sv tb/fft_ref_pkg.sv tb/tb_r2_top.sv \
    --top-module tb_r2_top
./obj_dir/Vtb_r2_top
```

Replace `tb_r2_top` with any other testbench name to run that one. The
end-to-end test `tb_r2_top` runs the top at its default parameters. It
streams 24 FFT frames with random input pauses and, at the same time, about
800 operand sets through each butterfly. It checks every result and its
latency, and it requires each mechanism to occur:

* an input pause;
* an SDF half switch;
* a butterfly input gap;
* results from all four structures.

**Changing things.**

* `fft16` takes `DW` (input width) and `W` (internal width; keep
  `W ≥ DW + 5` and a multiple of 4 for the adders).
* The butterflies take `DW`, `FRAC` and `PIPES`. Their internal width is fixed at
  40 bits, enough for `DW = 16`.
* The transform length is fixed at 16: the stage delays, the offsets in
  `fft16` and the twiddle table in `fft_pkg` all depend on it.
