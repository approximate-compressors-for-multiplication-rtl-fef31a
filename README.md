# 8:4 and 9:4 compressors for multiplier partial-product reduction

A multiplier spends most of its logic and delay on reducing a tall column of
partial-product bits to two rows, or one. A *compressor* does that reduction
one column at a time. An m:n compressor takes m bits of the same weight and
gives on n outputs, in binary, how many of them are 1. The lowest output has
the weight of the inputs. Each higher output has twice the weight of the one
below it.

This design holds two high-order compressors:

* **8:4**: eight inputs `I0..I7`, count 0..8
* **9:4**: nine inputs `I0..I8`, count 0..9

Each comes in two realisations:

* **Design I**: a three-stage tree of half and full adders.
* **Design II**: the same tree with every adder output built from 2x1 and
  4x1 multiplexers.

Outputs are named `X1`..`X4`. `X1` is the least significant bit. Eight ones
into the 8:4 compressor give `X4X3X2X1 = 1000`. Nine ones into the 9:4
compressor give `1001`.

All four circuits compute the **exact** count. The family these circuits come
from is usually called "approximate compressors". But the equations that
define these circuits produce the true number of ones for every input, and
exhaustive simulation confirms it. No input pattern gives an approximated
result.

## The adder tree (Design I)

Every bit below carries a weight. A full adder turns three bits of weight w
into a sum of weight w and a carry of weight 2w. A half adder does the same
for two bits.

```
             8:4 compressor                         9:4 compressor
stage 1  HA(I0,I1)      -> a (w1), b (w2)     FA(I0,I1,I2) -> a, b
         FA(I2,I3,I4)   -> c (w1), d (w2)     FA(I3,I4,I5) -> c, d
         FA(I5,I6,I7)   -> e (w1), f (w2)     FA(I6,I7,I8) -> e, f

stage 2  FA(a,c,e)      -> X1 (w1), g (w2)
         FA(b,d,f)      -> h (w2),  k (w4)

stage 3  HA(g,h)        -> X2 (w2), m (w4)
         HA(m,k)        -> X3 (w4), X4 (w8)
```

The two compressors differ only in the first-stage element on `I0`/`I1`:
a half adder for 8:4 and a full adder on `I0..I2` for 9:4. The sum bits of
stage 1 all go to one stage-2 full adder and the carries to the other.
Written out:

```
X1 = a ^ c ^ e
g  = ac | ae | ce          h = b ^ d ^ f          k = bd | bf | df
X2 = g ^ h
X3 = (g & h) ^ k
X4 = g & h & k
```

Why this is exact: the input count is (a+c+e) + 2(b+d+f), which equals
X1 + 2(g+h) + 4k. In stage 3, g + h = X2 + 2m, and m + k = X3 + 2X4. At most
one of m and k can be 1 when the count is below 8. For 8 and 9, both are 1.
That gives `X3 = 0, X4 = 1`, as required.

The 8:4 compressor uses 4 full adders and 3 half adders. The 9:4 compressor
uses 5 full adders and 2 half adders.

## The multiplexer version (Design II)

Design II keeps the tree above and builds each logic function from
multiplexers. Two inputs of a full adder, `x` and `y`, drive the select
lines `{x,y}` of two 4x1 multiplexers. The third input `z` goes to the data
inputs:

| sel `{x,y}` | 00 | 01 | 10 | 11 | gives |
|---|---|---|---|---|---|
| sum mux data   | z | ~z | ~z | z | x ^ y ^ z |
| carry mux data | 0 | z  | z  | 1 | majority(x,y,z) |

Exclusive-ors of two bits (`I0 ^ I1` in the 8:4 design, and `X2 = g ^ h` in
both) come from a 2x1 mux: the select is one bit, and the data are the other
bit and its complement. Two ANDs are written as plain ANDs: `I0 & I1`, and
`m = g & h` feeding the final half adder. The final half adder stays an adder.

| | 4x1 mux | 2x1 mux | half adder | AND |
|---|---|---|---|---|
| 8:4 (`comp84_mux`) | 8  | 2 | 1 | 2 |
| 9:4 (`comp94_mux`) | 10 | 1 | 1 | 1 |

In the original circuit, the select lines leave unused parts of the
structure idle, which saves power. That is a transistor-level effect. In RTL
the function is the same as Design I, and synthesis may well merge the two
realisations into the same gates. Design II is therefore useful here as a
structural description (for a custom or mux-rich cell library, or for
comparing netlists), not as a logic difference.

## Interface and timing

All modules are purely combinational, with no clock, no reset and no
pipeline registers. An output settles one propagation delay after its input
changes.

| module | inputs | outputs |
|---|---|---|
| `comp84_adder`, `comp84_mux` | `i[7:0]` = I7..I0 | `x[4:1]` = X4..X1 |
| `comp94_adder`, `comp94_mux` | `i[8:0]` = I8..I0 | `x[4:1]` = X4..X1 |
| `compressor_top` | `i84_add`, `i94_add`, `i84_mux`, `i94_mux` | `x84_add`, `x94_add`, `x84_mux`, `x94_mux` |

The output type `compressor_pkg::count_t` is `logic [4:1]`, so `x[k]` is
output `Xk`, and `int'(x)` is the count. All inputs have the same weight, so
you may connect partial-product bits to them in any order.

`compressor_top` places the four compressors side by side, each with its own
input vector. Drive the two 8:4 inputs (or the two 9:4 inputs) with the same
bits to compare the two realisations. No multiplier is part of this design.
To use the compressors in a Wallace or Dadda tree, instantiate
`comp84_*`/`comp94_*` directly: `X1` stays in the column, and `X2`, `X3`,
`X4` go to the next three columns up.

## Where this RTL departs from, or adds to, the original circuit

* **Exact, not approximate.** The circuit's defining equations were followed
  over the word "approximate" in its name.
* **Adder pins.** The adder symbols of the original schematic do not say
  which pin is the sum and which the carry. The wiring here follows the
  equations above.
* **Design II function and pin use.** No equations exist for the multiplexer
  realisation. It is taken to compute the same count as Design I. The
  element counts, which element drives each output, and the 0/1 constants on
  the carry multiplexers match the original schematic. These are this
  design's own choices:
  * which signal of each adder drives the select lines;
  * the order of the data inputs;
  * the complemented data inputs of the sum multiplexers.
* **Nothing analog.** The original circuits are 45 nm CMOS transistor
  schematics, whose power, area and delay were measured (about 5 ps and
  20-110 um^2). None of that is modelled here.

## Verification

Each module has a self-checking testbench in `tb/`. Each applies every input
pattern and checks the result against an independently computed reference:
`$countones` of the input, or the arithmetic sum for the adders.

* `comp84_*_tb` and `comp94_*_tb` sweep all 256 or 512 patterns. They also
  check the all-ones maximum and that every count 0..8 or 0..9 appears.
* `half_adder_tb`, `full_adder_tb`, `mux2_tb` and `mux4_tb` cover every
  input combination.
* `compressor_top_tb` runs the whole top at its only size. It sweeps all 512
  nine-bit patterns into both 9:4 compressors, and the low eight bits into
  both 8:4 compressors. It checks each output against the ones count and the
  adder and multiplexer versions against each other. It then drives the four
  compressors with 2000 independent random patterns, to show that each
  output follows only its own input. Per compressor, it counts how often
  each count value occurred. A value that never occurred, the maxima 8 and
  9 included, counts as a failure.

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog that ends the run with a failure if the run hangs. Each was also run
against a deliberately broken copy of its module and reported failures.
Examples of the breaks: a dropped carry term, swapped multiplexer data, a
miswired stage. Lint (`verilator --lint-only -Wall`) reports only unused
package constants in modules that need one compressor size.

## Simulating

With verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/compressor_pkg.sv tb/compressor_top_tb.sv --top-module compressor_top_tb
./obj_dir/Vcompressor_top_tb
```

Replace `compressor_top_tb` with any other testbench name to run that one.
Every run takes well under a second.

## Files

| file | content |
|---|---|
| `rtl/compressor_pkg.sv` | `count_t`, input widths |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | the adder cells |
| `rtl/mux2.sv`, `rtl/mux4.sv` | the multiplexer cells |
| `rtl/mux_full_adder.sv` | a full adder from two 4x1 muxes |
| `rtl/comp84_adder.sv`, `rtl/comp94_adder.sv` | Design I |
| `rtl/comp84_mux.sv`, `rtl/comp94_mux.sv` | Design II |
| `rtl/compressor_top.sv` | the four side by side |
| `tb/*_tb.sv` | one testbench per module, plus the top |
