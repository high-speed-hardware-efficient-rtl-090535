# 41-tap pipelined FIR compensation filter for a delta-sigma ADC

A delta-sigma ADC gets its resolution by following the modulator with a low-pass decimation
chain. Two cascaded SINC (moving-sum) filters reject the shaped quantisation noise cheaply, but
their response, `[sin(M·π·F) / (M·sin(π·F))]²`, droops towards the top of the pass band. A
*compensation filter* placed after them has roughly the inverse of that droop in the pass band,
so that the product of the two responses stays flat.

This repository holds synthesizable SystemVerilog for such a compensation filter: a 41-tap,
linear-phase FIR filter with fixed 15-bit coefficients, built for a very high clock rate (the
original full-custom 0.13 µm implementation ran at 1.25 GHz). The RTL keeps the architecture of
that design. Each idea below is applied to make every clock period short:

* **Folding.** The coefficients are symmetric (`h[k] = h[40-k]`), so the two samples that share a
  coefficient are added first. That leaves 21 multiplications per output instead of 41.
* **Fixed-coefficient multipliers.** There are no general multipliers. Each tap adds one shifted
  copy of its input for each 1 bit in its coefficient.
* **Bit-level pipelining.** Every one of those additions gets its own pipeline stage, and so does
  every adder of the summing tree.
* **A latency-balanced adder tree.** The multipliers now have different depths (3 to 9 stages),
  so their products arrive in different clocks. The tree adds early products first and brings in
  late ones further down, with balance registers where a gap remains.

The filter takes one 13-bit sample and produces one output every clock, with no stalls. The
latency is 15 clocks.

## Arithmetic

With `x[n]` the 13-bit two's complement input and `H[k] = h[k]·1024` the integer coefficient:

```
y[n] = Σ_{k=0..19} floor( (x[n-k] + x[n-40+k]) · H[k] / 8192 )  +  floor( x[n-20] · H[20] / 8192 )
```

So `y_out` is the filter output divided by 8, in units of the input LSB. Each of the 21 products is
truncated toward minus infinity before it is summed. As a result, the output carries a small
negative bias (at most 21 LSB, typically about 10) and a few LSB of truncation noise.

The number formats:

| signal | width | format |
|---|---|---|
| input sample `x_in` | 13 | two's complement integer |
| pre-adder sum | 14 | two's complement |
| after sign select | 15 | two's complement (+8192 must fit) |
| coefficient code | 15 | sign-magnitude: sign, 4 integer bits, 10 fraction bits |
| full product | 28 (29 held) | two's complement, 2^-10 units |
| tap product | 15 | bits 27..13 of the full product |
| tree and `y_out` | 20 | two's complement |

Choosing bits 27..13 means no tap product can overflow. The largest pre-added sum is 2^13 in
magnitude, and the largest magnitude is 10.047·1024 = 10288 < 2^14. For the same reason the
output cannot exceed ±54,294 for any input, because Σ|h| = 106.04. The 20-bit output has room to
spare; 17 bits would do.

## Coefficients

The coefficients are stored as 15-bit sign-magnitude codes in `fir_comp_pkg::COEF[k]`. Taps `k`
and `40-k` share entry `k`, and entry 20 is the centre tap.

| k (and 40-k) | h | code | 1 bits in magnitude |
|---|---|---|---|
| 0 | -3.397 | 10011.0110010110 | 7 |
| 1 | 10.047 | 01010.0000110000 | 4 |
| 2 | -8.431 | 11000.0110111001 | 7 |
| 3 | 3.710 | 00011.1011010111 | 9 |
| 4 | -6.002 | 10110.0000000010 | 3 |
| 5 | 1.876 | 00001.1110000001 | 5 |
| 6 | 1.424 | 00001.0110110010 | 6 |
| 7 | 1.006 | 00001.0000000110 | 3 |
| 8 | 3.420 | 00011.0110101110 | 8 |
| 9 | -2.555 | 10010.1000111000 | 5 |
| 10 | 1.366 | 00001.0101110110 | 7 |
| 11 | -3.260 | 10011.0100001010 | 5 |
| 12 | 0.548 | 00000.1000110001 | 4 |
| 13 | -1.542 | 10001.1000101011 | 6 |
| 14 | 0.385 | 00000.0110001010 | 4 |
| 15 | -0.211 | 10000.0011011000 | 4 |
| 16 | 1.027 | 00001.0000011011 | 5 |
| 17 | 0.168 | 00000.0010101100 | 4 |
| 18 | 1.319 | 00001.0101000110 | 5 |
| 19 | -0.866 | 10000.1101110110 | 7 |
| 20 (centre) | 0.933 | 00000.1110111011 | 8 |

The DC gain of this set is 0.9951.

## One tap

`fir_tap` is a short fixed pipeline:

```
x_a ─┐
     (+) pre-adder, 14 bit ── REG ── 2's complement select ── REG ── shift-and-add multiplier ── p (15 bit)
x_b ─┘                                (negate if h < 0)               (|h|, one stage per 1 bit)
```

* The **pre-adder** adds the two samples that share the coefficient. The centre tap has only one
  sample, so it has no pre-adder (`HAS_PREADD = 0`), but it keeps both registers.
* The **2's complement select** (`twos_comp_select`) applies the coefficient's sign. It negates
  the pre-added sum (`~d + 1`, through the carry-select adder) when the code's sign bit is set.
  After that, the multiplier only ever multiplies by a positive magnitude.
* The **multiplier** (`shift_add_mult`) runs one stage per set bit of `|h|`:
  * Stage 0 registers the input shifted to the lowest set bit.
  * Each later stage adds the input shifted to the next set bit, and registers the sum together
    with a copy of the input for the stages that follow.

  A magnitude with `b` set bits therefore costs `b-1` adders and `b` clocks.

A tap's latency is `2 + popcount(|h|)` clocks. Across the 21 taps that ranges from 5 to 11.

All adders are `sqrt_csel_adder` instances. These are square-root carry-select adders:
* The word is split into ripple-carry blocks of 1, 2, 3, … bits.
* Each block above the first computes its sum for both possible carry-ins.
* A multiplexer per block picks the right result when the real carry arrives.

## The adder tree and its timing

This is the part of the design that needs the most explanation.

Because the tap latencies differ, a plain binary tree would add products that belong to different
input samples. The tree in `adder_tree` has 20 adders with a fixed topology. Each adder is
followed by a register. The 21 leaves are numbered left to right as follows:

```
leaf:        0  1  2  3  4 | 5  6  7  8 | 9 10 11 | 12 13 14 | 15 16 17 18 | 19 20
tap k:       3  0  5  1  4 | 2  6  7 12 | 8  9 11 | 10 15 16 | 13 14 17 18 | 19 20
code 1 bits: 9  8  5  4  4 | 8  6  3  4 | 8  6  6 |  7  5  5 |  7  4  4  5 |  8  8
```

The tree is made of six chains, then a merge:

* **Chains.** Each chain starts with its two early leaves and brings the later ones in one
  adder at a time:
  * `((((L3+L4)+L2)+L1)+L0)`
  * `(((L7+L8)+L6)+L5)`
  * `((L10+L11)+L9)`
  * `((L13+L14)+L12)`
  * `(((L16+L17)+L18)+L15)`
  * `(L19+L20)`
* **Merge.** Three more levels combine the chains:
  * chain 2 + chain 3, then chain 1 + that;
  * chain 4 + chain 5, then that + chain 6;
  * the root adds the two halves.

The leaf order and the topology come from the original design. The third row above is the number
of 1 bits in each tap's full 15-bit code, sign included. It equals the number printed on each
leaf of the original tree, and that is how taps were assigned to leaves: a leaf gets a tap with
the matching count, and ties go to the lower tap index.

The sign bit makes the arrival times in this RTL differ from those counts. The sign is handled by
a fixed stage, not by an extra addition. As a result, some operands still arrive a clock or two
apart. `fir_comp_pkg` works out every arrival time at elaboration:

* A leaf's arrival time is its tap latency.
* An adder's arrival time is the later of its two operands, plus 1.

`bal_a` / `bal_b` then give the number of `dff_delay` balance registers placed in front of the
earlier operand. The resulting timing, in clocks after the samples enter the taps:

| adder (id) | operands | operand ready | balance regs | result ready |
|---|---|---|---|---|
| 21 | L3, L4 | 6, 5 | 0 / 1 | 7 |
| 22 | 21, L2 | 7, 7 | – | 8 |
| 23 | 22, L1 | 8, 9 | 1 / 0 | 10 |
| 24 | 23, L0 | 10, 11 | 1 / 0 | 12 |
| 25 | L7, L8 | 5, 6 | 1 / 0 | 7 |
| 26 | 25, L6 | 7, 8 | 1 / 0 | 9 |
| 27 | 26, L5 | 9, 9 | – | 10 |
| 28 | L10, L11 | 7, 7 | – | 8 |
| 29 | 28, L9 | 8, 10 | 2 / 0 | 11 |
| 30 | 27, 29 | 10, 11 | 1 / 0 | 12 |
| 31 | 24, 30 | 12, 12 | – | 13 |
| 32 | L13, L14 | 6, 7 | 1 / 0 | 8 |
| 33 | 32, L12 | 8, 9 | 1 / 0 | 10 |
| 34 | L16, L17 | 6, 6 | – | 7 |
| 35 | 34, L18 | 7, 7 | – | 8 |
| 36 | 35, L15 | 8, 8 | – | 9 |
| 37 | 33, 36 | 10, 9 | 0 / 1 | 11 |
| 38 | L19, L20 | 9, 10 | 1 / 0 | 11 |
| 39 | 37, 38 | 11, 11 | – | 12 |
| 40 (root) | 31, 39 | 13, 12 | 0 / 1 | 14 |

The tree output is ready 14 clocks after the taps' inputs. The input register adds one more, so
`y_out` for the window that ends with sample `x[n]` appears **15 clocks** after `x[n]` is
presented. If you change a coefficient, the latencies and balance registers follow automatically.

## Interface (`fir_comp_filter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; every register is rising-edge triggered |
| `rst_n` | in | 1 | asynchronous active-low reset; clears every register, including the sample history |
| `in_valid` | in | 1 | tag for `x_in`; carried to `out_valid` |
| `x_in` | in | 13 | input sample, two's complement |
| `out_valid` | out | 1 | `in_valid` delayed 15 clocks |
| `y_out` | out | 20 | filtered sample, `y[n]` of the formula above |

The pipeline advances every clock whatever `in_valid` is. `in_valid` does not gate anything: it
only marks which outputs belong to real input samples. After reset, the history counts as zeros,
so the first 40 outputs are the filter's response to a signal that starts at that point.

## Files

| file | contents |
|---|---|
| `rtl/fir_comp_pkg.sv` | widths, coefficient codes, tree topology, latency and balance functions |
| `rtl/fir_comp_filter.sv` | top level: input register, delay line, 21 taps, adder tree, valid pipe |
| `rtl/fold_delay_line.sv` | 40-stage sample shift register presenting the symmetric pairs |
| `rtl/fir_tap.sv` | one tap: pre-adder, registers, sign select, multiplier |
| `rtl/twos_comp_select.sv` | conditional negation by the coefficient sign |
| `rtl/shift_add_mult.sv` | pipelined shift-and-add multiplier by a constant |
| `rtl/adder_tree.sv` | latency-balanced pipelined adder tree |
| `rtl/sqrt_csel_adder.sv` | square-root carry-select adder |
| `rtl/dff_delay.sv` | register chain of parameterised width and depth (0 = wire) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fir_comp_tone.sv` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To run one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/fir_comp_pkg.sv tb/tb_fir_comp_filter.sv --top-module tb_fir_comp_filter -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_<name>.sv`. Each run takes well under a second.

* `tb_fir_comp_filter` runs the whole filter at its default size and checks every output sample
  exactly against the formula above. It also checks that `out_valid` and the latency are right.
  The stimulus includes:
  * impulses;
  * full-scale steps;
  * the sign pattern that drives the output to its maximum magnitude;
  * random samples with gaps in `in_valid`;
  * a reset in the middle of a stream.

  It also confirms, via internal probes, that each of these was exercised: the pre-adders, a
  negative-coefficient select, the centre tap, a balance register and back-to-back outputs.
* `tb_fir_comp_tone` feeds sine waves at F = f/fs = 0, 0.005, 0.02, 0.05, 0.1, 0.2 and 0.3. It
  compares the measured output amplitude with `4000·|H(F)|/8`, where `|H(F)|` is computed from
  the coefficients. The results match within 1 % in the pass band, and within a few LSB of
  truncation residue in the stop band.
* The per-module testbenches check:
  * the adder at 5, 14, 20 and 29 bits;
  * the multiplier for all 21 constants, including its latency;
  * the taps, including the centre variant;
  * the delay line;
  * the tree with random leaves at their own arrival times;
  * the delay element;
  * the sign stage, exhaustively.

The multiplier and tree testbenches recompute their expected latencies independently of the RTL
package.

## How far this follows the original design

These parts follow the original design:
* the filter length;
* the coefficient codes;
* the folded linear-phase structure;
* the 13-bit tap inputs and 15-bit tap outputs;
* the order of stages inside a tap;
* shift-and-add multiplication by the set bits only, pipelined at bit level;
* square-root carry-select adders;
* a register after every adder;
* the adder-tree topology and leaf order.

These are choices made here, because the original description does not cover them:
* **Kept product bits** (27..13) and therefore the 2^-3 output scaling. Truncation is used, not
  rounding.
* **Width of the tree and output**: 20 bits.
* **One addition per multiplier stage.** The stage boundaries of the original bit-level pipeline
  are not known.
* **The leaf-to-tap assignment** among taps that have equal counts.
* **The balance registers.** They are computed rather than drawn.
* **The input register, the reset, and the `in_valid`/`out_valid` tag.**
* **Block sizes of the carry-select adder** (1, 2, 3, …).
* **The delay line** as one straight shift register. It replaces the two delay rows (forward and
  returning) of the folded drawing; the samples presented are the same.

Circuit-level properties of the original cannot be expressed in RTL. These are the custom
master-slave flip-flop (70.49 ps, 132.66 µm²), the transistor-level adders and multipliers, the
1.25 GHz clock rate and the 2.69 mm² area. Here the flip-flops are ordinary `always_ff`
registers, and how fast the design runs depends on the target technology. The delta-sigma
modulator and the two SINC filters ahead of this filter are not part of this RTL. The testbenches
drive 13-bit samples directly.

The coefficient set does not produce a perfectly flat combined response. Its DC gain is 0.9951,
and `tb_fir_comp_tone` reports the response the coefficients actually give. If you need a
different response, replace `COEF` in `fir_comp_pkg`: the pipeline depths and balance registers
adapt. `adder_tree` stops elaboration with an error if a leaf's tap no longer has as many 1 bits
as `LEAF_FIG` gives for it. In that case, update `LEAF_FIG` and `LEAF_TAP` together. Also
update the reference coefficient lists in the testbenches. Keep every magnitude below 2^14 and
nonzero, and keep bits 27..13 sufficient for the product range, or change `PROD_SHIFT`
and `SUM_W`.
