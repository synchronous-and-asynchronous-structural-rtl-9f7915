# Łukasiewicz fuzzy norms as a carry-chain adder

Fuzzy logic replaces AND and OR by a t-norm and a t-conorm on truth values in
[0, 1]. The Łukasiewicz pair is

    t-conorm (bounded sum)         a ⊕ b = min(a + b, 1)
    t-norm   (bounded difference)  a ⊗ b = max(a + b − 1, 0)

In hardware a truth value is an unsigned N-bit number. 0 is all zeros and
1 is all ones, 2^N − 1. This RTL implements both norms so that **each costs
no more than one N-bit ripple-carry adder**. The saturation stage is folded
into the storage elements that sit after the adder anyway, so it costs
nothing extra. The structure is the one an FPGA slice offers: a look-up table
per bit, a dedicated carry chain, and flip-flops or latches with set/reset
inputs. On a Spartan-6 that comes to N/4 slices.

Three realizations of each norm are provided:

| realization | t-conorm | t-norm | output stage |
|---|---|---|---|
| gates (combinational) | `luk_tconorm` | `luk_tnorm` | OR / AND per bit |
| synchronous | `luk_tconorm_sync` | `luk_tnorm_sync` | flip-flop with synchronous set / reset |
| asynchronous (clockless) | `luk_tconorm_latch` | `luk_tnorm_latch` | latch with asynchronous preset / clear |

`luk_norms_top` puts all six side by side on one pair of operands.

## Why the carry out is all the saturation logic needs

Let s = a + b be the (N+1)-bit sum. Its top bit s_N is the adder's carry out.

**t-conorm.** The sum overflows the range exactly when s ≥ 2^N, that is when
the carry out is 1. The result is then 1 (all ones). Otherwise it is the low
N bits of the sum. So:

    q = s[N-1:0] | {N{carry_out}}

**t-norm.** The adder runs with carry in 1, so it computes a + b + 1.
If a + b ≥ 2^N − 1, then a + b + 1 ≥ 2^N, the carry out is 1, and the low
N bits are a + b + 1 − 2^N = a + b − (2^N − 1). That is the wanted result,
with no subtractor. If a + b < 2^N − 1, the carry out is 0 and the true result
would be negative, so it clamps to 0:

    q = (a + b + 1)[N-1:0] & {N{carry_out}}

In both cases one signal, the carry out, drives the whole saturation. That is
why it maps onto a shared set, reset, preset or clear input:

* **t-conorm.** The carry out drives the set input of every flip-flop
  (synchronous version) or the preset of every latch (asynchronous version).
* **t-norm.** The clamp acts when the carry out is 0. Slice flip-flops and
  latches only have active-high set/reset inputs, so one inverter drives the
  reset or clear from the inverted carry out. On the FPGA this inverter fits
  into the second output of the top bit's look-up table, so it costs no
  extra LUT.

At the boundary a + b = 2^N − 1 neither norm saturates through its control
input. The t-conorm's sum is already all ones. The t-norm's carry is 1 and
the low bits are already 0. This matters for the latch versions with a
closed gate (see below).

## The adder cell

`luk_fa_cell` is one bit of the carry chain, split the way the FPGA splits
it:

* **Propagate.** A 2-input look-up table computes p = a xor b. The truth
  table is the `LUT_INIT` parameter, default `4'h6`.
* **Sum.** A dedicated XOR computes s = p xor ci.
* **Carry.** The carry multiplexer computes co = p ? ci : a. If a and b
  differ, the incoming carry passes through. If they are equal, the carry
  out equals a (= b). No separate generate term is needed.

`luk_carry_chain` chains N cells, least significant bit first. It brings out
the carry in and the carry out, and it is shared by all six norms.

The FPGA version of this design also carries relative-placement constraints.
They put the cells of four consecutive bits in one slice and the slices in
one column, so that the chain uses the fast carry path. Those constraints are
vendor-specific and are not part of this RTL. A generic synthesis tool
infers an adder from `luk_carry_chain` in any case.

## Synchronous norms

`luk_tconorm_sync` and `luk_tnorm_sync` register the result on the rising
edge of `clk`. They have one clock of latency and take one result per clock.
Set (t-conorm) or reset (t-norm) has priority over D. This matches the
slice flip-flops with synchronous set/reset.

There is no separate reset port. The flip-flops' set/reset inputs are
already used for saturation, and q is defined from the first clock edge on.
Before that edge q holds whatever the device powered up with.

## Asynchronous (latch) norms

`luk_tconorm_latch` and `luk_tnorm_latch` replace the output gates with
level-sensitive latches:

* **t-conorm.** The carry out drives an asynchronous preset.
* **t-norm.** The inverted carry out drives an asynchronous clear.

The preset or clear overrides the gate.

In the clockless realization the latch gate is tied to 1. The latches are
then transparent and the block behaves like the gate version, but it uses
the storage element's set/reset input instead of extra logic.

In this RTL the gate is a port, `g` (or `latch_g` on the top), not a
constant. If it were tied inside, synthesis would remove the latches. With
the port, the latches stay latches, and driving the gate low holds the last
result. While the gate is low, an operand pair that makes the carry out
request saturation still forces the output at once (all ones, or all zeros).
An operand pair with a + b exactly 1 does not force it: at that boundary the
bound is reached through the sum path, which the closed gate blocks.

Caution: the preset or clear input follows the carry out while the adder
settles. A short pulse on it reaches the output. On some FPGA families, a
short pulse on a latch's set/reset input has been seen to produce output
transients in post-route timing simulation. Check the post-route timing of
the latch versions on the target device.

The synthesis and lint tools report these modules as latches, and that is
intended.

## Top level: `luk_norms_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of the synchronous pair |
| `latch_g` | in | 1 | gate of the latch pair; tie to 1 for the clockless norms |
| `a`, `b` | in | N | operands |
| `tconorm_comb`, `tnorm_comb` | out | N | gate realizations, combinational |
| `tconorm_sync`, `tnorm_sync` | out | N | registered, result of the operands at the previous rising edge |
| `tconorm_async`, `tnorm_async` | out | N | latch realizations, combinational while `latch_g` = 1 |

The one parameter is `N`, the resolution. It defaults to 8
(`luk_pkg::LUK_N`), and any N ≥ 1 works. The testbenches also run 4, 12, 16
and 24 bits.

## Files

* `rtl/luk_pkg.sv`: default width and the XOR truth table.
* `rtl/luk_fa_cell.sv`, `rtl/luk_carry_chain.sv`: the adder.
* `rtl/luk_tconorm*.sv`, `rtl/luk_tnorm*.sv`: the six norms.
* `rtl/luk_norms_top.sv`: the top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=<n> failures=<n>`.
* `tb/tb_luk_norm_widths.sv` with `tb/luk_width_checker.sv`: the top at 4,
  8, 12, 16 and 24 bits.

## Verification

Every testbench works out its expected values from the formulas above, in
plain integer arithmetic, independently of the RTL. What each one checks:

* **Adder.** `tb_luk_fa_cell` covers all 8 input cases.
  `tb_luk_carry_chain` covers every 4-bit pair with both carry-in values,
  plus 2,000 random 8-bit sums and carry-ripple corner cases.
* **Norms.** Each norm testbench applies every operand pair at 4 bits and at
  8 bits. Both the saturated and the unsaturated branch must occur.
* **Synchronous norms.** The testbenches also check, on every pair, that the
  output has not changed before the clock edge and shows the new result
  after it (one clock of latency).
* **Latch norms.** The testbenches check that the output is transparent with
  the gate open, holds with the gate closed, and is forced by the
  asynchronous preset or clear while the gate is closed.
* **Top, end to end.** `tb_luk_norms_top` runs at the default N = 8 with no
  parameter overrides. It applies all 65,536 operand pairs to all six
  outputs and checks the synchronous outputs before and after each edge. It
  checks that the sweep takes exactly one clock per pair, then runs a
  closed-gate phase on the latch pair. It counts t-conorm saturations,
  t-norm clamps, boundary pairs (a + b = 1), unsaturated pairs and latch
  holds, and fails if any of them never occurs.
* **Widths.** `tb_luk_norm_widths` runs the top at N = 4, 8, 12, 16 and 24
  with corner and random operands, 3,000 pairs per width.

To simulate with Verilator, for example the end-to-end test:

    verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
        rtl/luk_pkg.sv tb/tb_luk_norms_top.sv --top-module tb_luk_norms_top
    ./obj_dir/Vtb_luk_norms_top

Any other testbench builds the same way with its own name.

## What is this design's own choice

* **Equations followed.** The t-norm is max(a + b − 1, 0) and the carry-out
  function is the usual a·b + ci·(a xor b). These are the standard
  definitions, and the adder realizes them.
* **Latch t-norm by analogy.** The asynchronous t-norm (clear driven by the
  inverted carry out) follows the pattern of the synchronous t-norm. Only
  the latch t-conorm is laid out in detail in the source design.
* **Latch gate as a port.** It is a port, not a constant 1, for the reasons
  given above.
* **Reset and clock enable.** There is no reset port and no clock enable.
* **Not carried over from the FPGA version:**
  * placement attributes;
  * packing the t-norm's inverter into a dual-output LUT, which is left to
    the mapper;
  * a variant for older FPGA families whose flip-flops have active-low
    set/reset, where the inverter disappears.
* **Not checked here.** The area figures (adder size, N/4 slices) and
  operation above 400 MHz are properties of a placed Spartan-6
  implementation. These testbenches verify function and cycle timing only.
