# FASED: signed dot-product units where Booth negation is folded into the adder tree

A common integer dot-product unit has a row of multipliers, an adder tree and
an accumulator. With radix-4 Booth multipliers, each multiplier first picks a
magnitude (0, a or 2a) and then negates it when the weight is negative. In two's
complement, negation means inverting every bit and adding 1. That "+1" costs a
full row of adders in every multiplier, and those adders only ever increment.

This design removes those adders. Each lane produces only the magnitude
product `|w| x a`, with the weight's sign carried beside it as one bit. The
adders of the tree do the negations. Every tree adder can take a carry-in, and
a dot product of n lanes has n-1 tree adders plus one accumulator adder. That
gives exactly n carry-ins, enough to supply the n "+1"s even when every weight
is negative.

Two units are provided. They share the same sign-folding tree:

| unit | module | operation per cycle |
|------|--------|---------------------|
| fixed width | `fased_fw` | `acc += sum of a_i * w_i`: N lanes (default 4), 8-bit signed activations, 2-bit signed weights |
| variable width | `fased_vw` | 4 lanes, 8-bit activations, weights of 2 bits (4 products per cycle), 4 bits (2 per cycle) or 8 bits (1 per cycle) |

`fased_top` places the two units side by side. They share clock and reset;
everything else is separate.

## How the signs travel through the tree

This is the part that needs the most care.

Each value in the tree is a pair (v, s). The true quantity it stands for is
`+v` when s = 0 and `-v` when s = 1. A lane starts with v = |w| x a and
s = w[1], the weight's two's complement sign bit. When such a pair reaches a
sign-resolving stage, that stage negates v by inverting it and using its
carry-in as the +1.

An adder combines a left pair (l, sl) and a right pair (r, sr). It never
negates the left operand; it moves that sign outside the sum instead:

| signs | true sum | what the adder computes | sign passed on |
|-------|----------|-------------------------|----------------|
| +l, +r | l + r | l + r | + |
| +l, -r | l - r | l - r | + |
| -l, +r | -(l - r) | l - r | - |
| -l, -r | -(l + r) | l + r | - |

So an adder subtracts exactly when `sl XOR sr` is 1. The XOR drives the select
of a mux that picks the inverted right operand, and it is also the adder's
carry-in. The result leaves the adder with sign sl. The next level up treats
it just like a lane value.

At the root, only one sign is left: the sign of the left-most lane, `w3[1]`
in a 4-lane unit. The accumulator inverts the tree output when that sign is 1
and takes the sign as its carry-in. In effect it adds the tree output to the
running sum or subtracts it.

Worked example, fixed width, lanes 3..0: w = (-2, +1, -1, -1) and
a = (-3, 16, 3, 27).

* Magnitudes: (-6, -), (16, +), (3, -), (27, -).
* Left pair: the signs differ, so the adder computes -6 - 16 = -22, with sign -.
* Right pair: the signs match, so it computes 3 + 27 = 30, with sign -.
* Root: the signs match, so it computes -22 + 30 = 8, with sign -.
* The accumulator subtracts 8, and indeed (-2)(-3) + 16 - 3 - 27 = -8.

The unit and top testbenches replay this example.

The order is fixed: the left input of every adder is the subtree with the
higher lane numbers. It carries the outer sign upward, and only right inputs
have inverters.

## Variable width: Booth digits spread across lanes

`fased_vw` reads its four 2-bit weight segments w3..w0 in one of three ways,
selected by `mode` (`fased_pkg::mode_e`):

| mode | weights | activations the caller must present | result added per cycle |
|------|---------|-------------------------------------|------------------------|
| `MODE_2B` | w3, w2, w1, w0 | four independent a_i | `sum a_i * w_i` |
| `MODE_4B` | {w3,w2}, {w1,w0} | a3 = a2 and a1 = a0 | `a2*{w3,w2} + a0*{w1,w0}` |
| `MODE_8B` | {w3,w2,w1,w0} | all four equal | `a0*{w3,w2,w1,w0}` |

The unit does not copy activations between lanes. The caller does that.
Concurrent assertions in `fased_vw` flag a mode outside the three encodings,
and activations that break these rules.

A weight that spans several segments is multiplied as a multi-digit radix-4
Booth product, one digit per lane. Each lane's recoding table (`brt_vw`)
forms a 3-bit Booth group `{w_i[1], w_i[0], pad}`:

* pad is the sign bit of segment i-1 when segment i-1 belongs to the same weight;
* pad is 0 when segment i is the lowest segment of its weight.

The group selects the digit's magnitude times a:

| group | output |
|-------|--------|
| 000, 111 | 0 |
| 001, 010, 101, 110 | a |
| 011, 100 | 2a |

The digit's sign is the group's top bit, w_i[1], the same bit the 2-bit mode
uses. The sign-folding tree therefore works unchanged in every mode.

Where each lane takes its pad from:

| lane | pads with | when |
|------|-----------|------|
| 0 | 0 | always |
| 1 | w0[1] | 4- and 8-bit modes |
| 2 | w1[1] | 8-bit mode only |
| 3 | w2[1] | 4- and 8-bit modes |

The digits have to be aligned to their weight before they are added. The shifts
sit on left adder inputs only, the mirror image of the negations, which sit on
right inputs:

* lanes 3 and 1 are shifted left by 2 in 4- and 8-bit modes;
* the left first-level sum is shifted left by 4 in 8-bit mode.

Example in 4-bit mode: a1 = a0 = 3 and {w1,w0} = 1011 (-5).

* The groups are 101 and 110, so both lanes output 3, each with sign 1.
* Lane 1 is shifted to 12.
* The signs match, so the first-level adder computes 12 + 3 = 15, with sign 1.
* The left half is 0 with sign 0, so the root computes 0 - 15 = -15, with sign 0.
* The accumulator adds -15.

## Datapath widths

| point | fixed width (N = 4) | variable width |
|-------|---------------------|----------------|
| Booth output | 9 bits | 9 bits |
| after the <<2 shift | - | 11 bits |
| first-level sum | 10 bits | 12 bits |
| after the <<4 shift | - | 16 bits |
| root sum | 11 bits | 16 bits |
| accumulator | 32 bits | 32 bits |

Each adder sign-extends its inputs to its output width before inverting the
right one. So the most negative value negates exactly.

Every intermediate sum is, up to its carried sign, an exact partial dot
product, so these widths cannot overflow. The largest case is the 8-bit-mode
product (-128)(-128) = 16384, which fits the 16-bit root.

In `fased_fw` each further tree level adds one bit. The 32-bit accumulator
wraps on overflow.

## Interface and timing

Both units are single-cycle: the operands go through combinational logic into
one accumulator register.

* Operands presented with `en` high are added to the accumulator at the rising edge.
* The new value shows on `acc` right after that edge. One operation is accepted every cycle.
* `clr` with `en` starts a new sum from this cycle's operands.
* `clr` alone clears the accumulator.
* `rst_n` is an asynchronous active-low reset to zero.

| port (`fased_top`) | width | meaning |
|--------------------|-------|---------|
| `clk`, `rst_n` | 1 | clock, asynchronous active-low reset |
| `fw_en`, `fw_clr` | 1 | fixed-width unit: accumulate / start new sum |
| `fw_a[N]`, `fw_w[N]` | 8, 2 | fixed-width activations and weights |
| `fw_acc` | 32 | fixed-width accumulator |
| `vw_en`, `vw_clr` | 1 | variable-width unit: accumulate / start new sum |
| `vw_mode` | 2 | `MODE_2B` = 0, `MODE_4B` = 1, `MODE_8B` = 2 |
| `vw_a[4]`, `vw_w[4]` | 8, 2 | variable-width activations and weight segments |
| `vw_acc` | 32 | variable-width accumulator |

## Modules

| file | role |
|------|------|
| `rtl/fased_pkg.sv` | `mode_e` enumeration |
| `rtl/brt_fw.sv` | 2-bit Booth recoding: 0 / a / 2a |
| `rtl/brt_vw.sv` | Booth recoding with mode-dependent pad |
| `rtl/neg_add_node.sv` | one tree adder: sign XOR, conditional inversion of the right input, carry-in |
| `rtl/cond_shift.sv` | conditional left shift (widening) |
| `rtl/fased_accumulator.sv` | root sign resolution and 32-bit accumulator register |
| `rtl/fased_fw.sv` | fixed-width unit, generated tree for any power-of-two N |
| `rtl/fased_vw.sv` | variable-width unit, 4 lanes |
| `rtl/fased_top.sv` | both units side by side |

## What follows the method and what is this design's choice

These parts follow the method:

* the magnitude-only Booth lanes;
* the rewriting of the signs, with the XOR as mux select and carry-in;
* the root sign from the most significant lane, applied by the accumulator's carry-in;
* the Booth groups and their pads, the shift amounts and their places;
* the widths 9, 10, 11, 16 and 32.

These are this design's own choices:

* The 12-bit first-level width in the variable-width unit. It is the smallest width that holds the sum.
* The enable, clear and reset behaviour.
* The binary mode encoding.
* Leaving activation replication to the caller, with assertions to catch mistakes.
* Making N a parameter of the fixed-width unit. The variable-width unit is fixed at 4 lanes, because its modes are defined over exactly four 2-bit segments.

There is no pipelining. The adder chain from the Booth mux to the accumulator
is the critical path.

The comparison designs that motivate this method are not included here. They
are array-multiplier and plain Booth-multiplier dot-product units, and Bit
Fusion-style variable-width units.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_brt_fw` and `tb_brt_vw` are exhaustive over every activation, weight segment and pad input.
* `tb_neg_add_node` checks that `(sum_sign ? -sum : sum)` equals the signed sum of the inputs, for random and extreme operands.
* `tb_cond_shift` and `tb_fased_accumulator` compare against reference models, the latter every cycle with random enables and clears.
* `tb_fased_fw` replays the worked example above and 20,000 random operations. It runs at N = 4 and N = 8.
* `tb_fased_vw` replays the 4-bit example above, the 8-bit extremes and 30,000 random operations with random mode changes.
* `tb_fased_top` runs both units at their default sizes:
  * It streams a 64-element dot product with 2-, 4- and 8-bit weights and checks both the result and the cycle count: 16, 32 and 64 cycles.
  * It then runs 20,000 random cycles.
  * It fails if any of these never happens: a subtracting tree adder, an accumulator subtraction, all weights negative, each mode, a mode change, either shift, a pad taken from a lower segment, a clear, a hold.

All of these pass. Each testbench also fails when a single deliberate bug is
put into its module, for example a dropped carry-in or a wrong pad select.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fased_pkg.sv \
    tb/tb_fased_top.sv --top-module tb_fased_top -Mdir obj -o sim
./obj/sim
```

Any other testbench works the same way with its own name in place of
`tb_fased_top`. The package file must come first on the command line.
