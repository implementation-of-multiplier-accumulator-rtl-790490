# Multiply-accumulate unit on a 16-bit Vedic multiplier

A multiply-accumulate (MAC) unit computes running sums of products,
`acc = a[0]*b[0] + a[1]*b[1] + ...`, the core operation of FIR filters,
convolutions, transforms and inner products. This design builds the
multiplier of such a unit the "Vedic" way, after the Urdhva Tiryakbhyam
("vertically and crosswise") rule. It takes one pair of 16-bit unsigned
operands per clock and keeps a 32-bit sum.

The multiplier does all its partial products at once. It is a recursive
divide-and-conquer structure. A 16x16 multiply is split into four 8x8 multiplies. Each of those
is split into four 4x4 ones, then 2x2 ones, and finally 1-bit ANDs. An addition
tree at each level puts the four products back together. The result is purely
combinational. The accumulator is the only register in the design.

## Block structure

```
vedic_mac                      top: multiplier + accumulator
├── vedic_mul_16x16            4 x vedic_mul_8x8  + vedic_add_tree #(HALF=8)
│   └── vedic_mul_8x8          4 x vedic_mul_4x4  + vedic_add_tree #(HALF=4)
│       └── vedic_mul_4x4      4 x vedic_mul_2x2  + vedic_add_tree #(HALF=2)
│           └── vedic_mul_2x2  4 x vedic_mul_1x1  + two half adders
│               └── vedic_mul_1x1   AND gate
└── mac_accumulator            32-bit adder + register, sticky overflow flag
```

`mac_pkg` holds the shared widths: operands `OP_W = 16`, product
`PROD_W = 32` and accumulator `ACC_W = 32`.

## The 2x2 step: vertically and crosswise

For `a = {a1,a0}` and `b = {b1,b0}` the product is formed column by column:

| column | terms | result |
|---|---|---|
| 0 (vertical) | `a0&b0` | `p[0]` |
| 1 (crosswise) | `a1&b0 + a0&b1` (half adder) | `p[1]`, carry `c1` |
| 2 (vertical) | `a1&b1 + c1` (half adder) | `p[2]`, `p[3]` |

All four 1-bit products are formed in parallel. Only the two half adders lie
after them.

## Combining four half-width products

For an N-bit multiply with `H = N/2`, split `a = {aH, aL}` and `b = {bH, bL}`:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (each 2H bits)
p  = q0 + (q1 + q2) << H + q3 << 2H                      (4H bits)
```

`vedic_add_tree` does this with three word adders:

1. The low `H` bits of `q0` go straight to `p[H-1:0]`. Nothing is added to them.
2. `mid = q1 + q2 + q0[2H-1:H]` is `2H+1` bits wide. Its low `H` bits become `p[2H-1:H]`.
3. `p[4H-1:2H] = q3 + mid[2H:H]`. The full product fits in `4H` bits, so this sum never carries out.

The same parameterised tree serves the 4x4 (`HALF=2`), 8x8 (`HALF=4`) and
16x16 (`HALF=8`) levels. The adders are written as `+`, so synthesis
picks the adder architecture. Nothing here prescribes ripple-carry or any
other form.

## Accumulator and MAC timing

`vedic_mac` feeds the product straight into the accumulator's adder. There is
no register between them, so the critical path runs from the operands through
the whole multiplier and the 32-bit adder into the accumulator register.

| signal | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears `acc` and `overflow` |
| `clear` | in | 1 | start a new sum (see below) |
| `en` | in | 1 | accept `a*b` this cycle |
| `a`, `b` | in | 16 | unsigned operands |
| `prod` | out | 32 | `a*b`, combinational, same cycle |
| `acc` | out | 32 | running sum, the unit's 32-bit output |
| `overflow` | out | 1 | sticky: the sum has wrapped past 2^32 since the last clear |

What happens at each rising edge:

| `clear` | `en` | `acc` becomes | `overflow` becomes |
|---|---|---|---|
| 0 | 0 | unchanged | unchanged |
| 0 | 1 | `acc + a*b` (mod 2^32) | `overflow` OR carry out |
| 1 | 1 | `a*b` (first term of a new sum) | 0 |
| 1 | 0 | 0 | 0 |

The unit accepts one operand pair per clock. The sum shows on `acc` one clock
after the pair is presented. An N-term inner product therefore takes N clocks,
with `clear` high on the first term. No dead cycle is needed between sums.

Keep the 32-bit sum in mind: one full-scale product (`65535^2`) nearly
fills it. Sums of large operands wrap quickly. `overflow` tells you when a
result is no longer exact.

## What follows the source design and what is this design's own

Taken from the source design:

- the 16-bit unsigned operands and the 32-bit product;
- the four-way recursive split 16 → 8 → 4 → 2 → 1 bits, with an addition
  tree at each level;
- the vertical/crosswise 2x2 step;
- a multiplier with no internal registers;
- a MAC made of multiplier, adder and accumulator, with a 32-bit output.

Choices made here:

- the exact arrangement of the addition tree and the half adders of the 2x2 step;
- the `clear`/`en` controls;
- the asynchronous reset;
- the wrap-around with a sticky overflow flag;
- bringing the product out as a port.

The source design also reports FPGA figures for its multiplier: about 21 ns
combinational delay, and 106 mW against 198 mW for a conventional multiplier
on a Spartan-3E. It names a fully pipelined accumulator as a possible
extension. That extension is not built here; the accumulator is single-cycle.

Not built:

- The operand memory that would feed `a` and `b` is described only as "a
  memory location". It is left outside the design, and `a`/`b` are plain ports.
- The conventional multiplier is not included. It served only as a comparison.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vedic_mul_1x1`, `tb_vedic_mul_2x2`, `tb_vedic_mul_4x4`, `tb_vedic_mul_8x8` | every operand pair, exhaustively (up to 65,536 pairs) |
| `tb_vedic_mul_16x16` | all pairs of ten corner values, plus 200,000 random pairs |
| `tb_vedic_add_tree` | partial products of 100,000 random and extreme 16-bit pairs, recombined |
| `tb_mac_accumulator` | random adds, clears and idle cycles against a 64-bit reference; one-cycle latency; wrap and sticky flag; asynchronous reset |
| `tb_vedic_mac` | 300 inner products of random length (1–64) with idle cycles; see below |

`tb_vedic_mac` is the end-to-end test at full size. It checks `prod` in the
same cycle, checks `acc` both before and after every clock edge, and checks
`overflow`. It counts accumulates, idle cycles, clear-with-load,
clear-to-zero, wraps and resets. A mechanism that never occurs counts as a
failure.

The reference values come from the testbenches' own arithmetic (`*` and `+`
on wider integers), not from the design.

To simulate with Verilator (5.x), for example the full MAC:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv rtl/vedic_mul_1x1.sv \
  rtl/vedic_mul_2x2.sv rtl/vedic_add_tree.sv rtl/vedic_mul_4x4.sv \
  rtl/vedic_mul_8x8.sv rtl/vedic_mul_16x16.sv rtl/mac_accumulator.sv \
  rtl/vedic_mac.sv tb/tb_vedic_mac.sv --top-module tb_vedic_mac
./obj_dir/Vtb_vedic_mac
```

Every block's testbench finishes in well under a second.

## Changing the design

- **Wider accumulator.** Raise `ACC_W` in `mac_pkg` to get guard bits
  for long sums. `vedic_mac` zero-extends the product to `ACC_W` bits. The
  testbenches assume 32 bits and would need their reference width raised too.
- **Wider multiplier.** A 32x32 multiplier is one more level: four
  `vedic_mul_16x16` and a `vedic_add_tree #(.HALF(16))`, wired like
  `vedic_mul_16x16`.
- **Pipelining.** Putting registers between the levels or between multiplier
  and accumulator shortens the critical path. It adds latency, which the
  testbenches' one-cycle expectation would then have to follow.
