# Complex-number divider with three real multipliers

Dividing one complex number by another, `y = z1 / z2` with `z1 = a + ib`,
`z2 = c + id` and `y = e + if`, is normally done with the schoolbook formula

    e = (ac + bd) / R,   f = (ad - bc) / R,   R = c^2 + d^2

Built fully in parallel, that formula needs four real multipliers (ac, bd,
ad, bc), three adders, two squarers and two dividers. Multipliers grow with
the square of the word width, while adders grow only linearly. So it pays to
trade a multiplier for a few adders, as Gauss's trick does for complex
multiplication.

This RTL does that trade for division. It forms the two numerators with
**three** multipliers and six adders in total. The squarers and dividers are
the same as before.

## The factorisation

The numerator pair is a matrix-vector product:

    [ac + bd]   [c   d] [a]
    [ad - bc] = [d  -c] [b]

The matrix `[c d; d -c]` splits into three stages:

| stage | operation | hardware |
|---|---|---|
| pre-addition | `(a, b)` becomes `(a, a+b, b)` | 1 adder |
| diagonal | multiply by `(c-d, d, -(c+d))` | 2 adders for c-d and c+d, 3 multipliers |
| post-addition | sum the first two products, and the last two | 2 adders |
| scaling | multiply both by `1/R` | 2 squarers, 1 adder, 2 dividers |

The three products are

    m0 = a(c-d),   m1 = d(a+b),   m2 = b(c+d)

The numerators then follow:

    m0 + m1 = ac - ad + ad + bd = ac + bd
    m1 - m2 = ad + bd - bc - bd = ad - bc

The diagonal entry for the third product is `-(c+d)`. Here the sign is not
built as its own negator: the post-adder that forms `ad - bc` subtracts `m2`
instead. The unit count is therefore exactly 3 multipliers, 6 adders,
2 squarers and 2 dividers: `cdiv_top` instantiates that many units and no
other arithmetic.

Notice that the three multipliers depend on `c` and `d` only through `c-d`,
`d` and `c+d`. When the same divisor is used with many dividends, those three
values and `R` can be computed once. The RTL does not exploit this; every
division recomputes them.

## Data path and number format

```
 pre-addition        multiplication        post-addition     scaling
 a ──────────────┐
 c - d ──────────┴─ x ─ m0 ─┐
 a + b ──────────┐          ├─ m0 + m1 ─────── / R ── e
 d ──────────────┴─ x ─ m1 ─┤
 b ──────────────┐          ├─ m1 - m2 ─────── / R ── f
 c + d ──────────┴─ x ─ m2 ─┘
 c^2 + d^2 ──────────────────────────────────── R
```

| signal | width (IN_W = 16, FRAC_W = 16) | format |
|---|---|---|
| a, b, c, d | IN_W = 16 | signed integer |
| a+b, c-d, c+d | IN_W+1 = 17 | signed |
| m0, m1, m2 | 2·IN_W+1 = 33 | signed, exact |
| numerators | 2·IN_W+2 = 34 | signed, exact |
| c^2, d^2 | 2·IN_W-1 = 31 | unsigned |
| R | 2·IN_W = 32 | unsigned |
| e, f | IN_W+1+FRAC_W = 33 | signed fixed point, FRAC_W fraction bits |

Every intermediate value is kept at full width. No result before the division
rounds or overflows. The only rounding is in the dividers, which truncate
toward zero. The output value is `trunc(num · 2^FRAC_W / R)` read as a number
with FRAC_W fraction bits. For example, `(1 + i) / 3` gives `e = 21845` and `f = -21845`,
which means ±21845 / 65536 = ±0.33333.

The output width never overflows. For integer parts and any `z2 != 0`,
`|e|, |f| <= |z1| / |z2| <= sqrt(2) · 2^(IN_W-1) < 2^IN_W`. The largest
magnitude that can occur is f = +2^15 (for example b = -2^15, z2 = 1), which
needs IN_W+1 integer bits including the sign. Simulation assertions in
`cdiv_top` check that the bits dropped from the full-length quotients are
only sign copies, and that R never carries out.

If `c = d = 0`, the quotient is undefined. The unit then sets `div_by_zero`
and outputs `e = f = 0`.

## Interface and timing (`cdiv_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous, active-low reset of the output register |
| in_valid | in | 1 | a, b, c, d hold an operand pair this cycle |
| a, b | in | IN_W | real and imaginary part of the dividend |
| c, d | in | IN_W | real and imaginary part of the divisor |
| out_valid | out | 1 | e, f, div_by_zero belong to the input of the previous cycle |
| e, f | out | IN_W+1+FRAC_W | real and imaginary part of the quotient |
| div_by_zero | out | 1 | the divisor was zero |

Parameters: `IN_W` (default 16) and `FRAC_W` (default 16).

The whole arithmetic is one combinational ("fully parallel") network. A single
register stage sits at the output. Latency is one clock, and a new division
can start on every clock. When `in_valid` is low, `out_valid` falls on the
next clock and `e`, `f` keep their last values.

The critical path is long. It runs through a pre-adder, a multiplier, a
post-adder and a divider of 50 unrolled restoring steps. The design keeps the
structure flat on purpose: it is the operator-count structure, not a timing
closure. To reach a higher clock rate, pipeline the divider rows and the
multipliers.

## Modules

| file | contents |
|---|---|
| `rtl/cdiv_top.sv` | the divider: 3 pre-adders, 3 multipliers, 2 post-adders, 2 squarers, R adder, 2 dividers, output register |
| `rtl/cdiv_adder.sv` | signed adder/subtractor, result one bit wider; `SUB` selects subtraction |
| `rtl/cdiv_mult.sv` | exact signed multiplier (`*`; the architecture is left to synthesis) |
| `rtl/cdiv_squarer.sv` | squarer with a folded partial-product matrix: each cross term `x_i x_j` is added once at double weight, so it needs about half the partial products of a multiplier |
| `rtl/cdiv_divider.sv` | unrolled restoring divider: signed numerator, unsigned divisor, FRAC fraction bits appended, truncation toward zero, divide-by-zero flag |

Each file begins with a comment on what it does and on its timing.

## What is given and what is chosen here

The following parts follow the published structure:

- the factorisation into pre-additions, three multiplications and
  post-additions;
- which operands feed which multiplier;
- the negated `(c+d)` branch;
- the shared denominator `R = c^2 + d^2` built from two squarers and one adder;
- one divider per output;
- the operator counts.

The following are choices of this implementation, because the structure does
not specify them:

- two's-complement integer inputs and the default widths (16-bit inputs,
  16 fraction bits);
- full-width intermediates;
- the fixed-point output and truncation toward zero;
- the restoring divider and the folded squarer;
- folding the `-(c+d)` sign into the `ad - bc` subtractor;
- the zero-divisor convention;
- the output register with its valid handshake and asynchronous reset.

The multipliers and the adders use the SystemVerilog `*`, `+` and `-`
operators, so synthesis chooses their architectures.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

- `tb_cdiv_adder`: both add and subtract, with corner and random 17-bit
  operands.
- `tb_cdiv_mult`: 16 x 17-bit products, with corner and random operands.
- `tb_cdiv_squarer`: all 65536 16-bit inputs.
- `tb_cdiv_divider`: 34/32-bit operands, corners, random operands of every
  length, and zero divisors. The reference is `(num · 2^16) / den` in 64-bit
  arithmetic.
- `tb_cdiv_top`: the full divider at its default parameters, over more than
  20,000 divisions. The reference is the schoolbook formula in 64-bit
  arithmetic, which is independent of the three-multiplier structure.
  - Inputs are applied with random gaps, and reset is pulsed mid-run.
  - Each result must appear exactly one clock after its input.
  - The test counts zero divisors, back-to-back inputs, idle cycles, resets,
    and quotients in all four sign quadrants. Any of these that never occurs
    counts as a failure.

To run the end-to-end test with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cdiv_top \
  -y rtl -y tb +libext+.sv tb/tb_cdiv_top.sv
./obj_dir/Vtb_cdiv_top
```

Change `IN_W` / `FRAC_W` on `cdiv_top` to change the widths. Every internal
width follows from these two.
