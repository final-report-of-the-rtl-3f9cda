# Absolute-value threshold comparator in one carry chain

This circuit answers one question: is the magnitude of a signed number larger
than a threshold? The usual approach takes the absolute value first (a sign
test, a bitwise inversion and an increment), then runs the result through a
separate magnitude comparator. This design skips the absolute value. It
forms a single sum of A and T whose sign is the answer, and it computes only
the carry chain of that sum. For a 4-bit A the whole thing is three
carry-network cells, three 2:1 multiplexers and a handful of inverters.

- `A` is a 4-bit two's-complement number. `A[3]` is the sign.
- `T` is a 3-bit unsigned threshold.
- The output `gt_o` is 1 exactly when `|A| > T`.

## Why one carry chain is enough

Write `A = -8·s + a`, where `s` is the sign bit and `a` the three low bits.

**A negative (s = 1).** Then `|A| = 8 - a`. Form `B = T + A = T + a - 8`.
`B < 0` means `T < 8 - a = |A|`. The low three bits of B come from
adding `a` to `T`. The top bit of B is `1 + 0 + c3`, taken mod 2, where `c3`
is the carry out of the three low bits. So B is negative exactly when
`c3 = 0`.

**A positive (s = 0).** Form `B = T - A = T + ~a + 1`, with A sign-extended
before it is inverted. The top bit is now `0 + 1 + c3`, mod 2. Again, B is
negative (that is, `A > T`) exactly when `c3 = 0`.

Both cases therefore run the same 3-bit ripple chain. They differ only in two
ways:

| | A negative (s = 1) | A positive (s = 0) |
|---|---|---|
| addend bit i | `a[i]` | `~a[i]` |
| carry into bit 0 | 0 | 1 (the "+1" of the negation) |

So the carry-in is simply `~s`, and a multiplexer on `s` picks `a[i]` or
`~a[i]`. The answer is `~c3`. A mirror-adder carry network produces an
inverted carry anyway, so the last stage's network output is used directly
as `gt_o`. The extreme case `A = -8` (`1000`) needs no special handling. With
`a = 0` the chain never carries, so the output is always 1, which is correct
because 8 exceeds every 3-bit threshold.

## The cells

| Module | Function |
|---|---|
| `absv_inv` | inverter |
| `absv_mux2` | 2:1 multiplexer, `y = sel ? a : b`, built as a transmission-gate pair with a local select inverter |
| `mirror_adder_carry` | carry half of a mirror adder: `cout_n = ~MAJ(a, b, cin)`. It has no sum output. |
| `abs_value_comparator` | top level: the chain below |

The mirror adder is deliberately split into its carry network and a separate
restoring inverter. At transistor level this lets the inverter be sized
independently. In the RTL it shows up as two cells per stage.

Stage `i` of the chain (i = 0 is the least significant bit) is:

```
a[i] ─┬──────────────► mux.a ┐
      └─► inv ─► ~a[i] ► mux.b ├─► mirror_adder_carry(addend, t[i], carry[i]) ─► carry_n[i]
s ──────────────────► mux.sel ┘                                                    │
                                             stages 0,1: inv ─► carry[i+1] ◄────────┘
                                             stage 2:    carry_n[2] = gt_o
carry[0] = inv(s)
```

At transistor level the report this design comes from counts about 56
devices. It puts the worst path (input `A = 0111`, `T = 110`) at about 1.2 ns
in schematic simulation. After layout the path slows to about 1.5 to 1.8 ns
at 1 V, and meets a 1.25 ns target only with the supply raised to 1.25 V.
None of that is modelled here. The RTL has no delays, no clock and no reset.

## Choices made in this RTL

- **Strict `>`.** The problem was first stated as "output high when
  `|x| >= Thr`". The arithmetic the circuit actually implements gives
  `|A| > T`: carry-in 1 for a positive A turns `T - A < 0` into `A > T`.
  This RTL follows the circuit. The two cases differ only when `|A| = T`.
  For a positive A, a carry-in of 0 would turn the test into `>=`. For a
  negative A there is no carry-in that does the same, so `>=` would need a
  change to the threshold instead (compare against `T - 1`).
- **Multiplexer pin order.** `a_i` (the true bit) is passed when `sel_i = 1`,
  that is, for a negative A.
- **Carry-in.** It comes from one extra inverter on the sign bit.
- **Width.** `A_WIDTH` (default 4) sets the length of the chain: `A_WIDTH-1`
  stages, with T one bit narrower than A. The design was only ever given for
  4 bits. Other widths follow from the same arithmetic but are not tested.
- **Bit order.** Ports are little-endian vectors. In the original naming,
  `A1 A2 A3 A4` maps to `a_i[3:0]` and `T1 T2 T3` maps to `t_i[2:0]`.

## Interface of the top

```systemverilog
abs_value_comparator #(.A_WIDTH(4)) u (
  .a_i (a),   // [A_WIDTH-1:0] two's complement, a[A_WIDTH-1] = sign
  .t_i (t),   // [A_WIDTH-2:0] unsigned threshold
  .gt_o(gt)   // |a| > t, combinational
);
```

## Verification

Each cell has a self-checking testbench in `tb/`. It compares the cell
against an independently written truth table or against integer arithmetic.

`tb_abs_value_comparator` runs the top at its default size. It first applies
the critical vector `A = 0111`, `T = 110`, which must give 1. It then applies
all 128 combinations of A and T and checks each against `|A| > T` computed
with integers. It also counts these events and fails if any of them never
occurs:

- each sign case with output 0
- each sign case with output 1
- the most negative A
- a carry that ripples from the carry-in through all three stages

Run a testbench with plain Verilator:

```
verilator --binary -Wall -Wno-fatal -Irtl tb/tb_abs_value_comparator.sv \
          --top-module tb_abs_value_comparator
./obj_dir/Vtb_abs_value_comparator
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
