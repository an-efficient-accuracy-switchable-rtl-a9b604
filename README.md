# Accuracy-switchable majority-logic prefix adder (8 bit)

This is an 8-bit adder built only from three-input majority gates,
M(x, y, z) = xy + yz + xz, with one extra feature: its carry-out can be
switched at run time between the exact value and a cheaper approximate one.
The approximate carry-out ignores any carry that ripples from the lower four
bits through the upper four bits. Error-tolerant datapaths, such as image or
signal processing, can use the approximate setting. Exact arithmetic uses the
other. The sum bits are exact in both settings.

Majority gates are the native gate of several emerging technologies, such as
quantum-dot cellular automata. An adder expressed directly in M( ) needs
fewer gates than one translated from AND/OR logic. The full-adder carry is
already a majority, c[i+1] = M(a[i], b[i], c[i]). What follows is about
building a short carry tree out of that equation.

## Files

| file | module | role |
|---|---|---|
| `rtl/asmp_pkg.sv` | package | `ADDER_W = 8`, the `carry_mode_e` enum |
| `rtl/maj3.sv` | `maj3` | the majority gate |
| `rtl/maj_carry_gen.sv` | `maj_carry_gen` | prefix carry tree: carries c1..c7 and m8, m9, m10 |
| `rtl/switch_carry.sv` | `switch_carry` | final carry stage with the exact/approximate multiplexer |
| `rtl/maj_sum_gen.sv` | `maj_sum_gen` | all sum bits in parallel |
| `rtl/asmp_adder.sv` | `asmp_adder` | top level |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## Top-level interface

```
module asmp_adder (
  input  logic [7:0] a, b,
  input  logic       cin,
  input  logic       approx,   // 0: exact carry-out, 1: approximate carry-out
  output logic [7:0] sum,
  output logic       cout
);
```

The design is purely combinational. It has no clock, no reset and no state.
The outputs settle one carry-tree delay plus two gate delays after the inputs
change.

- `approx = 0`: `{cout, sum} = a + b + cin`.
- `approx = 1`: `sum` is unchanged. `cout` is the carry out of
  `a[7:4] + b[7:4]` with a carry-in of zero.

## How a majority gate builds a carry tree

The whole carry network rests on one identity of the majority function:

    M(x, y, M(u, v, w)) = M( M(x, y, u), M(x, y, v), w )

Apply it to two adjacent bit positions. The carry out of bit i+1 is
M(a[i+1], b[i+1], M(a[i], b[i], c[i])). Push the inner gate outward and the
carry becomes

    c[i+2] = M( M(a[i+1], b[i+1], a[i]),  M(a[i+1], b[i+1], b[i]),  c[i] )

The two inner gates depend only on operand bits. They form a two-bit "group
value", computed in parallel for every pair. The group value then acts on
the incoming carry with a single gate. Two group values combine the same way
into a four-bit group value: with (X, Y) for bits 7..6 and (U, V) for bits
5..4, the carry out of bit 7 is M(M(X, Y, U), M(X, Y, V), c4). This is the
majority-logic counterpart of the (generate, propagate) prefix operator of a
conventional prefix adder.

A group value (P, Q) also says directly what the group does with a carry:

- P & Q = M(P, Q, 0) is the group's carry-out for a carry-in of 0.
- P | Q = M(P, Q, 1) is the group's carry-out for a carry-in of 1.
- When P = Q, the group generates or kills a carry regardless of its
  carry-in. When P != Q, it passes the carry-in through.

The final carry stage relies on this.

## Gate map of the carry tree

Gates are numbered as in the gate-level drawing the design follows. Gate 0 is
an addition (see "Design choices").

| gate | inputs | output |
|---|---|---|
| 0 | a0, b0, c0 | c1 |
| 1 | a1, b1, c1 | c2 |
| 3, 2 | (a3, b3, a2), (a3, b3, b2) | group value of bits 3..2 |
| 5, 4 | (a5, b5, a4), (a5, b5, b4) | group value of bits 5..4 |
| 7, 6 | (a7, b7, a6), (a7, b7, b6) | group value of bits 7..6 |
| 8 | g3, g2, c2 | c4 (also called m8) |
| 10, 9 | (g7, g6, g5), (g7, g6, g4) | group value of bits 7..4 (m10, m9) |
| 11 | g5, g4, c4 | c6 |
| 12 | a2, b2, c2 | c3 |
| 13 | a4, b4, c4 | c5 |
| 14 | a6, b6, c6 | c7 |

The longest path to c7 passes through five majority gates (0, 1, 8, 11, 14).
The carry-out is formed by the final stage described next.

## The switchable carry-out

The exact carry-out is c8 = M(m10, m9, m8). The final stage writes it as the
OR of two terms:

    c8 = (m10 & m9)  |  (m8 & (m10 | m9))
         approximate     augmenting
         part            part

- The **approximate part**, m10 & m9, is the carry out of bits 7..4 as if no
  carry entered bit 4. It cuts the carry chain in the middle.
- The **augmenting part** adds back the one case the cut loses. A carry
  arrives at bit 4 (m8 = 1), and the upper half propagates it. The upper half
  propagates when m10 != m9, so the term is 1 only when m10 | m9 is also 1.

A 2:1 multiplexer driven by `approx` selects the approximate part alone or
the exact OR of both parts. Seen another way, the exact carry is
M(carry-if-0, carry-if-1, c4), a majority over two pre-computed carries and
the real carry-in of the upper half.

**Error behaviour.** The approximate carry can only be too small, never too
large. Take the 9-bit result {cout, sum}. When it is wrong it is 256 below
the exact value. This happens for 4096 of the 131072 combinations of a, b
and cin, i.e. 3.125 %: the lower half must produce a carry and a[7:4] ^
b[7:4] must be 1111. Averaged over all inputs, the error is 8. The
end-to-end testbench measures and prints these numbers.

## Sum bits

Each sum bit comes from two majority gates and an inverter. It uses the
bit's own carry-in c[i] and carry-out c[i+1]:

    s[i] = M( ~c[i+1],  M(a[i], b[i], ~c[i+1]),  c[i] )

When a[i] = b[i], the inner gate returns a[i] and the outer gate returns
c[i]. When a[i] != b[i], the carry-out equals the carry-in, the inner gate
returns ~c[i], and so does the outer gate. In both cases the result is
a ^ b ^ c. All eight bits are computed at once. `maj_sum_gen` has a width
parameter `W`, which defaults to 8.

The top sum bit s7 needs c8. It always receives the exact c8, even in
approximate mode, so the approximation never reaches the sum.

## Design choices and departures

These points were chosen here. Change them in one place if your use differs.

- **Width 8, with a bit-0 stage.** The gate-level drawing starts at bit 1,
  with c1 as an input. Gate 0, c1 = M(a0, b0, c0), makes the block a complete
  8-bit adder with a carry-in. Without it the adder would cover bits 7..1 and
  use c1 as its carry-in.
- **Reading of the final stage.** The final-carry equation is published only
  in a shorthand sum form over m8, m9 and m10. Taken literally as OR gates,
  that is not an exact carry. Here it is read as the two-term form
  above, which is exact in exact mode. Which term counts as "approximate",
  and therefore what the approximate mode returns (carry-in of bits 7..4
  taken as 0), is this design's interpretation. Gate types in the final stage
  were not given. The augmenting term's `m10 | m9` is an extra OR that the
  published drawing does not show as a separate gate.
- **Select polarity.** The multiplexer select is only labelled "Approx".
  Here, 1 selects the approximate carry (`asmp_pkg::MODE_APPROX`).
- **Only the carry-out is approximate.** See "Sum bits". If s7 should see the
  switched carry as well, connect `cout` instead of `c8_exact` to the sum
  generator in `asmp_adder.sv`. s7 then also errs whenever cout does.
- **Symmetric pairs.** In each gate pair (3/2, 5/4, 7/6, 10/9), which gate
  takes the a bit and which the b bit could not be read from the drawing.
  The pair is symmetric, so the choice does not change any output.
- **No timing model.** The published FPGA figures are not modelled by this
  RTL. They were 10 slices, 18 LUTs and a 10.905 ns delay, against 8, 15 and
  10.995 ns for the same adder without the switch.

## Verification

Each module has an exhaustive, self-checking testbench. The expected values
are computed with integer arithmetic in the testbench, not by re-using the
design's gates.

| testbench | what it covers |
|---|---|
| `tb_maj3` | all 8 input patterns |
| `tb_maj_carry_gen` | all 2^17 values of a, b, c0. Checks c1..c7 and m8, and checks m10 & m9, m10 \| m9 and M(m10, m9, m8) against the upper half's carry-out for carry-in 0, for carry-in 1, and the full carry-out |
| `tb_switch_carry` | all 16 input patterns, both modes |
| `tb_maj_sum_gen` | all 2^17 values, with ripple carries supplied by the testbench |
| `tb_asmp_adder` | all 2^17 values, each in exact then approximate mode. Counts exact operations, approximate operations, mode switches and approximate carry errors, and fails if any count is zero. Prints the error rate |

Each testbench ends with the line `TB_RESULT checks=N failures=M`. A watchdog
ends a run that hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_asmp_adder \
  rtl/asmp_pkg.sv rtl/maj3.sv rtl/maj_carry_gen.sv rtl/switch_carry.sv \
  rtl/maj_sum_gen.sv rtl/asmp_adder.sv tb/tb_asmp_adder.sv
./obj_dir/Vtb_asmp_adder
```

The end-to-end test runs the adder at its only size, 8 bits. It finishes in
well under a second.
