# Urdhva-Tiryagbhyam (Vedic) 8x8 multiplier

An unsigned 8-bit by 8-bit combinational multiplier built by the
"vertically and crosswise" (Urdhva-Tiryagbhyam) rule of Vedic arithmetic. The
rule splits each operand into a high and a low half and multiplies the halves
"vertically" (high x high, low x low) and "crosswise" (high x low, low x high).
The four partial products are then added with their weights. Each half-size product
is made the same way, one level down, so the whole multiplier is a tree of
small multipliers joined by ripple-carry adders:

```
vedic_8x8                      16-bit product of two 8-bit operands
 ├─ 4 x vedic_4x4              8-bit products of the 4-bit halves
 │    ├─ 4 x vedic_2x2         4 AND gates + 2 half adders each
 │    ├─ 3 x rca #(4)          4-bit ripple-carry adders
 │    └─ 1 x half_adder
 ├─ 3 x rca #(8)               8-bit ripple-carry adders
 └─ 1 x half_adder
rca = chain of full_adder
```

There is no clock, no register and no reset: the product settles one
combinational delay after the operands change. The longest path runs through
a 2x2 multiplier, three 4-bit adders and three 8-bit adders.

The structure is meant for a transistor-level realisation in gate-diffusion-input
(GDI) logic on FinFET devices. The RTL here describes only the logic. The
circuit style, power and delay are left to the cell library and the process.

## The arithmetic

For W-bit operands split into halves of H = W/2 bits, `m = {MH, ML}` and
`n = {NH, NL}`:

```
m * n = MH*NH * 2^W  +  (MH*NL + ML*NH) * 2^H  +  ML*NL
        q3 (vertical)    q1 + q2 (crosswise)        q0 (vertical)
```

Each of q0..q3 is W bits wide. The low H bits of q0 are already final product
bits, because nothing else lands at those weights.

## The adder network

This is the part that needs the most care. The same network is used at both
levels (W = 4 with 4-bit adders in `vedic_4x4`, W = 8 with 8-bit adders in
`vedic_8x8`):

| Step | Adder | Inputs | Outputs |
|------|-------|--------|---------|
| 1 | RCA1 (W bits) | q2 + q1 | sum `s1`, carry `ca1` |
| 2 | RCA2 (W bits) | s1 + {H zeros, q0[W-1:H]} | sum `s2`, carry `ca2` |
| 3 | half adder | ca1 + ca2 | sum `hs`, carry `hc` |
| 4 | RCA3 (W bits) | q3 + {zeros, hc, hs, s2[W-1:H]} | product bits [2W-1:W], carry `ca3` |

The product is `{RCA3 sum, s2[H-1:0], q0[H-1:0]}`.

Steps 1 and 2 form the middle column, `q1 + q2 + q0[W-1:H]`, at weight 2^H.
That sum needs W+1 bits. The two adders each drop a carry out of W bits, and
both carries weigh 2^(W+H) in the product. The half adder adds the two carries
into a 2-bit count. RCA3 then adds that count, together with the upper half of
`s2`, onto the vertical product q3.

Three facts follow from the bounds. The testbenches check all of them:

- **The half adder never produces a carry.** The middle sum is at most
  2(2^H - 1)^2 + 2^H - 1, which is below 2^(W+1). So `ca1` and `ca2` are never
  both 1 (4x4: at most 20 < 32; 8x8: at most 464 < 512). The half adder's
  carry pin is still wired, as in the source design. A synthesis tool removes
  it as constant.
- **`ca3` is always 0**, because a W x W product fits in 2W bits. The top
  still brings it out as a port, as in the source design. The `ca3` outputs
  of the four 4x4 multipliers inside the top are left open.
- The zero padding in steps 2 and 4 is what fixes each bit's weight. When
  changing widths, keep the pattern `{zeros, hc, hs, s2[W-1:H]}`.

## Modules

| Module | Ports | What it is |
|--------|-------|------------|
| `vedic_8x8` (top) | `m[7:0]`, `n[7:0]` in; `f[15:0]`, `ca3` out | 8x8 multiplier |
| `vedic_4x4` | `m[3:0]`, `n[3:0]` in; `f[7:0]`, `ca3` out | 4x4 multiplier |
| `vedic_2x2` | `a[1:0]`, `b[1:0]` in; `p[3:0]` out | 2x2 multiplier: `p0 = a0b0`; half adder (a1b0, a0b1) gives `p1` and carry c1; half adder (a1b1, c1) gives `p3 p2` |
| `rca #(WIDTH=4)` | `a`, `b` [WIDTH], `cin` in; `s` [WIDTH], `cout` out | ripple-carry adder of `full_adder` stages |
| `full_adder` | `a`, `b`, `cin` in; `s`, `cout` out | XOR sum, majority carry |
| `half_adder` | `a`, `b` in; `s`, `c` out | XOR sum, AND carry |

All operands and results are unsigned.

## What follows the source design and what is added

Taken from the source design:
- the decomposition into four half-size multipliers;
- the 2x2 cell made of four AND gates and two half adders;
- the use of ripple-carry adders (4-bit in the 4x4 multiplier, 8-bit in the 8x8);
- which products feed which adder, the zero padding, the half adder on `ca1`/`ca2`;
- the carry-out `ca3`.

Choices made here:
- the order of the bits where the schematic leaves it open (fixed by arithmetic, see above);
- the exact gate wiring inside the 2x2 cell;
- a carry-in port on `rca`, tied to 0 by both multipliers;
- plain XOR/AND/OR logic for the adder cells.

Not modelled:
- the GDI transistor circuits;
- the FinFET and MOSFET comparison;
- power and delay. The source design reports, for the 8x8 multiplier at
  45 nm, about 433 mW and 0.98 ns in FinFET against 658 mW and 1.37 ns in
  MOSFET. These are circuit-level results that RTL simulation cannot
  reproduce.
- the alternative adder styles (dual-rail domino, conventional static CMOS)
  that the source design compares against before choosing GDI.

## Verification

Every module has a self-checking testbench in `tb/`. Each one is exhaustive:

- `tb_half_adder`, `tb_full_adder`, `tb_vedic_2x2`: every input combination.
- `tb_rca`: the default 4-bit adder and an 8-bit instance, over all operands and both carry-in values.
- `tb_vedic_4x4`: all 256 operand pairs. Each product is checked against
  integer multiplication and, independently, against the column-by-column
  vertically-and-crosswise sums (f0 = m0n0, c1f1 = m1n0 + m0n1, ...,
  f7f6 = c5 + m3n3).
- `tb_vedic_8x8`: the top at its only configuration, all 65,536 operand pairs.

The multiplier testbenches count how often `ca1` and `ca2` fire and are folded
in by the half adder, at the top level and inside a 4x4 block. They fail if
either never fires. They also check that `hc` and `ca3` stay 0. Each
testbench prints `TB_RESULT checks=N failures=M` and has a time-out that
counts as a failure.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl tb/tb_vedic_8x8.sv --top-module tb_vedic_8x8
./obj_dir/Vtb_vedic_8x8
```

The full 8x8 run takes well under a second.

## Extending

A 16x16 multiplier follows the same pattern. Use four `vedic_8x8`
instances, three `rca #(.WIDTH(16))`, one `half_adder`, the padding
`{8'b0, q0[15:8]}` in the second adder and `{6'b0, hc, hs, s2[15:8]}` in the
last. For speed, any adder can be swapped for a faster one with the same
ports. The multiplier's structure does not depend on the adder being
ripple-carry.
