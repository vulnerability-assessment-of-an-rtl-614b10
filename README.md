# B-233 elliptic-curve point multiplier on a single shared bus

This RTL computes the elliptic-curve point product kP on the NIST binary curve
B-233 (y² + xy = x³ + x² + b over GF(2²³³)). It is a reconstruction of a bus-based
hardware accelerator, built for IHP's 130 nm process and studied for power-analysis
leakage. It uses the Montgomery ladder in López-Dahab projective coordinates, so
every key bit costs the same operations: 6 field products, 5 squarings and 3
additions, in 57 clock cycles.

The architecture is very small. There are eight 233-bit registers, one ALU, one
multiplier and one 233-bit bus. In each clock cycle exactly one unit drives the
bus, and any set of units may take the bus value. The whole algorithm is a
sequence of 32-bit control words issued by a controller.

No countermeasures against power analysis are built in, as in the original. The
design is meant as a faithful, readable and simulatable model of that kind of
accelerator. It does not try to harden it.

## Dataflow: one bus, one control word

```
             +------------+   cntr[31:0] (registered)
  is_set --->| controller |----------------------------------------------+
             +------------+                                              |
                   ^ bit_idx                                             v enables
  +------+   +----------+   +------------+   +-----+   +----+ +----+ ... +---+ +---+ +---+
  | test |<--| k / temp |   | multiplier |   | ALU |   | X1 | | Z1 |     | b | | x | | y |
  | bit  |   +----------+   +------------+   +-----+   +----+ +----+     +---+ +---+ +---+
  +------+        |                |            |         |      |         |     |     |
                  +----------------+------------+---------+------+---------+-----+-----+
                                          bus mux (cntr[27:24])  ---> bus ---> all inputs
```

The control word `cntr` has the layout `ecc_pkg::cntr_t`:

| bits  | name   | effect when 1 |
|-------|--------|---------------|
| 27-24 | sel    | bus source: 0 k/temp, 1 b, 2 Z1, 3 Z2, 4 X1, 5 X2, 6 multiplier, 7 ALU, 8 x, 9 y |
| 22    | seta   | multiplier stores the bus as first operand |
| 21    | setb   | multiplier takes the bus as second operand and starts |
| 20    | sqe    | ALU ← bus² |
| 19    | xe     | ALU ← ALU ⊕ bus (field addition) |
| 18    | we     | ALU ← bus |
| 17-14 | X2, X1, Z2, Z1 | register ← bus |
| 13    | b      | register b ← bus (never used) |
| 11, 10, 9 | x, y, k | register ← bus |
| 6     | test bit | test-bit register ← key[bit_idx] |
| 5-1   | be32   | ALU word index for the 32-bit load |
| 0     | we32   | ALU word `be32` ← `r_in32` (used once, to make the ALU 1) |

Bits 31-28, 23, 12, 8 and 7 are unused.

A field addition takes two cycles: `we` loads the first operand into the ALU, and
`xe` adds the second. A squaring takes one cycle. A product has `seta` in cycle t
and `setb` in cycle t+1. It then computes in cycles t+2..t+10 and can be read on
the bus from cycle t+11.

## The multiplier: iterative 4-segment Karatsuba

`gf_mult_ks4` splits each 233-bit operand into four 59-bit segments a3..a0. Two
levels of Karatsuba reduce the full product to nine 59×59 carry-less products:

| cycle | segment product | added at offsets (×59 bits) |
|-------|-----------------|-----------------------------|
| 0 | a0·b0 | 0, 1, 2, 3 |
| 1 | a1·b1 | 1, 2, 3, 4 |
| 2 | (a0+a1)(b0+b1) | 1, 3 |
| 3 | a2·b2 | 2, 3, 4, 5 |
| 4 | a3·b3 | 3, 4, 5, 6 |
| 5 | (a2+a3)(b2+b3) | 3, 5 |
| 6 | (a0+a2)(b0+b2) | 2, 3 |
| 7 | (a1+a3)(b1+b3) | 3, 4 |
| 8 | (a0+a1+a2+a3)(b0+b1+b2+b3) | 3 |

The offsets follow from `A·B = L + (M+L+H)x¹¹⁸ + H x²³⁶`, applied at both levels.
Here L, H and M are the products of the low halves, the high halves and the half
sums. A single 59-bit carry-less multiplier and a 472-bit accumulator do the work,
one row per cycle. The ninth cycle also reduces modulo x²³³ + x⁷⁴ + 1 into the
result register.

`setb` copies both operands into working registers. So the operands of the next
product can be loaded while one is computing. Products run back to back when the
next `setb` falls in the last compute cycle. An assertion forbids `setb` at any
earlier point of a computation.

## One key bit: the 57-cycle slot

For a key bit kᵢ the ladder performs one point addition and one doubling. With
kᵢ = 1, (X1,Z1) ← (X1,Z1) + (X2,Z2) and (X2,Z2) ← 2·(X2,Z2). With kᵢ = 0 the two
pairs swap roles. The formulas, with x the affine x of P, are:

* add: Z' = (X1·Z2 + X2·Z1)², X' = x·Z' + (X1·Z2)(X2·Z1)
* double: Z' = X²·Z², X' = X⁴ + b·Z⁴

Below, AX/AZ is the pair that receives the sum and PX/PZ the pair that is doubled.
For bit 1 these are X1/Z1 and X2/Z2, and for bit 0 the reverse. Two more role
names describe the order in which the P pair is squared: Q1 is squared in cycle 2
(Z2 for bit 1, X1 for bit 0), and Q2 in cycle 9 (X2 for bit 1, Z1 for bit 0). A1
and A2 are the A registers that feed M1 and M2; they are reused to park Q1⁴ and Q2⁴.
The six products, in the order the multiplier runs them, are:

| product | value | compute cycles |
|---------|-------|----------------|
| M1 | X1·Z2 | 0-8 |
| M2 | A2·Q2 (= X2·Z1) | 10-18 |
| M5 | PX²·PZ² = PZ' | 19-27 |
| M6 | b·PZ⁴ | 28-36 |
| M3 | M1·M2 | 37-45 |
| M4 | x·AZ' | 46-54 |

Cycle 0 belongs to the program `mont`: it starts M1, and `is_set` picks `montk1` or
`montk0` for cycles 1..56. Cycles not listed do nothing.

| cycle | bus | action |
|------|-----|--------|
| (54, 56 of the previous slot) | Z2, then X1' | seta, setb of M1 |
| 0 | ALU | X2 ← ALU if the previous bit was 0 (finishes that slot's AX') |
| 1 | A2 | seta (M2) |
| 2 | Q1 | ALU ← Q1² |
| 3 | ALU | Q1 ← Q1², ALU ← Q1⁴ |
| 4 | ALU | A1 ← Q1⁴ |
| 9 | Q2 | setb (M2); ALU ← Q2² |
| 10 | ALU | Q2 ← Q2², ALU ← Q2⁴ |
| 11 | ALU | A2 ← Q2⁴ |
| 12 | mult | ALU ← M1 |
| 13 | Q1 | seta |
| 18 | Q2 | setb (M5 = Q1²·Q2²) |
| 19 | mult | PX ← M2 |
| 20 | b | seta |
| 27 | AX (holds PZ⁴) | setb (M6) |
| 28 | mult | PZ ← M5 (final PZ) |
| 29 | ALU | seta ← M1 |
| 36 | PX | setb ← M2 (M3) |
| 37 | x | seta |
| 38 | PX | ALU ← M1 + M2 |
| 39 | ALU | ALU ← (M1+M2)² = AZ' |
| 40 | ALU | PX ← AZ' |
| 41 | AZ (holds PX⁴) | ALU ← PX⁴ |
| 42 | mult | ALU ← PX⁴ + M6 = PX' |
| 43 | PX | AZ ← AZ' (final AZ) |
| 44 | ALU | PX ← PX' (final PX) |
| 45 | AZ | setb ← AZ' (M4) |
| 46 | mult | ALU ← M3; bit 0 only: X2 ← M3 as well |
| 54 | Z2 | seta (next M1) |
| 55 | mult | ALU ← M3 + M4 = AX' |
| 56 | ALU (bit 1) / X1 (bit 0) | setb (next M1); bit 1: X1 ← AX'; test bit ← next key bit |

The multiplier computes in 54 of the 57 cycles and is idle in cycles 9, 55 and 56.
The idle cycles at the end of the slot give the power trace its periodic dip. The
ALU's densest stretch is cycles 38-42, with two additions and a squaring. Both
programs issue the same multiplier and ALU operations in the same cycles and
differ in which registers they read and write, with one exception. In cycle 46
a bit-0 slot also writes X2. That write is useless, because X2 is AX for bit 0
and is overwritten in cycle 0 of the next slot. It is kept because the
accelerator being modelled has it, and it is a leak (see below).

## What leaks: difference of means on this RTL

`tb/ecc_top_dom_tb.sv` repeats the horizontal attack on the long scalars k1 and k2.
It runs with a simple power model: each cycle counts the register and bus bits
that toggle. The ladder trace is cut into 231 slots of 57 points, and a mean slot
is formed. For each point p, every slot gets a key-bit guess: 1 if the slot is
below the mean at p, else 0. This gives 57 key candidates. Most candidates are
right about half the time. Two points stand out:

* **Point 48 (100 % for both scalars).** At the end of cycle 46 a bit-0 slot
  loads M3 into X2 as well as into the ALU. The toggling of X2 shows up in the
  next cycle and gives away every key bit. This is the redundant write
  described above.
* **Point 2 (24-26 %, so 74-76 % with the guess inverted).** In cycle 1 the bus
  carries Z1 for bit 1 and X2 for bit 0, which is the M2 operand.

The testbench runs the same test on the toggles of each unit alone. X1, Z1, X2
and Z2 each give the whole key away at four to six points of the slot (100 % or
0 % correct). Each of these registers is written in different cycles depending
on whether it plays the A or the P role. The ALU and the multiplier give no
point beyond 30-70 % in this model. They run the same operations in both kinds of
slot, on values whose toggle counts do not depend on the key bit.

These leaks come from the register roles and the one extra write, even though
both programs issue the same arithmetic operations at the same times. The
original accelerator's analysis shows the same pattern. Points 47 and 48 were
among its strongest candidates, and its register blocks X1, Z1, X2 and Z2 were
the worst leakage sources. Making the design resistant would need, for example, a fixed register
mapping with swapped contents, or randomised coordinates. Neither is built here.

## Before and after the ladder

**Initialisation (`mont`).** The first six cycles set X1 = x, Z2 = x², X2 = x⁴ + b
and Z1 = 1. For Z1 the ALU adds itself to reach zero, then loads word 0 with 1.
The controller then scans the key from bit 232 downwards, one bit per cycle
through the test-bit register, until it finds the leading one. This takes
234 − t cycles for a leading one at bit t, so the scan time depends on the length
of the key. Two more cycles then send the operands of the first product to the
multiplier. Processing the leading one is implicit in the start values, and one
slot follows for each lower bit.

**Affine conversion (`montpost`, 437 cycles).** This is a fixed list of steps in
`ecc_controller` (`post_uop`). It computes:

* T1 = Z1·Z2 and T2 = x·T1
* C = (X1 + xZ1)(X2 + xZ2) + (x² + y)·T1
* x(kP) = X1·xZ2 / T2
* y(kP) = (x + x(kP))·C / T2 + y

1/T2 comes from an Itoh-Tsujii inversion, T2^(2²³³−2), built with the addition
chain 1, 2, 3, 6, 7, 14, 28, 29, 58, 116, 232: 232 squarings and 10 products.
A chain step that adds j to the exponent takes j + 10 cycles. In the cycle that
reads the previous product off the bus, the ALU already squares it, and the
multiplier stores it as its first operand if the step multiplies by it. The
remaining j − 1 squarings follow, then setb, then nine compute cycles. The first
compute cycle also preloads β₁ (kept in Z1) when the next step needs it. The
last product before the inversion, X1·xZ2, runs back to back with the one
before it. Its result is moved into k while the first chain product computes.
The key register k holds temporaries in this phase. The results are written to
the registers x and y, which drive `x_out` and `y_out`.

**Total time.** A run takes 6 + (234 − t) + 2 + 57·t + 437 cycles after `start`,
for a leading one at bit t. For a 232-bit scalar (t = 231) that is 13 615 cycles,
13 167 of them in the ladder.

## Interface of `ecc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start | in | 1 | while idle: load k_in, x_in, y_in, b_in and begin |
| k_in, x_in, y_in, b_in | in | 233 | scalar, affine point P, curve constant b |
| busy | out | 1 | from start to done |
| done | out | 1 | one-cycle pulse at the end |
| key_zero | out | 1 | with done when k = 0 (x/y then keep P) |
| x_out, y_out | out | 233 | affine kP, valid from done |
| cntr_o | out | 32 | the control word, for observing activity |

The curve coefficient a = 1 of B-233 is built into the formulas. The design does
not detect kP = ∞ (for example k a multiple of the point order); the conversion
then returns zeros.

## Where this design departs from the accelerator it models

The overall structure, the bus codes, the control-word bits and the unit
behaviour are taken from the original, and so are these counts: 57 cycles and
6/5/3 operations per slot, 9 compute cycles per product, 8 initialisation cycles,
and the multiplier idle in cycles 9, 55 and 56. The following are
this design's own:

* **The slot microprogram.** The original cycle-by-cycle schedule is not
  available in full, so the table above is a reconstruction. It meets every
  cycle-level fact known about the original:
  * M1 starts in cycle 0, with its setb in cycle 56 of the previous slot.
  * That setb comes from the ALU for bit 1 and from X1 for bit 0.
  * The multiplier is idle in cycles 9, 55 and 56.
  * Cycle 2 squares Z2 or X1, and cycle 9 squares X2 or Z1.
  * Cycles 38-42 hold two additions and a squaring. With a single ALU register
    the five cycles cannot all be ALU operations: a result has to leave
    through the bus before the next load. So here cycle 40 stores AZ', and the
    first addition's first operand (M1) was loaded back in cycle 12.
  * Cycle 46 has the extra X2 write for bit 0.
  * A bit-0 slot writes X2 in cycle 0 of the next slot.

  Which register is read or written in the other cycles is this design's choice.
* **The post phase takes 437 cycles**, against 431 in the original.
* **Registers x and b are read on the bus in every slot**, for x·AZ' and b·PZ⁴.
* **The key scan, the test-bit input and the reuse of k as a temporary.** These
  fill gaps in the original's description. The temporary on bus code 0 is taken to
  be the key register, and the test-bit register is taken to hold the key bit that
  the controller selects.
* **The host port** (start/done, direct loading of b, x, y, k) and resets.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The reference model (`tb/gf_ref_pkg.sv`) is independent of the RTL. It
uses bit-serial field multiplication, Fermat inversion and affine
double-and-add, and it checks that the study point P1 and the generator lie on
B-233.

| testbench | what it checks |
|-----------|----------------|
| `gf_mult_ks4_tb` | products against the bit-serial reference; result not before cycle t+11 and present at t+11; back-to-back products |
| `ecc_alu_tb` | load, xor, squaring, every 32-bit word index, setting to 1 |
| `gf_reg_tb`, `test_bit_reg_tb`, `ecc_bus_tb` | write, load priority and hold; key bit selection; every bus code |
| `ecc_controller_tb` | per slot: 57 cycles, 6 seta/setb, 5 squarings, 3 additions, multiplier idle in cycles 9, 55 and 56, cycle-56 setb source, squaring sources in cycles 2 and 9, the bit-0-only X2 write in cycle 46, identical operation pattern for both bits; init 6+2 cycles, scan length, 437 post cycles |
| `ecc_top_tb` | kP for k = 0x2cc, 1, 2, 3, random 16/20-bit scalars on P1 and the generator, and k = 0; timing; counts every mechanism: bit-1 and bit-0 slots, scan, word load, squarings, additions, back-to-back products, k as temporary, k = 0 exit |
| `ecc_top_full_tb` | the two full 232-bit scalars of the study on P1, checked against the reference, with 13 167 ladder cycles each |
| `ecc_top_dom_tb` | difference-of-means test on a toggle-count power model for k1 and k2; prints the 57 candidate correctness values and the leaking points of each unit; requires a leaking point in the whole design and in a coordinate register |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ecc_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/ecc_top_full_tb.sv \
  --top-module ecc_top_full_tb && ./obj_dir/Vecc_top_full_tb
```

The full-length test takes a few seconds.

## Files

* `rtl/ecc_pkg.sv`: field size, reduction and squaring functions, the bus codes,
  the control-word struct and the program names
* `rtl/gf_mult_ks4.sv`, `rtl/ecc_alu.sv`, `rtl/gf_reg.sv`, `rtl/test_bit_reg.sv`,
  `rtl/ecc_bus.sv`: the units
* `rtl/ecc_controller.sv`: the control sequence
* `rtl/ecc_top.sv`: the connected design
* `tb/`: the testbenches and the reference package
