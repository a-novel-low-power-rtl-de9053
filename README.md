# 4×4 Vedic multipliers from modified GDI cells

Two small unsigned 4×4-bit multipliers, written as gate-level SystemVerilog.
Every gate in them is one kind of two-transistor cell: the *modified Gate
Diffusion Input* (GDI) cell. The multiplication follows the Vedic
*Urdhva Tiryakbhyam* method ("vertically and crosswise"). All partial
products are formed at once. They are then added column by column by half
and full adders, with no sequential steps.

The point of the construction is transistor count, and with it area and
power. A GDI AND gate takes 2 transistors where earlier designs use 5. A GDI
half adder takes 6 and a GDI full adder 10. The RTL keeps exactly that cell
structure, so one instance of `gdi_cell` stands for one transistor pair:

| design | cells | GDI cells | transistors |
|---|---|---|---|
| Design 1 (`vedic4_design1`) | 16 AND, 4 HA, 8 FA | 16 + 12 + 40 = 68 | 136 |
| Design 2 (`vedic4_design2`) | 4 × (2×2 multiplier) + 2 CSA + 1 RCA | 40 + 40 + 20 = 100 | 200 |

The RTL is purely combinational. It has no clock and no reset, and the
product is valid one propagation delay after the operands change.

## The GDI cell is a multiplexer

A GDI cell is one PMOS and one NMOS transistor whose gates are tied
together to the input `G`. While `G` is low the PMOS conducts and the output
follows input `P`. While `G` is high the NMOS conducts and the output follows
input `N`. Logically, then:

    out = G ? N : P                               (rtl/gdi_cell.sv)

The "modified" variant ties the PMOS body to VDD and the NMOS body to GND,
so that the cell can be built in an ordinary bulk process at 45 nm. That
changes the electrical behaviour only. The model assumes full-swing outputs
and ignores voltage drops, which have no meaning in two-state logic.

Every other function comes from what is wired to `P` and `N`:

| function | G | P | N | module |
|---|---|---|---|---|
| NOT a | a | 1 | 0 | `gdi_inv` (this is a plain CMOS inverter) |
| a AND b | a | 0 | b | `gdi_and` |
| a XOR b | a | b | ~b | inside the adders |
| majority carry | a^b | a | c | inside the full adder |

## Adders

**Half adder** (`gdi_half_adder`): three cells, six transistors.

    nb   = ~b
    sum  = a ? nb : b     (a ^ b)
    cout = a ? b  : 0     (a & b)

**Full adder** (`gdi_full_adder`): five cells, ten transistors.

    nb   = ~b
    h    = a ? nb : b     (a ^ b)
    nc   = ~cin
    sum  = h ? nc : cin   (a ^ b ^ cin)
    cout = h ? cin : a    (if a and b differ the carry is cin, otherwise it is a)

The transistor counts (6 and 10) are the target. The exact assignment of
cells inside the adders is this design's own; any other 6- or 10-transistor
GDI adder could be dropped in without changing the ports.

`csa4` is a 4-bit carry-save adder: four full adders side by side with no
carry between them. It turns three vectors into a sum vector `s` and a carry
vector `c`, with x + y + z = s + 2c. `rca4` is a 4-bit ripple-carry adder
of four full adders. Both take the width as parameter `W` (default 4).

## 2×2 Vedic multiplier

`vedic_2x2` uses four AND gates and two half adders (20 transistors). It
computes a1a0 × b1b0 in three steps:

1. vertical: p0 = a0·b0
2. crosswise: a1·b0 + a0·b1 gives p1, and the carry c moves left
3. vertical: a1·b1 + c gives p2, and its carry is p3

## Design 1: one carry-save array over all 16 partial products

All sixteen products `pp[i][j] = a[i]·b[j]` come from AND gates in
parallel. Column k holds the products with i + j = k, so the columns are 1,
2, 3, 4, 3, 2, 1 bits tall. Three rows of adders reduce them:

| cell | inputs | result |
|---|---|---|
| HA1 | a1b0, a0b1 | **p1**, carry → col 2 |
| FA1 | a2b0, a1b1, a0b2 | col 2 sum, carry → col 3 |
| FA2 | a2b1, a1b2, a0b3 | col 3 sum, carry → col 4 |
| FA3 | a3b1, a2b2, a1b3 | col 4 sum, carry → col 5 |
| FA4 | a3b2, a2b3, FA3 carry | col 5 sum, carry → col 6 |
| HA2 | a3b0, FA2 sum | col 3, carry → col 4 |
| HA3 | FA3 sum, FA2 carry | col 4, carry → col 5 |
| HA4 | FA1 sum, HA1 carry | **p2** |
| FA5 | HA2 sum, FA1 carry, HA4 carry | **p3** |
| FA6 | HA3 sum, HA2 carry, FA5 carry | **p4** |
| FA7 | FA4 sum, HA3 carry, FA6 carry | **p5** |
| FA8 | a3b3, FA4 carry, FA7 carry | **p6**, carry = **p7** |

The first two rows are the carry-save part. They never chain a carry
within a row, except FA3 into FA4. The bottom row (HA4, FA5…FA8) is a
ripple adder that merges the last two vectors, so its carry chain sets
the delay. Which partial products enter which first-row cell, where a3b0 and
a3b3 enter, and how many cells each row holds, follow the original block
diagram. The sum and carry wires between the rows are this design's own.
They were chosen so that each column adds up correctly with exactly
4 half adders and 8 full adders.

## Design 2: four 2×2 multipliers and a carry-save tree

Split the operands into halves, a = aH:aL and b = bH:bL, and form

    m0 = aL·bL   m1 = aH·bL   m2 = aL·bH   m3 = aH·bH    (four vedic_2x2)
    a·b = m0 + (m1 + m2)·4 + m3·16

The three additions are aligned as follows, each line starting at the weight
of the product bit it produces:

    p1 p0  = m0[1:0]
    CSA1   : m1 + m2 + {00, m0[3:2]}                  at weight 4
             p2 = s1[0]
    CSA2   : {0, s1[3:1]} + c1 + {m3[2:0], 0}         at weight 8
             p3 = s2[0]
    RCA    : {m3[3], s2[3:1]} + c2 + 0                at weight 16
             p7..p4 = RCA sum

A carry-save adder's carry vector `c` already has twice the weight of its
sum vector. So `c1` goes into CSA2 unshifted, beside `s1` shifted down by
one bit. In the same way `c2` enters the RCA beside `s2[3:1]`. The top bit
of m3 has weight 128 and cannot fit into CSA2's third operand, so it joins
the RCA as the top bit of its first operand. The product of two 4-bit
numbers never exceeds 225, so the RCA's carry out is always 0. A final
deferred immediate assertion (`a_no_overflow`) states this, and a simulator with
assertions enabled stops if it is ever violated. The block structure, the
"00" padding and the bus widths follow the original diagram. The bit-level
alignment shown above is this design's own, derived from bit weights.

## Top level

`vedic_gdi_top` places both multipliers side by side. Each has its own
ports: `d1_a`, `d1_b` → `d1_p` and `d2_a`, `d2_b` → `d2_p`, all unsigned. The
two designs compute the same function. They are alternatives that differ in
structure, delay and transistor count, not stages of one datapath.

## What this RTL does and does not capture

- It captures logic function and cell structure: which cells exist, how
  many there are, and how they connect.
- It does not capture power, delay, voltage swing, body biasing or the
  45 nm process. At the transistor level, at 1 V, Design 1 is reported to
  use 75 % less power and to have 53.9 % less delay than a conventional CMOS
  Vedic multiplier of the same structure. Design 2 is reported at 80.4 %
  less power and 37.6 % less delay. Those conventional baselines are not
  included here.
- Operands are unsigned. Signed (two's complement) multiplication is not
  covered.
- Synthesis tools will flatten the `gdi_cell` multiplexers into whatever
  gates their library has. The GDI structure only survives if `gdi_cell` is
  mapped to a custom two-transistor cell or kept as a black box.

## Files

    rtl/gdi_cell.sv         GDI cell, out = g ? n : p
    rtl/gdi_inv.sv          inverter (GDI cell, P=1, N=0)
    rtl/gdi_and.sv          2-transistor AND
    rtl/gdi_half_adder.sv   6-transistor half adder
    rtl/gdi_full_adder.sv   10-transistor full adder
    rtl/csa4.sv             W-bit carry-save adder (W=4)
    rtl/rca4.sv             W-bit ripple-carry adder (W=4)
    rtl/vedic_2x2.sv        2x2 Vedic multiplier
    rtl/vedic4_design1.sv   4x4 multiplier, carry-save array
    rtl/vedic4_design2.sv   4x4 multiplier, 2x2 blocks + CSA + RCA
    rtl/vedic_gdi_top.sv    both 4x4 multipliers side by side
    tb/tb_<module>.sv       one self-checking testbench per module above
                            (none for gdi_inv, which the adder tests cover)

## Verification

Every testbench is exhaustive over its block's inputs: 8 vectors for the
cell, 4096 operand triples for `csa4`, and all 256 operand pairs for each
4×4 multiplier. Each result is compared with integer arithmetic computed
in the testbench. Each testbench ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog that fails the run if it
does not finish.

`tb_vedic_gdi_top` runs both designs at full size. Design 2 gets the
operand pairs in a different order from Design 1, so swapped ports are
caught. The test also probes inside the designs and fails if any of these
carry paths never fires: the 2×2 crosswise carry, a 2×2 product ≥ 8, a carry
out of each CSA, a carry rippling into the RCA's top bit, the carries
between Design 1's array rows and in its merging adder, and product bit 7.
A full run takes well under a second.

To simulate, for example the top-level test:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_vedic_gdi_top tb/tb_vedic_gdi_top.sv
    ./obj_dir/Vtb_vedic_gdi_top

Replace the module name to run any other testbench. To lint a module:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vedic_gdi_top.sv`.
