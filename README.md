# 32-bit hybrid adder: Kogge-Stone and carry look-ahead bytes in cascade

A fast adder has to get the carry from bit 0 to the top quickly. A
parallel-prefix adder such as the Kogge-Stone adder (KSA) does that in
log2(n) cell levels, but it needs many cells and wires. A carry look-ahead
adder (CLA) is smaller but does not scale as well. This design is a
*heterogeneous hybrid*: it mixes the two types, byte by byte. An 8-bit KSA
is cascaded with an 8-bit CLA to make a 16-bit adder, and two of those are
cascaded into a 32-bit adder. The 16-bit level therefore joins two different adder types (heterogeneous), and the 32-bit level joins two copies of the same one (homogeneous). The 1-bit sum logic is modelled on a Gate
Diffusion Input (GDI) full-adder cell, a low-transistor-count circuit style.

The RTL is purely combinational: no clock, no registers, no reset.
`{cout, sum} = a + b + cin` for unsigned 32-bit `a` and `b`.

## Structure

```
hybrid_adder32                         bits
 ├─ u_lo : hybrid_adder16              15:0
 │   ├─ u_ksa : ksa8                    7:0   (Kogge-Stone)
 │   │   └─ ksa_black_cell / ksa_grey_cell
 │   └─ u_cla : cla8                   15:8
 │       ├─ u_lo : cla4                11:8   (carry look-ahead)
 │       │   └─ gdi_fa_cell x4
 │       └─ u_hi : cla4               15:12
 └─ u_hi : hybrid_adder16             31:16   (same as u_lo)
```

From bit 0 upwards the operand is cut into KSA / CLA / KSA / CLA bytes. The
carry between the pieces is passed directly from one block's `cout` to the
next block's `cin`. Inside each block the carries are computed in parallel.
The only serial part is the chain of block carries:

```
cin → KSA(7:0) → CLA4(11:8) → CLA4(15:12) → KSA(23:16) → CLA4(27:24) → CLA4(31:28) → cout
```

Putting the KSA in the low byte, and not the CLA, is this design's own
choice. The construction only fixes that an 8-bit KSA is cascaded with an 8-bit
CLA. With the KSA low, the carry of the first byte is ready after
log2(8) = 3 prefix levels.

## The Kogge-Stone byte (`ksa8`)

This is the least obvious part, so here is how it works in detail.

**Preprocessing.** Every bit forms its propagate `P(i) = a(i) XOR b(i)` and
its generate `G(i) = a(i) AND b(i)`. The carry-in is folded into bit 0:
`G(0) := G(0) | P(0)·cin`. The span that ends at bit 0 then already includes
the carry-in, so the tree needs no extra column for it. That is this design's
choice.

**Carry generation.** There are three levels, with merge distances 1, 2 and 4.
At level *l*, node *i* ≥ 2^l is combined with node *i − 2^l*. A combined
node always covers a contiguous span `[i : j]` of bits:

| level | distance | nodes with a grey cell | nodes with a black cell |
|-------|----------|------------------------|-------------------------|
| 0     | 1        | 1                      | 2..7                    |
| 1     | 2        | 2, 3                   | 4..7                    |
| 2     | 4        | 4..7                   | none                    |

* A **black cell** merges two (G, P) pairs into the pair of the combined span:
  `G = G_hi | P_hi·G_lo`, `P = P_hi·P_lo`.
* A **grey cell** is used when the lower span already reaches bit 0. Only the
  generate is needed, because nothing lies below to merge with:
  `G = G_hi | P_hi·G_lo`. The result is the final carry out of bit *i*.
* A node *i* < 2^l is already complete and passes through unchanged.

After the last level, node *i* holds `C(i)`, the carry out of bit *i*.

**Postprocessing.** `S(i) = P(i) XOR C(i−1)`, with `C(−1) = cin`, and
`cout = C(7)`.

The module has a `WIDTH` parameter (a power of two, default 8), and the
generate loops build the tree for any such width. The design itself only
uses 8. The (G, P) pair is the `adder_pkg::pg_t` struct.

## The carry look-ahead bytes (`cla4`, `cla8`)

`cla4` expands the recurrence `C(i) = G(i) + P(i)·C(i−1)` into flat
sum-of-products terms. For example, for bit 2:

```
C(2) = G2 + P2·G1 + P2·P1·G0 + P2·P1·P0·cin
```

So all four carries take the same two gate levels. The sums are
`S(i) = P(i) XOR C(i−1)`. `cla8` links two `cla4` blocks: the low block's
carry-out is the high block's carry-in. There is no second look-ahead level.

## The GDI full-adder cell (`gdi_fa_cell`)

The GDI cell first forms `H = A XOR B`. It then uses `H` to steer two pass
networks:

```
SUM   = H ? ~CIN : CIN
CARRY = H ?  CIN : A
```

When `A == B`, the carry is `A` (both 1 means generate, both 0 means kill).
Otherwise the carry is `CIN`. In `cla4`, each bit's `H` serves as the
propagate `P(i)` and the cell's `SUM` is the sum bit. The cell's `CARRY` is
the one-step form of the recurrence. A deferred assertion (`assert final`)
in `cla4` checks that it matches the look-ahead carry for every bit.

Only the logic function is modelled. The actual cell is an 8-transistor GDI
circuit. A synthesis tool will turn this RTL into ordinary gates, not GDI
transistors. The transistor-level area, delay and power figures of such a
circuit cannot be reproduced from RTL.

## Departures and open points

* **Carry-in.** The 32-bit adder has a `cin` port. It exists so that the
  blocks can be cascaded. Tie it to 0 for plain addition.
* **Byte order.** KSA low, CLA high in each 16-bit half (see above).
* **Carry between blocks.** Carries pass directly from block to block. No
  carry-select or skip logic is added between the blocks.
* **Arithmetic.** Unsigned only, with no overflow flag.
* **Not built.** Some descriptions of hybrid adders pair a modified
  Manchester carry chain with a carry-select sum stage on 8-bit groups. This
  design does not do that. It follows the KSA + CLA construction.

## Files

| file | contents |
|------|----------|
| `rtl/adder_pkg.sv` | `pg_t`, the (generate, propagate) struct |
| `rtl/gdi_fa_cell.sv` | GDI-style full-adder cell |
| `rtl/ksa_black_cell.sv`, `rtl/ksa_grey_cell.sv` | prefix cells |
| `rtl/ksa8.sv` | Kogge-Stone adder, `WIDTH` = 8 |
| `rtl/cla4.sv`, `rtl/cla8.sv` | carry look-ahead adders |
| `rtl/hybrid_adder16.sv` | KSA byte + CLA byte |
| `rtl/hybrid_adder32.sv` | top: two 16-bit hybrids |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the adder's outputs with integer arithmetic done in
the testbench. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* The cells, `cla4`, `cla8` and `ksa8` are tested exhaustively. That is 131072
  cases for the 8-bit adders. `tb_ksa8` also builds a 16-bit KSA
  (`WIDTH = 16`) and tests it on random operands and on full-length carry
  chains.
* `tb_hybrid_adder16` and `tb_hybrid_adder32` use directed and random
  operands. The directed operands include a carry generated at every bit and
  rippling to the top, and all-ones plus carry-in.
* `tb_hybrid_adder32` runs the top at its only size. It works out the carry
  into every block boundary (bits 4, 8, 12, 16, 24, 28, 32) on its own. It
  counts how often each boundary is crossed and fails if any boundary is
  never crossed. It also requires at least one case where `cin` ripples
  through all 32 bits.

To run one testbench with Verilator (5.x) from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/adder_pkg.sv tb/tb_hybrid_adder32.sv --top-module tb_hybrid_adder32
./obj_dir/Vtb_hybrid_adder32
```

Replace the name to run another testbench. Every run takes well under a
second.
