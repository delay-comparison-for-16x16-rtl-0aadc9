# 16 × 16 Vedic multiplier with ripple-carry, carry-look-ahead and Kogge-Stone adder trees

This is a combinational 16-bit × 16-bit unsigned multiplier built on the
*Urdhva Tiryakbhyam* ("vertically and crosswise") method of Vedic arithmetic.
The method forms all partial products of one product column at once and adds
them with the carry left by the column before it. The 32-bit product is
assembled from four 8 × 8 blocks and a three-adder tree. The carry scheme of
those adders decides the critical path after the 8 × 8 blocks, so the tree can
be built with three kinds of adder:

* a ripple carry adder (RCA),
* a carry look-ahead adder (CLA) made of 4-bit groups,
* a Kogge-Stone parallel prefix adder (KSA), the fastest of the three and the default.

The top level, `vedic_top`, holds all three variants side by side on shared
operands. They compute the same product, so you can compare their area and
timing in one synthesis run. There is no clock and no register anywhere: a
product is valid one combinational settling time after the operands change.

## The vertical-and-crosswise column method (`urdhva_mult`)

For N-bit operands `a` and `b` the product is formed in 2N−1 steps, from the
least significant column up:

* **Step k** takes every bit pair joined by a line in the vertical-and-crosswise
  diagram, i.e. all `a[i] & b[j]` with `i + j = k`. There is 1 pair in step 0,
  up to N in the middle step and 1 in the last.
* Those products are added to the **carry** left by step k−1. Before step 0 the
  carry is zero.
* Bit 0 of the column sum is **product bit k**. The remaining bits are the carry
  into step k+1. They can be worth more than 1: for N = 8 a column carry reaches 7.
* After step 2N−2 the carry that is left is product bit 2N−1.

Example (N = 4): 1101 × 1010 takes 1, 2, 3, 4, 3, 2, 1 crosswise products in
its seven steps and gives 10000010 (13 × 10 = 130). The same column scheme in
base 10 gives 123 × 456 = 56088.

In `urdhva_mult` each column sum is written as an addition inside one
`always_comb` loop, and synthesis is left to map it. A column sum is below 2N,
so it is held in `clog2(2N)+1` bits. `N` defaults to 8, the size the 16-bit
multiplier uses.

## Building 16 × 16 from 8 × 8 (`vedic_mult16`)

This is the part worth reading slowly. Split each operand into a high and a low
byte: `a = aH·2^8 + aL`, `b = bH·2^8 + bL`. The four byte products are:

| block | product        | weight |
|-------|----------------|--------|
| M1    | `aL × bL`      | 2^0    |
| M2    | `aH × bL`      | 2^8    |
| M3    | `aL × bH`      | 2^8    |
| M4    | `aH × bH`      | 2^16   |

The low byte of M1 is already final: nothing else has weight below 2^8. So
`q[7:0] = M1[7:0]`. The rest is summed in units of 2^8 by three adders:

```
ADDER1 (16 bit): A1      = M2                 + {8'h00, M1[15:8]}
ADDER2 (24 bit): A2      = {M4, 8'h00}        + {8'h00, M3}
ADDER3 (24 bit): q[31:8] = A2                 + {8'h00, A1}
```

ADDER1 and ADDER2 work in parallel and ADDER3 follows them. The critical path
is therefore one 8 × 8 block, then two adders. None of the adders can
overflow for 16-bit operands:

* A1 ≤ 255·255 + 254 < 2^16.
* A2 < 2^24.
* The full product is below 2^32.

So every carry in is tied to 0. An immediate assertion in `vedic_mult16` checks
that every carry out stays 0.

The parameter `ADDER` (type `vedic_pkg::adder_kind_e`) chooses the carry scheme
of all three adders: `ADDER_RCA`, `ADDER_CLA` or `ADDER_KSA` (the default).

## The adders

All adders have the same ports: `a`, `b` (`WIDTH` bits), `cin` → `s` (`WIDTH`
bits), `cout`. `WIDTH` defaults to 16. `generic_adder` wraps them and chooses
one with its `KIND` parameter.

**`full_adder`** — `s = a ^ b ^ cin`, `cout = a&b | (a^b)&cin`. It also outputs
the bit's propagate `p = a ^ b` and generate `g = a & b`.

**`rca_adder`** — a chain of `WIDTH` full adders. The carry out of bit i is the
carry in of bit i+1, so the delay grows linearly with the width.

**`cla4`** — four full adders plus a look-ahead unit. The unit computes every
carry in two logic levels from P, G and the group carry in C0:

```
C1 = G0 + P0·C0
C2 = G1 + P1·G0 + P1·P0·C0
C3 = G2 + P2·G1 + P2·P1·G0 + P2·P1·P0·C0
C4 = G3 + P3·G2 + P3·P2·G1 + P3·P2·P1·G0 + P3·P2·P1·P0·C0
```

The carries C1..C3 go back into the full adders in place of the rippled ones.
The group also outputs its propagate `PG = P3·P2·P1·P0` and generate
`GG = G3 + P3·G2 + P3·P2·G1 + P3·P2·P1·G0`.

**`cla_adder`** — `WIDTH/4` `cla4` groups. Each group's C4 is the next group's
C0. The PG/GG outputs are not used: there is no second look-ahead level. A
16-bit carry therefore crosses four groups rather than sixteen bits. `WIDTH`
must be a multiple of 4.

**`ksa_adder`** — Kogge-Stone parallel prefix adder in three steps:

1. **Preprocessing**: each bit forms `P_i = A_i ^ B_i` and `G_i = A_i & B_i`.
   The carry in is folded into bit 0 (`G_0 |= P_0 & cin`).
2. **Carry generation**: `clog2(WIDTH)` rows of prefix cells. Row l joins
   each bit's group with the group that ends 2^l bits lower:
   `G[i:j] = G[i:k+1] | P[i:k+1] & G[k:j]` and
   `P[i:j] = P[i:k+1] & P[k:j]`.
   For 16 bits the distances are 1, 2, 4 and 8. After the last row, `G[i:0]` is
   the carry into bit i+1.
3. **Postprocessing**: `S_i = P_i ^ C_i`, with `C_0 = cin`.

The depth is log2(WIDTH) and every cell's fan-out is at most two. The price is
many prefix cells.

## Files

| file | content |
|------|---------|
| `rtl/vedic_pkg.sv` | `adder_kind_e` enum (`ADDER_RCA`, `ADDER_CLA`, `ADDER_KSA`) |
| `rtl/full_adder.sv` | 1-bit full adder with P/G outputs |
| `rtl/rca_adder.sv` | ripple carry adder, `WIDTH` = 16 |
| `rtl/cla4.sv` | 4-bit carry look-ahead group |
| `rtl/cla_adder.sv` | chained `cla4` groups, `WIDTH` = 16 |
| `rtl/ksa_adder.sv` | Kogge-Stone adder, `WIDTH` = 16 |
| `rtl/generic_adder.sv` | adder with the scheme chosen by `KIND` |
| `rtl/urdhva_mult.sv` | N × N column-method multiplier, `N` = 8 |
| `rtl/vedic_mult16.sv` | 16 × 16 multiplier, `ADDER` = `ADDER_KSA` |
| `rtl/vedic_top.sv` | the RCA, CLA and KSA multipliers side by side |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design with integer arithmetic done in the
testbench. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `full_adder_tb`, `cla4_tb`: exhaustive tests. `cla4_tb` also checks PG and GG.
* `rca_adder_tb`, `cla_adder_tb`, `ksa_adder_tb`:
  * the 16-bit default plus a second width (4, 24 and 24 bits);
  * 20000 random operand pairs plus corners, with both carry-in values;
  * one pair in eight makes a carry run the full length.
* `generic_adder_tb`: every `KIND` at 16 and 24 bits, the widths the multiplier
  uses.
* `urdhva_mult_tb`: all 65536 pairs at N = 8, all 256 pairs at N = 4, and the
  1101 × 1010 example.
* `vedic_mult16_tb`: all three adder kinds on 100000 random pairs plus corners:
  0, 0xFFFF, 123 × 456, walking ones against shifted all-ones.
* `vedic_top_tb`: the end-to-end test at default parameters, on 200000 random
  pairs.
  * It checks all three outputs.
  * It also counts how often each carry path is exercised: a zero operand, both
    operands 0xFFFF, a column carry of 2 or more inside an 8 × 8 block, and a
    carry across the byte boundary in ADDER1, ADDER2 and ADDER3.
  * A path that is never exercised counts as a failure.

Every test was also run against a deliberately broken copy of its module (for
example, a missing look-ahead term, a missing prefix row or a wrong carry
shift), and each broken copy made its test fail.

To run one test with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
          tb/vedic_top_tb.sv --top-module vedic_top_tb -Mdir obj_top
./obj_top/Vvedic_top_tb
```

Swap in another testbench name for the others. All of them finish in well under
a second.

## How far it follows the original description, and what is its own

Taken from the original description of this multiplier:

* the column method;
* the full-adder and look-ahead equations;
* the three Kogge-Stone stages and its prefix-cell equations;
* the byte split into M1..M4;
* ADDER1..ADDER3 with their operand alignment and their 16/24/24-bit widths;
* the 32-bit result.

Choices made in this RTL:

* **Inside the 8 × 8 block.** The block is described only by what it does. Here
  it applies the column method directly: each column is one behavioural
  addition. It is not a hand-built tree of smaller Vedic blocks.
* **CLA between groups.** Groups are chained C4 → C0. The 4-bit group's PG/GG
  formulas are the usual ones, and nothing uses them here.
* **Carry in.** Every adder has a carry-in port, which the multiplier ties to 0.
* **Kogge-Stone sum.** The sum is `P_i XOR C_i`, the same sum equation as the
  full adder's.
* **Three variants in one top.** The choice of adder per multiplier, and putting
  all three variants in one top, are this design's own arrangement for
  comparing them.

**Timing and area.** The original work reports FPGA synthesis results for a
16 × 16 Vedic multiplier of 25.825 ns. It reports 24.686 ns for the 16-bit RCA,
21.028 ns for the CLA and 8.955 ns for the Kogge-Stone adder, with 350, 48, 25
and 30 slices. These figures have not been reproduced with this RTL. They
depend on the device and the tool, and they should be read as indications only.

**Scope.** The design is unsigned only. It has no pipeline registers, and no
input or output registers. To time it on an FPGA, wrap `vedic_mult16` in
registers at both ends.
