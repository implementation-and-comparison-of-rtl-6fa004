# Vedic multiplier on area-efficient carry select adders

This is a combinational NxN-bit binary multiplier (N = 4 to 128, default
128). It is built by the Urdhva Tiryakbhyam ("vertically and crosswise")
rule of Vedic arithmetic. The rule splits each operand into halves, forms
the four half-size products in parallel, and joins them with three N-bit
adders. Applied recursively, this reaches down to a 2x2 block of four AND
gates and two half adders.

Those adders are carry select adders (CSLA), in four variants. The variants
differ only in how a CSLA gets its "carry in = 1" result:

* **Regular** groups compute it with a second ripple carry adder (RCA).
* **Modified** groups compute it by adding one to the "carry in = 0" result
  with a binary-to-excess-1 converter (BEC). A BEC is an inverter, an AND
  chain and XORs, which is smaller than an RCA.

Each kind comes with **linear** grouping (equal 4-bit groups) or
**square-root** (SQRT) grouping (groups growing 2, 2, 3, 4, 5 bits). The
design holds all four multipliers side by side so they can be compared:
same function, different adder structure and gate count.

Everything is purely combinational: no clock, no reset, no registers. A
product is valid one combinational delay after the operands.

## Module hierarchy

```
vedic_csla_top            four NxN multipliers, one per CSLA kind
└─ vedic_mult  (x4)       NxN multiplier, recursion unrolled into levels
   ├─ vedic_2x2           2x2 leaf: 4 AND + 2 half adders
   │  └─ half_adder
   └─ csla     (x3 per node)  N-bit carry select adder, KIND selects variant
      ├─ rca              plain ripple carry group (first group)
      │  └─ full_adder
      ├─ csla_group_reg   regular group: RCA(cin=0) + RCA(cin=1) + mux
      │  ├─ half_adder, rca, mux2
      └─ csla_group_mod   modified group: RCA(cin=0) + BEC + mux
         ├─ half_adder, rca, bec, mux2
vedic_pkg                 csla_kind_e, group schedule, unit-gate area model
```

`vedic_pkg::csla_kind_e` has the values `REG_LINEAR`, `MOD_LINEAR`,
`REG_SQRT` and `MOD_SQRT`.

## The multiplier recursion

For an SxS product with H = S/2, write x = {xh, xl} and y = {yh, yl}. Four
H x H multipliers give the S-bit partial products

```
ll = xl*yl    lh = xl*yh    hl = xh*yl    hh = xh*yh
```

and three S-bit CSLAs, all with carry in 0, combine them:

```
CSLA1:  {c1, m} = lh + hl
CSLA2:  {c2, t} = m + {H'b0, ll[S-1:H]}
CSLA3:  {c3, u} = hh + {(H-1)'b0, c1|c2, t[S-1:H]}
x*y = { u , t[H-1:0] , ll[H-1:0] }
        S bits  H bits   H bits
```

The two points that are easy to get wrong:

* **c1 and c2 are merged with an OR, and that is exact.** The middle sum
  lh + hl + ll/2^H is at most 2(2^H-1)^2 + 2^H - 1 < 2^(S+1). It therefore
  overflows S bits at most once, so c1 and c2 are never both 1. The carry
  enters CSLA3 at bit H, above the H bits of t that it also adds.
* **c3 is always 0**, because the product fits in 2S bits. The outermost
  c3 is still a port of `vedic_mult`. `vedic_csla_top` checks it with an
  immediate assertion rather than bringing it out. The
  c3 of inner levels is left unconnected.

`vedic_mult` unrolls the recursion into `log2(N)` generate levels. Level
`lv` holds every product of size S = 2^lv. Node (i, j) multiplies
`a[i*S +: S]` by `b[j*S +: S]` and is stored at index `i*(N/S) + j` of that
level's array. Its four children are nodes (2i, 2j), (2i, 2j+1), (2i+1, 2j)
and (2i+1, 2j+1) of the level below. The netlist is the same as a nested
module instantiation. It is written as levels because some tools handle a
self-instantiating module poorly. N must be a power of two, at least 4. A
128x128 multiplier holds 4096 2x2 blocks and 4095 CSLAs.

## The carry select adders

`csla #(WIDTH, KIND)` cuts the word into groups. Group 0 is a plain RCA
that takes `cin`. Every later group gets both possible results ready. The
carry out of the group below drives that group's mux select, so the carry
path is one mux per group.

| group kind | carry-in-0 result | carry-in-1 result | select |
|---|---|---|---|
| regular, K bits (`csla_group_reg`) | HA + (K-1) FA | K FA with carry in 1 | (K+1)-bit 2:1 mux |
| modified, K bits (`csla_group_mod`) | HA + (K-1) FA | (K+1)-bit BEC applied to the carry-in-0 word | (K+1)-bit 2:1 mux |

The BEC (`bec`) computes x = b + 1 modulo 2^W:

```
x0 = ~b0,   x1 = b1 ^ b0,   x2 = b2 ^ (b0 & b1),   xi = bi ^ (b0 & ... & b(i-1))
```

The AND terms form a running chain. The BEC must be one bit wider than its
group because it also turns the group's carry into the carry-in-1 carry.

### Group schedules

| width | linear | square-root |
|---|---|---|
| 4 | 4 | 2, 2 |
| 8 | 4, 4 | 2, 2, 4 |
| 16 | 4 x 4 | 2, 2, 3, 4, 5 |
| 32, 64, 128 | 4 x (W/4) | (2, 2, 3, 4, 5) repeated W/16 times |

The 16-bit schedules are those of the original design. The other rows are
this implementation's reading. They were chosen because the published gate
counts follow from them exactly:

* Above 16 bits, a SQRT adder is a chain of 16-bit SQRT adders. The first
  group of each 16-bit block is a plain RCA fed by the previous block's
  carry. The published 32, 64 and 128-bit SQRT counts are exactly 2, 4 and
  8 times the 16-bit count.
* Below 16 bits, the 2, 2, 3, 4, 5 sequence is cut at the width and the
  last group takes the remainder. This gives the published 4x4 and 8x8
  multiplier counts. A 2, 3, 3 split of 8 bits gives the same count, so
  that choice is not pinned down.
* Linear adders use 4-bit groups at every width. The published 64-bit
  regular linear count (1742) is instead twice the 32-bit count, where
  uniform grouping gives 1807. Uniform grouping is used. The sum is the same
  either way.

Other widths stop elaboration with `$fatal`. LINEAR needs a multiple of 4.
SQRT needs 4, 8, 12 or a multiple of 16.

## Area model

`vedic_pkg` also counts area in unit gates: AND, OR and NOT count 1, XOR 5,
2:1 mux 4, half adder 6 and full adder 13. A (K+1)-bit BEC counts
1 + (K-1) + 5K. `csla_area(kind, width)` and `vm_area(kind, n)` walk the
same group schedule as the RTL. These are the counts of the structure
written here:

| multiplier | REG_LINEAR | MOD_LINEAR | REG_SQRT | MOD_SQRT |
|---|---|---|---|---|
| 4x4 | 221 | 221 | 314 | 272 |
| 8x8 | 1392 | 1308 | 1857 | 1563 |
| 16x16 | 6778 | 6190 | 8731 | 7261 |
| 32x32 | 29726 | 26786 | 37529 | 31061 |
| 64x64 | 124326 | 111306 | 155325 | 128277 |
| 128x128 | 508342 | 453658 | 631717 | 521173 |

The multiplier on modified linear adders is the smallest at every size
(at 4x4 it ties with regular linear, where both adders are plain 4-bit
RCAs). Taken alone, the modified SQRT adder is the smallest from 32 bits
up (672 against 675 units at 32 bits, 2688 against 2811 at 128 bits). At
16 bits modified linear is smaller (319 against 336). These counts match the published
tables except in two places:

* The 5-bit modified SQRT group counts 112 here, where the published table
  has 113. The MOD_SQRT figures are lower by the number of such groups.
* The 64-bit regular linear adder differs as explained above, which carries
  into REG_LINEAR 64x64 and 128x128.

Yosys reports its own cell counts, which are not these units.

## Relation to the published design

The structure follows the paper "Implementation and Comparison of Vedic
Multiplier using Area Efficient CSLA Architectures". The following points
are this implementation's own choices or readings:

* The SQRT grouping outside 16 bits, the 8-bit split, and uniform 4-bit
  linear grouping at 64 bits are described above.
* In the modified SQRT adder, every group is selected by the carry out of
  the group directly below it. The published text names a different carry
  for one group, but its block diagram agrees with this choice. No other
  choice adds correctly.
* The adders inside the multiplier have their carry inputs tied to 0.
* The c1/c2 merge and the unused c3 follow the published block diagrams.
  The proof that the OR is exact is given above.
* The top module holds all four multiplier variants, because the
  published work builds and compares all four.
* The published work was built for an FPGA with vendor tools. Nothing
  here is FPGA-specific.

## Simulating

All files are SystemVerilog 2017. Read the package first:

```
verilator --binary --timing --assert -y rtl rtl/vedic_pkg.sv \
          tb/tb_vedic_csla_top.sv --top-module tb_vedic_csla_top
./obj_dir/Vtb_vedic_csla_top
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. Every
testbench prints one line `TB_RESULT checks=N failures=M` and exits.

| testbench | what it covers |
|---|---|
| `tb_half_adder`, `tb_full_adder`, `tb_vedic_2x2` | exhaustive |
| `tb_mux2` | random words, both selects |
| `tb_rca` | 4-bit exhaustive, 16-bit random and full carry propagation |
| `tb_bec` | 3-bit against the published function table, 6-bit exhaustive |
| `tb_csla_group_reg`, `tb_csla_group_mod` | K = 2..5, exhaustive |
| `tb_csla` | all four kinds at 4..128 bits, corner cases, random, carry through every group |
| `tb_vedic_mult` | all four kinds, 4x4 and 8x8 exhaustive, 16x16 and 32x32 random; counts c1 and c2 events |
| `tb_vedic_csla_top` | the whole design at N = 32: 20,000 operand pairs through all four multipliers; requires c1, c2 and both mux selections to occur |
| `tb_area_model` | the unit-gate counts above against the published tables, allowing for the two known differences |

## Size and tool cost

At N = 128 the top is four multipliers, roughly two million gates when
flattened. Verilator needs about two minutes and 10 GB just to lint it.
A simulation model of the full top is several hundred MB of C++, and
compiling it is estimated at well over an hour on four cores. The largest size
simulated end to end is therefore N = 32 for the whole top. The adders
alone were simulated at all sizes up to 128 bits. The 128-bit structure
is the same recursion, one level deeper than 64 and two deeper than 32.
Full synthesis is slow and memory-hungry too. For experiments, use
`vedic_mult` alone or a smaller `N`; the structure is identical at every
power of two.

## Changing it

* Operand width: `N` on `vedic_csla_top` or `vedic_mult` (power of two, 4 to
  128 or more).
* Adder variant: `KIND` on `vedic_mult` or `csla`.
* Another grouping: edit `csla_num_groups`, `csla_group_size` and
  `csla_group_plain` in `vedic_pkg`. `csla` and the area model both follow
  them.
* Pipelining is not part of the design. Registers could be added between
  the recursion levels of `vedic_mult` (the `g_lvl` blocks).
