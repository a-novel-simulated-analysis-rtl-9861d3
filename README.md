# Enhanced 8-bit carry increment adder

An 8-bit adder that splits its operands into two 4-bit halves and adds both
halves **at the same time**. The upper half is added as if no carry came
from below; when the lower half does produce a carry, a short chain of half
adders increments the upper result afterwards. The 4-bit adder in each half
is interchangeable: ripple carry, carry look-ahead, or one of four parallel
prefix adders (Kogge-Stone, Ladner-Fischer, Han-Carlson, Beaumont-Smith).
Any of the 36 upper/lower combinations is a parameter setting of the same
RTL. The default puts a Han-Carlson adder in both halves. Of the
combinations that were compared in FPGA synthesis, that one had the
shortest delay.

All logic is combinational: there is no clock, no reset and no state.

## How the carry increment works

```
   a[7:4] b[7:4]                      a[3:0] b[3:0]
      |     |                            |     |
   +--------------+ ci=0              +--------------+
   | upper adder4 |<--                | lower adder4 |<-- cin
   +--------------+                   +--------------+
    |con   | t[3:0]                     | co1    | s[3:0]
    |      v                            |        v
    |  +-------------------------+      |
    |  | increment circuit       |<-----+
    |  | HA1 -> HA2 -> HA3 -> HA4|
    |  +-------------------------+
    |      | s[7:4]        | cinc
    v                      v
    +--------- OR ---------+--> cout
```

* The lower adder computes `s[3:0]` and `co1` from `a[3:0] + b[3:0] + cin`.
* The upper adder computes `t = a[7:4] + b[7:4]` with carry in 0. Its carry
  out is `con`. It does not wait for `co1`, so both halves finish in the
  time of one 4-bit addition.
* The increment circuit adds the single bit `co1` to `t`. HA1 adds `co1` to
  `t[0]` and gives `s[4]`. Each following half adder adds the carry of the
  one before to the next bit, giving `s[5]`, `s[6]` and `s[7]`. The carry
  out of HA4 is `cinc`.
* `cout = con | cinc`. This is exact, not an approximation. `cinc` can be 1
  only when `t = 4'b1111`. Then `a[7:4] + b[7:4] = 15` and `con = 0`. So at
  most one of the two carries is 1, and an OR is enough where an adder would
  otherwise be needed. Both testbenches check this exclusivity on every input.

The critical path is one 4-bit addition, then the increment chain (up to
four half adders), then the OR. The choice of 4-bit adder only changes the
first part. That is why the architecture of the 4-bit blocks is the knob
this design exposes.

## The six 4-bit adders

All six have the same ports: `a[3:0]`, `b[3:0]`, `ci` in and `s[3:0]`, `co`
out, with `{co, s} = a + b + ci`. They differ only in how the carries are
formed. Bit `i` has propagate `p_i = a_i ^ b_i` and generate
`g_i = a_i & b_i`. The sum is always `s_i = p_i ^ c_i`.

| module | kind (`adder_kind_e`) | carry network |
|--------|------|----------------|
| `rca4` | `ADD_RCA` | four `full_adder` cells; each carry ripples to the next stage |
| `cla4` | `ADD_CLA` | one look-ahead unit computes `c1..c4` from `p`, `g` and `c0` as two-level sums of products of `c_{i+1} = g_i \| p_i c_i` |
| `ksa4` | `ADD_KSA` | Kogge-Stone prefix tree, 2 levels |
| `lfa4` | `ADD_LFA` | Ladner-Fischer prefix tree, 2 levels |
| `hca4` | `ADD_HCA` | Han-Carlson prefix tree, 3 levels |
| `bsa4` | `ADD_BSA` | Beaumont-Smith prefix tree, 1 level of high-valency cells |

### Prefix trees

A prefix adder merges the `(g, p)` pairs of neighbouring bit groups with the
carry operator `pg_combine` (in `cia_pkg`):

```
(G, P) = (g_hi | p_hi & g_lo,  p_hi & p_lo)
```

When column `i` holds the group generate `G[i:0]`, that value is the carry
into bit `i+1`. The four trees differ in which merges they do and in what
order. `i:j` below means the group of bits `i` down to `j`.

```
              column:  3      2      1      0
Kogge-Stone   level 1  3:2    2:1    1:0    .
              level 2  3:0    2:0    .      .       (merge with 1:0 and with bit 0)
Ladner-Fischer level 1 3:2    .      1:0    .
              level 2  3:0    2:0    .      .       (both merge with the one 1:0 node)
Han-Carlson   level 1  3:2    .      1:0    .
              level 2  3:0    .      .      .       (odd columns only)
              level 3  .      2:0    .      .       (extra level for the even column)
Beaumont-Smith level 1 3:0    2:0    1:0    .       (2-, 3- and 4-input cells)
```

Kogge-Stone uses the most cells and has fan-out at most 2. Ladner-Fischer
reaches the same depth with fewer cells, but one node drives two cells.
Han-Carlson does a Kogge-Stone step on the odd columns only. It then spends
one extra level to finish the even columns, which saves cells and wiring.
At 4 bits the Han-Carlson placement coincides with a Brent-Kung tree; the
two only differ at larger widths. Beaumont-Smith uses cells that merge up to
four groups at once, so at 4 bits a single level suffices.

**Carry in.** A prefix tree has no carry input of its own. Here the carry in
is folded into bit 0 as `g_0' = g_0 | p_0 & ci`. Every group generate then
already includes it, and no extra level is needed. This matters only for the
lower adder: the upper one always gets `ci = 0`.

## Configuration

`enhanced_cia8` has two parameters of type `cia_pkg::adder_kind_e`:

| parameter | default | meaning |
|-----------|---------|---------|
| `UPPER_ADDER` | `ADD_HCA` | 4-bit adder for bits 7..4 (carry in tied to 0) |
| `LOWER_ADDER` | `ADD_HCA` | 4-bit adder for bits 3..0 (takes `cin`) |

A combination is written UPPER-LOWER. For example, HCA-RCA is a Han-Carlson
upper adder over a ripple carry lower adder. RCA-RCA is the basic carry
increment adder. The helper `adder4` turns the kind into the matching module
with a generate `if`, so only the two chosen adders are elaborated.

The width is fixed at 8 bits in two groups of 4. No width parameter is
provided.

## Files

| file | content |
|------|---------|
| `rtl/cia_pkg.sv` | `adder_kind_e`, `pg_t`, `pg_combine` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `rtl/rca4.sv`, `rtl/cla4.sv`, `rtl/ksa4.sv`, `rtl/lfa4.sv`, `rtl/hca4.sv`, `rtl/bsa4.sv` | the 4-bit adders |
| `rtl/adder4.sv` | selects one 4-bit adder by parameter |
| `rtl/increment_circuit.sv` | four chained half adders |
| `rtl/enhanced_cia8.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_enhanced_cia8.sv` | all 36 combinations side by side, all 2^17 inputs |
| `tb/tb_enhanced_cia8_full.sv` | default configuration, all 2^17 inputs |

## Verification

Every testbench is exhaustive. It tries all input combinations of its module
and compares the outputs with an integer sum computed in the testbench. It
then prints `TB_RESULT checks=N failures=M`. Coverage counters make a test
fail if a mechanism never fires. For the 4-bit adders these are a carry out
and a carry propagating through all four bits. For the increment circuit, a
carry rippling through all four half adders. For the top: a carry in, a
lower carry feeding the increment circuit, that carry reaching `cout`, and a
carry out of the upper adder. Each test was also run against a deliberately
broken copy of its module (a wrong carry term or a miswired stage) and
reported failures.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl \
    rtl/cia_pkg.sv tb/tb_enhanced_cia8.sv --top-module tb_enhanced_cia8
./obj_dir/Vtb_enhanced_cia8
```

Replace the testbench name to run another. Each completes in well under a
second.

## What is not reproduced, and where this RTL makes its own choices

* **Delay and area figures.** The comparison this design comes from reports
  FPGA slice/LUT counts and delays in ns for each 4-bit adder and each
  combination. Those depend on a vendor synthesis flow and are not
  reproduced here. Functional behaviour is the same for all combinations.
  Only structure and timing differ.
* **Combination naming.** The original comparison names combinations such
  as HCA-RCA without saying which adder sits in which half. This RTL reads
  the first name as the upper adder.
* **Default.** The Han-Carlson combination in both halves was chosen as the
  default because it was reported as the fastest. Ladner-Fischer
  combinations were reported as the smallest in area; use
  `ADD_LFA` for that.
* **Carry in of the prefix adders** is folded into bit 0 (see above). The
  original prefix-tree drawings have no carry input.
* **Han-Carlson tree.** Its 4-bit node placement follows the Han-Carlson
  construction: Kogge-Stone on odd columns, then one extra level for even
  columns. The three-level depth matches the original drawing; the exact
  wiring of that drawing could not be confirmed.
* **Beaumont-Smith depth.** A logic depth of 2 log(2n-1) is quoted for this
  adder family. This RTL follows the drawn 4-bit network instead, which is
  one level of 2-, 3- and 4-input cells.
* **Look-ahead unit** of `cla4`: the carries are written as flat sums of
  products. The internal form of the unit was not specified.
* **Selectable architecture.** The combinations are parameters of one
  top-level module rather than 36 separate designs.
