# Parallel prefix adders: Brent-Kung, Kogge-Stone, Han-Carlson, Ladner-Fischer and Knowles

A ripple-carry adder is slow because the carry into the top bit has to pass through every
bit below it. A parallel prefix adder computes all carries at once, in a tree whose depth
grows with log2 of the operand width. This library implements the five best-known prefix
trees as parameterized, synthesizable SystemVerilog: Kogge-Stone, Knowles, Brent-Kung,
Ladner-Fischer and Han-Carlson. They are set side by side at 8, 16 and 32 bits, the widths
at which their speed, area and power are usually compared. The five trees compute exactly
the same function. They differ only in how many operators they use, how deep the tree is,
how far each wire fans out and how many wires cross each level. Those differences are what
set delay, area and power once the adder is placed and routed.

## How a prefix adder works

Every adder here has the same three stages:

1. **Bit generate/propagate** (`bit_pg`). For each column i: `g = a & b` (the column
   creates a carry) and `p = a ^ b` (the column passes an incoming carry on).
2. **Prefix tree.** This is built from one operator (`prefix_cell`), which merges the pair
   of a more significant group of columns (`hi`) with the pair of the group just below it
   (`lo`):

       g = hi.g | (hi.p & lo.g)      p = hi.p & lo.p

   The operator is associative: groups can be merged in any bracketing. It is also
   idempotent: the two groups may overlap. The tree uses both properties to merge pairs in
   parallel. When the tree is done, column i holds `G[i:0]`, the generate of columns i
   down to 0. That is the carry out of column i.
3. **Sum.** `sum[0] = p[0]`, `sum[i] = p[i] ^ G[i-1:0]`, `cout = G[WIDTH-1:0]`.

There is no carry in. The ports are `a`, `b`, `sum`, `cout`. The adders are purely
combinational, with no clock, registers or reset.

## The five trees

In the descriptions below, n is the width, L = log2 n, and columns are numbered from 0 at
the least significant end. Level k of a tree has "span" 2^(k-1).

| Tree | Levels | Operators | n = 16 | Max fan-out | Lateral wire tracks |
|---|---|---|---|---|---|
| Kogge-Stone | L | n·L − n + 1 | 49 | 2 | n/2 |
| Knowles [2,1,1,1] | L | n·L − n + 1 | 49 | 3 | n/4 |
| Brent-Kung | 2L − 1 | 2(n − 1) − L | 26 | 2 | 1 |
| Ladner-Fischer | L | (n/2)·L | 32 | n/2 + 1 | 1 |
| Han-Carlson | L + 1 | (n/2)·L | 32 | 2 | n/4 |

Every column of this table is checked by the testbenches, against the functions in
`ppa_pkg` that place the operators. Fan-out counts every node of the next level that
reads a node, its own column included. Wire tracks are the most distinct lateral wires
that cross one column boundary within one level. For a Knowles tree in general, that is
the largest 2^(k-1)/f over its levels.

* **Kogge-Stone** (`kogge_stone_adder`). At level k, every column i ≥ 2^(k-1) merges with
  column i − 2^(k-1). This gives the fewest levels and a fan-out of 2, but also the most
  operators and the most wires.
* **Ladner-Fischer** (`ladner_fischer_adder`), built in its minimum-depth (Sklansky) form.
  At level k the columns are cut into blocks of 2^k. Each column in the upper half of a
  block merges with the last column of the lower half. The tree uses associativity but
  not idempotency. The lateral wire of level k drives 2^(k-1) operators, which is n/2 at
  the last level.
* **Brent-Kung** (`brent_kung_adder`). A reduction tree comes first. At level k ≤ L there
  is an operator in every column where (i+1) is a multiple of 2^k, spanning 2^(k-1). A
  distribution tree follows. At level L+d, operators with span 2^(L−d−1) sit in the
  columns halfway between columns that are already complete. At 16 bits the spans are
  1, 2, 4, 8, then 4, 2, 1. Each level holds only its own operators, so the 16-bit adder
  has 7 levels. Drawings that pull the first distribution operator up into level L have
  one level fewer; they compute the same carries.
* **Han-Carlson** (`han_carlson_adder`). Level 1 merges each odd column with the even
  column below it. Levels 2..L run Kogge-Stone on the odd columns only. A final level
  L+1 merges each even column with the odd column just below it.
* **Knowles** (`knowles_adder`). This is a family of minimum-depth trees, described next.

## The Knowles family, and the `FANOUT` parameter

This is the least obvious part of the library.

A Knowles tree has L levels and an operator in every column that can have one, as
Kogge-Stone does. It lets up to f neighbouring operators of a level share one lateral wire
instead of each having its own. The tree is named by its list of lateral fan-outs, written
**last level first**:

* `[1,1,1,1]` is 16-bit Kogge-Stone.
* `[8,4,2,1]` is 16-bit Ladner-Fischer/Sklansky.
* `[4,4,2,1]` has fan-out 4 at levels 4 and 3, 2 at level 2 and 1 at level 1.

At level k with fan-out f, the operator in column i takes its lateral input from:

    j = (i − 2^(k−1)) | (f − 1)

That is the Kogge-Stone source column, rounded up to the last column of its aligned group
of f. A legal list follows three rules, checked by `ppa_pkg::knowles_valid` at elaboration:

* Every entry is a power of two.
* The entry for level k is at most 2^(k−1).
* The fan-out never shrinks from one level to the next.

Under those rules, the shared source column has always covered everything down to the
column it needs, so every column still ends with `G[i:0]`. The operator count is always
the Kogge-Stone count. A larger fan-out buys fewer distinct lateral wires at the cost of
more load on each.

`FANOUT` has the type `ppa_pkg::fanout_list_t`: six bytes, left-aligned and zero-padded.
For example, `{8'd4, 8'd4, 8'd2, 8'd1, 8'd0, 8'd0}` is [4,4,2,1]. Its default,
`knowles_default(WIDTH)`, is the tree usually picked as the best Knowles tree at each width:

* [2,1,1] at 8 bits
* [4,4,2,1] at 16 bits
* [16,2,2,2,1] at 32 bits

Any other width falls back to Kogge-Stone. At 16 bits, the legality rules admit exactly
14 lists, the size of the 16-bit family; the testbench checks that count. It also builds
and checks 19 published trees:

* 8 bits: [2,1,1], [2,2,1], [4,1,1]
* 16 bits: [2,1,1,1], [2,2,1,1], [2,2,2,1], [4,1,1,1], [4,2,1,1], [4,2,2,1],
  [4,4,1,1], [4,4,2,1], [8,1,1,1], [8,2,1,1], [8,2,2,1], [8,4,1,1]
* 32 bits: [16,2,2,2,1], [16,4,2,2,1], [2,2,2,1,1], [4,4,2,2,1]

It also checks both 16-bit limit cases.

Some published Knowles netlists leave out operators whose results are never used. This
implementation keeps them. Synthesis removes them, and no output changes.

## Files

RTL (`rtl/`):

| File | Contents |
|---|---|
| `ppa_pkg.sv` | `gp_t` pair type, `arch_e` family enum, `fanout_list_t`, operator-placement and counting functions |
| `bit_pg.sv` | per-bit generate/propagate cell |
| `prefix_cell.sv` | the prefix operator |
| `kogge_stone_adder.sv`, `knowles_adder.sv`, `brent_kung_adder.sv`, `ladner_fischer_adder.sv`, `han_carlson_adder.sv` | the five adders; parameter `WIDTH` (default 32, a power of two from 2 to 64); Knowles also takes `FANOUT` |
| `ppa_width_set.sv` | the five families at one width on shared operands |
| `ppa_top.sv` | top: three `ppa_width_set`s at 8, 16 and 32 bits, with ports `a8/b8`, `a16/b16`, `a32/b32` and results `sumW[f]`, `coutW[f]` indexed by `ppa_pkg::arch_e` (0 Brent-Kung, 1 Kogge-Stone, 2 Han-Carlson, 3 Ladner-Fischer, 4 Knowles) |

In each adder, every level of the tree is one generate block `g_level[k]` that holds a row
of `WIDTH` nodes. Each node is either a `prefix_cell` (`g_col[i].g_op.u_op`) or a wire
(`g_wire`). This makes a tree easy to read back from the elaborated hierarchy. To add a
new tree, write one `*_has_op` and one source function in `ppa_pkg`, add them to
`arch_has_op` and `arch_src`, and copy one of the adders.

Testbenches (`tb/`):

| File | What it checks |
|---|---|
| `tb_adder_harness.sv` | shared driver, used by the adder testbenches: checks level, operator, fan-out and wire-track counts, corner cases, a carry started in every column and rippled to the top, and 1250 random vectors (half biased to long propagate runs), all against `a + b` |
| `tb_bit_pg.sv`, `tb_prefix_cell.sv` | exhaustive truth tables; the operator test also checks associativity over all triples |
| `tb_kogge_stone_adder.sv`, `tb_brent_kung_adder.sv`, `tb_han_carlson_adder.sv`, `tb_ladner_fischer_adder.sv` | each family at 8, 16 and 32 bits |
| `tb_knowles_adder.sv` | the 19 published Knowles trees, the two limit cases, the defaults, rejection of an illegal list, and the count of 14 legal 16-bit lists |
| `tb_ppa_top.sv` | the whole top at its default sizes: 1250 random and directed vectors per width. Checks all 15 adders against `a + b` and against each other, and fails if a carry out, a full-width carry chain or a killed carry never occurred at some width |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
One vector is applied per 10 ns clock cycle and checked in the same cycle.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/ppa_pkg.sv tb/tb_ppa_top.sv --top-module tb_ppa_top
    ./obj_dir/Vtb_ppa_top

Replace `tb_ppa_top` with any testbench name. The include paths let Verilator find each
module in the file of the same name. Every testbench finishes in well under a second.

## How far to trust it, and where it departs from published netlists

* All adders, at every width and tree exercised above, match `a + b` on every vector. For
  each module, a copy with one deliberate wiring or logic fault was checked and fails its
  testbench.
* **Not covered:** delay, area and power in a given technology. These were the point of
  the original comparison (32 nm and 45 nm standard-cell implementations after place and
  route), and they depend on cell mapping and buffering. The RTL fixes the tree topology,
  which sets those figures; the cell library and buffering are left to synthesis.
* **Buffers, and the choice between inverting and non-inverting prefix gates, are not in
  the RTL.** `prefix_cell` is written as the non-inverting AND-OR function.
* **Brent-Kung** uses 2·log2(n) − 1 levels. A listing that merges the first distribution
  operator into the last reduction level computes the same carries with one level fewer.
* **Ladner-Fischer** is the minimum-depth (Sklansky) member of the family: n/2 operators
  per level, (n/2)·log2(n) in all.
* **Knowles** trees keep every operator. Pruning the unused ones gives the same results.
* **There is no carry in.** To add one, treat it as the generate of a column −1: merge it
  into column 0 before the tree.
* `WIDTH` must be a power of two from 2 to 64; other values stop elaboration with an error.
