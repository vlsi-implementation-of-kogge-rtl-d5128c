# Kogge-Stone parallel-prefix adder, 32 bits

A ripple-carry adder is slow because bit *i* cannot settle until the carry out
of bit *i-1* has arrived: the worst case passes a carry through all 32 bits.
A Kogge-Stone adder removes that chain. It works out every carry
directly from the operands, in a logarithmic number of steps. For 32 bits
that is 5 levels of two-input cells, and every carry is ready after the same
5 levels. The price is area and wiring: the carry tree has 129 cells and many
long horizontal wires.

`koggestone_zfc` computes `{c32, sum} = a + b + c0` for 32-bit `a` and `b`.
It is purely combinational. There is no clock, register or reset, and the
outputs are valid once the logic has settled.

```
 a[31:0] b[31:0]
     |     |
 +---v-----v----------+
 | ksa_pre_processing |  p_i = a_i ^ b_i ,  g_i = a_i & b_i
 +---------+----------+
           | pg_bit[31:0]  ----------------------------+
 +---------v----------+                                |
 | ksa_carry_tree     |  5 levels, 129 black cells     |
 +---------+----------+                                |
           | pg_grp[31:0] = (G[i:0], P[i:0])           |
 +---------v----------+                                |
 | ksa_parallel_carry |<-- c0   32 gray cells          |
 +---------+----------+                                |
           | carry[32:0]                               |
 +---------v----------+                                |
 | ksa_post_processing|<-------------------------------+
 +---------+----------+   sum_i = p_i ^ carry[i]
           |
   sum[31:0], c32 = carry[32]
```

## Generate, propagate and spans

Every bit position is summarised by two signals:

* **generate** `g_i = a_i & b_i`: the bit produces a carry whatever comes in;
* **propagate** `p_i = a_i ^ b_i`: the bit passes an incoming carry on.

The same two signals describe a contiguous span of bits `i:j` (bit *i* down
to bit *j*). `G[i:j]` means the span produces a carry out of bit *i* on its
own. `P[i:j]` means a carry entering at bit *j* leaves at bit *i*. Two adjacent
spans, an upper `i:k` and a lower `k-1:j`, merge into `i:j` by the prefix
operator:

```
P[i:j] = P[i:k] & P[k-1:j]
G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
```

The operator is associative, so the spans can be merged in any tree shape.
The adder is built from two versions of it:

| cell | module | computes | used for |
|---|---|---|---|
| black cell | `ksa_black_cell` | `G[i:j]` and `P[i:j]` | every node of the carry tree |
| gray cell | `ksa_gray_cell` | `G[i:j]` only | merging the carry-in (the lower span's propagate is not needed) |

The pair `(g, p)` travels as one packed struct, `ksa_pkg::pg_t`. Its field
order is `{g, p}`.

## The carry tree (recursive doubling)

`ksa_carry_tree` has `ceil(log2 N)` levels. At level *l* the distance is
`d = 2**(l-1)`. Every bit `i >= d` merges the span it holds (length `d`,
ending at bit *i*) with the span held by bit `i-d`. Bits below `d` already
reach bit 0 and pass through unchanged. Each level doubles every span, so after
the last level bit *i* holds `(G[i:0], P[i:0])`.

| level | distance | black cells (N = 32) | span held by bit *i* afterwards |
|---|---|---|---|
| 1 | 1 | 31 | `i : i-1` |
| 2 | 2 | 30 | `i : i-3` |
| 3 | 4 | 28 | `i : i-7` |
| 4 | 8 | 24 | `i : i-15` |
| 5 | 16 | 16 | `i : i-31` (all bits) |
|   |    | **129** = n·log2 n − n + 1 | |

Each cell output feeds at most two cells of the next level: the one at the
same position and the one `d` positions higher. This small, uniform fan-out
is what makes Kogge-Stone fast. The cost is the lateral wiring, whose length
doubles at every level.

Inside the module, `lvl[l][i]` is the pair bit *i* holds after level *l*, and
`lvl[0]` is the tree's input. The generate loops are named
`g_level[l].g_bit[i].g_node.u_black`, which makes any node easy to find in a
waveform viewer.

## Where the carry-in enters

Textbooks often feed the carry-in into bit 0 before the tree
(`g_0' = g_0 | p_0 & c0`). Here the tree sees only `a` and `b`. The carry-in
is merged afterwards, for all bits at once, by one row of gray cells in
`ksa_parallel_carry`:

```
carry[0]   = c0
carry[i+1] = G[i:0] | (P[i:0] & c0)      i = 0 .. N-1
```

`carry[i]` is the carry **into** bit *i*, so `carry[0]` is `c0` and
`carry[32]` is the carry-out `c32`. This is why every tree node must be a
black cell: the row needs `P[i:0]` for every bit. Merging the carry-in this
way keeps the tree at exactly n·log2 n − n + 1 nodes. It also adds one
AND-OR level after the tree.

The last stage, `ksa_post_processing`, needs only the per-bit propagates and
the carry vector: `sum[i] = p_i ^ carry[i]`.

Synthesis reports 322 two-input ANDs, 161 ORs and 64 XORs for N = 32. That is
129 black cells, 32 gray cells, 32 generate ANDs, and 32 XORs each for the
propagates and the sums.

## Reference vector

One 32-bit operand pair with carry-in set is the design's reference point:

| signal | value |
|---|---|
| `a` | `0x56AA548A` (`01010110101010100101010010001010`) |
| `b` | `0x6AAA5555` (`01101010101010100101010101010101`) |
| `c0` | 1 |
| `g` = a & b | `01000010101010100101010000000000` |
| `p` = a ^ b | `00111100000000000000000111011111` |
| `sum` | `0xC154A9E0` (`11000001010101001010100111100000`) |
| `c32` | 0 |

`tb_koggestone_zfc` checks this vector literally.

## Files

| file | content |
|---|---|
| `rtl/ksa_pkg.sv` | `pg_t` struct and `ks_levels()` |
| `rtl/ksa_pre_processing.sv` | per-bit generate and propagate |
| `rtl/ksa_black_cell.sv` | full prefix operator |
| `rtl/ksa_gray_cell.sv` | generate-only prefix operator |
| `rtl/ksa_carry_tree.sv` | Kogge-Stone tree of black cells |
| `rtl/ksa_parallel_carry.sv` | carry-in merge, one gray cell per bit |
| `rtl/ksa_post_processing.sv` | sum bits and carry-out |
| `rtl/koggestone_zfc.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_koggestone_zfc_small.sv` | exhaustive test of the adder at N = 6 and N = 8 |

### Parameter

`N` (operand width) defaults to 32 on every module. Any `N >= 1` works,
including widths that are not a power of two. The tree then has
`ceil(log2 N)` levels, and the last level simply has fewer cells. The top's
carry-out port keeps the name `c32` whatever `N` is.

## Verification

Each testbench compares the module with a reference built a different way,
and prints `TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

* `tb_ksa_black_cell` and `tb_ksa_gray_cell`: all input combinations.
* `tb_ksa_pre_processing`: the per-bit definitions and the identity
  `a + b = p + 2g`.
* `tb_ksa_carry_tree`: checked against a serial walk over bits 0..i. At
  N = 32 it uses directed and random inputs. At N = 7 it tries all 2^14
  inputs.
* `tb_ksa_parallel_carry` and `tb_ksa_post_processing`: checked against case
  analysis and a ripple-carry model.
* `tb_koggestone_zfc`: the top at its default N = 32, compared with
  `a + b + c0` as a 33-bit integer. It runs the reference vector, then carry
  chains of every length 1..32 (started by a generate at bit 0, or entered
  through `c0`), then corner values and 20,000 random vectors. It counts how
  often each of these happens:
  * the carry-in changes the result;
  * a carry-out occurs;
  * a carry propagates over the whole word;
  * a carry chain needs each tree level 1..5.

  A case that never happens counts as a failure.
* `tb_koggestone_zfc_small`: all operand pairs and both carry-in values at
  N = 8 and N = 6.

Each testbench was also run against a deliberately broken copy of its module,
and each one failed.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/ksa_pkg.sv tb/tb_koggestone_zfc.sv --top-module tb_koggestone_zfc
./obj_dir/Vtb_koggestone_zfc
```

Replace the testbench name to run any other testbench. Each one finishes in
well under a second.

## How this relates to the published design

Taken from the published design:

* the three-stage structure and its order (pre-processing, carry
  generation with black and gray cells and a parallel carry stage,
  post-processing);
* the generate, propagate, black-cell, gray-cell and sum equations;
* `log2 n` levels and n·log2 n − n + 1 tree nodes;
* the top-level name and ports `a[31:0]`, `b[31:0]`, `c0`, `sum[31:0]`,
  `c32`;
* the reference vector.

Choices made here:

* **Parallel carry stage.** The published design names this stage but does
  not describe it. Here it is the gray-cell row that merges `c0` into every
  group signal (see above). All tree nodes are therefore black cells.
* **Carry equation.** The published carry equation,
  `C_i = (P_i & C_{i-1}) | G_i`, is written in ripple form. This design
  applies it at group level in the parallel carry row, not bit by bit.
* **Internal signal names.** The published simulation shows internal buses
  named `u`, `w`, `y` and `c`. This RTL does not reproduce those names.
  `carry[31:1]` corresponds to the published `c[31:1]`.
* **ZFC.** The design's name refers to "ZFC (zero finding logic)", but no
  function is given for it: no equation, stage, port or output. No zero
  detection is implemented. A zero flag, if wanted, would be
  `sum == '0 && !c32`, added outside the adder.
* **Timing.** The published delay figures (about 5.5 ns total, on an
  unnamed FPGA flow) describe an implemented netlist. This RTL has the same
  logic depth but makes no timing claim.
