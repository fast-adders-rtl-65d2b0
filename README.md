# Fast binary adders: carry-select, carry look-ahead and parallel prefix

A ripple-carry adder is slow because the carry into bit *i* waits for every
bit below it. Each adder here removes that wait in a different way:

- **Carry select**: compute each group's result for both possible carries
  in. The late carry then only drives a multiplexer.
- **Carry look-ahead (CLA)**: write the carries as flat sums of products of
  per-bit *generate* and *propagate* signals. Do this in a hierarchy so that
  no gate gets too wide.
- **Parallel prefix**: treat carry computation as a prefix problem over an
  associative operator. Then evaluate it with a tree of log2(N) levels. The
  Kogge-Stone, Ladner-Fischer, Knowles and Han-Carlson adders are different
  trees for the same problem.

All blocks are purely combinational. They have no clock, no registers and no
handshake. Outputs settle from the inputs through gate delay only. The main
design is the 8-bit Kogge-Stone adder. The other adders are companion
examples of the same ideas, and the top level puts them side by side.

## The signals every adder is built on

For operand bits A_i and B_i:

| signal | formula | meaning |
|---|---|---|
| G_i (generate) | A_i & B_i | bit *i* makes a carry whatever comes in |
| P_i (propagate) | A_i \| B_i | bit *i* passes an incoming carry on |
| Psum_i (partial sum) | A_i ^ B_i | the sum bit before the carry is added |

From these, C_{i+1} = G_i | P_i·C_i and S_i = Psum_i ^ C_i.

Propagate uses the OR form throughout. The XOR form, A_i ^ B_i, gives the
same carries and is common elsewhere. With OR, P_i is also 1 when both bits
are 1. That case is harmless because G_i is then 1 as well.

The pair (P,G) of a span of bits i:j says whether that span generates a
carry and whether it passes one through. The package `adder_pkg` defines the
pair as the packed struct `pg_t`.

## Parallel-prefix adders (the main design)

### The operator "o"

Two adjacent spans combine like this. The upper span is i:m and the lower
span is m-1:j.

    (P_i:m, G_i:m) o (P_m-1:j, G_m-1:j) = (P_i:m & P_m-1:j,  G_i:m | P_i:m & G_m-1:j)

The combined span generates a carry if the upper part generates one, or if
the upper part passes on a carry made in the lower part. It propagates only
if both parts propagate.

The operator is associative but not commutative. Any bracketing of
(i:i) o (i-1:i-1) o ... o (0:0) therefore gives the same result (P,G)_i:0.
Each prefix adder is one particular bracketing, drawn as a graph of
operator nodes (`prefix_op`).

Once every bit *i* holds (P,G)_i:0, the carry in is folded in at the bottom
(`prefix_sum`):

    C_i+1 = G_i:0 | P_i:0 & C0,   S_i = Psum_i ^ C_i

C0 does not enter the prefix tree. It costs one AND-OR per bit at the end.

### The four prefix graphs

In this notation, node (i:j) holds the pair of span i:j. All four 8-bit
graphs end with (7:0) … (0:0).

**Kogge-Stone** (`kogge_stone_adder`, N = 8 by default). At level k, every
bit *i* ≥ 2^(k-1) combines with bit i − 2^(k-1). Every node drives exactly
one other node sideways. The cost is the largest node count and the most
wiring.

    level 1: (7:6) (6:5) (5:4) (4:3) (3:2) (2:1) (1:0)
    level 2: (7:4) (6:3) (5:2) (4:1) (3:0) (2:0)
    level 3: (7:0) (6:0) (5:0) (4:0)                       17 nodes, 3 levels

**Ladner-Fischer** (`ladner_fischer_adder`, N = 8). Within blocks of 2^k
bits, the top bit of the lower half feeds every bit of the upper half. This
gives the fewest nodes in minimum depth, but fan-out grows to N/2.

    level 1: (7:6) (5:4) (3:2) (1:0)
    level 2: (7:4) (6:4) (3:0) (2:0)      (5:4), (1:0) drive 2 nodes
    level 3: (7:0) (6:0) (5:0) (4:0)      (3:0) drives 4 nodes  — 12 nodes, 3 levels

**Knowles** (`knowles_adder`, fixed at 8 bits). Kogge-Stone and
Ladner-Fischer are the two ends of a family of minimum-depth graphs, which
differ in the fan-out used at each level. This member has fan-out 1, 1 and 4
at levels 1, 2 and 3:

    level 1: (7:6) (6:5) (5:4) (3:2) (2:1) (1:0)
    level 2: (7:4)=(7:6)o(5:4)  (6:4)=(6:5)o(4:4)  (3:0)=(3:2)o(1:0)  (2:0)=(2:1)o(0:0)
    level 3: (7:0) (6:0) (5:0) (4:0), all from (3:0)        14 nodes, 3 levels

**Han-Carlson** (`han_carlson_adder`, N = 8). It adds one level to save about
half the Kogge-Stone nodes, while keeping fan-out low:

1. Each odd bit combines with the even bit below it.
2. A Kogge-Stone tree runs over the odd bits only.
3. A final level gives each even bit *i* > 0 the finished prefix of bit
   *i − 1*.

    level 1: (7:6) (5:4) (3:2) (1:0)
    level 2: (7:4) (5:2) (3:0)
    level 3: (7:0) (5:0)
    level 4: (6:0) (4:0) (2:0)                              12 nodes, 4 levels

Kogge-Stone, Ladner-Fischer and Han-Carlson are generated from a loop and
take any N. N is meant to be a power of two, and the testbenches also check
N = 16 and 32. The Knowles graph is written out node by node for 8 bits,
because only that member is defined here.

## Carry look-ahead adders

`cla_lcu4` is a 4-way look-ahead carry unit. It takes four (P,G) pairs and a
carry in. It returns all four carries and the group pair, each as one flat
sum of products, for example:

    C4 = G3 | P3 G2 | P3 P2 G1 | P3 P2 P1 G0 | P3 P2 P1 P0 C0
    G_3:0 = G3 | P3 G2 | P3 P2 G1 | P3 P2 P1 G0,   P_3:0 = P3 P2 P1 P0

The same unit works at every level of the hierarchy. Only the meaning of its
inputs changes.

- **`cla_adder16`**: 16 bits as four 4-bit *groups*. The group units give
  the group pairs (G_i+3:i, P_i+3:i). A block-level unit turns them and C0
  into the group carries C4, C8, C12 and C16 = G_15:0 | P_15:0·C0. Each
  group unit then forms the carries inside its group from its group carry.
  There is no combinational loop: a unit's group pair does not depend on
  its carry in. The block pair (P_15:0, G_15:0) is an output.
- **`cla_adder64`**: four 16-bit *blocks* under one more unit, at the
  *section* level. That unit takes the block pairs and C0 and gives the
  block carries C16, C32, C48 and C64. The section pair is an output.

At each level the carry out is produced twice: by the level's own unit and
by the unit above it. An `assert final` checks that the two agree.

## Carry-select adder

`csel_group` holds two W-bit ripple adders on the same operand slice. One
assumes carry in 0 and the other assumes carry in 1. The real carry in
drives two 2:1 multiplexers: one picks the sum and the other the carry out.
`carry_select_adder` chains N/W of these groups. The group carries ripple
through one multiplexer per group. They are brought out on `gc` (bit 0 is
c0) so that they can be observed. The defaults are N = 16 and W = 4, with
groups of equal size.

## Top level

`fast_adders_top` instantiates each adder once, with its own ports and
nothing shared:

| prefix | adder | extra outputs |
|---|---|---|
| `ks_` | 8-bit Kogge-Stone | |
| `lf_` | 8-bit Ladner-Fischer | |
| `kn_` | 8-bit Knowles | |
| `hc_` | 8-bit Han-Carlson | |
| `cla_` | 16-bit CLA | `cla_blk_p`, `cla_blk_g` |
| `cla64_` | 64-bit CLA | `cla64_sec_p`, `cla64_sec_g` |
| `csel_` | 16-bit carry select | `csel_gc[3:0]` |

Every adder has ports `*_a`, `*_b`, `*_c0`, `*_s` and `*_cout`.

## How far to trust it, and where it is this design's own choice

The tests found no errors:

- All four 8-bit prefix adders were checked exhaustively: 256 × 256 × 2 =
  131072 additions each, with no failure.
- The 16-bit and 64-bit CLA adders and the carry-select adder were checked
  on directed corner cases plus 100k–200k random additions.
- The 4-bit and 6-bit select groups and an 8-bit carry-select adder were
  checked exhaustively.

Each testbench was also run against a copy of its block with one deliberate
fault, and it caught the fault.

These parts follow the classic structures exactly:

- The Kogge-Stone 8-bit graph.
- The OR-form propagate.
- The carry and sum stage.
- The CLA equations for groups and blocks.
- The Ladner-Fischer and Knowles 8-bit graphs.

These are the design's own choices:

- **Han-Carlson graph.** Han-Carlson is usually described only as "one extra
  final stage of low fan-out". The arrangement built here (odd-bit
  Kogge-Stone followed by an even-bit fix-up) is the standard one.
- **CLA section level.** The 64-bit section level repeats the group-to-block
  step once more. Its width of 64 is a consequence of that choice.
- **Carry-select sizes.** The width (16), the group width (4) and ripple
  inner adders are choices. A variant whose higher groups are wider, to
  balance delays, is not built.
- **Carry-select carry out.** The carry out is picked by a multiplexer, the
  same as the sum.
- **Width generators.** The loops that build Kogge-Stone, Ladner-Fischer and
  Han-Carlson for widths other than 8 are generalisations.
- **Knowles coverage.** For 8 bits, the Knowles family has other members
  besides the one built here, with other fan-out patterns. They are not
  built.

Nothing here gives delays or areas. Depth is counted in operator levels
only.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`, and the top
level has `tb/tb_fast_adders_top.sv`. A testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`. The package must come first on the
command line, for example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/adder_pkg.sv \
        tb/tb_kogge_stone_adder.sv --top-module tb_kogge_stone_adder
    ./obj_dir/Vtb_kogge_stone_adder

- The Kogge-Stone testbench first replays ten sample additions, such as
  36 + 129 + 1 = 166 and 237 + 140 + 1 = 378. It then runs the exhaustive
  sweep.
- The top-level testbench runs every adder at its default size. It counts
  how often each carry mechanism was exercised, and fails if any never was.
  The mechanisms are:
  - a carry rippling from C0 across all bits;
  - a carry generated in bit 0 reaching the carry out;
  - CLA block and section propagate and generate;
  - carries crossing a whole group or block;
  - each carry-select choice, and a carry selected through every group.

Each testbench runs in well under a second.

## Files

- `rtl/adder_pkg.sv`: the `pg_t` pair.
- `rtl/pg_gen.sv`, `prefix_op.sv`, `prefix_sum.sv`: the bit-level signals,
  the operator "o", and the carry and sum stage.
- `rtl/kogge_stone_adder.sv`, `ladner_fischer_adder.sv`, `knowles_adder.sv`,
  `han_carlson_adder.sv`: the prefix adders.
- `rtl/cla_lcu4.sv`, `cla_adder16.sv`, `cla_adder64.sv`: carry look-ahead.
- `rtl/ripple_adder.sv`, `csel_group.sv`, `carry_select_adder.sv`: carry
  select.
- `rtl/fast_adders_top.sv`: the top level.
- `tb/tb_*.sv`: one testbench per module listed above, except
  `ripple_adder`, which is tested through `csel_group`.
