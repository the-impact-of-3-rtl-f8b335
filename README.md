# 64-bit prefix adders and barrel shifter for a two-die (3D) stack

Not every circuit gains the same from stacking dies. In a 64-bit adder the critical path is mostly
gate delay, and only the top levels of the carry tree drive long wires. In a 64-bit barrel shifter
the wires dominate: a bit may have to travel across the whole word, and each multiplexer level
needs wires twice as long as the one before. A face-to-face two-die stack joins the dies with
dense, short die-to-die (D2D) vias. It can place odd bit columns on one die and even bit columns
on the other. The circuit's footprint then halves, and so does every wire that runs across the bit
columns.

This RTL gives the four units that the study "The Impact of 3-Dimensional Integration on the
Design of Arithmetic Units" compares, all 64 bits wide:

| unit | module | character |
|---|---|---|
| Brent-Kung adder | `bk_adder` | fewest nodes, two passes through the tree, deepest |
| Sklansky adder | `sk_adder` | minimum depth, fan-out doubles each level |
| Kogge-Stone adder | `ks_adder` | minimum depth, fan-out two, most nodes and wire |
| barrel shifter | `barrel_shifter` | six multiplexer levels, wire length doubles per level |

`arith_units_3d` is the top level: it places the four units side by side.

The study evaluated each unit as a transistor-level circuit, in 2D and in 3D. It reports these
reductions for the 3D versions:

| unit | latency | energy |
|---|---|---|
| Brent-Kung adder | 1.5 % | 3.4 % |
| Sklansky adder | 1.8 % | 0.6 % |
| Kogge-Stone adder | 3.7 % | 2.6 % |
| barrel shifter | 8.8 % | 7.7 % |

**How far this RTL goes.** The 3D partition is a floorplan: the logic function and the netlist are
the same in 2D and 3D. So this RTL describes the logic of both, and simulation cannot reproduce the
latency and energy figures above. It is a correct, synthesizable statement of how each unit
computes, with the tree shapes that set its wiring. It does not model die assignment, via counts
or timing.

## The prefix node

Every adder is built from one operator. Each bit produces a pair:

- generate `g = a & b`;
- propagate `p = a ^ b`.

Suppose a node receives the pair of an upper bit span `[i:k]` and the pair of the adjacent lower
span `[k-1:j]`. It produces the pair of `[i:j]`:

    g = g_hi | (p_hi & g_lo)
    p = p_hi & p_lo

This is `pg_node`. The package `arith_pkg` holds the function and the `pg_t` struct it works on.
Because the operator is associative, any tree that builds span `[i:0]` for every `i` gives the same
carries. The three adders differ only in which nodes they place and how they wire them.

In all three adders the carry-in is folded into bit 0, where `g0 = a0&b0 | p0&cin`. The final
generate of span `[i:0]` is then the carry out of bit `i`. The sum is `sum[i] = p[i] ^ c[i]`, with
`c[0] = cin` and `c[i] = G[i-1:0]`. `cout` is `G[63:0]`.

## Three carry trees

Let `d = 2**l` be the distance covered at level `l`, and `W` the width.

**Kogge-Stone (`ks_adder`), log2 W levels (6 at 64 bits).** At level `l`, every column `i >= d`
combines its span with the span in column `i-d`. Columns below `d` pass their value on unchanged.
After level `l` each column covers `2d` bits, or reaches bit 0. Each node drives at most two nodes.
This is what makes the tree fast, but it needs about `W*log2 W` nodes and a wire for each. For 8
bits, the spans after each level are 0-1…6-7, then 0-2…4-7, then 0-4…0-7.

**Sklansky (`sk_adder`), log2 W levels.** At level `l` the word splits into blocks of `2d` bits.
Every column in the upper half of a block combines with the top column of the lower half,
`((i>>l)<<l) - 1`. That column already holds the prefix down to bit 0. One node therefore feeds `d`
nodes: fan-out and wire length double at every level, but the node count is only `(W/2)*log2 W`.
For 8 bits: 0-1, 2-3, 4-5, 6-7; then 0-2, 0-3, 4-6, 4-7; then 0-4…0-7.

**Brent-Kung (`bk_adder`), 2·log2 W − 1 levels (11 at 64 bits).** The tree runs in two passes:

- **Reduction pass** (`g_up`), distances 1 up to W/2. Column `i` combines with `i-d` when `i+1` is
  a multiple of `2d`. This is a binary tree: columns `2**k - 1` end up with their full prefix,
  while the others hold partial spans. For 8 bits it builds 0-1, 2-3, 4-5, 6-7, then 0-3, 4-7, then
  0-7.
- **Distribution pass** (`g_down`), distances W/4 down to 1. Columns `3d-1, 5d-1, …` combine their
  partial span with the finished prefix `d` columns below. For 8 bits: 0-5 at distance 2, then 0-2,
  0-4, 0-6 at distance 1.

The node count is below `2W` and fan-out stays low. The cost is almost twice the logic depth.

In each adder every level is its own generate block, with its own `cur`/`nxt` arrays. The netlist
therefore has no apparent loops, and the hierarchy names follow the levels: `g_level[l].g_col[i]`,
`g_up[l]…`, `g_down[l]…`.

## Barrel shifter

`barrel_shifter` has log2 W multiplexer levels. Level `k` is controlled by `shamt[k]`:

- If `shamt[k]` is 0, the bit passes straight down.
- If `shamt[k]` is 1, the bit takes the value from `2**k` places away: bit `i-2**k` for a left
  shift, bit `i+2**k` for a right shift.

The levels run from distance 1 at the top to distance `W/2` at the bottom. The longest wires are
therefore at the deepest level. In a planar layout each level is also taller than the one before,
because it needs more wiring tracks. This is why the shifter gains the most from halving its
width. Bits shifted in from outside the word are zero (a logical shift). `shift_left = 1` selects
a left shift.

## Top level

`arith_units_3d` (parameter `WIDTH = 64`, `SHW = log2 WIDTH`):

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | adder operands; `a` is also the shifter's data |
| `cin` | in | 1 | carry-in, shared by the three adders |
| `shamt` | in | SHW | shift amount, 0..63 |
| `shift_left` | in | 1 | 1 = left shift, 0 = right shift |
| `bk_sum`/`bk_cout`, `sk_sum`/`sk_cout`, `ks_sum`/`ks_cout` | out | WIDTH / 1 | results of each adder |
| `shift_out` | out | WIDTH | shifter result |

Every unit is combinational, with no clock or reset. The results are valid one combinational delay
after the inputs change. Synthesized to generic cells, the whole top comes to about 2,200 one-bit
gates: roughly 430 for Brent-Kung, 640 for Sklansky, 1,030 for Kogge-Stone and 770 for the shifter.

## What the two-die version changes, and what it does not

In the stacked version each unit is bit-sliced: odd bit columns go on one die, even bit columns on
the other. Adjacent nodes sit on top of each other, so the width halves and so does every wire
between nodes. Some wires then pass through a D2D via, which takes less than one fan-out-of-four
gate delay. The number of vias depends on the tree:

- Brent-Kung and Kogge-Stone need O(N) vias. In Kogge-Stone only the first level crosses between
  the dies: at the later levels, the distance is even and links columns of the same parity.
- Sklansky needs O(N log N) vias: half of the wires at every level cross.
- The barrel shifter halves the wire length at every level. The savings therefore grow with depth.

None of this changes the logic. The RTL has no die attribute, no via cells and no physical
parameters. Mapping columns to dies belongs to the floorplan: place even and odd `g_col[i]` /
`g_mux[i]` instances on different tiers.

## Choices this RTL makes

These points are not fixed by the study. They were chosen here:

- **Carry-in and carry-out ports** on the adders. The carry-in enters through bit 0's generate.
- **The Brent-Kung distribution pass.** Only the reduction tree is drawn in the study. The
  distribution nodes sit at the standard Brent-Kung positions.
- **Shifter details:** zero fill, no rotate or arithmetic mode, and `shift_left = 1` meaning left.
  The shift amount covers 0..63.
- **Top-level wiring.** The four units are independent in the study. Sharing one operand bus is
  only for convenience.
- **Widths other than powers of two** have not been tested.

## Verification

Each testbench in `tb/` checks its unit against independent arithmetic: the integer `+` and the
`<<`/`>>` operators. Each prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_pg_node` | all 16 input pairs |
| `tb_bk_adder`, `tb_sk_adder`, `tb_ks_adder` | 8-bit instance: all 131,072 combinations of `a`, `b`, `cin`. 64-bit instance: full-length carry ripple, a carry chain of every length, single-bit carries, random operands (about 20,000 cases) |
| `tb_barrel_shifter` | 8-bit instance: every word, amount and direction. 64-bit instance: walking patterns at every amount, plus 20,000 random cases |
| `tb_arith_units_3d` | the top at its default 64 bits: all four units on 20,000 shared random inputs, plus directed cases |

`tb_arith_units_3d` counts how often each behaviour occurred: carry-out, a carry through all 64
bits, carry-in, left shift, right shift, a shift by 63 and a shift by 0. A behaviour that never
occurs counts as a failure.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/arith_pkg.sv tb/tb_arith_units_3d.sv --top-module tb_arith_units_3d
    ./obj_dir/Vtb_arith_units_3d

Each testbench finishes in well under a second. To change the width, set `WIDTH`. The
adders and the shifter derive their level count from it, and the testbenches also instantiate the
8-bit versions.
