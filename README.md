# Three-operand parallel prefix adders (24-bit)

Adding three numbers `A + B + C` is the inner step of Montgomery modular
multiplication, of linear congruential pseudo-random bit generators and of
multi-operand multipliers. The usual hardware is a carry-save row followed by
a ripple-carry adder, so the delay grows linearly with the word width. This
design keeps the carry-save row and replaces the ripple-carry adder with a
parallel prefix carry network. The delay then grows with `log2(n)`. Adding a
third operand costs only one extra full-adder delay.

The RTL builds the 24-bit three-operand adder with each of five classic
prefix networks: Kogge-Stone, Brent-Kung, Sklansky, Ladner-Fischer and
Han-Carlson. All five compute the same exact result and differ only in area,
depth and fan-out. Beside the adders stands the application the adders were
meant for: a cascaded three-operand multiplier `A*B*C` built from two
Wallace-tree multipliers, each ending in a two-operand parallel prefix adder.

Everything is combinational. There is no clock, no reset and no pipeline
register.

## The four stages of the adder

`three_operand_adder` computes `{cout, sum} = a + b + c + cin` for `N`-bit
operands (`N = 24` by default) in four stages:

| stage | module | per bit position `i` |
|---|---|---|
| 1. bit addition | `bit_addition_logic` | `s[i] = a[i]^b[i]^c[i]`, `cy[i] = maj(a[i],b[i],c[i])` |
| 2. base logic | `base_logic` | `g[i] = s[i] & cy[i-1]`, `p[i] = s[i] ^ cy[i-1]`, with `cin` in place of `cy[-1]` |
| 3. PG logic | one of the five `*_pg` networks | `G[i:0]` for `i = 0..N-1` from black and grey cells |
| 4. sum logic | `sum_logic` | `sum[0] = p[0]`, `sum[i] = p[i] ^ G[i-1:0]`, `cout = G[N:0]` |

Stage 1 is a row of full adders (a 3:2 compressor). It turns three operands
into two numbers, `s` and `cy << 1`, without any carry moving between bits.

Stage 2 is where this adder differs from an ordinary carry-save adder followed
by a prefix adder. Each "saltire" cell pairs the sum bit of position `i` with
the carry bit from position `i-1`. It produces the generate and propagate of
a two-operand addition. Cell 0 takes the external carry input, which needs no
extra logic.

There are `N+1` base cells, not `N`. The carry of the top full adder has
weight `2^N`. Position `N` has no operand bit, so there `p[N] = cy[N-1]` and
`g[N] = 0`.

Stage 3 is the only part that differs between the five adders. It is covered
in the next section.

Stage 4 forms the sum bits. A single grey cell over position `N` gives
`cout = g[N] | p[N] & G[N-1:0]`. The result `{cout, sum[N:0]}` has `N+2` bits,
enough for the largest value `3*(2^N-1)+1`. No input can overflow it.

A 3-bit example shows how the stages work. Take `4 + 3 + 7` with `cin = 1`:

- Stage 1 gives `s = 000` and `cy = 111`.
- In stage 2, every base cell has `p = 1` and `g = 0`.
- No group generates, so `sum = 1111` (15) and `cout = 0`.

## The prefix networks

Each network takes `g[N-1:0]` and `p[N-1:0]` and returns `gx[i] = G[i:0]`.
Two cell types do the work:

- A **black cell** computes `G = Ghi | Phi & Glo` and `P = Phi & Plo`.
- A **grey cell** computes only `G`. It is used when the lower group already
  starts at bit 0. The group propagate of such a group is never read again.

Every network therefore has exactly `N-1` grey cells, one per position from
1 to `N-1`. The networks differ in their black cells.

Every network module is written the same way. Two arrays, `gl[l][i]` and
`pl[l][i]`, hold the value of node `i` after level `l`. Level 0 holds the
network inputs. At each level, a generate loop decides one of three things
for every node:

- it joins a partner `j` through a black cell,
- it joins a partner `j` through a grey cell, when `j`'s group reaches bit 0,
- it passes unchanged.

Each network's rule, for `N = 24`:

| network | rule | levels | black | grey | max fan-out |
|---|---|---|---|---|---|
| Kogge-Stone | level `l`: every `i >= 2^(l-1)` joins `i - 2^(l-1)` | 5 | 66 | 23 | 2 |
| Brent-Kung | up-sweep: `i mod 2^u = 2^u-1` joins `i - 2^(u-1)`; down-sweep (largest block first): `i >= 2^d`, `i mod 2^d = 2^(d-1)-1` joins `i - 2^(d-1)` | 8 | 18 | 23 | 2 |
| Sklansky | level `l`: `i` with bit `l-1` set joins `((i>>l)<<l) + 2^(l-1) - 1` | 5 | 29 | 23 | 2^(l-1) |
| Ladner-Fischer | odd `i` joins `i-1`; Sklansky on the odd positions; even `i >= 2` joins `i-1` | 6 | 20 | 23 | about half of Sklansky's |
| Han-Carlson | odd `i` joins `i-1`; Kogge-Stone on the odd positions; even `i >= 2` joins `i-1` | 6 | 33 | 23 | 2 |

These level counts are the depths usually given for these networks:
`log2 n` for Kogge-Stone and Sklansky, `2 log2 n - 2` for Brent-Kung, and
`log2 n + 1` for Ladner-Fischer and Han-Carlson, with `log2` rounded up.
`tri_add_pkg::prefix_levels()` returns them, and each network's testbench
checks them.

Sklansky has the fewest cells of the minimum-depth networks but the largest
fan-out. In the FPGA comparison these networks come from, the 24-bit
Sklansky adder was both the smallest (77 LUTs against 80-113) and the
fastest (7.53 ns against 7.68-8.87 ns). That is why it is the default
`TOPOLOGY` wherever one adder is built.

The networks are sized by parameter and work for any `N >= 1`. The
testbenches check them at sizes 1, 2, 3, 5, 8, 13, 16, 17, 24 and 32.

## The cascaded three-operand multiplier

`three_operand_multiplier` computes `A*B*C` for 8-bit unsigned operands. It
is two multipliers in a chain:

1. An 8x8 `wallace_multiplier` produces the 16-bit `A*B`. Its final adder is
   a 16-bit prefix adder.
2. A 16x8 `wallace_multiplier` multiplies that result by `C` and produces the
   24-bit product. Its final adder is a 24-bit prefix adder.

Inside `wallace_multiplier`:

- Row `j` of the partial-product matrix is `a & b[j]`, shifted left by `j`.
- Each stage takes the rows in groups of three. A `bit_addition_logic` row
  reduces each group to a sum row and a carry row, and the carry row is
  shifted left by one. Rows left over pass on to the next stage.
- The number of stages is computed at elaboration. Eight rows need 4 stages:
  8 → 6 → 4 → 3 → 2.
- A `two_operand_ppa` adds the last two rows. It has three stages: it forms
  `g`/`p`, runs a prefix network (Sklansky by default), then XORs to get the
  sum.

The reduction is written on whole rows, not on single bits. A full adder
whose inputs are constant zero becomes a half adder or a wire after
synthesis, so the gate-level result is the usual Wallace tree. The multiplier
and the three-operand adders are not connected to each other.

## Top level: `tri_add_top`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b`, `c` | in | `N` | operands of all five adders |
| `cin` | in | 1 | carry input |
| `sum` | out | `5 x (N+1)` | `sum[t]`, with `t` a `tri_add_pkg::prefix_e` value: 0 KS, 1 BK, 2 SK, 3 LF, 4 HC |
| `cout` | out | 5 | carry output of each adder |
| `mul_a`, `mul_b`, `mul_c` | in | `MW` | multiplier operands |
| `mul_product` | out | `3*MW` | `mul_a * mul_b * mul_c` |

The parameters are `N = 24` and `MW = 8`. The five adders share their inputs
so they can be compared side by side, for example in synthesis. To use a
single adder, instantiate `three_operand_adder` with the `TOPOLOGY` you want.

## Departures from the source description, and how far to trust it

- **Sum width.** The published interface lists a 24-bit `sum_output` and a
  `cout`, a 25-bit result. That cannot hold every sum of three 24-bit numbers
  and a carry. Here `sum` is `N+1` bits and `cout = G[N:0]`, following the
  adder's own equations and its 3-bit example. To get the 24-bit interface,
  take `sum[N-1:0]`.
- **No clock.** The published simulation and schematic show `clk` and
  `reset` ports, and some slice registers appear in its FPGA results. What
  those registers hold is not described. These adders are purely
  combinational. Register the ports outside if needed.
- **Network wiring.** Each network follows the textbook rule above. It was
  not copied cell by cell from a drawing. The published black-cell counts
  are Kogge-Stone 58, Brent-Kung 20, Sklansky 29, Ladner-Fischer 20 and
  Han-Carlson 29. Sklansky and Ladner-Fischer match the table above exactly,
  and all five match on the 23 grey cells. The published Kogge-Stone,
  Brent-Kung and Han-Carlson counts do not match any standard form of those
  networks.
- **Multiplier internals.** The type of prefix network inside the
  multiplier's adders and the row-level Wallace formulation are choices of
  this implementation. The operand, intermediate and product widths
  (8/8/8, 16, 24) are the published ones.
- Area and delay figures (LUTs, ns, W) came from one FPGA family. No
  synthesis results are reproduced here.

Every block is checked against an arithmetic reference computed in its
testbench. The networks are compared with a ripple-carry recurrence, and
the adders and multipliers with integer `+` and `*`. Each testbench also
fails on a deliberately broken copy of its block.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`, and each has a
watchdog that stops a hung run. With Verilator 5:

```
verilator --binary --timing --top-module tri_add_top_tb \
    rtl/tri_add_pkg.sv tb/tri_add_top_tb.sv -y rtl -y tb
./obj_dir/Vtri_add_top_tb
```

Use the same command for any other testbench; only the names change. The
testbenches:

- `tri_add_top_tb` runs the whole design at its default sizes.
  - It checks a sequence of vectors with known sums: 348+1372+2744 = 4464,
    then with `a`, `b` and `c` stepping by 1, 4 and 8, sums 4477 through
    4529.
  - It runs corners and 20000 random cases on all five adders, and random
    products on the multiplier.
  - It counts each mechanism: carry input used, sum bit `N` set, carry out
    set, a carry rippling through all 24 positions, and a full 24-bit
    product. A mechanism that never happens is counted as a failure.
- `three_operand_adder_tb` checks all five networks at 24 bits, the 3-bit
  example above, and an exhaustive 3-bit sweep.
- `*_pg_tb` check each network at ten sizes against the ripple recurrence,
  along with its level count.
- `wallace_multiplier_tb` is exhaustive for 8x8. It also checks 16x8, and
  the shapes with zero or one reduction stage.
- `three_operand_multiplier_tb`, `two_operand_ppa_tb`, `sum_logic_tb`,
  `base_logic_tb`, `bit_addition_logic_tb`, `black_cell_tb` and
  `grey_cell_tb` check the remaining blocks.

Every testbench finishes in well under a second.

## Files

- `rtl/tri_add_pkg.sv` holds the `prefix_e` enum, `OPERAND_WIDTH` and the
  level-count functions.
- `rtl/black_cell.sv` and `rtl/grey_cell.sv` are the prefix cells.
- `rtl/bit_addition_logic.sv`, `rtl/base_logic.sv` and `rtl/sum_logic.sv`
  are stages 1, 2 and 4 of the adder.
- `rtl/kogge_stone_pg.sv`, `rtl/brent_kung_pg.sv`, `rtl/sklansky_pg.sv`,
  `rtl/ladner_fischer_pg.sv` and `rtl/han_carlson_pg.sv` are the networks.
- `rtl/prefix_network.sv` picks a network by `TOPOLOGY`.
- `rtl/three_operand_adder.sv` is the four-stage adder.
- `rtl/two_operand_ppa.sv`, `rtl/wallace_multiplier.sv` and
  `rtl/three_operand_multiplier.sv` make up the multiplier.
- `rtl/tri_add_top.sv` is the top level.
- `tb/<module>_tb.sv` is the testbench for each module.
