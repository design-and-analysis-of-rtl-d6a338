# Kogge-Stone and Han-Carlson parallel prefix adders (8-bit)

A ripple-carry adder is slow because the carry into bit *i* waits for every
bit below it. A parallel prefix adder treats the carries as a *prefix
computation*: each bit says whether it **generates** a carry (`g = a & b`) or
**propagates** one (`p = a ^ b`). Two neighbouring spans of bits combine with an
associative operator. Because the operator is associative, the carries into all
bit positions can be computed by a tree of depth about log2(n) instead of a
chain of length n.

This repository holds two such adders, both 8 bits wide by default and
purely combinational:

* **Kogge-Stone** (`kogge_stone_adder`). Every position combines at every level,
  at distances 1, 2, 4, 8. The depth is minimal and the fan-out is low. The cost
  is the most cells and the most long wires.
* **Han-Carlson** (`han_carlson_adder`). Only odd bit positions take part in
  the Kogge-Stone part of the tree. The even positions get their carry in one
  extra final row. This roughly halves the cell count, at the price of one more
  logic level.

The two are alternatives to each other, not parts of one datapath.
`ppa_adders_top` places them side by side so that both can be simulated and
synthesised together.

## The prefix operator: black and grey cells

For a span of bits `i:j`, `G[i:j]` says "this span produces a carry out by
itself", and `P[i:j]` says "this span passes an incoming carry through".
Merging an upper span `i:k` with the adjacent lower span `k-1:j` gives:

```
G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
P[i:j] = P[i:k] &  P[k-1:j]
```

* **black cell** (`black_cell`): computes both `G` and `P`. It is needed
  while the span does not yet reach bit 0, because a later level will extend it
  further.
* **grey cell** (`grey_cell`): computes only `G`. It is used once the merged
  span reaches bit 0 (or the carry in). `G[i:0]` is then the final carry out of
  bit *i*, and its propagate is never needed.
* **buffer**: in a transistor netlist, a buffer carries a value unchanged to
  the next level. In RTL it is just a wire. The generate loops show buffers as
  `g_buf` blocks.

Both cells take the `(G,P)` pair as the packed struct `ppa_pkg::gp_t`.

Around the prefix tree, every adder has the same two thin stages:

* `pg_gen` (pre-processing) forms `g_i = a_i & b_i` and `p_i = a_i ^ b_i`.
* `sum_gen` (post-processing) forms `S_i = p_i ^ C_{i-1}`, where
  `C_{i-1} = G[i-1:0]` is the carry into bit *i*.

The carry out is taken straight from the prefix tree.

## Kogge-Stone network with carry in

The carry in is modelled as one extra prefix position below bit 0, with
generate = `cin` and no propagate. The tree therefore works on M = N+1 = 9
positions and needs ceil(log2 9) = **4 levels**. At level *s*, with distance
d = 2^(s-1), each position *e* (0 = `cin`, *e* = bit *e*-1) does one of three
things:

| condition   | cell   | result                         |
|-------------|--------|--------------------------------|
| e < d       | buffer | unchanged                      |
| d ≤ e < 2d  | grey   | span now reaches `cin`: a carry |
| e ≥ 2d      | black  | span still open, keep G and P  |

For the 8-bit adder this gives the following cells, named by bit span:

| level | black cells                      | grey cells                 | buffers   |
|-------|----------------------------------|----------------------------|-----------|
| 1 (d=1) | 7:6 6:5 5:4 4:3 3:2 2:1 1:0    | 0:cin                      | –         |
| 2 (d=2) | 7:4 6:3 5:2 4:1 3:0            | 2:cin 1:cin                | 0         |
| 3 (d=4) | 7:0                            | 6:cin 5:cin 4:cin 3:cin    | 1, 2      |
| 4 (d=8) | –                              | 7:cin                      | 0–6       |

That is 21 cells: 13 black and 8 grey. After level 4, position *i* holds
`G[i-1:cin]`, the carry into bit *i*. `cout` is `G[7:cin]`. Without the carry
in, the same network would need only 3 levels and 17 cells (n·log2 n − n + 1).

## Han-Carlson network

This adder has no carry in. With L = ceil(log2 N) (3 for N = 8), the tree has
**L + 1 = 4 levels**:

* **Levels 1 … L act on odd bit positions only.** Even positions pass straight
  through. At level *s* (distance d = 2^(s-1)), odd bit *i* merges with bit
  *i − d*. It uses a grey cell if the result reaches bit 0 (i < 2d), a black
  cell otherwise, and a buffer if i < d. Level 1 pairs each odd bit with the even
  bit just below it, as a Brent-Kung tree does. The later levels form a
  Kogge-Stone tree over the odd positions.
* **Level L+1 is the carry-merge row.** Each even bit *i* ≥ 2 gets one grey
  cell that merges its own `g_i/p_i` with the finished carry `G[i-1:0]` of the
  odd bit below it.

| level | black cells  | grey cells | buffers        |
|-------|--------------|------------|----------------|
| 1     | 7:6 5:4 3:2  | 1:0        | 0, 2, 4, 6     |
| 2     | 7:4 5:2      | 3:0        | 1, even bits   |
| 3     | –            | 7:0 5:0    | 1, 3, even bits|
| 4     | –            | 6:0 4:0 2:0| odd bits, 0    |

That is 12 cells: 5 black and 7 grey, which equals (n/2)·log2 n. For example,
the carry out of bit 5 is `G[5:0] = G[5:2] | P[5:2] & G[1:0]`. It is built at
level 3 from the level-2 span 5:2 and the level-1 carry 1:0.

For N = 8 the prefix trees of the two adders together come to 51 two-input
AND and 33 OR gates: 34 AND and 21 OR in the Kogge-Stone tree, 17 AND and
12 OR in the Han-Carlson tree. On top of that, each adder has 8 AND and 8 XOR
gates in `pg_gen` and 8 XOR gates in `sum_gen`.

## Interfaces and timing

| module              | ports                                                              |
|---------------------|--------------------------------------------------------------------|
| `kogge_stone_adder` | `a[N-1:0]`, `b[N-1:0]`, `cin` → `sum[N-1:0]`, `cout`               |
| `han_carlson_adder` | `a[N-1:0]`, `b[N-1:0]` → `sum[N-1:0]`, `cout`                      |
| `ppa_adders_top`    | `ks_a`, `ks_b`, `ks_cin` → `ks_sum`, `ks_cout`; `hc_a`, `hc_b` → `hc_sum`, `hc_cout` |

Every module is combinational. There is no clock, reset or handshake. Outputs
are valid one propagation delay after the inputs settle. Both adders have four
prefix levels at N = 8, plus one gate level before the tree and one after it.
Each adder exposes its depth as the localparam `STAGES`. The circuits these
adders were drawn from were measured at 130 nm at about 9.3 ns (Kogge-Stone) and
9.1 ns (Han-Carlson), using 564 and 402 transistors. Those figures belong to
that transistor-level implementation. The RTL neither reproduces nor predicts
them.

## Parameters and other widths

`N` (type `int unsigned`, default 8) is the only parameter. It is shared by
both adders in the top. The cell placement for N = 8 is the reference design.
Other widths use the same rules stated above. Both adders are tested at
N = 16, 24 and 32; 24 shows that N need not be a power of two. The Han-Carlson
adder needs N ≥ 2.

## Where this RTL departs from, or adds to, the reference design

* The Kogge-Stone adder has four levels because the carry in counts as a ninth
  position, exactly as in the reference 8-bit graph. A formula for
  Kogge-Stone delay that ignores the carry in would give three.
* The Han-Carlson adder has no carry in, as in its reference graph. Its carry
  out is `G[7:0]`.
* Buffers are wires. There is no drive-strength model.
* The generalisation to widths other than 8 is this design's own.
* Nothing at transistor or layout level is modelled: transistor count, area,
  power, PDP and EDP.
* In the last prefix level, the `P` vector of each adder is unused (no later
  level needs it), and lint reports it as an unused signal. That is expected;
  synthesis removes it.

## Files

| file | contents |
|------|----------|
| `rtl/ppa_pkg.sv` | `gp_t` (group generate/propagate pair) |
| `rtl/pg_gen.sv`, `rtl/sum_gen.sv` | pre- and post-processing |
| `rtl/black_cell.sv`, `rtl/grey_cell.sv` | prefix operators |
| `rtl/kogge_stone_adder.sv`, `rtl/han_carlson_adder.sv` | the two adders |
| `rtl/ppa_adders_top.sv` | both adders side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the block with a model written independently of
it, using truth tables or integer addition. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs.

* `tb_pg_gen`, `tb_sum_gen`: all 2^16 input pairs, bit by bit.
* `tb_black_cell`, `tb_grey_cell`: all input combinations.
* `tb_kogge_stone_adder`: N = 8 exhaustively (all 2^17 `a, b, cin`). N = 16, 24
  and 32 get 20,000 random vectors each, plus long-carry corner cases. The test
  also checks that the depth is 4 levels.
* `tb_han_carlson_adder`: the same for the Han-Carlson adder (2^16 exhaustive
  cases at N = 8), also with a depth check of 4.
* `tb_ppa_adders_top`: the top with default parameters. Both adders are driven
  through every input combination at once. The test counts how often each
  carry path was exercised and fails if one never was:
  * the carry in entering the prefix tree;
  * a carry rippling through all 8 bits in each adder;
  * carries produced by the Han-Carlson merge row;
  * carry outs.

To run one with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/ppa_pkg.sv tb/tb_ppa_adders_top.sv \
          --top-module tb_ppa_adders_top -Mdir obj_tb -o sim
./obj_tb/sim
```

Replace the testbench name to run another. `-Irtl` lets Verilator find each
module in `rtl/<module>.sv`. Each run takes well under a second.
