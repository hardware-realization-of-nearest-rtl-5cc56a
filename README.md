# k-d tree nearest neighbour search engine

Given a query point, this engine returns the stored point closest to it in
squared Euclidean distance. The stored points are organised beforehand into a
balanced k-d tree kept in two on-chip memories. The engine does not scan all
points. It walks the tree depth first and reads only the leaves the query can
reach. It skips every subtree whose splitting plane is farther from the query
than the best point found so far.

The RTL is parameterised the same way as the generator it follows:

| parameter | meaning | default |
|-----------|---------|---------|
| `W`       | bits per signed coordinate (also the median width) | 16 |
| `K`       | dimensions of a point | 3 |
| `AW`      | address bits of the points memory (2**AW points; a leaf's count also has AW bits) | 7 (100 points fit) |
| `DEPTH`   | levels of the tree (2**DEPTH tree words, up to 2**DEPTH-1 nodes) | 5 (31 nodes) |

The defaults are the reference instance: 16-bit coordinates, k = 3, a 31-node
tree and 100 points.

## Data layout

**Tree memory** (`tree_rom`). There is one word per node, and node `n` has its
children at `2n+1` and `2n+2`. A word is `{leaf, median, start, count}`:

* `leaf` (1 bit): the node has no children and owns points.
* `median` (W bits, signed): the splitting value. Only inner nodes use it.
* `start`, `count` (AW bits each): the node's first point address and its
  number of points. Only leaves use them.

A node at level `L` splits on dimension `L mod K`. Points whose coordinate is
below the median belong to the left subtree. Points above it belong to the
right subtree. A point equal to the median may sit on either side. The tree
does not have to be full: the engine never looks past a node marked `leaf`, so
the words below a leaf are unused.

**Points memory** (`points_rom`). There is one point per word, with coordinate
0 in the low W bits. The points of one leaf sit at consecutive addresses.

Both memories are read-only during a search. They can be filled in two ways:

* At time zero, from `$readmemh` images named by the `TREE_INIT` and
  `POINTS_INIT` parameters. The images have one hex word per line: 2**DEPTH
  lines for the tree and up to 2**AW lines for the points.
* Beforehand, through the `tree_we/...` and `pts_we/...` ports of `nns_top`.
  A points write takes the single port of the points memory, so it must not
  happen during a search.

## The search and its stack

Recursion is replaced by a stack of registers (`node_stack`) with DEPTH
entries. Each entry holds `{node address, child bit, depth}`:

* child bit 0 means "the first child is next".
* child bit 1 means "the second child may be next".
* depth is the splitting dimension, 0..K-1. It is carried on the stack rather
  than computed from the address.

Between queries the stack holds only the root `{0, 0, 0}`. Each clock, the
word of the node on top of the stack selects one of four modes (`nns_ctrl`):

1. **Leaf.** A counter steps through the leaf's points, one address per clock
   (`start + counter`). After the last point the counter returns to 0, the
   leaf is popped, and a *delay counter* is loaded with 2. A leaf with count 0
   is popped at once.
2. **Inner node, child bit 0.** The query's coordinate in the node's dimension
   is compared with the median. If it is smaller the left child comes first;
   otherwise the right child does. The node's child bit is set, and the first
   child is pushed with depth `(d+1) mod K`.
3. **Inner node, child bit 1.** This takes two clocks. The first clock
   registers `(q[d] - median)^2` in `plane_distance`. The second compares it
   with the best distance so far:
   * If the best distance is not greater, no closer point can lie across the
     plane, and the node is popped.
   * Otherwise the node's entry is overwritten with its second child. There
     is no push, because nothing is left to do at the parent.
4. **Stack empty.** This is the final phase. Once the delay counter is 0,
   `out_valid` rises and `out_point` shows the best-point register. When the
   result is taken, the stack is reset to the root and the next query may
   enter.

### Why the delay counter exists

A point read from the points memory passes through two registers before it
can change the best point:

* the memory's own read register (`points_rom`);
* the distance register (`point_distance`).

The best-point register (`best_register`) updates one clock later. The delay
counter counts down every clock, in every mode, and keeps the result back
until the last point of the last leaf has been through this pipeline.

### Stale best distance in the plane check

The delay counter does not hold back the second-child check. That check
therefore compares against a best distance that may not yet include the last
one or two points of the leaf just finished. The stale value can only be
larger than the true one. The effect is that a subtree is sometimes visited
when it could have been skipped. The result is still the exact nearest
neighbour. For example, a root with two one-point leaves always visits both.

## Timing

Every step takes whole clocks, and one query is in flight at a time:

| step | clocks |
|------|--------|
| accept the query (`in_valid && in_ready`) | 1 |
| descend into a first child | 1 per inner node |
| second-child check | 2 per inner node revisited |
| leaf with c points | c, or 1 if c = 0 |
| after the last point read, until `out_valid` | 3 |

So a tree that is a single leaf of P points answers P+3 clocks after the query
is accepted. A root with two one-point leaves answers after 8 clocks.
`in_ready` is low from acceptance until the result has been taken. The result
is held while `out_ready` is low.

## Modules

| file | role |
|------|------|
| `rtl/nns_pkg.sv` | stack command enum, width helpers |
| `rtl/nns_top.sv` | the engine: ports, memory loading, wiring |
| `rtl/nns_ctrl.sv` | query register, modes, leaf counter, delay counter, plane-check wait bit, handshakes |
| `rtl/node_stack.sv` | register stack with top pointer; overflow and underflow assertions |
| `rtl/tree_rom.sv` | node words, combinational read |
| `rtl/points_rom.sv` | points, single port, one-clock read |
| `rtl/point_distance.sv` | squared Euclidean distance, registered (full precision, 2W+2+clog2(K) bits) |
| `rtl/plane_distance.sv` | squared distance to a splitting plane, registered |
| `rtl/best_register.sv` | closest point and its distance; cleared per query, updated on strictly smaller |

## Choices made in this RTL

The traversal rules, the stack contents, the replace-instead-of-push rule, the
delay of two clocks and the two-clock plane check follow the published
description. The following are this design's own choices:

* **Tree memory reads combinationally.** The top of the stack must select the
  mode in the same clock. The points memory has a one-clock read, like a block
  RAM.
* **Loading.** The published generator bakes the tree in when it generates
  the hardware. Here the contents come from memory images or from write
  ports instead.
* **Query handshake.** A query is accepted only while the engine is idle, and
  the result waits for `out_ready`.
* **Reset.** Reset is asynchronous and active low. It leaves the stack at the
  root and the best distance at its maximum.
* **Tie-breaking.** When two points are equally close, the one met first is
  returned. Only the distance is defined.
* **Empty leaf.** A leaf with count 0 is allowed and costs one clock.
* **Stack capacity.** The stack holds DEPTH entries, one per level of the
  path. Entering a child outside the tree memory is flagged by an assertion.

The reference table's 8-bit, 24-bit and 32-bit, 7-, 15- and 63-node, 50- and
200-point and k = 2, 4, 5 instances are obtained by overriding the
parameters. `tb/tb_nns_table1.sv` runs all twelve.

## Simulation

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nns_pkg.sv tb/tb_nns_top.sv --top-module tb_nns_top
./obj_dir/Vtb_nns_top
```

* `tb_nns_top`: default size. It builds 40 random balanced trees, including
  one of 100 points. Some have early leaves and some have empty leaves. Each
  is queried 60 times with random gaps and output back-pressure. Every answer
  is checked against a brute-force search, and the two latencies above are
  checked. It counts each mechanism and requires every one to occur: leaf
  scans, empty leaves, descents, revisits, prunes, delay waits, a full stack,
  input stalls and output stalls.
* `tb_nns_rom_init`: a twelve-point example tree, pre-stored through
  `tb/nns_example_tree.hex` and `tb/nns_example_points.hex`. The points are
  2-D with z = 0, and the root splits x at 6. The query (5,3,0) must return
  (4,4,0) after scanning two leaves. Random queries against brute force
  follow. Run it from the folder that holds `tb/`, because the image paths
  are relative.
* `tb_nns_table1`: the twelve reference-table configurations side by side,
  using the helper `tb/nns_config_check.sv`.
* `tb_nns_ctrl`, `tb_node_stack`, `tb_point_distance`, `tb_plane_distance`,
  `tb_best_register`, `tb_tree_rom`, `tb_points_rom`: unit tests with
  independent reference models.

## Limits

* One query at a time; queries are not pipelined.
* Latency depends on the data and the tree.
* No FPGA-specific memory primitives are instantiated. The two memories are
  plain arrays, which synthesis maps to distributed RAM (tree) and block RAM
  (points).
* Tree construction is left to the user. The testbenches show one way to do
  it: sort each node's points on its dimension, take the middle element as the
  median, and put the lower half left and the rest right.
