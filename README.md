# Random-forest classifier with multi-valued decision diagrams

A random forest classifies a feature vector by letting many decision trees
vote and taking the majority. Evaluated as ordinary binary trees, a path can
test the same feature again and again, and the longest path sets the
latency. This design stores every tree as a **multi-valued decision diagram**
(MDD) instead. At each level of the diagram one feature is compared with
several constants at once, and the comparison bits together choose one of
many edges. On any path a feature is tested at most once, so a path is never
longer than the number of features.

The forest is one deep pipeline. The trees sit in series and each tree takes
one clock per MDD level. A small voter after each tree adds that tree's vote
to per-class counts that travel down the chain with the vector. A pipelined
majority search at the end picks the winning class. Nothing stalls: the
classifier takes one feature vector and returns one class every clock.

The default build is sized for a 50-tree forest over 4 features and 3
classes (the shape of a forest trained on the Iris data set), with 14-bit
signed fixed-point features.

## From a decision tree to an MDD(k)

A binary tree node tests `x[f] <= c`. Collect all the constants a tree uses
with feature `f`, sort them ascending, and call them `c0 < c1 < ... < c(n-1)`.
They cut the feature's range into `n+1` intervals. One MDD level
("height") handles feature `f` completely:

* The level holds the feature index and `k` constants (`K` parameter, default
  4). Bit `j` of the level's **super-variable value** is `x[f] <= c[j]`.
  Constants the tree does not need are set to the largest positive value, so
  their bits are always 1.
* With sorted constants, a value in interval `i` gives the code whose bits
  `j >= i` are 1 and bits `j < i` are 0. This is a thermometer code.
* Every node of the level has `2^k` edges, one per code. Codes that cannot
  occur with sorted constants may hold any edge. The natural choice is the
  edge of the interval given by the code's lowest set bit.
* An edge points to a node of the next level, or it is a **terminal** holding
  a class label.

To build the diagram, order the features (tested features first), classify
every combination of intervals with the original tree, and build the levels
from the bottom up. An edge into a part of the diagram whose answer is
always the same class becomes a terminal. Nodes with identical edges are
merged. The testbench `tb/rf_forest_workload.sv` does exactly this, and can
serve as a reference for table generation.

Every tree in the hardware has the same number of levels (`LEVELS`).
Two rules keep all trees in step:

* **Early terminals.** Once a path reaches a terminal, the terminal rides
  unchanged through the remaining levels.
* **Skipped levels.** A path that skips a level in the middle passes through
  a node whose `2^k` edges all point to the same child.

Because of these rules every tree has the same latency, however short its
paths are.

## Pipeline

```
in_feats ─► tree 0 ─► vote ─► tree 1 ─► vote ─► ... ─► tree T-1 ─► vote ─► majority ─► out_class
            (LEVELS clk)  (1 clk)                                        (clog2 C clk)
counts = 0 ─────────────────┘ counts travel with the vector ──────────────┘
```

* `super_variable_eval`: the feature multiplexer and `k` signed comparators
  of one level. It is combinational, with the level's feature index and
  constants held in registers.
* `mdd_level_stage`: one level as one pipeline stage. The current pointer's
  node number and the super-variable value form the address
  `{node, value}` into the level's edge memory, which holds
  `2^clog2(NODES) × 2^k` entries. The edge read is registered along with the
  feature vector and a carried word (the vote counts).
* `mdd_tree`: `LEVELS` stages in a chain. The root is node 0 of level 0.
  After `LEVELS` clocks it gives `{terminal, label}`.
* `vote_accumulator`: adds one to the count of the class the tree reached,
  then registers. A tree that ends without reaching a terminal casts no
  vote.
* `majority_detector`: a tournament of pairwise comparisons, with one
  register per round. On equal votes the lower class number wins.
* `rf_mdd_top`: wires `NUM_TREES` trees and voters in series, then the
  majority detector.

**Timing.** Latency is `NUM_TREES*(LEVELS+1) + max(1, clog2(NUM_CLASS))`
clocks, which is 252 at the defaults. A new vector is accepted every clock.
`in_valid` is a valid-only stream: there is no back-pressure and no stall.
An assertion in `rf_mdd_top` reports a table write to a tree or level that
does not exist.
Reset is asynchronous and active low. It clears the valid bits and the level
registers (feature 0, constants at their maximum). It does not clear the edge
memories.

## Number format

Features and constants are `FEAT_W`-bit (default 14) two's-complement fixed
point, compared as signed integers. Where the binary point sits is up to
whoever generates the tables; the hardware only compares. Narrower
`FEAT_W` cuts wiring and comparator size, at some cost in classification
accuracy.

## Loading the tables

All tables are written through one port, `cfg` (`rf_pkg::cfg_wr_t`), one
word per clock while `cfg.we` is 1:

| field   | width | meaning                                                   |
|---------|-------|-----------------------------------------------------------|
| `sel`   | 2     | `CFG_FEATURE`, `CFG_THRESH` or `CFG_EDGE`                  |
| `tree`  | 16    | tree number                                               |
| `level` | 8     | level (height) within the tree, 0 = root                  |
| `addr`  | 16    | constant number (`CFG_THRESH`); `node*2^k + code` (`CFG_EDGE`) |
| `data`  | 32    | feature index, constant (low `FEAT_W` bits), or edge      |

An edge is `{terminal, index}` in the low `IDX_W+1` bits, where
`IDX_W = max(clog2(NODES), clog2(NUM_CLASS))`. With `terminal = 0`, the
index is a node of the next level. With `terminal = 1`, it is the class
label. At the defaults an edge is 5 bits: bit 4 is the terminal flag.

Load every edge a path can reach before streaming vectors, because the edge
memories power up with unknown contents. In practice, write all
`NODES*2^k` edges of every level. Writing while vectors are in flight is
allowed, but vectors in flight see a mix of old and new tables.

## Parameters (`rf_mdd_top`)

| parameter   | default | meaning                                      |
|-------------|---------|----------------------------------------------|
| `NUM_TREES` | 50      | trees in the chain                           |
| `NUM_FEAT`  | 4       | features per vector                          |
| `NUM_CLASS` | 3       | classes                                      |
| `FEAT_W`    | 14      | fixed-point width of features and constants  |
| `K`         | 4       | constants per level (`2^K` edges per node)   |
| `LEVELS`    | 4       | levels per tree = longest MDD path           |
| `NODES`     | 16      | node slots per level (best a power of two)   |

`clog2(NODES) + K` must fit in 16 bits, because that is the width of the
edge address.

Storage per level is `NODES × 2^K × (IDX_W+1)` bits, which is 1280 bits at
the defaults. The whole default forest has 256 000 bits of edge memory. On
an FPGA each level's edge table maps to a small RAM with an asynchronous read
(distributed RAM). For block RAM, move the register in front of the read.

### Forest shapes

| forest shape          | trees | features | classes | longest MDD path | MDD nodes | fits the default build |
|-----------------------|-------|----------|---------|------------------|-----------|-------------------------|
| Iris                  | 50    | 4        | 3       | 4                | 517       | yes (about 10 nodes per tree against 64 slots) |
| Hayes-Roth            | 15    | 5        | 3       | 5                | 448       | no: needs `NUM_FEAT=5, LEVELS=5` |
| Contraceptive Method  | 25    | 9        | 3       | 9                | 7 360     | no |
| Glass Identification  | 30    | 10       | 7       | 10               | 17 204    | no |
| Hepatitis             | 30    | 19       | 2       | 15               | 145 664   | no: thousands of nodes per tree |
| Dermatology           | 30    | 33       | 6       | 15               | 118 336   | no |
| Ionosphere            | 25    | 34       | 2       | 20               | 671 744   | no |

The sizes are those of trained forests for these UCI data sets. Shapes
other than Iris need the parameters above changed, and the large ones need
`NODES` far beyond what the flat per-level tables here suit. MDD node counts
grow roughly exponentially with the number of features a tree tests, so
MDDs pay off for forests of many shallow trees.

## Verification

Each testbench in `tb/` checks its block against values computed
independently, and ends with a `TB_RESULT checks=N failures=M` line. Each
also has a watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_super_variable_eval`   | comparison bits against integer arithmetic, including values exactly on a constant; reset state |
| `tb_mdd_level_stage`       | edge lookup against a copy of the table, terminal pass-through, one-clock latency, streaming |
| `tb_mdd_tree`              | labels against a walk of the same random diagram; latency `LEVELS`; both early and full-length paths |
| `tb_vote_accumulator`      | exactly one count incremented; no vote for non-terminals or out-of-range labels |
| `tb_majority_detector`     | first maximum for 3 and 5 classes, with ties; latency `clog2(C)` |
| `tb_rf_mdd_top`            | the default 50-tree build end to end: two random forests loaded in turn, bursts and gaps, class/votes/counts against a model, latency 252, one result per clock. It counts early paths, full paths, no-vote trees, ties, back-to-back results, bubbles and a reload, and fails if any count is zero. |
| `tb_rf_workloads`          | seven forest shapes (table above). Random binary trees are converted into MDDs as described earlier and classified by the hardware, and every result must equal the binary trees' own majority vote. Iris runs at the default parameters with 50 trees and Hayes-Roth with its 15 trees. The five larger shapes run 6 trees each, which keeps the build time down. |

The trees in these tests are random, not trained on real data. Since the
hardware only compares and counts, matching the binary trees exactly on
random inputs is the relevant check.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rf_mdd_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/rf_pkg.sv tb/tb_rf_mdd_top.sv
./obj_dir/Vtb_rf_mdd_top
```

The default-size end-to-end test builds and runs in under a minute. The
workload test takes about two minutes to build, most of it in the C++
compiler.

## Departures and limits

* **No host interface.** The host computer, PCI Express link, board support
  logic and DDR3 memory that would feed vectors and collect results are not
  part of this RTL. The `in_*`, `out_*` and `cfg` ports are where they
  attach.
* **Uniform tree shape.** Every tree gets `LEVELS` levels of `NODES` slots.
  A generator that sizes each tree separately would save memory for small
  trees. Here, short trees just pass their terminals along.
* **Programmable tables.** The edges live in writable tables, so one build
  serves any forest of the configured size. They are not hard-wired per
  forest.
* **Sign format.** The features are taken as two's complement.
  Sign-magnitude data must be converted before it enters.
* **Choices of this design.** The comparison is `<=`, as in common tree
  learners. Ties go to the lowest class. A tree that ends without a
  terminal casts no vote. `K = 4` and `NODES = 16` are sized for an
  Iris-like forest, about 10 MDD nodes per tree.
