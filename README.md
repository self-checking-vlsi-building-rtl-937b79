# Self-checking node by duplication and matching

A node of a fault-tolerant multicomputer must notice when its own output is
wrong, and it must notice this before a second fault can hide the first. This
design gets that property by duplication. Two identical processor-plus-memory
modules run in lock step on the same inputs, and a comparator checks that their
outputs agree. The node forwards one module's output. When the comparator sees
a disagreement, three things happen:

- the node resets both modules, so a transient fault clears itself;
- it flags the failure on a two-wire failure indicator to its neighbours;
- its own interrupt rises whenever a neighbour flags a failure.

The whole scheme rests on the comparator. A comparator with a hidden fault
(for example an output stuck at "match") would let a later module failure
through unnoticed. So the comparator here is **self-testing**: for every
single fault in its fault model, some input that occurs in normal operation
makes it report an error. A faulty comparator therefore shows up during normal
traffic, before it can mask anything.

The RTL contains the comparator, from the transistor-level checker cell up to
the full node wrapper. The processor and memory modules are not part of it:
any synchronous machine with a reset and an interrupt input can be
duplicated.

## Two-rail signals

Every error signal in the design is a *two-rail pair*: one logical bit on two
wires, `{rail1, rail0}`.

| value  | meaning                                      |
|--------|----------------------------------------------|
| 01, 10 | code word: valid (the checker says "match")  |
| 00, 11 | noncode word: error                          |

A single wire cannot do this job, because a stuck wire still looks like a valid
level. With two rails, a rail stuck at either value, or two rails shorted
together, turns some valid output into 00 or 11. The rule holds at every level:

- the checker cells take two-rail pairs and produce a two-rail pair;
- the comparator's output is a pair;
- a node's failure indicator to its neighbours is a pair;
- so is the status the node receives from each neighbour.

`trc_pkg` defines `tr_pair_t` (`logic [1:0]`, `{c1, c0}`) and `is_noncode()`.

To compare two words, complement one of them. Module A's bit `x[i]` and the
complement of module B's bit `~y[i]` form a valid pair exactly when
`x[i] == y[i]`. The comparator is then just a *two-rail code checker* over
`N` pairs.

## The checker cell (`trc_cell`)

The basic cell checks two pairs, `(a1,b1)` and `(a0,b0)`. It is a two-level
NOR-NOR PLA with one product term for each of the four code inputs.

| row | devices in the AND plane | selected by code input | drives |
|-----|--------------------------|------------------------|--------|
| 0   | a1, b0                   | a1=0, a0=1             | c0     |
| 1   | b1, b0                   | a1=1, a0=1             | c1     |
| 2   | b1, a0                   | a1=1, a0=0             | c0     |
| 3   | a1, a0                   | a1=0, a0=0             | c1     |

A product-term line is the NOR of the input lines that have a device in its
row. It is therefore 1 only when all of those inputs are 0, which for valid
inputs happens for exactly one code word. An output line is the NOR of the
product terms in its column. For a valid input exactly one row is selected and
pulls exactly one output low, so `c = {a1^a0, ~(a1^a0)}`. If either input pair
is 11, no row is selected and the output is 11. If a pair is 00 and the other
is not 11, rows on both outputs are selected and the output is 00. A noncode value at the
input therefore always leaves as a noncode value.

The device pattern is held in two parameters, `AND_PLANE` (per row, bits
a1,b1,a0,b0) and `OR_PLANE` (per row, bit 1 = c1, bit 0 = c0). Their defaults
are the fault-free cell. Overriding them models physical defects directly:

- a missing or extra transistor is one bit flipped;
- a product term stuck at 0 is a full row;
- a product term stuck at 1 is an empty row;
- an output stuck at 1 is an empty column.

The cell is combinational. The dynamic CMOS version of this PLA precharges its
lines every cycle, so it keeps no state even with an open in a precharge or
discharge path. A stateless model is therefore faithful.

## Wide checkers: the tree (`trc_tree`)

One two-level PLA for `n` pairs needs `2^n` product terms. For a 16-bit module
that is 65 536 terms, and all `2^n` code words would have to occur before the
checker is fully tested. The design instead uses a tree of two-pair cells. Each
cell's output pair is one input pair of the next level. The default `N = 8`
is the classic arrangement:

```
(a7 b7 a6 b6) (a5 b5 a4 b4)   (a3 b3 a2 b2) (a1 b1 a0 b0)
      cell         cell             cell         cell
           cell                          cell
                          cell  ->  c1 c0
```

The tree is laid out as a heap. Node 1 is the root, and node `k` has children
`2k` (on the cell's `(a1,b1)` input) and `2k+1`. Nodes `N..2N-1` are the input
pairs, with pair `i` at node `2N-1-i`. Every `N >= 1` gives `N-1` cells of two
inputs each. For powers of two the tree is balanced. For other widths the
leaves sit on two adjacent levels; this layout is a choice of this RTL. For
valid inputs the root's `c1` is the parity of `a`, which the testbenches use as
their reference.

### Why four input words test any tree

A cell is fully tested once it has seen its four code inputs. In a tree, the
inputs of a cell are the outputs of its sub-trees, so the question is whether
normal traffic can bring all four combinations to every cell at once. It can,
and four words always suffice, whatever `N` is.

Look at the `a` rail of a node across four words as a 4-bit sequence, and use
only the weight-two sequences. They fall into three classes up to complement:
`0011`, `0101` and `0110`. Any two classes XOR to the third. If a cell's two
inputs carry sequences of two different classes, the cell sees 00, 01, 10 and
11, and its output carries the third class. Give the root `0011` and assign
classes downwards; the leaves then spell out four test words.
`trc_selftest_tb` builds these words for a 16-pair tree. It checks that every
one of the 15 cells receives all four code inputs. It also checks that a stuck
output line on any cell turns some word's root output into a noncode value.

## The comparator and the node

`dm_comparator #(N = 16)` feeds `x` and `~y` into `trc_tree #(N)`. It
outputs the tree's pair `c` and `no_match = (c[1] == c[0])`. Module B is the
complemented one.

`sc_node #(N = 16, NBRS = 1)` is the node logic around the two modules:

| port         | dir | width      | function                                                |
|--------------|-----|------------|---------------------------------------------------------|
| `mod_a_out`  | in  | N          | output of module A                                      |
| `mod_b_out`  | in  | N          | output of module B                                      |
| `nbr_status` | in  | NBRS x 2   | failure indicator pair from each neighbour              |
| `func_out`   | out | N          | functional output of the node (= module A's output)     |
| `fail_ind`   | out | 2          | failure indicator to the neighbours (comparator output) |
| `mod_reset`  | out | 1          | reset of both modules: high while the outputs disagree  |
| `mod_int`    | out | 1          | interrupt of both modules: a neighbour's pair is noncode |

The node's functional input goes straight to both modules and does not pass
through `sc_node`.

**Timing.** Every path is combinational. A wrong module output shows on
`fail_ind` and `mod_reset` in the same cycle it appears. The modules, which
reset synchronously, are back at their sane state one clock later. The
outputs then agree again, and reset drops. A permanent fault makes the node
reset every time the faulty bit matters. Deciding to give up on such a node is
left to the neighbours' software, which can refuse to talk to a node that
fails too often.

## Fault model covered by the tests

`trc_cell_tb` checks, for each single fault, that at least one of the four
code inputs gives a noncode output:

- all 16 AND-plane and 8 OR-plane crosspoints (missing or extra device);
- each product term stuck at 0 and at 1;
- each output line stuck at 0 and at 1;
- each input line stuck at 0 and at 1;
- the output lines shorted together (both wired-AND and wired-OR).

Electrical effects such as a load transistor with a shifted threshold (a line
that some gates read as 0 and others as 1) have no two-valued counterpart. They
are covered only through their logical equivalents: a weak 1 on an input line
is a set of missing devices, and a weak 0 is a set of product terms stuck at 0.
A multiple-device version of those faults is not enumerated.

## Files

| file                        | contents                                               |
|-----------------------------|--------------------------------------------------------|
| `rtl/trc_pkg.sv`            | two-rail pair type and helpers                         |
| `rtl/trc_cell.sv`           | two-pair checker cell (NOR-NOR PLA)                    |
| `rtl/trc_tree.sv`           | N-pair checker tree                                    |
| `rtl/dm_comparator.sv`      | comparator for two N-bit words                         |
| `rtl/sc_node.sv`            | self-checking node logic (top)                         |
| `tb/trc_cell_tb.sv`         | exhaustive function and single-fault campaign          |
| `tb/trc_tree_tb.sv`         | exhaustive 8-pair tree, random 16- and 5-pair trees    |
| `tb/trc_selftest_tb.sv`     | four-word self-test of a 16-pair tree                  |
| `tb/dm_comparator_tb.sv`    | comparator, 16 and 3 bits                              |
| `tb/sc_node_tb.sv`          | end-to-end node at full size with two behavioural modules, transient and permanent faults and neighbour interrupts |
| `tb/sc_node_nbrs_tb.sv`     | node with three neighbours                             |
| `tb/sc_pair_tb.sv`          | two nodes as neighbours: a failing node resets only itself and interrupts the other |
| `tb/pm_model.sv`            | behavioural stand-in for a processor-plus-memory module (testbench only) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, from the project root:

```
verilator --binary --timing --assert --top-module sc_node_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/trc_pkg.sv tb/sc_node_tb.sv
./obj_dir/Vsc_node_tb
```

Use the same command with another `--top-module` and testbench file for the
other benches. All of them finish in seconds. `sc_node_tb` runs the node at its
default size (16-bit modules, one neighbour). It counts how often each
mechanism occurs: matching cycles, no-match, local reset, recovery from a
transient, repeated detection of a permanent fault and the neighbour
interrupt. It fails if any of them never happens.

## Where this RTL makes its own choices

- The crosspoint pattern of the cell is read from a schematic. It was checked
  against the required behaviour (one product term per code word, each term on
  one output, code in gives code out) rather than taken from a printed table.
- Module B is the complemented input of the comparator, and module A supplies
  the functional output.
- `no_match`, `mod_reset` and `mod_int` are plain one-wire decodes ("rails
  equal") of two-rail pairs. These decoders are not self-checking themselves;
  only the pairs sent between nodes are.
- How long the reset lasts, what the interrupt does, and whether any path is
  registered are not specified by the scheme. Here everything is
  combinational, and the reset lasts exactly as long as the disagreement.
- The tree layout for widths that are not powers of two, and the default of
  one neighbour status pair, are choices of this RTL.

Outside the RTL are the duplicated processor-plus-memory module, the
communication node that routes messages between computation nodes, the
error-detecting code on the inter-node links, and the system-level recovery
protocol. None of them is specified in enough detail to build.
