// trc_tree: self-testing two-rail code checker for N input pairs.
//
// Checks the two-rail word formed by a[N-1:0] and b[N-1:0] (pair i is
// (a[i], b[i]), valid when b[i] = ~a[i]) and reduces it to one two-rail pair
// c = {c1, c0}: 01 or 10 when every pair is valid, 00 or 11 when any pair is
// not. For a valid word c1 is the parity of a.
//
// How it works: a tree of two-pair checker cells (trc_cell), each cell's
// output pair feeding the next level as one input pair, as in the published
// eight-pair tree (four leaf cells, two middle cells, one root). The tree is
// laid out like a heap: node 1 is the root, node k has children 2k and 2k+1,
// nodes N .. 2N-1 are the input pairs and nodes 1 .. N-1 are cells, with the
// even child on the cell's (a1,b1) input. Pair i sits at node 2N-1-i, so for
// N = 8 the leaf cells see (a7,b7,a6,b6), (a5,b5,a4,b4) and so on, exactly as
// drawn. For N not a power of two the same rule still gives N-1 cells with two
// inputs each; the leaves then sit on two adjacent levels (this layout for
// other widths is this design's own). Because each cell needs only its four
// code inputs for a full self-test, the whole tree is exercised by a few
// input words, independent of N.
//
// Interface: purely combinational. N >= 1; N - 1 cells, depth ceil(log2 N).
module trc_tree
  import trc_pkg::*;
#(
  parameter int unsigned N = 8   // number of input pairs (8 in the published tree)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output tr_pair_t     c
);

  tr_pair_t node [1:2*N-1];

  for (genvar i = 0; i < int'(N); i++) begin : g_leaf
    assign node[2*N-1-i] = {a[i], b[i]};
  end

  for (genvar k = 1; k < int'(N); k++) begin : g_cell
    trc_cell u_cell (
      .in1 (node[2*k]),
      .in0 (node[2*k+1]),
      .c   (node[k])
    );
  end

  assign c = node[1];

endmodule
