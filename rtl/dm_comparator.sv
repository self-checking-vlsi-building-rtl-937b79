// dm_comparator: self-testing comparator for duplication and matching.
//
// Compares the N-bit outputs x and y of two identical modules. y is
// complemented, so that (x[i], ~y[i]) is a valid two-rail pair exactly when
// x[i] == y[i], and the 2N-bit word is checked by a two-rail code checker tree
// (trc_tree). The tree's output pair c is the comparator's output: 01 or 10
// means the words match, 00 or 11 means they do not. Because the result is
// itself a two-rail pair, a fault inside the checker that is exercised by
// normal traffic also shows up as a noncode output rather than being masked.
//
// no_match is the one-wire decode of c (rails equal) used as the local reset;
// the decoder is this design's own, the two-rail output c is what goes to the
// neighbours. Which module is complemented is also this design's choice.
//
// Interface: purely combinational; c and no_match follow x and y within the
// same cycle.
module dm_comparator
  import trc_pkg::*;
#(
  parameter int unsigned N = 16   // module output width ("say, 16 bits")
) (
  input  logic [N-1:0] x,         // output of module A
  input  logic [N-1:0] y,         // output of module B
  output tr_pair_t     c,         // two-rail match result {c1, c0}
  output logic         no_match   // 1 when c is noncode
);

  trc_tree #(.N(N)) u_tree (
    .a (x),
    .b (~y),
    .c (c)
  );

  assign no_match = is_noncode(c);

endmodule
