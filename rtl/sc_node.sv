// sc_node: totally self-checking node built by duplication and matching.
//
// A computation or communication node is built from two identical,
// independent modules (processor plus memory) that receive the same inputs
// and run in lock step, so their N-bit outputs must always agree. This module
// is the node logic around the two modules:
//   * the outputs of both modules go to a self-testing comparator
//     (dm_comparator), whose two-rail result is the node's 2-bit failure
//     indicator, sent on dedicated wires to the neighbours;
//   * the output of module A is the node's functional output;
//   * a no-match (noncode failure indicator) is the local reset of both
//     modules, so that a node hit by a transient fault returns itself to a
//     sane state instead of being reset by its neighbours;
//   * a noncode failure indicator from any neighbour raises the modules'
//     interrupt, which starts the system-level recovery routines.
// The two modules themselves are outside this module: their outputs come in
// on mod_a_out / mod_b_out, and their reset and interrupt go out on mod_reset
// and mod_int. The functional input of the node is wired to both modules
// directly and does not pass through here.
//
// Follows the published block diagram: N-bit functional output, 2-bit
// failure indicator, 2-bit status per neighbour. This design's own choices:
// module A (not B) supplies the functional output, the reset and interrupt
// are the one-wire decodes "rails equal" of the two-rail pairs, NBRS (number
// of neighbour status pairs) defaults to the one pair drawn, and all paths
// are combinational, so the modules see the reset at the next clock edge
// after the mismatching output appears.
module sc_node
  import trc_pkg::*;
#(
  parameter int unsigned N    = 16,  // module output width
  parameter int unsigned NBRS = 1    // neighbour status pairs
) (
  input  logic [N-1:0] mod_a_out,            // output of module A
  input  logic [N-1:0] mod_b_out,            // output of module B
  input  tr_pair_t     nbr_status [NBRS],    // failure indicators of neighbours
  output logic [N-1:0] func_out,             // functional output of the node
  output tr_pair_t     fail_ind,             // failure indicator to neighbours
  output logic         mod_reset,            // reset of both modules
  output logic         mod_int               // interrupt to both modules
);

  dm_comparator #(.N(N)) u_cmp (
    .x        (mod_a_out),
    .y        (mod_b_out),
    .c        (fail_ind),
    .no_match (mod_reset)
  );

  assign func_out = mod_a_out;

  always_comb begin
    mod_int = 1'b0;
    for (int i = 0; i < int'(NBRS); i++)
      if (is_noncode(nbr_status[i])) mod_int = 1'b1;
  end

endmodule
