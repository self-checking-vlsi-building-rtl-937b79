// trc_pkg: shared types and helpers for the two-rail code checkers.
//
// A two-rail pair carries one logical bit on two wires, {rail1, rail0}. The
// pair is a code word when the rails differ (01 or 10) and a noncode word when
// they are equal (00 or 11). Every checker in this design reports its result
// as such a pair, so that a stuck or shorted output wire is itself visible as
// a noncode value. The pair layout {c1, c0} follows the output labels of the
// checker cell; the helper functions are this design's own.
package trc_pkg;

  // {rail1, rail0}: in a checker output these are the lines c1 and c0.
  typedef logic [1:0] tr_pair_t;

  // True for 00 and 11, the two values that signal an error.
  function automatic logic is_noncode(tr_pair_t p);
    return p[1] == p[0];
  endfunction

endpackage
