// roba_pkg: types and functions shared by the RoBA multiplier blocks.
//
// The parallel-prefix adder works on (generate, propagate) pairs. gp_t holds
// one pair and prefix_op() is the associative prefix operator that merges a
// more significant group [i:j] with the adjacent less significant group [l:k]:
//   (g, p) = (g_hi | p_hi & g_lo, p_hi & p_lo)
// This is the operator of the Han-Carlson adder description; the packaging as
// a struct and a function is this design's own choice.
package roba_pkg;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } gp_t;

  function automatic gp_t prefix_op(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
