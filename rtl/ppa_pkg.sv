// ppa_pkg: types shared by the parallel prefix adder.
//
// A prefix adder works on (generate, propagate) pairs. pg_t bundles one such
// pair; the prefix cells (black_cell, gray_cell), the pre-processing stage and
// the carry tree all pass vectors of it. The pair encoding is the usual one
// for carry-lookahead logic: g = the group produces a carry on its own,
// p = the group passes an incoming carry through.
package ppa_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } pg_t;

endpackage
