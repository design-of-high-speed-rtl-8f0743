// ksa_pkg: types shared by the Kogge-Stone adder and its prefix cell.
//
// A bit position (or a group of positions) of a parallel-prefix adder is
// described by a generate/propagate pair. pg_t bundles the two so that the
// prefix network can be written as arrays of pairs.
package ksa_pkg;

  // Generate / propagate pair of one bit or of a group of bits i:j.
  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } pg_t;

endpackage
