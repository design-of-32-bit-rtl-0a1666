// adder_pkg: types shared by the parallel-prefix (Kogge-Stone) part of the
// hybrid adder.
//
// A prefix network combines (generate, propagate) pairs. pg_t bundles one
// such pair so the black and grey cells and the prefix tree can pass it as a
// single value. g is the group generate, p the group propagate, as in the
// usual definitions G = A AND B and P = A XOR B for a single bit.
package adder_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } pg_t;

endpackage
