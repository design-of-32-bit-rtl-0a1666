// ksa_grey_cell: the grey cell of a Kogge-Stone prefix tree.
//
// It merges the (generate, propagate) pair of span hi = [i:k] with the
// generate of the adjacent span [k-1:0] that already reaches bit 0, and
// produces only the group generate of [i:0], which is the carry out of
// bit i:
//   G = G_hi + P_hi . G_lo
// No propagate is formed, since nothing below bit 0 remains to be merged.
// Combinational.
module ksa_grey_cell
  import adder_pkg::*;
(
  input  pg_t  hi,
  input  logic g_lo,
  output logic g
);

  always_comb g = hi.g | (hi.p & g_lo);

endmodule
