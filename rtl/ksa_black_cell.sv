// ksa_black_cell: the black cell of a Kogge-Stone prefix tree.
//
// It takes two (generate, propagate) pairs, one for the more significant
// span hi = [i:k] and one for the adjacent less significant span lo =
// [k-1:j], and merges them into the pair of the whole span [i:j]:
//   G = G_hi + P_hi . G_lo
//   P = P_hi . P_lo
// Used where the merged span does not yet reach bit 0, so its propagate is
// still needed further down the tree. Combinational.
module ksa_black_cell
  import adder_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t out
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
