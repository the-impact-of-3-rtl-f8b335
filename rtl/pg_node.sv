// Propagate-generate prefix node: the circle of every carry-tree diagram.
//
// It merges the (g, p) pair of a more significant bit span with the pair of
// the adjacent, less significant span into the pair of the combined span:
//   g = g_hi | (p_hi & g_lo),  p = p_hi & p_lo.
// All three adders (bk_adder, sk_adder, ks_adder) are built from this one
// node; they differ only in which nodes they place and how they wire them.
// The node's role follows the carry-tree description; its gate equations
// are the standard prefix operator, as the description gives none.
// Purely combinational, no clock. In a two-die stack a node sits on one die
// or the other; that placement does not change its function.
module pg_node
  import arith_pkg::*;
(
  input  pg_t hi,   // span [i:k]
  input  pg_t lo,   // span [k-1:j]
  output pg_t out   // span [i:j]
);

  always_comb out = pg_combine(hi, lo);

endmodule
