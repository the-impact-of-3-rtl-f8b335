// Package shared by the parallel-prefix adders and their top level.
//
// pg_t is the (generate, propagate) pair that flows along every wire of a
// carry tree. pg_combine is the prefix operator that each tree node applies:
// a more significant span (hi) absorbs the adjacent less significant span
// (lo). The operator is associative, which is what lets Brent-Kung, Sklansky
// and Kogge-Stone trees compute the same carries in different shapes.
package arith_pkg;

  typedef struct packed {
    logic g;  // span generates a carry out
    logic p;  // span propagates a carry in
  } pg_t;

  // Default operand width of every unit (64-bit units throughout).
  localparam int unsigned DATA_W = 64;

  function automatic pg_t pg_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
