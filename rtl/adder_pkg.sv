// adder_pkg: types and functions shared by the adders of this collection.
//
// pg_t is a (propagate, generate) pair describing how a span of bit positions
// treats an incoming carry: g = the span produces a carry by itself, p = the span
// passes an incoming carry through.  pg_combine(hi, lo) merges two adjacent spans
// (hi above lo) into one, the usual prefix ("dot") operator of carry-look-ahead
// trees.  When lo.g already folds in a carry-in, the merged g is the carry out of
// the merged span.  Pure combinational helpers, no timing of their own.
package adder_pkg;

  typedef struct packed {
    logic p;
    logic g;
  } pg_t;

  function automatic pg_t pg_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
