// ls_group4: four-input node of the Lynch-Swartzlander carry tree.
//
// Takes four adjacent (p, g) pairs, index 0 least significant, and returns the
// prefix pairs of spans 1:0, 2:0 and 3:0 (pg10, pg20, pg30), built with
// adder_pkg::pg_combine.  A node at the bottom of the tree also takes the adder's
// carry-in c0, which is folded into input 0 (g0 | p0 & c0); the g parts of its
// outputs are then the carries out of bits 1, 2 and 3.  Nodes that have no
// carry-in tie c0 to 0.  Purely combinational.
//
// Inputs and outputs match the node boxes of the published 32-bit carry tree
// (p3,g3 .. p0,g0 in; p1:0-g1:0, p2:0-g2:0, p3:0-g3:0 out; C0 on the bottom node).
// How a node computes its prefixes inside is not given there; a serial chain of
// three prefix operators is used here.
module ls_group4
  import adder_pkg::*;
(
  input  pg_t  pg [4],
  input  logic c0,
  output pg_t  pg10,
  output pg_t  pg20,
  output pg_t  pg30
);
  pg_t in0;

  always_comb begin
    in0.p = pg[0].p;
    in0.g = pg[0].g | (pg[0].p & c0);
    pg10  = pg_combine(pg[1], in0);
    pg20  = pg_combine(pg[2], pg10);
    pg30  = pg_combine(pg[3], pg20);
  end
endmodule
