// full_adder: one-bit full adder, the cell of the ripple-carry adder.
//
// s = x xor y xor ci; co is the majority of x, y and ci, written as
// generate (x & y) or propagate (x ^ y) with ci.  Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  always_comb begin
    p  = x ^ y;
    s  = p ^ ci;
    co = (x & y) | (p & ci);
  end
endmodule
