// skip_block: one K-bit block of a conventional carry-skip adder.
//
// The block adds x and y with its carry-in by rippling (a K-bit ripple-carry
// adder) and also reports dont_skip, which is low exactly when every bit of the
// block propagates (x[i] ^ y[i] for all i).  In that case the block's carry-out
// equals its carry-in, so the adder around it may route the carry-in past the
// block through a 2:1 multiplexer instead of waiting for the ripple.
// dont_skip depends on x and y only, so it settles early ("setup") while the carry
// is still on its way.  Purely combinational.
//
// Ports follow the block symbol of the general carry-skip structure (Cin, Cout,
// Don't skip, S); the propagate definition x ^ y is the usual one.
module skip_block #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic         cin,
  output logic [K-1:0] s,
  output logic         cout,
  output logic         dont_skip
);
  ripple_carry_adder #(.N(K)) u_rca (
    .x   (x),
    .y   (y),
    .cin (cin),
    .s   (s),
    .cout(cout)
  );

  assign dont_skip = ~&(x ^ y);
endmodule
