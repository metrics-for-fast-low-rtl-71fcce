// ckp_block: K-bit block of the carry-skip-CKP adder (carry-strength block).
//
// For every bit position k the block works out whether the carry into k is
// decided inside the block or is simply the block's carry-in:
//   e[i]  = ~(x[i] ^ y[i])     bit i does not propagate (it generates or kills)
//   c[0]  = cin,  c[i+1] = e[i] ? x[i] : c[i]            (multiplexer ripple)
//   cs[1] = e[0], cs[i+1] = cs[i] | e[i]                 ("carry-strength")
// cs[k] = 0 means bits 0..k-1 all propagate, so the carry into k is cin; cs[k] = 1
// means it was generated or killed inside the block and is c[k].  From bit 2 up
// the sum uses cc[k] = cs[k] ? c[k] : cin, so a late carry-in reaches every sum
// bit through a single multiplexer instead of rippling through the block after it
// arrives.  Bits 0 and 1 use cin and c[1] directly.  s[k] = ~(e[k] ^ cc[k]).
// The block's outputs are cout = c[K] (the rippled carry) and
// dont_skip = cs[K] (some bit of the block does not propagate), which drive the
// skip multiplexer of the adder around it.  Purely combinational.
//
// The gate-level arrangement follows the published 8-bit CKP bit block; K is a
// parameter so the same block serves 4-, 8- and 16-bit variants.
module ckp_block #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic         cin,
  output logic [K-1:0] s,
  output logic         cout,
  output logic         dont_skip
);
  logic [K-1:0] e;    // not-propagate per bit
  logic [K:0]   c;    // rippled carries
  logic [K:0]   cs;   // carry-strength: carry into bit k decided inside the block
  logic [K-1:0] cc;   // carry used by the sum of bit k

  assign e     = ~(x ^ y);
  assign c[0]  = cin;
  assign cs[0] = 1'b0;

  for (genvar i = 0; i < K; i++) begin : g_bit
    assign c[i+1]  = e[i] ? x[i] : c[i];
    assign cs[i+1] = cs[i] | e[i];
    if (i < 2) begin : g_direct
      assign cc[i] = c[i];
    end else begin : g_select
      assign cc[i] = cs[i] ? c[i] : cin;
    end
  end

  assign s = ~(e ^ cc);

  assign cout      = c[K];
  assign dont_skip = cs[K];
endmodule
