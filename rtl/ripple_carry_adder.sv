// ripple_carry_adder: N-bit ripple-carry adder.
//
// A chain of N full adders.  Bit i takes x[i], y[i] and the carry c[i] of the bit
// below; the carry-in enters at bit 0 and the carry out of bit N-1 is cout (the
// (N+1)-th result bit).  The smallest and slowest adder of the collection: the
// worst-case delay grows linearly with N.  Purely combinational; outputs are valid
// once the carry has rippled through all N cells.
//
// The structure is the classic one.  Port names (x, y, cin, s, cout) are shared by
// all adders here; N defaults to 32, the operand width the comparison centres on.
module ripple_carry_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .x (x[i]),
      .y (y[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
