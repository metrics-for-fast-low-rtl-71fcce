// lynch_swartzlander_adder: 32-bit hybrid carry-look-ahead adder.
//
// A carry tree (ls_carry_tree) computes only the carries into bits 8, 16 and 24
// and the carry-out, directly from the bit propagate (x ^ y) and generate (x & y)
// signals.  In parallel, the sum is formed in 8-bit slices:
//   s[7:0]    one 8-bit ripple-carry adder fed by cin;
//   s[15:8]   two 8-bit ripple-carry adders, with carry-in 1 and 0, and a
//             multiplexer that picks one by c8; likewise s[23:16] by c16 and
//             s[31:24] by c24 (carry-select).
// cout is c32 from the tree.  The slower of the tree and an 8-bit ripple sets the
// delay.  Purely combinational.
//
// The slice width, the carry-select arrangement and the tree follow the published
// 32-bit carry-tree diagram; the 8-bit adders inside the slices are plain
// ripple-carry adders here, a choice of this design.
module lynch_swartzlander_adder (
  input  logic [31:0] x,
  input  logic [31:0] y,
  input  logic        cin,
  output logic [31:0] s,
  output logic        cout
);
  logic [31:0] p, g;
  logic        c8, c16, c24, c32;
  logic [3:1]  sel;

  assign p = x ^ y;
  assign g = x & y;

  ls_carry_tree u_tree (
    .p  (p),
    .g  (g),
    .cin(cin),
    .c8 (c8),
    .c16(c16),
    .c24(c24),
    .c32(c32)
  );

  // slice 0: carry-in known from the start
  logic unused_c0;

  ripple_carry_adder #(.N(8)) u_slice0 (
    .x   (x[7:0]),
    .y   (y[7:0]),
    .cin (cin),
    .s   (s[7:0]),
    .cout(unused_c0)
  );

  assign sel = {c24, c16, c8};

  // slices 1..3: carry-select
  for (genvar q = 1; q < 4; q++) begin : g_slice
    logic [7:0] s_c1, s_c0;
    logic       unused_co1, unused_co0;

    ripple_carry_adder #(.N(8)) u_add1 (
      .x   (x[8*q +: 8]),
      .y   (y[8*q +: 8]),
      .cin (1'b1),
      .s   (s_c1),
      .cout(unused_co1)
    );

    ripple_carry_adder #(.N(8)) u_add0 (
      .x   (x[8*q +: 8]),
      .y   (y[8*q +: 8]),
      .cin (1'b0),
      .s   (s_c0),
      .cout(unused_co0)
    );

    assign s[8*q +: 8] = sel[q] ? s_c1 : s_c0;
  end

  assign cout = c32;
endmodule
