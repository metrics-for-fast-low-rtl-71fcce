// ls_carry_tree: carry tree of the 32-bit Lynch-Swartzlander adder.
//
// Produces only the carries the carry-select sum blocks need: c8, c16, c24 (into
// bits 8, 16, 24) and c32 (the carry-out), with no backward propagation.
//   Level 1: eight ls_group4 nodes, one per 4-bit group; the node of bits 3..0 takes
//            cin, so its 3:0 output is already the carry c4.
//   Level 2: one node over groups 3..0 (bits 15..0) gives c8 (its 1:0 output) and
//            c16 (its 3:0 output); one node over groups 7..4 gives the (p, g) of
//            bits 23..16, 27..16 and 31..16.
//   Level 3: one node whose inputs 3..1 are those three spans and whose input 0 is
//            c16 (as g, with p = 0) gives c24 (1:0 output) and c32 (3:0 output).
// p[i] and g[i] are the bit propagate and generate signals.  Purely combinational;
// depth is three nodes.
//
// The node arrangement and which output feeds which input follow the published
// carry-tree diagram.  Fixed 32-bit width.  Several node outputs (the 1:0 and
// 2:0 spans of the level-1 nodes, for instance) are left open, as in that diagram;
// lint reports them as unused signals.
module ls_carry_tree
  import adder_pkg::*;
(
  input  logic [31:0] p,
  input  logic [31:0] g,
  input  logic        cin,
  output logic        c8,
  output logic        c16,
  output logic        c24,
  output logic        c32
);
  pg_t l1_in  [8][4];
  pg_t l1_10  [8];
  pg_t l1_20  [8];
  pg_t l1_30  [8];
  pg_t l2lo_in[4];
  pg_t l2hi_in[4];
  pg_t l3_in  [4];
  pg_t l2lo_10, l2lo_20, l2lo_30;
  pg_t l2hi_10, l2hi_20, l2hi_30;
  pg_t l3_10, l3_20, l3_30;

  // level 1: 4-bit groups
  for (genvar q = 0; q < 8; q++) begin : g_l1
    for (genvar i = 0; i < 4; i++) begin : g_in
      assign l1_in[q][i] = '{p: p[4*q+i], g: g[4*q+i]};
    end
    ls_group4 u_node (
      .pg  (l1_in[q]),
      .c0  (q == 0 ? cin : 1'b0),
      .pg10(l1_10[q]),
      .pg20(l1_20[q]),
      .pg30(l1_30[q])
    );
  end

  // level 2: 16-bit halves
  for (genvar i = 0; i < 4; i++) begin : g_l2_in
    assign l2lo_in[i] = l1_30[i];
    assign l2hi_in[i] = l1_30[4+i];
  end

  ls_group4 u_l2_lo (
    .pg  (l2lo_in),
    .c0  (1'b0),
    .pg10(l2lo_10),
    .pg20(l2lo_20),
    .pg30(l2lo_30)
  );

  ls_group4 u_l2_hi (
    .pg  (l2hi_in),
    .c0  (1'b0),
    .pg10(l2hi_10),
    .pg20(l2hi_20),
    .pg30(l2hi_30)
  );

  // level 3: upper half, with c16 as its lowest input
  assign l3_in[0] = '{p: 1'b0, g: l2lo_30.g};
  assign l3_in[1] = l2hi_10;
  assign l3_in[2] = l2hi_20;
  assign l3_in[3] = l2hi_30;

  ls_group4 u_l3 (
    .pg  (l3_in),
    .c0  (1'b0),
    .pg10(l3_10),
    .pg20(l3_20),
    .pg30(l3_30)
  );

  assign c8  = l2lo_10.g;
  assign c16 = l2lo_30.g;
  assign c24 = l3_10.g;
  assign c32 = l3_30.g;
endmodule
