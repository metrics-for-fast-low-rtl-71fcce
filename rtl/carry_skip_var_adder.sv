// carry_skip_var_adder: carry-skip adder with blocks of different sizes.
//
// Same principle as carry_skip_adder, but the block sizes grow by two from the
// ends towards the middle: for 32 bits they are 1,3,5,7,7,5,3,1 from the least
// significant end.  Short first blocks let a carry generated near the bottom leave
// its block quickly; short last blocks let a skipped carry finish rippling
// quickly; the long middle blocks are skipped.  Every block except the most
// significant one is a skip_block followed by a 2:1 skip multiplexer
// (dont_skip = 1 selects the rippled carry-out, 0 the block's carry-in); the last
// block is a plain ripple-carry adder whose carry-out is cout.  With the sizes
// chosen this way the worst-case delay drops from 2*sqrt(2N) - 3.5 (equal blocks)
// to about 2*sqrt(N) - 2.5 full-adder delays.  Purely combinational.
//
// The 32-bit block sizes and the placement of the multiplexers follow the
// published optimal 32-bit arrangement.  SIZES must add up to N; other widths need
// a matching SIZES list.
module carry_skip_var_adder #(
  parameter int unsigned N          = 32,
  parameter int unsigned NB         = 8,
  parameter int unsigned SIZES [NB] = '{1, 3, 5, 7, 7, 5, 3, 1}
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  // bit position where block b starts
  function automatic int unsigned offset(int unsigned b);
    int unsigned o = 0;
    for (int unsigned i = 0; i < b; i++) o += SIZES[i];
    return o;
  endfunction

  if (offset(NB) != N) begin : g_bad_size
    $error("carry_skip_var_adder: block sizes add up to %0d, not N = %0d", offset(NB), N);
  end

  // bc[b]: carry into block b; bc[NB]: carry out of the adder
  logic [NB:0] bc;

  assign bc[0] = cin;

  for (genvar b = 0; b < NB - 1; b++) begin : g_blk
    localparam int unsigned LO = offset(b);
    localparam int unsigned KB = SIZES[b];
    logic rip_cout;
    logic dont_skip;

    skip_block #(.K(KB)) u_blk (
      .x        (x[LO +: KB]),
      .y        (y[LO +: KB]),
      .cin      (bc[b]),
      .s        (s[LO +: KB]),
      .cout     (rip_cout),
      .dont_skip(dont_skip)
    );

    assign bc[b+1] = dont_skip ? rip_cout : bc[b];
  end

  localparam int unsigned LO_LAST = offset(NB - 1);
  localparam int unsigned K_LAST  = SIZES[NB-1];

  ripple_carry_adder #(.N(K_LAST)) u_last (
    .x   (x[LO_LAST +: K_LAST]),
    .y   (y[LO_LAST +: K_LAST]),
    .cin (bc[NB-1]),
    .s   (s[LO_LAST +: K_LAST]),
    .cout(bc[NB])
  );

  assign cout = bc[NB];
endmodule
