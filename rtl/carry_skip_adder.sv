// carry_skip_adder: N-bit carry-skip adder with equal K-bit blocks.
//
// The operands are cut into M = N/K blocks.  Block 0 (the least significant) is a
// plain K-bit ripple-carry adder fed by cin.  Every higher block j is a skip_block:
// it ripples its own carry-in, and a 2:1 multiplexer picks the carry passed on to
// block j+1:
//   dont_skip = 1  ->  the block's rippled carry-out          (mux input 1)
//   dont_skip = 0  ->  the block's carry-in, skipping it      (mux input 0)
// The last multiplexer gives cout.  A long carry thus ripples through part of the
// block it starts in, hops over the fully propagating blocks through one
// multiplexer each, and ripples into the block where it ends.  In units of one
// full-adder delay, with a multiplexer at 0.5, the worst case is
// 2K + N/K - 3.5, minimal at K = sqrt(N/2).  Purely combinational.
//
// The block arrangement (plain first block, a skip multiplexer after every other
// block) follows the published general carry-skip structure; N = 32 and K = 8 are
// the main configuration of the comparison.  N must be a multiple of K.
module carry_skip_adder #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned M = N / K;

  if (N % K != 0 || K == 0) begin : g_bad_size
    $error("carry_skip_adder: N (%0d) must be a positive multiple of K (%0d)", N, K);
  end

  // bc[j]: carry into block j; bc[M]: carry out of the adder
  logic [M:0] bc;

  assign bc[0] = cin;

  ripple_carry_adder #(.N(K)) u_blk0 (
    .x   (x[K-1:0]),
    .y   (y[K-1:0]),
    .cin (bc[0]),
    .s   (s[K-1:0]),
    .cout(bc[1])
  );

  for (genvar j = 1; j < M; j++) begin : g_blk
    logic rip_cout;
    logic dont_skip;

    skip_block #(.K(K)) u_blk (
      .x        (x[j*K +: K]),
      .y        (y[j*K +: K]),
      .cin      (bc[j]),
      .s        (s[j*K +: K]),
      .cout     (rip_cout),
      .dont_skip(dont_skip)
    );

    assign bc[j+1] = dont_skip ? rip_cout : bc[j];
  end

  assign cout = bc[M];
endmodule
