// carry_skip_ckp_adder: N-bit carry-skip adder made of CKP (carry-strength) blocks.
//
// Same block arrangement as carry_skip_adder: block 0 is a plain K-bit ripple-carry
// adder fed by cin, and every higher block j feeds a 2:1 skip multiplexer that
// passes on the block's rippled carry-out when dont_skip = 1 and the block's
// carry-in when dont_skip = 0.  The higher blocks are ckp_block instances: their
// sum bits take the carry-in through one multiplexer when all lower bits of the
// block propagate, so a long carry that ends in a block does not have to ripple
// through it before the sums are valid.  Purely combinational.
//
// Follows the published carry-skip-CKP scheme with its general carry-skip
// structure.  N = 32 and K = 8 are the main configuration of the comparison; N must
// be a multiple of K.
module carry_skip_ckp_adder #(
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
    $error("carry_skip_ckp_adder: N (%0d) must be a positive multiple of K (%0d)", N, K);
  end

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

    ckp_block #(.K(K)) u_blk (
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
