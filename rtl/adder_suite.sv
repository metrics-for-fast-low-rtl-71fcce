// adder_suite: the adders of the comparison, side by side.
//
// Five independent adders, each with its own operands, carry-in, sum and
// carry-out, so that each can be placed, timed and measured on its own:
//   rca_*  ripple_carry_adder        N bits
//   csk_*  carry_skip_adder          N bits, equal K-bit blocks
//   csv_*  carry_skip_var_adder      32 bits, blocks 1,3,5,7,7,5,3,1
//   ckp_*  carry_skip_ckp_adder      N bits, K-bit carry-strength blocks
//   ls_*   lynch_swartzlander_adder  32 bits, carry tree + carry-select
// All compute {cout, s} = x + y + cin; they differ only in how the carry travels,
// and therefore in delay and size.  Purely combinational: no clock, no reset.
//
// The set of adders and the defaults N = 32, K = 8 follow the comparison's main
// 32-bit configuration.  The vendor library adder it also measures is not part of
// this RTL.
module adder_suite #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8
) (
  input  logic [N-1:0]  rca_x,
  input  logic [N-1:0]  rca_y,
  input  logic          rca_cin,
  output logic [N-1:0]  rca_s,
  output logic          rca_cout,

  input  logic [N-1:0]  csk_x,
  input  logic [N-1:0]  csk_y,
  input  logic          csk_cin,
  output logic [N-1:0]  csk_s,
  output logic          csk_cout,

  input  logic [31:0]   csv_x,
  input  logic [31:0]   csv_y,
  input  logic          csv_cin,
  output logic [31:0]   csv_s,
  output logic          csv_cout,

  input  logic [N-1:0]  ckp_x,
  input  logic [N-1:0]  ckp_y,
  input  logic          ckp_cin,
  output logic [N-1:0]  ckp_s,
  output logic          ckp_cout,

  input  logic [31:0]   ls_x,
  input  logic [31:0]   ls_y,
  input  logic          ls_cin,
  output logic [31:0]   ls_s,
  output logic          ls_cout
);
  ripple_carry_adder #(.N(N)) u_rca (
    .x(rca_x), .y(rca_y), .cin(rca_cin), .s(rca_s), .cout(rca_cout)
  );

  carry_skip_adder #(.N(N), .K(K)) u_csk (
    .x(csk_x), .y(csk_y), .cin(csk_cin), .s(csk_s), .cout(csk_cout)
  );

  carry_skip_var_adder u_csv (
    .x(csv_x), .y(csv_y), .cin(csv_cin), .s(csv_s), .cout(csv_cout)
  );

  carry_skip_ckp_adder #(.N(N), .K(K)) u_ckp (
    .x(ckp_x), .y(ckp_y), .cin(ckp_cin), .s(ckp_s), .cout(ckp_cout)
  );

  lynch_swartzlander_adder u_ls (
    .x(ls_x), .y(ls_y), .cin(ls_cin), .s(ls_s), .cout(ls_cout)
  );
endmodule
