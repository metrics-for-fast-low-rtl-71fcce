// tb_ls_carry_tree: checks the 32-bit carry tree against integer addition.
// p = x ^ y and g = x & y are formed from random and carry-chain-biased operands;
// the expected c8, c16, c24, c32 are bits 8, 16, 24 and 32 of
// (x + y + cin) ^ x ^ y, the carries into those positions.
module tb_ls_carry_tree;
  logic [31:0] x, y;
  logic        cin, c8, c16, c24, c32;
  int checks = 0, failures = 0;

  ls_carry_tree dut (.p(x ^ y), .g(x & y), .cin(cin), .c8(c8), .c16(c16), .c24(c24), .c32(c32));

  task automatic check(logic [31:0] xa, logic [31:0] xb, logic xc);
    logic [32:0] c;
    x = xa; y = xb; cin = xc;
    #1;
    c = ({1'b0, xa} + {1'b0, xb} + 33'(xc)) ^ {1'b0, xa} ^ {1'b0, xb};
    checks++;
    if ({c32, c24, c16, c8} !== {c[32], c[24], c[16], c[8]}) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0b: carries %b, got %b", xa, xb, xc,
                 {c[32], c[24], c[16], c[8]}, {c32, c24, c16, c8});
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '0, 1'b1);
    check('1, '1, 1'b0);
    check(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] r;
      r = $urandom;
      case (i % 3)
        0: check(r, $urandom, 1'($urandom));
        1: check(r, ~r ^ (32'd1 << ($urandom % 32)), 1'($urandom));
        default: check(r, ~r ^ (32'd1 << ($urandom % 32)) ^ (32'd1 << ($urandom % 32)), 1'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
