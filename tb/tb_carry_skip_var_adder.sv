// tb_carry_skip_var_adder: checks carry_skip_var_adder against integer addition.
// Instance: the default 32-bit adder with blocks 1,3,5,7,7,5,3,1.
// Every instance gets corner cases (carry chains over the full width) and random
// operands, half of them biased towards long carry chains (y = ~x with one bit
// flipped, so a carry crosses many blocks).  The expected {cout, s} is the
// integer sum x + y + cin.  The test also counts how often a carry entering a
// fully propagating block had to skip it, and fails if that never happened.
module tb_carry_skip_var_adder;
  logic [31:0] d_x, d_y, d_s;
  logic        d_cin, d_cout;
  carry_skip_var_adder  u_d (.x(d_x), .y(d_y), .cin(d_cin), .s(d_s), .cout(d_cout));

  int checks = 0, failures = 0;
  int n_skip = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a carry of 1 entering a block whose bits all propagate (lo..lo+k-1)
  function automatic bit skipped(logic [63:0] xa, logic [63:0] xb, logic xc, int lo, int k);
    logic [64:0] sum;
    logic [64:0] carries;
    sum     = {1'b0, xa} + {1'b0, xb} + 65'(xc);
    carries = sum ^ {1'b0, xa} ^ {1'b0, xb};
    return carries[lo] && (((xa ^ xb) >> lo) & ((64'd1 << k) - 1)) == ((64'd1 << k) - 1);
  endfunction

  task automatic check_d(logic [31:0] xa, logic [31:0] xb, logic xc);
    logic [32:0] exp;
    int blk [7][2] = '{'{0, 1}, '{1, 3}, '{4, 5}, '{9, 7}, '{16, 7}, '{23, 5}, '{28, 3}};
    d_x = xa; d_y = xb; d_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 33'(xc);
    checks++;
    if ({d_cout, d_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL d: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {d_cout, d_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_d(int n);
    logic [31:0] r;
    check_d('1, '0, 1'b1);
    check_d('1, '1, 1'b1);
    check_d('1, '1, 1'b0);
    check_d({(32/2){2'b01}}, {(32/2){2'b10}}, 1'b1);
    check_d(32'(1), '1, 1'b0);
    check_d('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 32'({$urandom, $urandom});
      if (i % 2 == 0) check_d(r, 32'({$urandom, $urandom}), 1'($urandom));
      else            check_d(r, ~r ^ (32'(1) << ($urandom % 32)), 1'($urandom));
    end
  endtask

  initial begin
    run_d(20000);
    checks++;
    if (n_skip == 0) begin
      failures++;
      $display("FAIL no carry ever skipped a block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
