// tb_ckp_block: exhaustive check of the carry-strength (CKP) block.
// An 8-bit block (every x, y, cin) and a 4-bit block (likewise) are checked:
// {cout, s} must equal x + y + cin and dont_skip must be low exactly when every
// bit propagates.  The test also counts the cases in which some sum bit above bit
// 1 takes its carry straight from cin (all bits below it propagate) while cin = 1,
// the case the carry-strength signals exist for, and fails if there were none.
module tb_ckp_block;
  logic [7:0] x, y, s;
  logic       cin, cout, dont_skip;
  logic [3:0] x4, y4, s4;
  logic       cin4, cout4, ds4;
  int checks = 0, failures = 0;
  int n_direct = 0;

  ckp_block          dut  (.x(x), .y(y), .cin(cin), .s(s), .cout(cout), .dont_skip(dont_skip));
  ckp_block #(.K(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .s(s4), .cout(cout4), .dont_skip(ds4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [7:0] p;
      {cin, x, y} = 17'(v);
      #1;
      p = x ^ y;
      if (cin && p[0] && p[1] && p[2]) n_direct++;
      checks += 2;
      if ({cout, s} !== 9'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL sum %h + %h + %0b got %h", x, y, cin, {cout, s});
      end
      if (dont_skip !== (p != 8'hFF)) begin
        failures++;
        if (failures < 10) $display("FAIL dont_skip x=%h y=%h got %0b", x, y, dont_skip);
      end
    end
    for (int v = 0; v < (1 << 9); v++) begin
      {cin4, x4, y4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(int'(x4) + int'(y4) + int'(cin4)) || ds4 !== ((x4 ^ y4) != 4'hF)) begin
        failures++;
        if (failures < 10) $display("FAIL K=4 %h + %h + %0b got %h ds=%0b", x4, y4, cin4, {cout4, s4}, ds4);
      end
    end
    checks++;
    if (n_direct == 0) begin
      failures++;
      $display("FAIL carry-in never reached an upper sum bit directly");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
