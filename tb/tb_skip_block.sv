// tb_skip_block: exhaustive check of an 8-bit carry-skip block.
// For every x, y, cin: {cout, s} must equal x + y + cin, and dont_skip must be low
// exactly when every bit propagates (x ^ y all ones).  A 1-bit block is also
// checked exhaustively, as the variable-size adder uses such blocks.
module tb_skip_block;
  logic [7:0] x, y, s;
  logic       cin, cout, dont_skip;
  logic       x1, y1, s1, cin1, cout1, ds1;
  int checks = 0, failures = 0;
  int n_skip = 0;

  skip_block          dut  (.x(x), .y(y), .cin(cin), .s(s), .cout(cout), .dont_skip(dont_skip));
  skip_block #(.K(1)) dut1 (.x(x1), .y(y1), .cin(cin1), .s(s1), .cout(cout1), .dont_skip(ds1));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic exp_ds;
      {cin, x, y} = 17'(v);
      #1;
      exp_ds = ((x ^ y) != 8'hFF);
      if (!exp_ds) n_skip++;
      checks += 2;
      if ({cout, s} !== 9'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL sum %h + %h + %0b got %h", x, y, cin, {cout, s});
      end
      if (dont_skip !== exp_ds) begin
        failures++;
        if (failures < 10) $display("FAIL dont_skip x=%h y=%h got %0b", x, y, dont_skip);
      end
    end
    for (int v = 0; v < 8; v++) begin
      {cin1, x1, y1} = 3'(v);
      #1;
      checks++;
      if ({cout1, s1} !== 2'(int'(x1) + int'(y1) + int'(cin1)) || ds1 !== !(x1 ^ y1)) begin
        failures++;
        $display("FAIL K=1 x=%0b y=%0b c=%0b", x1, y1, cin1);
      end
    end
    checks++;
    if (n_skip != 512) begin
      failures++;
      $display("FAIL expected 512 all-propagate cases, saw %0d", n_skip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
