// tb_carry_skip_adder: checks carry_skip_adder against integer addition.
// Instances: the default 32-bit adder with 8-bit blocks, and the other sizes
// compared: 16 bits with 4- and 8-bit blocks, 32 bits with 16-bit blocks, 64 bits
// with 8-, 16- and 32-bit blocks.
// Every instance gets corner cases (carry chains over the full width) and random
// operands, half of them biased towards long carry chains (y = ~x with one bit
// flipped, so a carry crosses many blocks).  The expected {cout, s} is the
// integer sum x + y + cin.  The test also counts how often a carry entering a
// fully propagating block had to skip it, and fails if that never happened.
module tb_carry_skip_adder;
  logic [31:0] d_x, d_y, d_s;
  logic        d_cin, d_cout;
  carry_skip_adder  u_d (.x(d_x), .y(d_y), .cin(d_cin), .s(d_s), .cout(d_cout));

  logic [15:0] n16k4_x, n16k4_y, n16k4_s;
  logic        n16k4_cin, n16k4_cout;
  carry_skip_adder #(.N(16), .K(4)) u_n16k4 (.x(n16k4_x), .y(n16k4_y), .cin(n16k4_cin), .s(n16k4_s), .cout(n16k4_cout));

  logic [15:0] n16k8_x, n16k8_y, n16k8_s;
  logic        n16k8_cin, n16k8_cout;
  carry_skip_adder #(.N(16), .K(8)) u_n16k8 (.x(n16k8_x), .y(n16k8_y), .cin(n16k8_cin), .s(n16k8_s), .cout(n16k8_cout));

  logic [31:0] n32k16_x, n32k16_y, n32k16_s;
  logic        n32k16_cin, n32k16_cout;
  carry_skip_adder #(.N(32), .K(16)) u_n32k16 (.x(n32k16_x), .y(n32k16_y), .cin(n32k16_cin), .s(n32k16_s), .cout(n32k16_cout));

  logic [63:0] n64k8_x, n64k8_y, n64k8_s;
  logic        n64k8_cin, n64k8_cout;
  carry_skip_adder #(.N(64), .K(8)) u_n64k8 (.x(n64k8_x), .y(n64k8_y), .cin(n64k8_cin), .s(n64k8_s), .cout(n64k8_cout));

  logic [63:0] n64k16_x, n64k16_y, n64k16_s;
  logic        n64k16_cin, n64k16_cout;
  carry_skip_adder #(.N(64), .K(16)) u_n64k16 (.x(n64k16_x), .y(n64k16_y), .cin(n64k16_cin), .s(n64k16_s), .cout(n64k16_cout));

  logic [63:0] n64k32_x, n64k32_y, n64k32_s;
  logic        n64k32_cin, n64k32_cout;
  carry_skip_adder #(.N(64), .K(32)) u_n64k32 (.x(n64k32_x), .y(n64k32_y), .cin(n64k32_cin), .s(n64k32_s), .cout(n64k32_cout));

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
    int blk [3][2] = '{'{8, 8}, '{16, 8}, '{24, 8}};
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

  task automatic check_n16k4(logic [15:0] xa, logic [15:0] xb, logic xc);
    logic [16:0] exp;
    int blk [3][2] = '{'{4, 4}, '{8, 4}, '{12, 4}};
    n16k4_x = xa; n16k4_y = xb; n16k4_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 17'(xc);
    checks++;
    if ({n16k4_cout, n16k4_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n16k4: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n16k4_cout, n16k4_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n16k4(int n);
    logic [15:0] r;
    check_n16k4('1, '0, 1'b1);
    check_n16k4('1, '1, 1'b1);
    check_n16k4('1, '1, 1'b0);
    check_n16k4({(16/2){2'b01}}, {(16/2){2'b10}}, 1'b1);
    check_n16k4(16'(1), '1, 1'b0);
    check_n16k4('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 16'({$urandom, $urandom});
      if (i % 2 == 0) check_n16k4(r, 16'({$urandom, $urandom}), 1'($urandom));
      else            check_n16k4(r, ~r ^ (16'(1) << ($urandom % 16)), 1'($urandom));
    end
  endtask

  task automatic check_n16k8(logic [15:0] xa, logic [15:0] xb, logic xc);
    logic [16:0] exp;
    int blk [1][2] = '{'{8, 8}};
    n16k8_x = xa; n16k8_y = xb; n16k8_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 17'(xc);
    checks++;
    if ({n16k8_cout, n16k8_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n16k8: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n16k8_cout, n16k8_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n16k8(int n);
    logic [15:0] r;
    check_n16k8('1, '0, 1'b1);
    check_n16k8('1, '1, 1'b1);
    check_n16k8('1, '1, 1'b0);
    check_n16k8({(16/2){2'b01}}, {(16/2){2'b10}}, 1'b1);
    check_n16k8(16'(1), '1, 1'b0);
    check_n16k8('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 16'({$urandom, $urandom});
      if (i % 2 == 0) check_n16k8(r, 16'({$urandom, $urandom}), 1'($urandom));
      else            check_n16k8(r, ~r ^ (16'(1) << ($urandom % 16)), 1'($urandom));
    end
  endtask

  task automatic check_n32k16(logic [31:0] xa, logic [31:0] xb, logic xc);
    logic [32:0] exp;
    int blk [1][2] = '{'{16, 16}};
    n32k16_x = xa; n32k16_y = xb; n32k16_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 33'(xc);
    checks++;
    if ({n32k16_cout, n32k16_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n32k16: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n32k16_cout, n32k16_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n32k16(int n);
    logic [31:0] r;
    check_n32k16('1, '0, 1'b1);
    check_n32k16('1, '1, 1'b1);
    check_n32k16('1, '1, 1'b0);
    check_n32k16({(32/2){2'b01}}, {(32/2){2'b10}}, 1'b1);
    check_n32k16(32'(1), '1, 1'b0);
    check_n32k16('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 32'({$urandom, $urandom});
      if (i % 2 == 0) check_n32k16(r, 32'({$urandom, $urandom}), 1'($urandom));
      else            check_n32k16(r, ~r ^ (32'(1) << ($urandom % 32)), 1'($urandom));
    end
  endtask

  task automatic check_n64k8(logic [63:0] xa, logic [63:0] xb, logic xc);
    logic [64:0] exp;
    int blk [7][2] = '{'{8, 8}, '{16, 8}, '{24, 8}, '{32, 8}, '{40, 8}, '{48, 8}, '{56, 8}};
    n64k8_x = xa; n64k8_y = xb; n64k8_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 65'(xc);
    checks++;
    if ({n64k8_cout, n64k8_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n64k8: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n64k8_cout, n64k8_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n64k8(int n);
    logic [63:0] r;
    check_n64k8('1, '0, 1'b1);
    check_n64k8('1, '1, 1'b1);
    check_n64k8('1, '1, 1'b0);
    check_n64k8({(64/2){2'b01}}, {(64/2){2'b10}}, 1'b1);
    check_n64k8(64'(1), '1, 1'b0);
    check_n64k8('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 64'({$urandom, $urandom});
      if (i % 2 == 0) check_n64k8(r, 64'({$urandom, $urandom}), 1'($urandom));
      else            check_n64k8(r, ~r ^ (64'(1) << ($urandom % 64)), 1'($urandom));
    end
  endtask

  task automatic check_n64k16(logic [63:0] xa, logic [63:0] xb, logic xc);
    logic [64:0] exp;
    int blk [3][2] = '{'{16, 16}, '{32, 16}, '{48, 16}};
    n64k16_x = xa; n64k16_y = xb; n64k16_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 65'(xc);
    checks++;
    if ({n64k16_cout, n64k16_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n64k16: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n64k16_cout, n64k16_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n64k16(int n);
    logic [63:0] r;
    check_n64k16('1, '0, 1'b1);
    check_n64k16('1, '1, 1'b1);
    check_n64k16('1, '1, 1'b0);
    check_n64k16({(64/2){2'b01}}, {(64/2){2'b10}}, 1'b1);
    check_n64k16(64'(1), '1, 1'b0);
    check_n64k16('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 64'({$urandom, $urandom});
      if (i % 2 == 0) check_n64k16(r, 64'({$urandom, $urandom}), 1'($urandom));
      else            check_n64k16(r, ~r ^ (64'(1) << ($urandom % 64)), 1'($urandom));
    end
  endtask

  task automatic check_n64k32(logic [63:0] xa, logic [63:0] xb, logic xc);
    logic [64:0] exp;
    int blk [1][2] = '{'{32, 32}};
    n64k32_x = xa; n64k32_y = xb; n64k32_cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + 65'(xc);
    checks++;
    if ({n64k32_cout, n64k32_s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n64k32: %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {n64k32_cout, n64k32_s});
    end
    foreach (blk[i]) if (skipped(64'(xa), 64'(xb), xc, blk[i][0], blk[i][1])) n_skip++;
  endtask

  task automatic run_n64k32(int n);
    logic [63:0] r;
    check_n64k32('1, '0, 1'b1);
    check_n64k32('1, '1, 1'b1);
    check_n64k32('1, '1, 1'b0);
    check_n64k32({(64/2){2'b01}}, {(64/2){2'b10}}, 1'b1);
    check_n64k32(64'(1), '1, 1'b0);
    check_n64k32('0, '0, 1'b0);
    for (int i = 0; i < n; i++) begin
      r = 64'({$urandom, $urandom});
      if (i % 2 == 0) check_n64k32(r, 64'({$urandom, $urandom}), 1'($urandom));
      else            check_n64k32(r, ~r ^ (64'(1) << ($urandom % 64)), 1'($urandom));
    end
  endtask

  initial begin
    run_d(20000);
    run_n16k4(20000);
    run_n16k8(20000);
    run_n32k16(20000);
    run_n64k8(20000);
    run_n64k16(20000);
    run_n64k32(20000);
    checks++;
    if (n_skip == 0) begin
      failures++;
      $display("FAIL no carry ever skipped a block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
