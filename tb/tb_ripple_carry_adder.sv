// tb_ripple_carry_adder: checks the ripple-carry adder against integer addition.
// An 8-bit instance is checked exhaustively (all x, y, cin); the default 32-bit
// instance gets corner cases (full-length carry chains) and random operands,
// half of them biased towards long carry chains (y close to ~x).  16- and 64-bit
// instances, the other operand widths compared, get the same random treatment.
module tb_ripple_carry_adder;
  localparam int unsigned W = 32;

  logic [7:0]   a8, b8, s8;
  logic         c8i, c8o;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic [15:0]  a16, b16, s16;
  logic         c16i, c16o;
  logic [63:0]  a64, b64, s64;
  logic         c64i, c64o;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.N(16)) dut16 (.x(a16), .y(b16), .cin(c16i), .s(s16), .cout(c16o));
  ripple_carry_adder #(.N(64)) dut64 (.x(a64), .y(b64), .cin(c64i), .s(s64), .cout(c64o));

  ripple_carry_adder #(.N(8)) dut8 (.x(a8), .y(b8), .cin(c8i), .s(s8), .cout(c8o));
  ripple_carry_adder          dut  (.x(a),  .y(b),  .cin(ci),  .s(s),  .cout(co));

  task automatic check32(logic [W-1:0] xa, logic [W-1:0] xb, logic xc);
    logic [W:0] exp;
    a = xa; b = xb; ci = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + (W+1)'(xc);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0b = %h, got %h", xa, xb, xc, exp, {co, s});
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
    for (int v = 0; v < (1 << 17); v++) begin
      {c8i, a8, b8} = 17'(v);
      #1;
      checks++;
      if ({c8o, s8} !== 9'(int'(a8) + int'(b8) + int'(c8i))) begin
        failures++;
        if (failures < 10) $display("FAIL8 %h + %h + %0b got %h", a8, b8, c8i, {c8o, s8});
      end
    end
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b1);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'h0000_0001, 32'hFFFF_FFFF, 1'b0);
    check32('0, '0, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] r;
      r = $urandom;
      if (i % 2 == 0) check32(r, $urandom, 1'($urandom));
      else            check32(r, ~r ^ (W'(1) << ($urandom % W)), 1'($urandom));
    end
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] r;
      logic [64:0] e64;
      logic [16:0] e16;
      r    = {$urandom, $urandom};
      a64  = r;
      b64  = (i % 2 == 0) ? {$urandom, $urandom} : ~r ^ (64'd1 << ($urandom % 64));
      c64i = 1'($urandom);
      a16  = r[15:0];
      b16  = (i % 2 == 0) ? 16'($urandom) : ~r[15:0] ^ (16'd1 << ($urandom % 16));
      c16i = 1'($urandom);
      #1;
      e64 = {1'b0, a64} + {1'b0, b64} + 65'(c64i);
      e16 = {1'b0, a16} + {1'b0, b16} + 17'(c16i);
      checks += 2;
      if ({c64o, s64} !== e64) begin
        failures++;
        if (failures < 10) $display("FAIL64 %h + %h + %0b got %h", a64, b64, c64i, {c64o, s64});
      end
      if ({c16o, s16} !== e16) begin
        failures++;
        if (failures < 10) $display("FAIL16 %h + %h + %0b got %h", a16, b16, c16i, {c16o, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
