// tb_ls_group4: exhaustive check of the four-input carry-tree node.
// For all 2^9 settings of the four (p, g) pairs and c0 the expected span signals
// are computed bit by bit from their definition: a span i..0 generates if some
// position j generates (position 0 also when p0 & c0) and every position above j
// in the span propagates; it propagates if every position propagates.
module tb_ls_group4;
  import adder_pkg::*;

  pg_t  pg [4];
  logic c0;
  pg_t  pg10, pg20, pg30;
  int checks = 0, failures = 0;

  ls_group4 dut (.pg(pg), .c0(c0), .pg10(pg10), .pg20(pg20), .pg30(pg30));

  function automatic pg_t span(logic [3:0] p, logic [3:0] g, logic c, int top);
    pg_t  r;
    logic all_p;
    r.g = 1'b0;
    r.p = 1'b1;
    for (int j = 0; j <= top; j++) begin
      logic gj;
      gj    = g[j] | (j == 0 && p[0] && c);
      all_p = 1'b1;
      for (int k = j + 1; k <= top; k++) all_p &= p[k];
      if (gj && all_p) r.g = 1'b1;
      r.p &= p[j];
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 9); v++) begin
      logic [3:0] p, g;
      {c0, p, g} = 9'(v);
      for (int i = 0; i < 4; i++) pg[i] = '{p: p[i], g: g[i]};
      #1;
      checks += 3;
      if (pg10 !== span(p, g, c0, 1)) begin failures++; $display("FAIL 1:0 p=%b g=%b c0=%b", p, g, c0); end
      if (pg20 !== span(p, g, c0, 2)) begin failures++; $display("FAIL 2:0 p=%b g=%b c0=%b", p, g, c0); end
      if (pg30 !== span(p, g, c0, 3)) begin failures++; $display("FAIL 3:0 p=%b g=%b c0=%b", p, g, c0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
