// tb_adder_suite: end-to-end test of the whole adder collection at its defaults.
//
// Every vector is applied to all five adders at once (each through its own
// ports), and each {cout, s} is compared with the integer sum x + y + cin.
// Operands are corner cases plus random values, most of them biased towards long
// carry chains.  The test counts how often each carry mechanism of the collection
// was exercised, worked out from the operands alone, and fails if one never was:
//   full ripple       a carry travels across all 32 bits
//   fixed skip        a carry of 1 skips a fully propagating 8-bit block
//   variable skip     a carry of 1 skips a fully propagating block of the 1,3,5,7,7,5,3,1 adder
//   ckp direct        an upper sum bit of a CKP block takes the block's carry-in of 1
//                     directly (all lower bits of that block propagate)
//   select 1 / 0      a carry-select slice of the carry-tree adder picks its
//                     carry-in-1 / carry-in-0 sum
module tb_adder_suite;
  localparam int unsigned N = 32;
  localparam int unsigned K = 8;
  localparam int unsigned VSIZE [8] = '{1, 3, 5, 7, 7, 5, 3, 1};

  logic [N-1:0] x, y;
  logic         cin;
  logic [N-1:0] rca_s, csk_s, csv_s, ckp_s, ls_s;
  logic         rca_c, csk_c, csv_c, ckp_c, ls_c;

  int checks = 0, failures = 0;
  int n_ripple = 0, n_skip = 0, n_vskip = 0, n_direct = 0, n_sel1 = 0, n_sel0 = 0;

  adder_suite dut (
    .rca_x(x), .rca_y(y), .rca_cin(cin), .rca_s(rca_s), .rca_cout(rca_c),
    .csk_x(x), .csk_y(y), .csk_cin(cin), .csk_s(csk_s), .csk_cout(csk_c),
    .csv_x(x), .csv_y(y), .csv_cin(cin), .csv_s(csv_s), .csv_cout(csv_c),
    .ckp_x(x), .ckp_y(y), .ckp_cin(cin), .ckp_s(ckp_s), .ckp_cout(ckp_c),
    .ls_x (x), .ls_y (y), .ls_cin (cin), .ls_s (ls_s),  .ls_cout (ls_c)
  );

  task automatic compare(string name, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h + %h + %0b = %h, got %h", name, x, y, cin, exp, got);
    end
  endtask

  task automatic apply(logic [N-1:0] xa, logic [N-1:0] xb, logic xc);
    logic [N:0] exp, c;
    logic [N-1:0] p;
    int lo;
    x = xa; y = xb; cin = xc;
    #1;
    exp = {1'b0, xa} + {1'b0, xb} + (N+1)'(xc);
    c   = exp ^ {1'b0, xa} ^ {1'b0, xb};   // c[i]: carry into bit i
    p   = xa ^ xb;
    compare("ripple",        {rca_c, rca_s}, exp);
    compare("carry-skip",    {csk_c, csk_s}, exp);
    compare("variable skip", {csv_c, csv_s}, exp);
    compare("carry-skip CKP",{ckp_c, ckp_s}, exp);
    compare("carry tree",    {ls_c,  ls_s},  exp);

    if (xc && &p) n_ripple++;
    for (int j = 1; j < N / K; j++) begin
      if (c[j*K] && &p[j*K +: K]) n_skip++;
      if (c[j*K] && &p[j*K +: 3]) n_direct++;
    end
    lo = 0;
    for (int b = 0; b < 7; b++) begin
      if (c[lo] && ((p >> lo) & ((N'(1) << VSIZE[b]) - 1)) == ((N'(1) << VSIZE[b]) - 1)) n_vskip++;
      lo += VSIZE[b];
    end
    for (int q = 1; q < 4; q++) begin
      if (c[8*q]) n_sel1++;
      else        n_sel0++;
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
    logic [N-1:0] r;
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'h0000_0001, 32'hFFFF_FFFF, 1'b0);
    apply(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 30000; i++) begin
      r = $urandom;
      case (i % 3)
        0: apply(r, $urandom, 1'($urandom));
        1: apply(r, ~r ^ (N'(1) << ($urandom % N)), 1'($urandom));
        default: apply(r, ~r ^ (N'(1) << ($urandom % N)) ^ (N'(1) << ($urandom % N)), 1'($urandom));
      endcase
    end

    $display("mechanisms: full ripple %0d, fixed skip %0d, variable skip %0d, ckp direct %0d, select1 %0d, select0 %0d",
             n_ripple, n_skip, n_vskip, n_direct, n_sel1, n_sel0);
    checks += 6;
    if (n_ripple == 0) begin failures++; $display("FAIL full ripple never happened");   end
    if (n_skip   == 0) begin failures++; $display("FAIL fixed skip never happened");    end
    if (n_vskip  == 0) begin failures++; $display("FAIL variable skip never happened"); end
    if (n_direct == 0) begin failures++; $display("FAIL ckp direct never happened");    end
    if (n_sel1   == 0) begin failures++; $display("FAIL select 1 never happened");      end
    if (n_sel0   == 0) begin failures++; $display("FAIL select 0 never happened");      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
