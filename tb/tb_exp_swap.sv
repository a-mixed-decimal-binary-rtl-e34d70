// tb_exp_swap - random check of the exponent comparison and operand swap.
// Operands get random exponents (often equal), signs, specials and significands.  The
// reference orders the operands by exponent with ordinary integer arithmetic: X is the operand
// with the larger exponent (A on a tie), special operands contribute a zero significand, and
// the sign of X includes the operation when X is B.  Combinational block, so each vector is
// applied and checked after a delay of 1.
module tb_exp_swap;
  import mfa_pkg::*;

  mfp_t a, b;
  logic op, swap, x_zero, eff_sub, sign_x;
  logic [EXP_W-1:0] diff, ex;
  sig_t cx, cy;
  logic [LZC_W-1:0] lzcx;
  int checks = 0, failures = 0;

  exp_swap dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mfp_t rand_op();
    mfp_t o;
    o = '0;
    o.special = ($urandom % 4 == 0) ? special_t'($urandom % 5) : SP_NONE;
    o.sign = 1'($urandom);
    o.sig  = {$urandom, $urandom, 16'($urandom)};
    o.lzc  = LZC_W'($urandom % 17);
    o.exp  = EXP_W'($urandom % 768);
    return o;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ea, eb;
      bit bad, a_first;
      mfp_t x, y;
      a = rand_op(); b = rand_op();
      if ($urandom % 4 == 0) b.exp = a.exp;
      op = 1'($urandom);
      #1;
      ea = int'(a.exp); eb = int'(b.exp);
      a_first = (ea >= eb);
      x = a_first ? a : b;
      y = a_first ? b : a;
      bad = 0;
      if (swap != !a_first) bad = 1;
      if (int'(diff) != (a_first ? ea - eb : eb - ea)) bad = 1;
      if (cx != ((x.special == SP_NONE) ? x.sig : '0)) bad = 1;
      if (cy != ((y.special == SP_NONE) ? y.sig : '0)) bad = 1;
      if (lzcx != x.lzc || ex != x.exp) bad = 1;
      if (x_zero != (x.special == SP_ZERO)) bad = 1;
      if (eff_sub != (a.sign ^ b.sign ^ op)) bad = 1;
      if (sign_x != (a_first ? a.sign : (b.sign ^ op))) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL ea=%0d eb=%0d swap=%0d diff=%0d", ea, eb, swap, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
