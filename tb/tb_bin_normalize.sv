// tb_bin_normalize - random check of the binary normalization and Group_ID.
// A positive magnitude with a known leading position (random redundant octal digits, leading
// position 0..20, random sticky part) is normalized.  Reference, with plain integers: the
// output exponent is ER + top - 19; for top = 20 the output is the magnitude divided by 8, the
// dropped digit joining the sticky part; otherwise it is the magnitude times 8^(19-top).  The
// integer part of the output (two top digits, less one when the rest is negative) must lie in
// [1,8), and the Group_ID must be 1 for 1, 2 for 2..3 and 3 for 4..7.  Combinational block.
module tb_bin_normalize;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  frame_t mag, nf;
  logic sticky, sticky_neg, n_sticky, n_sticky_neg;
  logic [4:0] top;
  logic [EXP_W-1:0] er, en;
  logic [1:0] group_id;
  int checks = 0, failures = 0;

  bin_normalize dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int t, ip, want_g, d0;
      big_t m, lo, hi, vn, want;
      bit bad, want_sn, want_sneg;
      t  = (n % 4 == 0) ? $urandom % 21 : 17 + $urandom % 4;
      lo = pow_int(8, t) + 1;
      hi = (t == 20) ? 3 * pow_int(8, 20) : pow_int(8, t + 1) - 1;
      m  = lo + ((big_t'({$urandom, $urandom, $urandom, $urandom}) & ~(big_t'(1) << 127)) % (hi - lo));
      if (n % 5 == 0) m = (m >> (3 * t)) << (3 * t);     // zero tail
      if (m < lo) m = lo;
      mag = encode(m, 0, FRAME, 8, 1);
      sticky = 1'($urandom); sticky_neg = sticky & 1'($urandom);
      top = 5'(t);
      er = EXP_W'(100 + $urandom % 500);
      #1;
      bad = (int'(en) != int'(er) + t - 19);
      vn = digits_value(nf, 0, FRAME, 8);
      want_sn = sticky; want_sneg = sticky_neg;
      if (t == 20) begin
        d0 = dval(mag[3:0]);
        want = (m - d0) / 8;
        if (d0 != 0) begin want_sn = 1; want_sneg = (d0 < 0); end
      end else begin
        want = m << (3 * (19 - t));
      end
      if (vn != want || n_sticky != want_sn || (want_sn && n_sticky_neg != want_sneg)) bad = 1;
      ip = int'(vn / pow_int(8, 19));
      if (vn == big_t'(ip) * pow_int(8, 19) && want_sn && want_sneg) ip--;
      want_g = (ip >= 4) ? 3 : (ip >= 2) ? 2 : 1;
      if (ip < 1 || ip > 7 || int'(group_id) != want_g) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL top=%0d mag=%h nf=%h en=%0d g=%0d", t, mag, nf, en, group_id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
