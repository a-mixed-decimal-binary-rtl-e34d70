// tb_dec_final_correction - random check of the decimal window selection and final
// correction.
// A decimal magnitude is built for one of the three cases (final carry, left shift, neither):
// 16 significant digits (fewer allowed in the no-shift case, 10^16 - 1 included so that
// rounding up carries out) placed so that the case's window holds them, plus random digits
// below, with no two neighbouring digits both +6 or both -6; each rounding input gets the low
// two digits of its window moved to the value rounded down or up.
// Reference, with plain integers: the result significand is the selected window with its
// rounded low digits; 10^16 becomes 10^15 with the exponent one higher; the exponent is ER
// plus one (final carry) or minus one (left shift); beyond the largest decimal64 exponent the
// result is infinity or 10^16 - 1 at that exponent, as the mode and sign demand; a zero result
// is a zero with ER, negative only for round toward -infinity in a subtraction (or when the
// operands' sign says so in an addition); the leading-zero count is 16 minus the digit count.
// Combinational block.
module tb_dec_final_correction;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  frame_t mag;
  logic final_carry, shift_left, zero, sign, eff_sub;
  logic [7:0] lsds_ns, lsds_fc, lsds_sl;
  logic [EXP_W-1:0] er;
  rmode_t mode;
  mfp_t res;
  int checks = 0, failures = 0;

  dec_final_correction dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window starting at digit lo with its two low digits moved by dec, renormalized
  function automatic logic [7:0] rounded_lsds(input frame_t f, input int lo, input int dec);
    int lv, nv;
    lv = dval(f[lo*4 +: 4]) + dec;
    nv = dval(f[(lo+1)*4 +: 4]);
    if (lv > 6) begin lv -= 10; nv++; end
    else if (lv < -6) begin lv += 10; nv--; end
    return {4'(nv), 4'(lv)};
  endfunction

  // step that takes the window at digit lo to the value rounded down or up at random
  function automatic int round_step(input big_t v, input frame_t f, input int lo);
    big_t fl, slice;
    fl = v / pow_int(10, lo);
    if ($urandom % 2 && fl * pow_int(10, lo) != v) fl++;
    slice = digits_value(f, lo, FRAME - lo, 10);
    return int'(fl - slice);
  endfunction

  initial begin
    for (int n = 0; n < 30000; n++) begin
      int kase, lo, e;
      big_t v, q, got;
      bit bad;
      kase = $urandom % 3;                      // 0 no shift, 1 final carry, 2 left shift
      lo   = (kase == 1) ? 4 : (kase == 2) ? 2 : 3;
      v = big_t'({$urandom, $urandom}) % ipow10(16);
      if ((kase != 0 || n % 2 == 0) && v < ipow10(15)) v += ipow10(15);
      if (n % 9 == 0) v = ipow10(16) - 1;
      v = v * pow_int(10, lo) + big_t'($urandom) % pow_int(10, lo);
      mag = encode(v, 0, FRAME, 10, 1);
      while (!no_twin_sixes(mag)) mag = encode(v, 0, FRAME, 10, 1);
      final_carry = (kase == 1); shift_left = (kase == 2);
      lsds_ns = rounded_lsds(mag, 3, round_step(v, mag, 3));
      lsds_fc = rounded_lsds(mag, 4, round_step(v, mag, 4));
      lsds_sl = rounded_lsds(mag, 2, round_step(v, mag, 2));
      zero = (n % 13 == 0);
      sign = 1'($urandom); eff_sub = 1'($urandom); mode = rmode_t'($urandom % 6);
      e = (n % 4 == 0) ? DEC_EMAX - 1 + $urandom % 2 : 50 + $urandom % 600;
      er = EXP_W'(e);
      #1;
      q = digits_value(mag, lo + 2, 15, 10) * 100;
      q += big_t'(10 * dval((kase == 1) ? lsds_fc[7:4] : (kase == 2) ? lsds_sl[7:4] : lsds_ns[7:4]));
      q += big_t'(dval((kase == 1) ? lsds_fc[3:0] : (kase == 2) ? lsds_sl[3:0] : lsds_ns[3:0]));
      e = e + ((kase == 1) ? 1 : (kase == 2) ? -1 : 0);
      if (q == ipow10(16)) begin q = ipow10(15); e++; end
      got = sig_value(res.sig, 0, SIG_DIGITS, 10);
      bad = 0;
      if (zero) begin
        bad = (res.special != SP_ZERO) || (res.exp != er) || (res.lzc != 16)
           || (res.sign != (eff_sub ? (mode == RM_RN) : sign));
      end else if (e > DEC_EMAX) begin
        if (overflow_to_inf(sign, mode)) bad = (res.special != SP_INF) || (res.sign != sign);
        else bad = (res.special != SP_NONE) || (res.sign != sign) || (int'(res.exp) != DEC_EMAX)
                || (got != (ipow10(16) - 1) * 100) || (res.lzc != 0);
      end else begin
        bad = (res.special != SP_NONE) || (res.sign != sign) || (int'(res.exp) != e)
           || (got != q * 100) || (int'(res.lzc) != 16 - ndigits10(q))
           || !digits_ok({res.sig, 4'b0}, FRAME) || res.sig[19*4 +: 4] != 0;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL case=%0d v=%0d q=%0d got=%0d e=%0d/%0d lzc=%0d sp=%0d",
                                   kase, v, q, got, e, res.exp, res.lzc, res.special);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
