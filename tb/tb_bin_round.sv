// tb_bin_round - random check of the binary rounding block.
// Inputs are normalized octal significands N (integer part 1..7 in the top two digits, random
// redundant digits with no two neighbouring digits both +6 or both -6, low parts biased towards exact halves), a random sticky part, the
// matching Group_ID, both signs, all six modes, and exponents that sometimes sit at the top of
// the binary64 range.  Reference, with plain integers: the LSB weight is 32, 64 or 128 units
// of the extension digit; 4*N plus the sticky sign is divided by 4 times that weight and the
// quotient rounded by the IEEE rule of the mode.  The result significand (in LSD units) must
// equal quotient * weight / 8, with 8 turned into 1 and the exponent raised by one; beyond the
// binary64 range the result must be infinity or the largest finite number 2 - 2^-52 at the
// top exponent, as the mode and sign demand.  Combinational block.
module tb_bin_round;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  frame_t nf;
  logic sticky, sticky_neg, sign;
  logic [1:0] group_id;
  logic [EXP_W-1:0] en;
  rmode_t mode;
  mfp_t res;
  int checks = 0, failures = 0;

  bin_round dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 30000; n++) begin
      int ip, w, fs, e, ip2;
      big_t v, v4, q0, rem4, q, got, want;
      rem_t cat;
      bit bad, ovf;
      ip = 1 + $urandom % 7;
      if (n % 7 == 0) ip = 7;
      v  = big_t'(ip) * pow_int(8, 19) + (big_t'({$urandom, $urandom}) % pow_int(8, 19));
      if (n % 3 == 0) v = (v >> 7) << 7 | big_t'((n % 2) ? 64 : 16) ;   // halves of the LSB
      if (n % 11 == 0) v = big_t'(ip + 1) * pow_int(8, 19) - 1 - big_t'($urandom % 4);
      nf = encode(v, 0, FRAME, 8, 1);
      while (!no_twin_sixes(nf)) nf = encode(v, 0, FRAME, 8, 1);
      w  = (ip >= 4) ? 128 : (ip >= 2) ? 64 : 32;
      group_id = (ip >= 4) ? 2'd3 : (ip >= 2) ? 2'd2 : 2'd1;
      sticky = 1'($urandom); sticky_neg = sticky & 1'($urandom);
      sign = 1'($urandom); mode = rmode_t'($urandom % 6);
      e = (n % 4 == 0) ? BIN_EMAX8 - 1 + $urandom % 3 : 100 + $urandom % 500;
      en = EXP_W'(e);
      #1;
      fs = sticky ? (sticky_neg ? -1 : 1) : 0;
      v4 = 4 * v + big_t'(fs);
      q0 = v4 / (4 * w);                    // v4 > 0
      rem4 = v4 - q0 * 4 * w;
      cat = (rem4 == 0) ? REM_ZERO : (rem4 < 2 * w) ? REM_LOW : (rem4 == 2 * w) ? REM_HALF : REM_HIGH;
      q = q0 + big_t'(round_up(cat, q0[0], sign, mode));
      want = q * w / 8;
      if (want == pow_int(8, 19)) begin want = pow_int(8, 18); e++; end
      ip2 = int'(want / pow_int(8, 18));
      ovf = (e > BIN_EMAX8) || (e == BIN_EMAX8 && ip2 >= 2);
      got = sig_value(res.sig, 0, SIG_DIGITS, 8);
      bad = 0;
      if (ovf) begin
        if (overflow_to_inf(sign, mode)) bad = (res.special != SP_INF) || (res.sign != sign);
        else bad = (res.special != SP_NONE) || (res.sign != sign) || (int'(res.exp) != BIN_EMAX8)
                || (got != 2 * pow_int(8, 18) - 4);
      end else begin
        bad = (res.special != SP_NONE) || (res.sign != sign) || (int'(res.exp) != e) || (got != want)
           || !digits_ok({res.sig, 4'b0}, FRAME);
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL v=%0d g=%0d st=%0d/%0d m=%0d want=%0d got=%0d e=%0d/%0d",
                                   v, group_id, sticky, sticky_neg, mode, want, got, e, res.exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
