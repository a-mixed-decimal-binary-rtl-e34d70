// tb_cr1_detect - random check of the sign, magnitude, leading-digit, final-carry and
// shift-left detection on the adder output.
// CR1 is a random redundant signed-digit number of either sign (radix 10 below 2*10^19, or
// radix 8 below 3*8^20), often with a zero or nearly-cancelled high part, plus a random sticky
// part.  Reference, with plain integers, scaling values by 4 so that the sticky part becomes
// +-1: the sign of 4*CR1 + sticky gives neg; |CR1| must come out digit-wise in [-6,6] with
// the same value; the leading position p satisfies radix^p <= |CR1| (with its sticky part) <
// radix^(p+1) whenever it reaches one unit of digit 0; in radix 10 the final carry is an effective addition reaching 10^19, and the
// shift-left case is an effective subtraction, right-shifted Y and a non-zero result below
// 10^18.  Combinational block.
module tb_cr1_detect;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  frame_t cr1, mag;
  logic sticky, sticky_neg, eff_sub, rsa_nz, neg, zero, mag_sticky_neg, final_carry, shift_left;
  logic [4:0] top;
  int checks = 0, failures = 0;

  cr1_detect dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40000; n++) begin
      int r, fs, ms, p;
      big_t lim, v, mv, v4, m4;
      bit bad, s;
      r   = (n % 2) ? 10 : 8;
      lim = (r == 10) ? 2 * ipow10(19) : 3 * pow_int(8, 20);
      v   = big_t'({$urandom, $urandom, $urandom, $urandom}) & ~(big_t'(1) << 127);
      v   = v % lim;
      if (n % 4 == 1) v = v % pow_int(r, 1 + $urandom % 19);
      if (n % 16 == 3) v = 0;
      if (n % 8 == 5) v = pow_int(r, 18 + $urandom % 2);
      s   = 1'($urandom);
      cr1 = encode(v, 0, FRAME, r, 1);
      if (s) for (int i = 0; i < FRAME; i++) cr1[i*4 +: 4] = 4'(-dval(cr1[i*4 +: 4]));
      sticky = 1'($urandom); sticky_neg = sticky & 1'($urandom);
      eff_sub = 1'($urandom); rsa_nz = 1'($urandom);
      #1;
      fs = sticky ? (sticky_neg ? -1 : 1) : 0;
      v4 = 4 * digits_value(cr1, 0, FRAME, r) + big_t'(fs);
      mv = digits_value(mag, 0, FRAME, r);
      ms = mag_sticky_neg ? -1 : (sticky ? 1 : 0);
      m4 = 4 * mv + big_t'(ms);
      bad = 0;
      if (neg != (v4 < 0)) bad = 1;
      if (zero != (v4 == 0)) bad = 1;
      if (m4 != (neg ? -v4 : v4) || !digits_ok(mag, FRAME)) bad = 1;
      if (m4 >= 4) begin                    // below one unit of digit 0 no position is defined
        p = int'(top);
        if (m4 < 4 * pow_int(r, p) || m4 >= 4 * pow_int(r, p + 1)) bad = 1;
      end
      if (r == 10) begin
        if (final_carry != (!eff_sub && m4 >= 4 * ipow10(19))) bad = 1;
        if (shift_left != (eff_sub && rsa_nz && v4 != 0 && m4 < 4 * ipow10(18))) bad = 1;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d cr1=%h st=%0d/%0d neg=%0d zero=%0d top=%0d fc=%0d sl=%0d",
                                   r, cr1, sticky, sticky_neg, neg, zero, top, final_carry, shift_left);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
