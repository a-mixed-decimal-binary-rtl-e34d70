// tb_dec_round - exhaustive check of one decimal rounding block.
// Every combination of LSD, guard and round digit in [-6,6], extension digit in {-6,-1,0,1,6},
// sticky none/positive/negative, both signs and all six rounding modes (with a random
// next digit) is applied.  Reference: the value 100*(10*NXT + LSD) + 10*G + R plus a fraction
// of a unit whose sign comes from E (or from the sticky part when E is zero) is rounded to a
// multiple of 100 with the IEEE rule of the mode; the block must report the difference to
// 10*NXT + LSD as its decision and return {NXT', LSD'} with that value, LSD' in [-6,6].
// Values are scaled by 4 so that the fraction becomes +-1.  Combinational block.
module tb_dec_round;
  import mfa_pkg::*;

  sd_digit_t lsd, nxt, g, r, e;
  logic sticky, sticky_neg, sign;
  rmode_t mode;
  logic [1:0] decision;
  logic [7:0] lsds;
  int checks = 0, failures = 0;

  dec_round dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    int evals[5] = '{-6, -1, 0, 1, 6};
    for (int il = -6; il <= 6; il++)
      for (int ig = -6; ig <= 6; ig++)
        for (int ir = -6; ir <= 6; ir++)
          for (int ie = 0; ie < 5; ie++)
            for (int is = 0; is < 3; is++)
              for (int k = 0; k < 12; k++) begin
                int b, fs, v4, q0, rem4, q, got;
                rem_t cat;
                lsd = 4'(il); g = 4'(ig); r = 4'(ir); e = 4'(evals[ie]);
                nxt = 4'(int'($urandom % 13) - 6);
                sticky = (is != 0); sticky_neg = (is == 2);
                sign = k[0]; mode = rmode_t'(k / 2);
                #1;
                b  = 10 * dval(nxt) + il;
                fs = (ie != 2) ? ((evals[ie] < 0) ? -1 : 1) : (is == 0) ? 0 : (is == 2) ? -1 : 1;
                v4 = 4 * (100 * b + 10 * ig + ir) + fs;
                q0 = floordiv(v4, 400);
                rem4 = v4 - 400 * q0;
                cat = (rem4 == 0) ? REM_ZERO : (rem4 < 200) ? REM_LOW : (rem4 == 200) ? REM_HALF : REM_HIGH;
                q = q0 + int'(round_up(cat, (q0 & 1) != 0, sign, mode));
                got = 10 * dval(lsds[7:4]) + dval(lsds[3:0]);
                checks++;
                if (got != q || dval(lsds[3:0]) < -6 || dval(lsds[3:0]) > 6
                    || int'($signed(decision)) != q - b) begin
                  failures++;
                  if (failures < 5)
                    $display("FAIL nxt=%0d lsd=%0d g=%0d r=%0d e=%0d st=%0d m=%0d s=%0d want=%0d got=%0d",
                             dval(nxt), il, ig, ir, evals[ie], is, mode, sign, q, got);
                end
              end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
