// tb_special_cases - exhaustive check of the special-value rules.
// All 5 x 5 operand classes, both signs of each operand and both operations (200 cases) are
// compared with a table written from the IEEE 754 rules: any NaN gives a quiet NaN;
// infinity plus infinity of the same effective sign keeps it; of opposite effective signs it
// is invalid (quiet NaN); infinity and a finite value give that infinity (with the sign of B
// flipped by a subtraction); anything else is not special.  Combinational block.
module tb_special_cases;
  import mfa_pkg::*;

  special_t sp_a, sp_b, res_special;
  logic sign_a, sign_b, op, is_special, res_sign;
  int checks = 0, failures = 0;

  special_cases dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int k = 0; k < 8; k++) begin
          bit bad, nan, sb;
          special_t want;
          bit want_sign, want_is;
          sp_a = special_t'(i); sp_b = special_t'(j);
          {sign_a, sign_b, op} = 3'(k);
          #1;
          sb = sign_b ^ op;
          nan = (i == SP_SNAN || i == SP_QNAN || j == SP_SNAN || j == SP_QNAN);
          want_is = 1; want_sign = 0;
          if (nan) want = SP_QNAN;
          else if (i == SP_INF && j == SP_INF) begin
            want = (sign_a == sb) ? SP_INF : SP_QNAN;
            want_sign = (sign_a == sb) ? sign_a : 1'b0;
          end
          else if (i == SP_INF) begin want = SP_INF; want_sign = sign_a; end
          else if (j == SP_INF) begin want = SP_INF; want_sign = sb; end
          else begin want = SP_NONE; want_is = 0; end
          bad = (is_special != want_is) || (want_is && (res_special != want || res_sign != want_sign));
          checks++;
          if (bad) begin
            failures++;
            if (failures < 5) $display("FAIL a=%0d b=%0d k=%0d got %0d/%0d", i, j, k, res_special, res_sign);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
