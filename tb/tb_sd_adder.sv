// tb_sd_adder - random check of the 21-digit signed-digit adder/subtractor in both radices.
// Operands have random digits in [-6,6] below the two addendum positions and 0/1 there.
// Reference: integer value of the sum frame must equal value(x) +/- value(y); every sum digit
// must lie in [-6,6] and no two neighbouring sum digits may both be +6 or both -6.
module tb_sd_adder;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  frame_t x, y, s;
  logic sub;
  radix_t radix;
  int checks = 0, failures = 0;

  sd_adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int r;
      big_t want, got;
      bit bad;
      for (int i = 0; i < FRAME; i++) begin
        x[i*4 +: 4] = (i >= P_DADD) ? 4'($urandom % 2) : 4'(int'($urandom % 13) - 6);
        y[i*4 +: 4] = (i >= P_DADD) ? 4'($urandom % 2) : 4'(int'($urandom % 13) - 6);
      end
      sub = 1'($urandom);
      radix = radix_t'($urandom % 2);
      #1;
      r = (radix == RADIX_DEC) ? 10 : 8;
      want = sub ? digits_value(x, 0, FRAME, r) - digits_value(y, 0, FRAME, r)
                 : digits_value(x, 0, FRAME, r) + digits_value(y, 0, FRAME, r);
      got = digits_value(s, 0, FRAME, r);
      bad = (want != got) || !digits_ok(s, FRAME);
      for (int i = 0; i < FRAME - 1; i++)
        if (dval(s[i*4 +: 4]) == dval(s[(i+1)*4 +: 4]) && (dval(s[i*4 +: 4]) == 6 || dval(s[i*4 +: 4]) == -6))
          bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("FAIL radix=%0d sub=%0d x=%h y=%h s=%h", r, sub, x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
