// tb_sd_digit_cell - exhaustive check of the signed-digit cell: every x, y in [-6,6], every
// incoming transfer, both radices, addition and subtraction.  The reference is plain integer
// arithmetic: x +/- y + tin must equal radix*tout + s, s must lie in [-6,6], and the interim
// part (s - tin) must lie in [-5,5] so that consecutive sum digits can never both be +6 or -6.
module tb_sd_digit_cell;
  import mfa_pkg::*;

  sd_digit_t x, y, s;
  logic tin_posi, tin_nega, sub, tout_posi, tout_nega;
  radix_t radix;
  int checks = 0, failures = 0;

  sd_digit_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int sb = 0; sb < 2; sb++)
        for (int t = -1; t <= 1; t++)
          for (int a = -6; a <= 6; a++)
            for (int b = -6; b <= 6; b++) begin
              int rad, tout, sv, want;
              radix = radix_t'(r);
              sub = sb[0];
              x = 4'(a); y = 4'(b);
              tin_posi = (t == 1); tin_nega = (t == -1);
              #1;
              rad  = (r == 1) ? 10 : 8;
              tout = int'(tout_posi) - int'(tout_nega);
              sv   = dval(s);
              want = (sb == 1) ? a - b + t : a + b + t;
              checks++;
              if (tout_posi && tout_nega || rad*tout + sv != want || sv < -6 || sv > 6
                  || sv - t < -5 || sv - t > 5) begin
                failures++;
                if (failures < 10)
                  $display("FAIL radix=%0d sub=%0d x=%0d y=%0d tin=%0d -> tout=%0d s=%0d",
                           rad, sb, a, b, t, tout, sv);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
