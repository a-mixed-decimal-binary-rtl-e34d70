// tb_sticky_gen - random check of the sticky bit and sticky sign.
// Random signed-digit significands (digits in [-6,6], many zero digits so that the
// shifted-out part is often zero or has a short non-zero run), random swap and every right
// shift 0..22.  Reference: the digits of the Y operand that a right shift by rsa pushes out of
// the 21-digit frame, evaluated as a radix-10 signed-digit number: sticky means non-zero,
// sticky sign means negative.  Combinational block.
module tb_sticky_gen;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  sig_t ca, cb;
  logic swap, sticky, sticky_neg;
  logic [4:0] rsa;
  int checks = 0, failures = 0;

  sticky_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      frame_t fy;
      big_t lost;
      int k;
      for (int i = 0; i < SIG_DIGITS; i++) begin
        ca[i*4 +: 4] = ($urandom % 3 == 0) ? 4'(int'($urandom % 13) - 6) : 4'd0;
        cb[i*4 +: 4] = ($urandom % 3 == 0) ? 4'(int'($urandom % 13) - 6) : 4'd0;
      end
      swap = 1'($urandom);
      rsa = 5'($urandom % 23);
      #1;
      fy = {swap ? ca : cb, 4'b0000};
      k = (int'(rsa) > FRAME) ? FRAME : int'(rsa);
      lost = digits_value(fy, 0, k, 10);
      checks++;
      if (sticky != (lost != 0) || sticky_neg != (lost < 0)) begin
        failures++;
        if (failures < 5) $display("FAIL rsa=%0d y=%h sticky=%0d neg=%0d", rsa, fy, sticky, sticky_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
