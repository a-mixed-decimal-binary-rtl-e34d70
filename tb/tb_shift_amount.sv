// tb_shift_amount - exhaustive-in-part check of the shift amount computation.
// Every leading-zero count 0..16 is combined with random exponent differences (small ones
// and ones far beyond the frame), both radices and a zero or non-zero X.  Reference: for a
// decimal X the left shift is the smaller of the difference and the leading-zero count, for a
// binary X it is zero, for a zero X it is the whole difference; the right shift is the rest;
// both are clipped to the frame width (21 for the left shift, 22 meaning "everything out" for
// the right shift) and the result exponent is EX minus the left shift.  Combinational block.
module tb_shift_amount;
  import mfa_pkg::*;

  logic [EXP_W-1:0] diff, ex, er;
  logic [LZC_W-1:0] lzcx;
  logic x_zero, rsa_nz;
  radix_t radix;
  logic [4:0] lsa, rsa;
  int checks = 0, failures = 0;

  shift_amount dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int z = 0; z <= 16; z++)
      for (int n = 0; n < 1000; n++) begin
        int d, l, r;
        bit bad;
        d = ($urandom % 3 == 0) ? $urandom % 768 : $urandom % 30;
        lzcx = LZC_W'(z);
        diff = EXP_W'(d);
        ex = EXP_W'(d + $urandom % (768 - d));
        x_zero = ($urandom % 8 == 0);
        radix = radix_t'($urandom % 2);
        #1;
        if (x_zero) l = d;
        else if (radix == RADIX_BIN) l = 0;
        else l = (d < z) ? d : z;
        r = d - l;
        bad = (int'(lsa) != ((l > 21) ? 21 : l)) || (int'(rsa) != ((r > 22) ? 22 : r))
           || (rsa_nz != (r != 0)) || (int'(er) != int'(ex) - l);
        checks++;
        if (bad) begin
          failures++;
          if (failures < 5) $display("FAIL d=%0d z=%0d lsa=%0d rsa=%0d er=%0d", d, z, lsa, rsa, er);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
