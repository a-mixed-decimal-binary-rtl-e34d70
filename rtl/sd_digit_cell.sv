// sd_digit_cell - one digit of the mixed radix-10 / radix-8 signed-digit adder/subtractor.
//
// Digits are 4-bit two's complement values in [-6,6].  The cell computes x + y (sub = 0) or
// x - y (sub = 1) plus the incoming transfer tin in {-1,0,1}, and splits the result into an
// outgoing transfer tout in {-1,0,1} and a sum digit s in [-6,6] such that
//   x +/- y + tin = radix * tout + s.
// As in the document, the work is split into two parallel paths:
//  * a 4-bit binary adder forms the interim sum x + ym, where ym is y or, for a subtraction,
//    its 15's complement (the missing +1 is folded into the correction digit);
//  * the incoming transfer (and the +1 of a subtraction) is pre-added to every possible
//    correction (0, -10, +10, and +/-8 which are the same modulo 16), giving the
//    "modified correction digits".
// Threshold flags on the interim sum, the zero flags z1/z2 and the operand signs decide
// whether the true digit sum reached +/-6; that decision gives tout and selects one modified
// correction digit, which a second 4-bit adder adds to the interim sum.
// The document's flag equations are followed (eff_op, no_correction, the above_threshold
// equation and the threshold ranges printed in its threshold figures).  Two of the printed
// equations are not used as printed: need_correction picks the below/above threshold by the
// sign of the operands (the printed form corrects 0 + (-1) into an out-of-range digit), and
// the sign of the subtrahend is that of -y, so y = 0 counts as non-negative.
// Purely combinational.
module sd_digit_cell
  import mfa_pkg::*;
(
  input  sd_digit_t x,
  input  sd_digit_t y,
  input  logic      tin_posi,
  input  logic      tin_nega,
  input  radix_t    radix,
  input  logic      sub,
  output sd_digit_t s,
  output logic      tout_posi,
  output logic      tout_nega
);

  sd_digit_t ym, interim, o_enc, mcd;
  logic z1, z2, neg_x, neg_y, eff_op, no_correction;
  logic above_threshold, below_threshold, need_correction;

  always_comb begin
    ym      = sub ? ~y : y;
    interim = x + ym;
    z1      = (x == 4'd0);
    z2      = (y == 4'd0);
    neg_x   = x[3];
    neg_y   = ym[3] & ~z2;                      // sign of +y or -y
    eff_op  = neg_x ^ neg_y;                    // operands of different signs
    no_correction = eff_op & ~z1 & ~z2;

    // threshold ranges: sub=0 above: not in [0,5], below: in [0,10] (as 4-bit codes)
    //                   sub=1 above: not in [0,4], below: in [0,9]
    above_threshold = (interim[1] & interim[2]) | interim[3] | (sub & interim[0] & interim[2]);
    below_threshold = ~interim[3] | (~interim[2] & ~interim[1])
                    | (~interim[2] & ~sub & (interim[0] ^ interim[1]));

    need_correction = ~no_correction & ((neg_x | neg_y) ? below_threshold : above_threshold);
    tout_posi = need_correction & ((~z1 & ~neg_x) | (~z2 & ~neg_y));
    tout_nega = need_correction & ((~z1 &  neg_x) | (~z2 &  neg_y));

    // O = tin + sub, 4-bit two's complement, values -1..2
    unique case ({tin_posi, tin_nega, sub})
      3'b010:  o_enc = 4'b1111;   // -1
      3'b011:  o_enc = 4'b0000;   // -1 + 1
      3'b100:  o_enc = 4'b0001;   // +1
      3'b101:  o_enc = 4'b0010;   // +1 + 1
      3'b001:  o_enc = 4'b0001;   //  0 + 1
      default: o_enc = 4'b0000;
    endcase

    // modified correction digit: I0 = O, I1 = O - 10, I2 = O +/- 8, I3 = O + 10 (mod 16)
    if (!tout_posi && !tout_nega)       mcd = o_enc;
    else if (radix == RADIX_BIN)        mcd = {~o_enc[3], o_enc[2:0]};
    else if (tout_posi)                 mcd = o_enc + 4'b0110;
    else                                mcd = o_enc + 4'b1010;

    s = interim + mcd;
  end

endmodule
