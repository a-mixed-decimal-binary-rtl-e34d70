// cr1_detect - examination of the adder output CR1.
//
// Holds the four blocks that work on CR1 side by side in the document's block diagram:
//  * negative significand detection: CR1 is negative when its most significant non-zero digit
//    is.  Making it positive costs no carry: every digit is negated on its own.  The sticky
//    sign follows the flip;
//  * leading zero detection on |CR1|: position of the leading digit (used for the binary
//    normalization);
//  * final carry detection (decimal): an effective addition whose addendum digit is 2 or more,
//    or 1 with a non-negative remainder, exceeds the 16-digit precision and must be shifted
//    right;
//  * shift-left case detection (decimal): an effective subtraction whose exponent is still
//    above the preferred one (Y was shifted right), addendum 0, and a MainStream with a leading
//    zero (explicit, or an implicit one: a leading 1 followed by a negative remainder).
// Where the document looks only at the MainStream for the remainder's sign, this design also
// includes the guard/round digits and the sticky part, which decides the case of an all-zero
// MainStream.  Combinational.
module cr1_detect
  import mfa_pkg::*;
(
  input  frame_t     cr1,
  input  logic       sticky,        // shifted-out part non-zero
  input  logic       sticky_neg,    // shifted-out part negative (as it enters CR1)
  input  logic       eff_sub,
  input  logic       rsa_nz,
  output logic       neg,
  output logic       zero,          // CR1 and its sticky part are zero
  output frame_t     mag,           // |CR1|
  output logic       mag_sticky_neg,
  output logic [4:0] top,           // leading digit position of |CR1|
  output logic       final_carry,
  output logic       shift_left
);

  logic z_cr1, neg_mag_unused;
  logic [4:0] top_cr1_unused;
  logic rest19_neg, rest18_neg, z_mag;
  logic [P_DADD*4-1:0] below19;
  logic [(P_DADD-1)*4-1:0] below18;
  logic z19, z18;
  logic [4:0] t19, t18;

  sd_lead #(.N(FRAME)) u_sign (.d(cr1), .below_neg(sticky & sticky_neg),
                               .zero(z_cr1), .neg(neg), .top(top_cr1_unused));

  always_comb begin
    for (int i = 0; i < FRAME; i++)
      mag[i*4 +: 4] = neg ? 4'(-cr1[i*4 +: 4]) : cr1[i*4 +: 4];
    mag_sticky_neg = sticky & (sticky_neg ^ neg);
    zero = z_cr1 & ~sticky;
    below19 = mag[P_DADD*4-1:0];
    below18 = mag[(P_DADD-1)*4-1:0];
  end

  sd_lead #(.N(FRAME)) u_lzd (.d(mag), .below_neg(mag_sticky_neg),
                              .zero(z_mag), .neg(neg_mag_unused), .top(top));
  // sign of everything below the addendum, and below the MainStream's leading digit
  sd_lead #(.N(P_DADD)) u_r19 (.d(below19), .below_neg(mag_sticky_neg),
                               .zero(z19), .neg(rest19_neg), .top(t19));
  sd_lead #(.N(P_DADD-1)) u_r18 (.d(below18), .below_neg(mag_sticky_neg),
                                 .zero(z18), .neg(rest18_neg), .top(t18));

  always_comb begin
    logic signed [3:0] add_d, ms_top;
    add_d  = $signed(mag[P_DADD*4 +: 4]);
    ms_top = $signed(mag[(P_DADD-1)*4 +: 4]);
    final_carry = ~eff_sub & ((add_d >= 4'sd2) || (add_d == 4'sd1 && !rest19_neg));
    shift_left  = eff_sub & rsa_nz & ~zero & (add_d == 4'sd0)
                & ((ms_top == 4'sd0) || (ms_top == 4'sd1 && rest18_neg));
  end

endmodule
