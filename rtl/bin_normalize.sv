// bin_normalize - normalization of the binary-mode sum.
//
// Binary64 values are kept as octal signed-digit numbers whose value lies in [1,8): the
// integer part is formed by the binary and decimal addendum digits (frame digits 20 and 19).
// From the leading digit position of |CR1| the sum is shifted right one digit (a final carry,
// value 8 or more) or left as many digits as it has leading zeros, and the octal exponent is
// adjusted by the same amount.  A digit shifted out at the right joins the sticky part.
// Then the Group_ID is derived from the integer part of the normalized value (the integer
// digits, less one when the fraction is negative):
//   group 1: 1,  group 2: 2..3,  group 3: 4..7.
// The group tells where the binary64 least significant bit sits in the octal digits.
// Underflow below the binary64 normal range is not handled (the document does not treat it).
// Combinational.
module bin_normalize
  import mfa_pkg::*;
(
  input  frame_t            mag,
  input  logic              sticky,
  input  logic              sticky_neg,
  input  logic [4:0]        top,
  input  logic [EXP_W-1:0]  er,
  output frame_t            nf,
  output logic              n_sticky,
  output logic              n_sticky_neg,
  output logic [EXP_W-1:0]  en,
  output logic [1:0]        group_id
);

  logic [(FRAME-2)*4-1:0] frac;
  logic fz_unused, frac_neg;
  logic [4:0] ft_unused;

  always_comb begin
    n_sticky     = sticky;
    n_sticky_neg = sticky_neg;
    if (top == 5'(P_BADD)) begin
      nf = mag >> 4;
      if (mag[3:0] != 4'd0) begin
        n_sticky     = 1'b1;
        n_sticky_neg = mag[3];
      end
    end else begin
      nf = mag << (4 * (P_DADD - int'(top)));
    end
    en = er + EXP_W'(top) - EXP_W'(P_DADD);
    frac = nf[(FRAME-2)*4-1:0];
  end

  sd_lead #(.N(FRAME-2)) u_frac (.d(frac), .below_neg(n_sticky & n_sticky_neg),
                                 .zero(fz_unused), .neg(frac_neg), .top(ft_unused));

  always_comb begin
    int ip;
    ip = 8 * dval(nf[P_BADD*4 +: 4]) + dval(nf[P_DADD*4 +: 4]) - (frac_neg ? 1 : 0);
    if (ip >= 4)      group_id = 2'd3;
    else if (ip >= 2) group_id = 2'd2;
    else              group_id = 2'd1;
  end

endmodule
