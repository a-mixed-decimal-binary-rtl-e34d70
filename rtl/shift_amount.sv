// shift_amount - shift amount evaluation for operand alignment.
//
// Decimal mode: the operand X with the larger exponent is shifted left as far as its stored
// leading-zero count allows, but no further than the exponent difference d; the rest of d is
// a right shift of Y:  LSA = min(d, LZCX), RSA = d - LSA, ER = EX - LSA.  This brings the
// result as close as possible to the preferred (smaller) exponent.
// Binary mode: operands are normalized, so LSA = 0 and RSA = d.
// When X is zero, X is moved all the way to Y's exponent (LSA = d, RSA = 0), so that
// 0 + y gives y exactly in both radices (this design's choice; the document does not treat
// zero operands in the alignment).  The shift amounts sent to the shifters are clamped to the
// frame width; ER is exact.  Combinational.
module shift_amount
  import mfa_pkg::*;
(
  input  logic [EXP_W-1:0]  diff,
  input  logic [LZC_W-1:0]  lzcx,
  input  logic [EXP_W-1:0]  ex,
  input  logic              x_zero,
  input  radix_t            radix,
  output logic [4:0]        lsa,       // left shift of X, digits (0..21)
  output logic [4:0]        rsa,       // right shift of Y, digits (0..22, 22 = everything out)
  output logic              rsa_nz,    // Y was shifted right: ER is above the preferred exponent
  output logic [EXP_W-1:0]  er
);

  logic [EXP_W-1:0] lsa_full, rsa_full;

  always_comb begin
    if (x_zero)                      lsa_full = diff;
    else if (radix == RADIX_BIN)     lsa_full = '0;
    else if (diff < EXP_W'(lzcx))    lsa_full = diff;
    else                             lsa_full = EXP_W'(lzcx);
    rsa_full = diff - lsa_full;
    er       = ex - lsa_full;
    lsa      = (lsa_full > EXP_W'(FRAME))     ? 5'(FRAME)     : lsa_full[4:0];
    rsa      = (rsa_full > EXP_W'(FRAME + 1)) ? 5'(FRAME + 1) : rsa_full[4:0];
    rsa_nz   = (rsa_full != '0);
  end

endmodule
