// exp_swap - exponent difference and swapping unit.
//
// Subtracts the two biased exponents; when EA < EB the swap flag is raised and the operands
// are exchanged so that X is the operand with the larger (or equal) exponent and Y the other.
// The unit also forms the effective operation (sign of A xor sign of B xor operation, with
// 1 = negative / subtract) and the tentative result sign, which is the sign X carries into the
// sum: sign(A) when not swapped, sign(B) xor op when swapped.  A zero operand (special code
// zero) enters the datapath with all-zero digits.  Combinational.
module exp_swap
  import mfa_pkg::*;
(
  input  mfp_t              a,
  input  mfp_t              b,
  input  logic              op,          // 0 = A + B, 1 = A - B
  output logic              swap,
  output logic [EXP_W-1:0]  diff,        // |EA - EB|
  output sig_t              cx,
  output sig_t              cy,
  output logic [LZC_W-1:0]  lzcx,
  output logic [EXP_W-1:0]  ex,
  output logic              x_zero,
  output logic              eff_sub,
  output logic              sign_x
);

  sig_t ca, cb;
  logic [EXP_W:0] d_ab;

  always_comb begin
    ca   = (a.special == SP_NONE) ? a.sig : '0;
    cb   = (b.special == SP_NONE) ? b.sig : '0;
    d_ab = {1'b0, a.exp} - {1'b0, b.exp};
    swap = d_ab[EXP_W];                        // EA < EB
    diff = swap ? (b.exp - a.exp) : d_ab[EXP_W-1:0];
    cx   = swap ? cb : ca;
    cy   = swap ? ca : cb;
    lzcx = swap ? b.lzc : a.lzc;
    ex   = swap ? b.exp : a.exp;
    x_zero  = swap ? (b.special == SP_ZERO) : (a.special == SP_ZERO);
    eff_sub = a.sign ^ b.sign ^ op;
    sign_x  = swap ? (b.sign ^ op) : a.sign;
  end

endmodule
