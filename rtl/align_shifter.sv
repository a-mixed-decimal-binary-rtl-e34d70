// align_shifter - the two alignment barrel shifters.
//
// Both 20-digit significands are placed in the 21-digit frame (one extension digit below the
// LSD).  X is shifted left by LSA digits, Y right by RSA digits; digits shifted out of Y are
// accounted for by the sticky unit.  Digits move whole, so the signed-digit encoding is kept.
// Combinational.
module align_shifter
  import mfa_pkg::*;
(
  input  sig_t       cx,
  input  sig_t       cy,
  input  logic [4:0] lsa,
  input  logic [4:0] rsa,
  output frame_t     ax,
  output frame_t     ay
);

  frame_t fx, fy;

  always_comb begin
    fx = {cx, 4'b0000};
    fy = {cy, 4'b0000};
    ax = (lsa >= 5'(FRAME)) ? '0 : fx << (4 * lsa);
    ay = (rsa >= 5'(FRAME)) ? '0 : fy >> (4 * rsa);
  end

endmodule
