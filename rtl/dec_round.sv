// dec_round - one decimal rounding block (no-shift, final-carry or left-shift anticipation).
//
// Given the rounding digits of one anticipated result position - the least significant kept
// digit (LSD) and the digit above it, the guard digit G, the round digit R, the next digit E
// and the sign of the sticky part below E - and the rounding mode, the block outputs the
// rounding decision (-1, 0 or +1 added to the LSD) and the expected two least significant
// digits of the rounded result.  Three copies run in parallel on the three possible windows;
// the final correction unit keeps one.
// Because digits are signed, the discarded part 10*G + R (+ E/10 + sticky) may be negative;
// the decision then includes a -1 that moves the rounding point down one unit.  The decision
// obeys the document's tables for directed rounding (pivot = first non-zero of G, R) and for
// round-to-nearest; here it is computed from the value of the discarded part, which covers the
// same cases.  Since the adder never yields two neighbouring digits of +6 (or of -6), a digit
// overflow of the LSD into the next digit cannot overflow that one too: only two digits change.
// Combinational.
module dec_round
  import mfa_pkg::*;
(
  input  sd_digit_t       lsd,
  input  sd_digit_t       nxt,
  input  sd_digit_t       g,
  input  sd_digit_t       r,
  input  sd_digit_t       e,
  input  logic            sticky,
  input  logic            sticky_neg,
  input  logic            sign,
  input  rmode_t          mode,
  output logic [1:0]      decision,     // two's complement -1, 0, +1
  output logic [7:0]      lsds          // {nxt', lsd'}
);

  int t, q, dd, fs, lv, nv, dec;
  rem_t cat;

  always_comb begin
    t  = 10 * dval(g) + dval(r);
    fs = (e != 4'd0) ? (e[3] ? -1 : 1) : (sticky ? (sticky_neg ? -1 : 1) : 0);
    q  = (t < 0 || (t == 0 && fs < 0)) ? -1 : 0;
    dd = t - 100 * q;
    if (dd == 0 && fs == 0)          cat = REM_ZERO;
    else if (dd < 50)                cat = REM_LOW;
    else if (dd > 50)                cat = REM_HIGH;
    else if (fs == 0)                cat = REM_HALF;
    else                             cat = (fs > 0) ? REM_HIGH : REM_LOW;
    dec = q + int'(round_up(cat, ((dval(lsd) + q) & 1) != 0, sign, mode));
    lv  = dval(lsd) + dec;
    nv  = dval(nxt);
    if (lv > 6)       begin lv = lv - 10; nv = nv + 1; end
    else if (lv < -6) begin lv = lv + 10; nv = nv - 1; end
    decision = 2'(dec);
    lsds     = {4'(nv), 4'(lv)};
  end

endmodule
