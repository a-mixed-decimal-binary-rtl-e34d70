// bin_round - binary rounding of a normalized redundant octal significand.
//
// The result must equal what IEEE binary64 rounding gives on the same value.  The binary64
// least significant bit lies inside the two lowest octal digits, at a place set by the
// Group_ID: bit 2 of the LSD (group 1), bit 0 of the SLSD (group 2) or bit 1 of the SLSD
// (group 3); bits below it, the extension digit and the sticky part are discarded.  The
// document gives case lists for round toward +infinity, -infinity, zero and to nearest-even
// over LSD, SLSD, sticky sign and sign; this block reaches the same decisions from the value
// of the low part 64*SLSD + 8*LSD + EXT (with the sticky sign): it splits it into a multiple of
// the LSB weight and a remainder in [0, weight), rounds that multiple by the mode, and writes it
// back into SLSD and LSD, passing at most one unit into the next digit.
// Afterwards: a significand rounded up to 8 becomes 1 with the octal exponent one higher, and
// an exponent beyond binary64 range (octal exponent above 341, or 341 with an integer part of 2
// or more) gives infinity or the largest finite binary64 number, depending on mode and sign.
// The lzc field (decimal only) is always zero here and the special field is only none or
// infinity, so those output bits are constant.  Combinational.
module bin_round
  import mfa_pkg::*;
(
  input  frame_t            nf,
  input  logic              sticky,
  input  logic              sticky_neg,
  input  logic [1:0]        group_id,
  input  logic [EXP_W-1:0]  en,
  input  logic              sign,
  input  rmode_t            mode,
  output mfp_t              res
);

  int t, w, q, dd, fs, v, lv, sv, c, d3;
  rem_t cat;
  sig_t s1;

  always_comb begin
    w  = (group_id == 2'd1) ? 32 : (group_id == 2'd2) ? 64 : 128;
    t  = 64 * dval(nf[P_SLSD*4 +: 4]) + 8 * dval(nf[P_LSD*4 +: 4]) + dval(nf[P_EXT*4 +: 4]);
    fs = sticky ? (sticky_neg ? -1 : 1) : 0;
    q  = (t >= 0) ? t / w : -((-t + w - 1) / w);        // floor(t / w)
    if (t == q * w && fs < 0) q = q - 1;
    dd = t - q * w;
    if (dd == 0 && fs == 0)          cat = REM_ZERO;
    else if (2 * dd < w)             cat = REM_LOW;
    else if (2 * dd > w)             cat = REM_HIGH;
    else if (fs == 0)                cat = REM_HALF;
    else                             cat = (fs > 0) ? REM_HIGH : REM_LOW;
    q  = q + int'(round_up(cat, (q & 1) != 0, sign, mode));
    v  = q * w / 8;                                      // new low part in LSD units
    lv = v & 7;
    sv = (v - lv) / 8;
    c  = 0;
    if (sv > 6)       begin sv = sv - 8; c = 1;  end
    else if (sv < -6) begin sv = sv + 8; c = -1; end
    d3 = dval(nf[P_MS0*4 +: 4]) + c;
    s1 = nf[FRAME*4-1:4];
    s1[0*4 +: 4] = 4'(lv);
    s1[1*4 +: 4] = 4'(sv);
    s1[2*4 +: 4] = 4'(d3);
  end

  logic fz_unused, frac_neg;
  logic [4:0] ft_unused;
  sd_lead #(.N(SIG_DIGITS-2)) u_frac (.d(s1[(SIG_DIGITS-2)*4-1:0]), .below_neg(1'b0),
                                      .zero(fz_unused), .neg(frac_neg), .top(ft_unused));

  always_comb begin
    int ip;
    logic [EXP_W:0] e2;
    ip = 8 * dval(s1[19*4 +: 4]) + dval(s1[18*4 +: 4]) - (frac_neg ? 1 : 0);
    res = '0;
    res.sign = sign;
    res.special = SP_NONE;
    res.sig = s1;
    e2 = {1'b0, en};
    if (ip >= 8) begin                                   // exactly 8 after rounding
      res.sig = '0;
      res.sig[18*4 +: 4] = 4'd1;
      e2 = e2 + 1'b1;
      ip = 1;
    end
    res.exp = e2[EXP_W-1:0];
    if (e2 > (EXP_W+1)'(BIN_EMAX8) || (e2 == (EXP_W+1)'(BIN_EMAX8) && ip >= 2)) begin
      res.exp = EXP_W'(BIN_EMAX8);
      res.sig = '0;
      if (overflow_to_inf(sign, mode)) begin
        res.special = SP_INF;
      end else begin                                     // 2 - 2^-52 = 2.0...0(-4) octal
        res.sig[18*4 +: 4] = 4'd2;
        res.sig[0 +: 4]    = 4'hC;
      end
    end
  end

endmodule
