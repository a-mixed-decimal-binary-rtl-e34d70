// dec_final_correction - final correction unit of the decimal path.
//
// Chooses one of the three rounded candidates according to the detections on CR1:
//   final carry  -> |CR1| shifted right one digit, exponent ER + 1,
//   shift-left   -> |CR1| shifted left one digit,  exponent ER - 1,
//   otherwise    -> |CR1| as is, exponent ER,
// and writes the two rounded least significant digits of that candidate into place.  Then:
//  * if rounding carried the significand up to exactly 10^16, the result becomes 10^15 with the
//    exponent one higher (this design's completion; the document does not discuss it);
//  * if the exponent passes the decimal64 maximum, the result is infinity or the largest
//    finite number 9999999999999999 x 10^369, depending on rounding mode and sign, as the
//    document describes for a final carry at the largest exponent;
//  * an exact zero result gets the special code zero, sign + (or - when rounding toward
//    -infinity) for an effective subtraction and the common sign otherwise, as IEEE 754 says;
//  * the leading-zero count of the result is computed for the next operation.
// Result digits 19, 1 and 0 are always zero in decimal mode, so those output bits are
// constant.  Combinational.
module dec_final_correction
  import mfa_pkg::*;
(
  input  frame_t            mag,
  input  logic              final_carry,
  input  logic              shift_left,
  input  logic              zero,
  input  logic [7:0]        lsds_ns,     // rounded {LSD+1, LSD} of the no-shift window
  input  logic [7:0]        lsds_fc,     // ... of the final-carry window
  input  logic [7:0]        lsds_sl,     // ... of the left-shift window
  input  logic [EXP_W-1:0]  er,
  input  logic              sign,
  input  logic              eff_sub,
  input  rmode_t            mode,
  output mfp_t              res
);

  logic [17*4-1:0] digs;                 // 17 result digits: 16 MainStream + addendum
  logic [EXP_W+1:0] e;
  logic z_unused, n_unused, rest_neg, z2_unused;
  logic [4:0] top_r, t2_unused;

  always_comb begin
    if (final_carry) begin
      digs = mag[4*4 +: 17*4];
      digs[7:0] = lsds_fc;
      e = {2'b00, er} + 1'b1;
    end else if (shift_left) begin
      digs = mag[2*4 +: 17*4];
      digs[7:0] = lsds_sl;
      e = {2'b00, er} - 1'b1;
    end else begin
      digs = mag[3*4 +: 17*4];
      digs[7:0] = lsds_ns;
      e = {2'b00, er};
    end
  end

  // sign of the digits below the addendum, to spot a significand of 10^16
  sd_lead #(.N(16)) u_rest (.d(digs[16*4-1:0]), .below_neg(1'b0),
                            .zero(z2_unused), .neg(rest_neg), .top(t2_unused));

  logic [17*4-1:0] digs2;
  logic [EXP_W+1:0] e2;
  always_comb begin
    logic signed [3:0] a;
    a = $signed(digs[16*4 +: 4]);
    digs2 = digs;
    e2 = e;
    if (a >= 4'sd2 || (a == 4'sd1 && !rest_neg)) begin
      digs2 = '0;
      digs2[15*4 +: 4] = 4'd1;
      e2 = e + 1'b1;
    end
  end

  sd_lead #(.N(17)) u_lzc (.d(digs2), .below_neg(1'b0), .zero(z_unused), .neg(n_unused),
                           .top(top_r));

  always_comb begin
    res = '0;
    res.sign = sign;
    res.exp  = e2[EXP_W-1:0];
    if (zero) begin
      res.special = SP_ZERO;
      res.sign    = eff_sub ? (mode == RM_RN) : sign;
      res.exp     = er;
      res.lzc     = 5'd16;
    end else if (e2 > (EXP_W+2)'(DEC_EMAX)) begin
      res.exp = EXP_W'(DEC_EMAX);
      if (overflow_to_inf(sign, mode)) begin
        res.special = SP_INF;
      end else begin
        res.special = SP_NONE;
        res.sig[18*4 +: 4] = 4'd1;           // 10^16 - 1 = 1 0...0 -1
        res.sig[2*4 +: 4]  = 4'hF;
        res.lzc = '0;
      end
    end else begin
      res.special = SP_NONE;
      res.sig[2*4 +: 17*4] = digs2;
      res.lzc = 5'(15 - int'(top_r));
    end
  end

endmodule
