// mixed_fp_adder - five-stage pipelined mixed decimal64 / binary64 redundant floating-point
// adder/subtractor.
//
// One datapath serves both radices.  Significands are held as signed digits in [-6,6]
// (radix 10 for decimal64, radix 8 for binary64), so the significand addition is carry-free
// and its delay does not depend on the precision.  Decimal operands carry their leading-zero
// count, so alignment needs no leading-zero detection.
//
// Pipeline (one operation may enter every cycle; a result leaves 5 cycles after its operands
// were presented, together with out_valid):
//   stage 1  swap, shift and align: exponent difference, swap, shift amounts, barrel shifters,
//            sticky generation, special-value handling
//   stage 2  add/subtract: 21-digit signed-digit adder (radix selected per operation)
//   stage 3  final carry / negative significand / leading zero / shift-left detection on CR1,
//            conversion to magnitude, and the three parallel decimal rounding blocks
//   stage 4  decimal final correction; binary normalization and Group_ID
//   stage 5  binary rounding; selection of the result (special, decimal or binary)
// The stage split is the document's; which register carries what, the valid signal and the
// reset (only the valid bits are reset) are this design's choices.  There is no stall:
// decimal and binary operations may follow each other in any order.
//
// Interface: operands a, b in the mfp_t format of mfa_pkg, op (0 add, 1 subtract),
// radix, rounding mode; result in the same format.
module mixed_fp_adder
  import mfa_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  mfp_t   a,
  input  mfp_t   b,
  input  logic   op,
  input  radix_t radix,
  input  rmode_t rmode,
  output logic   out_valid,
  output mfp_t   result
);

  // ---------------------------------------------------------------- stage 1
  logic swap, x_zero, eff_sub1, sign_x1, rsa_nz1, sticky1, sticky_neg1;
  logic [EXP_W-1:0] diff, ex, er1;
  logic [LZC_W-1:0] lzcx;
  logic [4:0] lsa, rsa;
  sig_t cx, cy;
  frame_t ax, ay;
  logic sp_is1, sp_sign1;
  special_t sp_res1;

  exp_swap u_exp_swap (
    .a(a), .b(b), .op(op), .swap(swap), .diff(diff), .cx(cx), .cy(cy), .lzcx(lzcx),
    .ex(ex), .x_zero(x_zero), .eff_sub(eff_sub1), .sign_x(sign_x1));

  shift_amount u_shift_amount (
    .diff(diff), .lzcx(lzcx), .ex(ex), .x_zero(x_zero), .radix(radix),
    .lsa(lsa), .rsa(rsa), .rsa_nz(rsa_nz1), .er(er1));

  align_shifter u_align (.cx(cx), .cy(cy), .lsa(lsa), .rsa(rsa), .ax(ax), .ay(ay));

  sticky_gen u_sticky (
    .ca((a.special == SP_NONE) ? a.sig : '0), .cb((b.special == SP_NONE) ? b.sig : '0),
    .swap(swap), .rsa(rsa), .sticky(sticky1), .sticky_neg(sticky_neg1));

  special_cases u_special (
    .sp_a(a.special), .sp_b(b.special), .sign_a(a.sign), .sign_b(b.sign), .op(op),
    .is_special(sp_is1), .res_special(sp_res1), .res_sign(sp_sign1));

  // control that travels down the pipe
  typedef struct packed {
    radix_t           radix;
    rmode_t           mode;
    logic             eff_sub;
    logic             sign_x;
    logic             rsa_nz;
    logic             sticky;
    logic             sticky_neg;     // sign of the sticky part as it enters CR1
    logic [EXP_W-1:0] er;
    logic             sp_is;
    special_t         sp_res;
    logic             sp_sign;
  } ctl_t;

  ctl_t   ctl1_d, ctl2, ctl3, ctl4;
  frame_t ax2, ay2;
  logic   v2, v3, v4, v5;

  always_comb begin
    ctl1_d.radix      = radix;
    ctl1_d.mode       = rmode;
    ctl1_d.eff_sub    = eff_sub1;
    ctl1_d.sign_x     = sign_x1;
    ctl1_d.rsa_nz     = rsa_nz1;
    ctl1_d.sticky     = sticky1;
    ctl1_d.sticky_neg = sticky_neg1 ^ eff_sub1;
    ctl1_d.er         = er1;
    ctl1_d.sp_is      = sp_is1;
    ctl1_d.sp_res     = sp_res1;
    ctl1_d.sp_sign    = sp_sign1;
  end

  always_ff @(posedge clk) begin
    ax2  <= ax;
    ay2  <= ay;
    ctl2 <= ctl1_d;
  end

  // ---------------------------------------------------------------- stage 2
  frame_t cr1, cr1_3;

  sd_adder #(.N(FRAME)) u_adder (
    .x(ax2), .y(ay2), .sub(ctl2.eff_sub), .radix(ctl2.radix), .s(cr1));

  always_ff @(posedge clk) begin
    cr1_3 <= cr1;
    ctl3  <= ctl2;
  end

  // ---------------------------------------------------------------- stage 3
  logic neg3, zero3, mag_sticky_neg3, fc3, sl3, sign3;
  frame_t mag3;
  logic [4:0] top3;
  logic [1:0] dns_unused, dfc_unused, dsl_unused;
  logic [7:0] lsds_ns3, lsds_fc3, lsds_sl3;

  cr1_detect u_detect (
    .cr1(cr1_3), .sticky(ctl3.sticky), .sticky_neg(ctl3.sticky_neg),
    .eff_sub(ctl3.eff_sub), .rsa_nz(ctl3.rsa_nz),
    .neg(neg3), .zero(zero3), .mag(mag3), .mag_sticky_neg(mag_sticky_neg3), .top(top3),
    .final_carry(fc3), .shift_left(sl3));

  assign sign3 = ctl3.sign_x ^ neg3;

  // the three decimal rounding blocks: no shift, final carry (right shift), left shift
  logic [3:0] e_fc;
  logic       st_fc, stn_fc;
  always_comb begin
    e_fc   = mag3[1*4 +: 4];
    st_fc  = ctl3.sticky | (mag3[3:0] != 4'd0);
    stn_fc = (mag3[3:0] != 4'd0) ? mag3[3] : mag_sticky_neg3;
  end

  dec_round u_rnd_ns (
    .lsd(mag3[3*4 +: 4]), .nxt(mag3[4*4 +: 4]), .g(mag3[2*4 +: 4]), .r(mag3[1*4 +: 4]),
    .e(mag3[0 +: 4]), .sticky(ctl3.sticky), .sticky_neg(mag_sticky_neg3), .sign(sign3),
    .mode(ctl3.mode), .decision(dns_unused), .lsds(lsds_ns3));

  dec_round u_rnd_fc (
    .lsd(mag3[4*4 +: 4]), .nxt(mag3[5*4 +: 4]), .g(mag3[3*4 +: 4]), .r(mag3[2*4 +: 4]),
    .e(e_fc), .sticky(st_fc), .sticky_neg(stn_fc), .sign(sign3),
    .mode(ctl3.mode), .decision(dfc_unused), .lsds(lsds_fc3));

  dec_round u_rnd_sl (
    .lsd(mag3[2*4 +: 4]), .nxt(mag3[3*4 +: 4]), .g(mag3[1*4 +: 4]), .r(mag3[0 +: 4]),
    .e(4'd0), .sticky(ctl3.sticky), .sticky_neg(mag_sticky_neg3), .sign(sign3),
    .mode(ctl3.mode), .decision(dsl_unused), .lsds(lsds_sl3));

  frame_t mag4;
  logic fc4, sl4, zero4, sign4, msn4;
  logic [4:0] top4;
  logic [7:0] lsds_ns4, lsds_fc4, lsds_sl4;

  always_ff @(posedge clk) begin
    mag4     <= mag3;
    fc4      <= fc3;
    sl4      <= sl3;
    zero4    <= zero3;
    sign4    <= sign3;
    msn4     <= mag_sticky_neg3;
    top4     <= top3;
    lsds_ns4 <= lsds_ns3;
    lsds_fc4 <= lsds_fc3;
    lsds_sl4 <= lsds_sl3;
    ctl4     <= ctl3;
  end

  // ---------------------------------------------------------------- stage 4
  mfp_t dec_res4, dec_res5;
  frame_t nf4, nf5;
  logic ns4, nsn4, ns5, nsn5, zero5, sign5;
  logic [EXP_W-1:0] en4, en5;
  logic [1:0] grp4, grp5;
  ctl_t ctl5;

  dec_final_correction u_dec_final (
    .mag(mag4), .final_carry(fc4), .shift_left(sl4), .zero(zero4),
    .lsds_ns(lsds_ns4), .lsds_fc(lsds_fc4), .lsds_sl(lsds_sl4),
    .er(ctl4.er), .sign(sign4), .eff_sub(ctl4.eff_sub), .mode(ctl4.mode), .res(dec_res4));

  bin_normalize u_bin_norm (
    .mag(mag4), .sticky(ctl4.sticky), .sticky_neg(msn4), .top(top4), .er(ctl4.er),
    .nf(nf4), .n_sticky(ns4), .n_sticky_neg(nsn4), .en(en4), .group_id(grp4));

  always_ff @(posedge clk) begin
    dec_res5 <= dec_res4;
    nf5      <= nf4;
    ns5      <= ns4;
    nsn5     <= nsn4;
    en5      <= en4;
    grp5     <= grp4;
    zero5    <= zero4;
    sign5    <= sign4;
    ctl5     <= ctl4;
  end

  // ---------------------------------------------------------------- stage 5
  mfp_t bin_res5, res5;

  bin_round u_bin_round (
    .nf(nf5), .sticky(ns5), .sticky_neg(nsn5), .group_id(grp5), .en(en5), .sign(sign5),
    .mode(ctl5.mode), .res(bin_res5));

  always_comb begin
    res5 = '0;
    if (ctl5.sp_is) begin
      res5.special = ctl5.sp_res;
      res5.sign    = ctl5.sp_sign;
      res5.exp     = ctl5.er;
    end else if (ctl5.radix == RADIX_DEC || zero5) begin
      res5 = dec_res5;                           // also carries the zero result of binary
      if (ctl5.radix == RADIX_BIN) res5.lzc = '0;
    end else begin
      res5 = bin_res5;
    end
  end

  always_ff @(posedge clk) result <= res5;

  // valid bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v2 <= in_valid; v3 <= v2; v4 <= v3; v5 <= v4; out_valid <= v5;
    end
  end

endmodule
