// tb_mixed_fp_adder - end-to-end test of the pipelined mixed decimal/binary adder at its
// default size.
//
// Random and directed operations of both radices, all six rounding modes, addition and
// subtraction, with operands given random redundant encodings, are issued back to back (with
// random idle cycles).  Every result is compared with a reference computed here with plain
// 128-bit integer arithmetic:
//  * decimal: the alignment rule (larger operand shifted left by up to its leading-zero count,
//    the other right), exact sum with guard/round/sticky information, the 16-digit rounding
//    window moved right on a final carry or left in the shift-left case, rounding by mode,
//    10^16 -> 10^15, overflow, zero sign;
//  * binary: the exact sum of the two binary64 values rounded to 53 significant bits (IEEE),
//    compared by value with the octal result, which must also be normalized to [1,8).
// It also checks the 5-cycle latency, that a decimal/binary/decimal burst finishes 7 cycles
// after the first issue, and counts how often each mechanism occurred; a mechanism that never
// occurred counts as a failure.
// Timing: 10-unit clock; inputs are driven at the falling edge, results are taken when
// out_valid is high at a rising edge; a watchdog ends a run that hangs.  The top module is
// instantiated with no parameter overrides.
module tb_mixed_fp_adder;
  import mfa_pkg::*;
  import tb_util_pkg::*;

  localparam int NOPS = 50000;
  localparam int LAT  = 5;

  logic clk = 0, rst_n = 0, in_valid = 0, op = 0, out_valid;
  mfp_t a, b, result;
  radix_t radix;
  rmode_t rmode;

  mixed_fp_adder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, last_seen = 0;

  typedef struct {
    radix_t   radix;
    special_t special;
    logic     sign;
    big_t     q;        // decimal: significand; binary: rounded integer
    int       expo;     // decimal: biased exponent; binary: octal biased exponent er
    int       sh;       // binary: value = q * 2^(sh-57) * 8^(expo-bias)
    int       lzc;
    int       issue;
  } exp_t;

  exp_t queue[$];

  // mechanism counters
  typedef enum int { M_FC, M_SL, M_NEG, M_STICKY, M_RUP, M_POSTCARRY, M_ZERO, M_NAN, M_INF,
                     M_INVALID, M_OVF, M_BIN_RSHIFT, M_BIN_LSHIFT, M_DEC_LSA, M_RADIX_SWITCH,
                     M_TIE, M_BURST7, M_LAST } mech_t;
  int mech[M_LAST];

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- reference rounding
  function automatic bit ref_up(input big_t d, input big_t u, input int es, input bit odd,
                                input bit sign, input rmode_t m, output bit tie);
    bit inexact, gt, half;
    inexact = (d != 0) || (es != 0);
    gt   = (2*d > u) || (2*d == u && es > 0);
    half = (2*d == u) && es == 0;
    tie  = half;
    case (m)
      RM_RNE: return gt || (half && odd);
      RM_RNA: return gt || half;
      RM_RP:  return inexact && !sign;
      RM_RN:  return inexact && sign;
      RM_RA:  return inexact;
      default: return 0;
    endcase
  endfunction

  function automatic bit ovf_inf(input bit sign, input rmode_t m);
    return !(m == RM_RZ || (m == RM_RP && sign) || (m == RM_RN && !sign));
  endfunction

  // ---------------------------------------------------------------- reference model
  function automatic exp_t reference(input mfp_t x_a, input mfp_t x_b, input logic x_op,
                                     input radix_t rad, input rmode_t m);
    exp_t r;
    bit nan_a, nan_b, inf_a, inf_b, sb_eff, eff_sub, swp, xz, sx, sy, rem, sgn, tie;
    int ea, eb, ex, ey, d, lsa, rsa, er, es, lzcx, rr;
    big_t ca, cb, cx, cy, xs, ys, s, mag, u, q, dd, base;
    r.radix = rad; r.special = SP_NONE; r.sign = 0; r.q = 0; r.expo = 0; r.sh = 0; r.lzc = 0;
    rr = (rad == RADIX_DEC) ? 10 : 8;
    nan_a = x_a.special inside {SP_SNAN, SP_QNAN};
    nan_b = x_b.special inside {SP_SNAN, SP_QNAN};
    inf_a = x_a.special == SP_INF;
    inf_b = x_b.special == SP_INF;
    sb_eff = x_b.sign ^ x_op;
    eff_sub = x_a.sign ^ sb_eff;
    if (nan_a || nan_b) begin r.special = SP_QNAN; mech[M_NAN]++; return r; end
    if (inf_a && inf_b) begin
      r.special = eff_sub ? SP_QNAN : SP_INF; r.sign = eff_sub ? 0 : x_a.sign;
      if (eff_sub) mech[M_INVALID]++; else mech[M_INF]++;
      return r;
    end
    if (inf_a) begin r.special = SP_INF; r.sign = x_a.sign; mech[M_INF]++; return r; end
    if (inf_b) begin r.special = SP_INF; r.sign = sb_eff;   mech[M_INF]++; return r; end

    ca = (x_a.special == SP_ZERO) ? 0 : sig_value(x_a.sig, 0, SIG_DIGITS, rr);
    cb = (x_b.special == SP_ZERO) ? 0 : sig_value(x_b.sig, 0, SIG_DIGITS, rr);
    if (rad == RADIX_DEC) begin ca = ca / 100; cb = cb / 100; end   // digits 2..18
    ea = int'(x_a.exp); eb = int'(x_b.exp);
    swp = ea < eb;
    cx = swp ? cb : ca;  cy = swp ? ca : cb;
    ex = swp ? eb : ea;  ey = swp ? ea : eb;
    sx = swp ? sb_eff : x_a.sign;
    sy = swp ? x_a.sign : sb_eff;
    xz = swp ? (x_b.special == SP_ZERO) : (x_a.special == SP_ZERO);
    lzcx = swp ? int'(x_b.lzc) : int'(x_a.lzc);
    d = ex - ey;
    if (xz) lsa = d;
    else if (rad == RADIX_BIN) lsa = 0;
    else lsa = (d < lzcx) ? d : lzcx;
    rsa = d - lsa;
    er  = ex - lsa;
    if (lsa > 0 && rad == RADIX_DEC && !xz) mech[M_DEC_LSA]++;

    // units: decimal 10^-3 of ER (G, R, E digits), binary 8^-1 of the LSD (E digit)
    if (rad == RADIX_DEC) begin
      xs = xz ? 0 : cx * ipow10(lsa) * 1000;
      if (rsa <= 3) begin ys = cy * ipow10(3 - rsa); rem = 0; end
      else if (rsa <= 35) begin base = ipow10(rsa - 3); ys = cy / base; rem = (cy % base) != 0; end
      else begin ys = 0; rem = cy != 0; end
    end else begin
      xs = cx * 8;
      if (rsa <= 1) begin ys = cy * pow_int(8, 1 - rsa); rem = 0; end
      else if (rsa <= 40) begin base = pow_int(8, rsa - 1); ys = cy / base; rem = (cy % base) != 0; end
      else begin ys = 0; rem = cy != 0; end
    end
    s = (sx ? -xs : xs) + (sy ? -ys : ys);
    if (s < 0 || (s == 0 && rem && sy)) begin sgn = 1; mag = -s; end
    else begin sgn = 0; mag = s; end
    if (s < 0) mech[M_NEG]++;
    es = rem ? ((sy ^ sgn) ? -1 : 1) : 0;
    if (rem) mech[M_STICKY]++;
    if (mag == 0 && es == 0) begin
      r.special = SP_ZERO; mech[M_ZERO]++;
      r.sign = eff_sub ? (m == RM_RN) : sx;
      r.expo = er; r.lzc = 16;
      return r;
    end
    r.sign = sgn;

    if (rad == RADIX_DEC) begin
      bit fc, sl;
      fc = !eff_sub && (mag > ipow10(19) || (mag == ipow10(19) && es >= 0));
      sl = eff_sub && rsa > 0 && (mag < ipow10(18) || (mag == ipow10(18) && es < 0));
      if (fc) mech[M_FC]++;
      if (sl) mech[M_SL]++;
      u = fc ? 10000 : sl ? 100 : 1000;
      r.expo = er + (fc ? 1 : 0) - (sl ? 1 : 0);
      q = mag / u; dd = mag % u;
      if (dd == 0 && es < 0) begin q = q - 1; dd = u; end
      if (ref_up(dd, u, es, q[0], sgn, m, tie)) begin q = q + 1; mech[M_RUP]++; end
      if (tie) mech[M_TIE]++;
      if (q == ipow10(16)) begin q = ipow10(15); r.expo++; mech[M_POSTCARRY]++; end
      if (r.expo > DEC_EMAX) begin
        mech[M_OVF]++;
        r.expo = DEC_EMAX;
        if (ovf_inf(sgn, m)) begin r.special = SP_INF; return r; end
        q = ipow10(16) - 1;
      end
      r.q = q;
      r.lzc = 16 - ndigits10(q);
    end else begin
      int bl, sh;
      big_t mm;
      mm = mag;
      if (es < 0) begin mm = mm - 1; es = 1; end
      bl = 0;
      for (int i = 0; i < 127; i++) if (mm[i]) bl = i + 1;
      if (bl > 57 + 3) mech[M_BIN_RSHIFT]++;           // value of 8 or more
      if (bl <= 57 - 3) mech[M_BIN_LSHIFT]++;          // below 1/8: at least 2 digits left
      sh = bl - 53;
      if (sh > 0) begin
        q = mm >> sh; dd = mm & ((big_t'(1) << sh) - 1); u = big_t'(1) << sh;
      end else begin
        q = mm << (-sh); dd = 0; u = 2;
      end
      if (ref_up(dd, u, es, q[0], sgn, m, tie)) begin q = q + 1; mech[M_RUP]++; end
      if (tie) mech[M_TIE]++;
      if (q == (big_t'(1) << 53)) begin q = big_t'(1) << 52; sh++; mech[M_POSTCARRY]++; end
      r.q = q; r.sh = sh; r.expo = er;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- result comparison
  function automatic bit result_ok(input exp_t e, input mfp_t res);
    big_t v;
    if (res.special != e.special) return 0;
    if (e.special inside {SP_QNAN}) return 1;
    if (res.sign != e.sign) return 0;
    if (e.special == SP_INF) return 1;
    if (e.special == SP_ZERO) return (e.radix == RADIX_BIN) || (int'(res.exp) == e.expo);
    if (!digits_ok({res.sig, 4'b0}, FRAME)) return 0;
    if (e.radix == RADIX_DEC) begin
      v = sig_value(res.sig, 2, 17, 10);
      return v == e.q && int'(res.exp) == e.expo && int'(res.lzc) == e.lzc
          && sig_value(res.sig, 0, 2, 10) == 0 && res.sig[19*4 +: 4] == 4'd0;
    end else begin
      int l, rr, mn;
      big_t lhs, rhs;
      v = sig_value(res.sig, 0, SIG_DIGITS, 8);
      if (v < (big_t'(1) << 54) || v >= (big_t'(1) << 57)) return 0;
      l  = 3 * (int'(res.exp) - e.expo) - 54;
      rr = e.sh - 57;
      mn = (l < rr) ? l : rr;
      lhs = v << (l - mn);
      rhs = e.q << (rr - mn);
      return lhs == rhs;
    end
  endfunction

  // ---------------------------------------------------------------- operand generation
  function automatic mfp_t dec_operand(input big_t v, input int ebias, input bit sign);
    mfp_t o;
    frame_t f;
    o = '0;
    o.sign = sign;
    o.exp = EXP_W'(ebias);
    if (v == 0) begin o.special = SP_ZERO; o.lzc = 16; return o; end
    f = encode(v, 2, 17, 10, 1);
    o.special = SP_NONE;
    o.sig = f[SIG_DIGITS*4-1:0];
    o.lzc = LZC_W'(16 - ndigits10(v));
    return o;
  endfunction

  function automatic big_t rand_dec_sig();
    int nd, kind;
    big_t v;
    kind = $urandom % 10;
    if (kind == 0) return ipow10(16) - 1;
    if (kind == 1) return ipow10(15);
    if (kind == 2) return ipow10($urandom % 16);
    nd = 1 + $urandom % 16;
    if (kind < 6) nd = 16;
    v = 0;
    for (int i = 0; i < nd; i++) v = v * 10 + big_t'((i == 0) ? 1 + int'($urandom % 9) : int'($urandom % 10));
    if (kind == 6) v = (v / 10) * 10 + 5;      // ties
    return v;
  endfunction

  // binary64 value sig53 * 2^(e2 - 52) as octal operand
  function automatic mfp_t bin_operand(input big_t sig53, input int e2, input bit sign);
    mfp_t o;
    frame_t f;
    int e8, k;
    o = '0;
    o.sign = sign;
    if (sig53 == 0) begin o.special = SP_ZERO; o.exp = EXP_W'(EXP_BIAS + e2 / 3); return o; end
    e8 = (e2 >= 0) ? e2 / 3 : -((-e2 + 2) / 3);
    k  = e2 - 3 * e8;
    f  = encode(sig53 << (2 + k), 0, SIG_DIGITS, 8, 1);
    o.special = SP_NONE;
    o.sig = f[SIG_DIGITS*4-1:0];
    o.exp = EXP_W'(EXP_BIAS + e8);
    return o;
  endfunction

  function automatic big_t rand_bin_sig();
    big_t v;
    int kind;
    kind = $urandom % 8;
    if (kind == 0) return (big_t'(1) << 53) - 1;
    if (kind == 1) return big_t'(1) << 52;
    v = big_t'(1) << 52;
    v = v | (big_t'({$urandom, $urandom}) & ((big_t'(1) << 52) - 1));
    if (kind == 2) v = v & ~big_t'(64'hFFFF);       // short significands
    return v;
  endfunction

  task automatic issue(input mfp_t x_a, input mfp_t x_b, input logic x_op, input radix_t rad,
                       input rmode_t m);
    exp_t e;
    // inputs change at the falling edge, away from the rising edge that samples them
    e = reference(x_a, x_b, x_op, rad, m);
    @(negedge clk);
    a = x_a; b = x_b; op = x_op; radix = rad; rmode = m; in_valid = 1;
    e.issue = cycle;
    queue.push_back(e);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic random_op(input radix_t rad);
    mfp_t x_a, x_b;
    int kind, ea, eb;
    bit sa, sbb;
    rmode_t m;
    m  = rmode_t'($urandom % 6);
    sa = 1'($urandom); sbb = 1'($urandom);
    kind = $urandom % 100;
    if (rad == RADIX_DEC) begin
      big_t va, vb;
      ea = EXP_BIAS - 10 + $urandom % 20;
      eb = ($urandom % 4 == 0) ? EXP_BIAS - 40 + $urandom % 80 : ea - 20 + $urandom % 40;
      va = rand_dec_sig(); vb = rand_dec_sig();
      if (kind < 8) begin vb = va; eb = ea; end                          // cancellation
      if (kind >= 8 && kind < 12) begin va = 0; end
      if (kind >= 12 && kind < 15) begin ea = DEC_EMAX - $urandom % 2; eb = ea - $urandom % 3;
                                         va = ipow10(16) - 1 - big_t'($urandom % 1000); vb = va; sbb = sa; end
      x_a = dec_operand(va, ea, sa);
      x_b = dec_operand(vb, eb, sbb);
    end else begin
      big_t va, vb;
      int e2a, e2b;
      e2a = -40 + $urandom % 80;
      e2b = ($urandom % 3 == 0) ? e2a - 3 + $urandom % 7 : e2a - 70 + $urandom % 140;
      va = rand_bin_sig(); vb = rand_bin_sig();
      if (kind < 10) begin vb = va ^ big_t'(int'($urandom % 16)); e2b = e2a; end         // cancellation
      if (kind >= 10 && kind < 14) begin vb = va; e2b = e2a - 1 - $urandom % 3; end
      if (kind >= 14 && kind < 17) vb = 0;
      x_a = bin_operand(va, e2a, sa);
      x_b = bin_operand(vb, e2b, sbb);
    end
    if (kind >= 95) begin
      special_t sp;
      sp = special_t'(1 + $urandom % 3);
      if ($urandom % 2 != 0) x_a.special = sp; else x_b.special = sp;
      if (kind == 99) begin x_a.special = SP_INF; x_b.special = SP_INF; end
    end
    issue(x_a, x_b, 1'($urandom), rad, m);
  endtask

  // ---------------------------------------------------------------- result checker
  radix_t last_radix = RADIX_BIN;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (queue.size() == 0) begin
        failures++;
        $display("FAIL: result without an operation");
      end else begin
        e = queue.pop_front();
        checks++;
        last_seen = cycle;
        if (cycle - e.issue != LAT) begin
          failures++;
          $display("FAIL: latency %0d", cycle - e.issue);
        end
        if (!result_ok(e, result)) begin
          failures++;
          if (failures < 12)
            $display("FAIL radix=%0d exp: sp=%0d s=%0d q=%0d e=%0d sh=%0d lzc=%0d | got sp=%0d s=%0d sig=%h e=%0d lzc=%0d",
                     e.radix, e.special, e.sign, e.q, e.expo, e.sh, e.lzc,
                     result.special, result.sign, result.sig, result.exp, result.lzc);
        end
      end
    end
  end

  initial begin
    int t0;
    radix_t rad, prev;
    a = '0; b = '0; radix = RADIX_DEC; rmode = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // three operations issued back to back (decimal, binary, decimal)
    issue(dec_operand(123, EXP_BIAS + 1, 0), dec_operand(45, EXP_BIAS, 0), 0, RADIX_DEC, RM_RNE);
    t0 = queue[0].issue;
    issue(bin_operand(big_t'(8'b10101101) << 45, 7, 0), bin_operand(big_t'(8'b11100100) << 45, 4, 0),
          0, RADIX_BIN, RM_RP);
    issue(dec_operand(124, EXP_BIAS + 4, 0), dec_operand(6210, EXP_BIAS + 3, 0), 1, RADIX_DEC, RM_RNE);
    idle();
    while (queue.size() != 0) @(posedge clk);
    if (last_seen - t0 == 7) mech[M_BURST7]++;   // last result written 7 cycles after the first issue
    else begin failures++; $display("FAIL: burst of three took %0d cycles", last_seen - t0); end

    // random mixed stream
    prev = RADIX_DEC;
    for (int n = 0; n < NOPS; n++) begin
      rad = radix_t'($urandom % 2);
      if (rad != prev) mech[M_RADIX_SWITCH]++;
      prev = rad;
      random_op(rad);
      if ($urandom % 8 == 0) idle();
    end
    idle();
    repeat (LAT + 2) @(posedge clk);
    if (queue.size() != 0) begin failures++; $display("FAIL: %0d results missing", queue.size()); end

    for (int i = 0; i < M_LAST; i++) begin
      $display("mechanism %s: %0d", mech_t'(i), mech[i]);
      if (mech[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
