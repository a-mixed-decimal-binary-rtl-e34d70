// tb_util_pkg - reference helpers shared by the testbenches: the integer value of a
// signed-digit frame, random redundant encodings of an integer, and digit-set checks.
// All arithmetic is plain integer arithmetic on 128-bit numbers, independent of the RTL.
package tb_util_pkg;
  import mfa_pkg::*;

  typedef logic signed [127:0] big_t;

  function automatic big_t pow_int(input int r, input int n);
    big_t p = 1;
    for (int i = 0; i < n; i++) p = p * r;
    return p;
  endfunction

  // value of digits [lo .. lo+n-1] of a frame, in units of digit lo
  function automatic big_t digits_value(input frame_t f, input int lo, input int n, input int r);
    big_t v = 0;
    for (int i = lo + n - 1; i >= lo; i--) v = v * r + big_t'(dval(f[i*4 +: 4]));
    return v;
  endfunction

  function automatic big_t sig_value(input sig_t s, input int lo, input int n, input int r);
    frame_t f = '0;
    f[SIG_DIGITS*4-1:0] = s;
    return digits_value(f, lo, n, r);
  endfunction

  // random redundant encoding of v >= 0 into digits [lo .. lo+n-1] of a frame (others zero).
  // The most significant digit is never chosen negative.
  function automatic frame_t encode(input big_t v, input int lo, input int n, input int r,
                                    input bit redundant);
    frame_t f = '0;
    big_t rem = v;
    for (int i = 0; i < n; i++) begin
      int d;
      d = int'(rem % big_t'(r));
      if (d > 6) d = d - r;
      else if (redundant && i < n - 1 && d >= r - 6 && ($urandom % 2) == 1) d = d - r;
      rem = (rem - big_t'(d)) / big_t'(r);
      f[(lo+i)*4 +: 4] = 4'(d);
    end
    if (rem != 0) $error("encode: value does not fit");
    return f;
  endfunction

  // all digits in [-6,6]
  function automatic bit digits_ok(input frame_t f, input int n);
    for (int i = 0; i < n; i++) begin
      int d = dval(f[i*4 +: 4]);
      if (d < -6 || d > 6) return 0;
    end
    return 1;
  endfunction

  // the signed-digit adder never produces two neighbouring digits that are both +6 or both
  // -6; blocks after it rely on that, so stimulus for them keeps to it
  function automatic bit no_twin_sixes(input frame_t f);
    for (int i = 0; i < FRAME - 1; i++)
      if (dval(f[i*4 +: 4]) == dval(f[(i+1)*4 +: 4]) && (dval(f[i*4 +: 4]) == 6 || dval(f[i*4 +: 4]) == -6))
        return 0;
    return 1;
  endfunction

  function automatic big_t ipow10(input int n);
    return pow_int(10, n);
  endfunction

  // number of decimal digits of v > 0
  function automatic int ndigits10(input big_t v);
    int n = 0;
    big_t t = v;
    while (t > 0) begin t = t / 10; n++; end
    return n;
  endfunction

endpackage
