// mfa_pkg - shared types, constants and digit helpers of the mixed decimal/binary
// redundant floating-point adder.
//
// Operand format (one struct for both radices):
//   special    3 bits  none / infinity / signalling NaN / quiet NaN / zero
//   sign       1 bit   the significand itself is never negative
//   sig       20 digits, 4-bit two's-complement signed digits in [-6,6]:
//                      [19] binary addendum, [18] decimal addendum,
//                      [17:2] MainStream (16 digits), [1] SLSD, [0] LSD
//   lzc        5 bits  decimal leading-zero count: 16 - (number of decimal digits of the value)
//   exp       10 bits  biased exponent (bias 398); base 10 in decimal mode, base 8 in binary mode
// A decimal64 value uses sig[18:2]; its integer significand is sum(d_i*10^(i-2)).
// A binary64 value uses all 20 digits as an octal fixed-point number with two integer digits
// ([19],[18]) and 18 fraction digits; it is normalized so its value lies in [1,8).
//
// Inside the datapath a 21-digit frame is used: frame digit 0 (EXT) sits below the LSD and
// frame digit i+1 holds sig digit i.  The frame positions 2 and 1 are the guard and round
// digits of decimal operations.  The document's datapath is 20 digits wide; the EXT digit is
// this design's addition, so that a binary subtraction whose operands are one octal digit apart
// and which cancels many leading digits is still exact.
package mfa_pkg;

  localparam int MS_DIGITS  = 16;                 // MainStream digits (decimal64 precision)
  localparam int SIG_DIGITS = MS_DIGITS + 4;      // 20 digits in the operand format
  localparam int FRAME      = SIG_DIGITS + 1;     // 21 digits inside the datapath
  localparam int EXP_W      = 10;
  localparam int LZC_W      = 5;
  localparam int EXP_BIAS   = 398;                // decimal64: q in [-398, 369]
  localparam int DEC_EMAX   = 369 + EXP_BIAS;     // largest biased decimal exponent
  localparam int BIN_EMAX8  = 341 + EXP_BIAS;     // largest biased octal exponent of binary64

  // frame positions
  localparam int P_EXT  = 0;
  localparam int P_LSD  = 1;
  localparam int P_SLSD = 2;
  localparam int P_MS0  = 3;                      // least significant MainStream digit
  localparam int P_DADD = 19;                     // decimal addendum
  localparam int P_BADD = 20;                     // binary addendum

  typedef logic [3:0] sd_digit_t;                 // two's complement digit, value in [-6,6]
  typedef logic [SIG_DIGITS*4-1:0] sig_t;
  typedef logic [FRAME*4-1:0]      frame_t;

  typedef enum logic [2:0] {
    SP_NONE = 3'd0, SP_INF = 3'd1, SP_SNAN = 3'd2, SP_QNAN = 3'd3, SP_ZERO = 3'd4
  } special_t;

  typedef enum logic { RADIX_BIN = 1'b0, RADIX_DEC = 1'b1 } radix_t;

  typedef enum logic [2:0] {
    RM_RNE = 3'd0,   // nearest, ties to even
    RM_RNA = 3'd1,   // nearest, ties away from zero
    RM_RP  = 3'd2,   // toward +infinity
    RM_RN  = 3'd3,   // toward -infinity
    RM_RZ  = 3'd4,   // toward zero
    RM_RA  = 3'd5    // away from zero
  } rmode_t;

  typedef struct packed {
    special_t          special;
    logic              sign;
    sig_t              sig;
    logic [LZC_W-1:0]  lzc;
    logic [EXP_W-1:0]  exp;
  } mfp_t;

  // position of the remainder below the rounding point, relative to half an ulp
  typedef enum logic [1:0] { REM_ZERO, REM_LOW, REM_HALF, REM_HIGH } rem_t;

  function automatic sd_digit_t dig(input frame_t f, input int i);
    return f[i*4 +: 4];
  endfunction

  function automatic int dval(input sd_digit_t d);
    return int'($signed(d));
  endfunction

  // Rounding decision on a positive significand: 1 = add one unit in the last place.
  function automatic logic round_up(input rem_t r, input logic lsb_odd, input logic sign,
                                    input rmode_t m);
    logic inexact;
    inexact = (r != REM_ZERO);
    case (m)
      RM_RNE:  return (r == REM_HIGH) || (r == REM_HALF && lsb_odd);
      RM_RNA:  return (r == REM_HIGH) || (r == REM_HALF);
      RM_RP:   return inexact && !sign;
      RM_RN:   return inexact && sign;
      RM_RA:   return inexact;
      default: return 1'b0;                       // RM_RZ
    endcase
  endfunction

  // Result of an overflow: infinity unless the mode rounds toward zero for this sign.
  function automatic logic overflow_to_inf(input logic sign, input rmode_t m);
    case (m)
      RM_RZ:   return 1'b0;
      RM_RP:   return !sign;
      RM_RN:   return sign;
      default: return 1'b1;
    endcase
  endfunction

endpackage
