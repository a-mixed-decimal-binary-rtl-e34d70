// special_cases - result of additions with NaN or infinity operands.
//
// Follows the rules of the document: any NaN operand (signalling or quiet) gives a quiet NaN;
// one infinity and one finite operand give infinity with the sign of the infinity when it is
// the first operand, and with (sign xor operation) when it is the second; two infinities give
// infinity under an effective addition and a quiet NaN under an effective subtraction.
// Zero operands are not special here: they go through the datapath with zero digits.
// The quiet NaN produced has sign 0 and a zero payload (this design's choice).
// res_special never takes the code zero, so its top bit is constant.  Combinational.
module special_cases
  import mfa_pkg::*;
(
  input  special_t sp_a,
  input  special_t sp_b,
  input  logic     sign_a,
  input  logic     sign_b,
  input  logic     op,
  output logic     is_special,
  output special_t res_special,
  output logic     res_sign
);

  logic nan_a, nan_b, inf_a, inf_b, eff_sub;

  always_comb begin
    nan_a   = (sp_a == SP_SNAN) || (sp_a == SP_QNAN);
    nan_b   = (sp_b == SP_SNAN) || (sp_b == SP_QNAN);
    inf_a   = (sp_a == SP_INF);
    inf_b   = (sp_b == SP_INF);
    eff_sub = sign_a ^ sign_b ^ op;
    is_special  = 1'b1;
    res_special = SP_QNAN;
    res_sign    = 1'b0;
    if (nan_a || nan_b) begin
      res_special = SP_QNAN;
    end else if (inf_a && inf_b) begin
      res_special = eff_sub ? SP_QNAN : SP_INF;
      res_sign    = eff_sub ? 1'b0 : sign_a;
    end else if (inf_a) begin
      res_special = SP_INF;
      res_sign    = sign_a;
    end else if (inf_b) begin
      res_special = SP_INF;
      res_sign    = sign_b ^ op;
    end else begin
      is_special  = 1'b0;
      res_special = SP_NONE;
    end
  end

endmodule
