// sd_lead - leading-digit detection on a signed-digit number.
//
// For N digits in [-6,6] (radix 8 or 10) plus a sign for whatever lies below digit 0
// (the sticky part), reports
//   zero : every digit is zero,
//   neg  : the value is negative, i.e. the most significant non-zero digit is negative, or,
//          with all digits zero, the part below is negative,
//   top  : for a positive value, the position of its leading digit in conventional form:
//          the index p of the most significant non-zero digit, minus one when that digit is 1
//          and everything below it is negative (then the value is below radix^p).
// This is the sign and leading-zero detection that, unlike the addition, needs a scan over the
// whole width.  Combinational helper.
module sd_lead #(
  parameter int N = 21
) (
  input  logic [N*4-1:0] d,
  input  logic           below_neg,
  output logic           zero,
  output logic           neg,
  output logic [4:0]     top
);

  logic [N:0] rest_neg;   // rest_neg[p]: the value of digits below p (and the sticky) is < 0

  assign rest_neg[0] = below_neg;
  for (genvar p = 0; p < N; p++) begin : g_rest
    assign rest_neg[p+1] = (d[p*4 +: 4] != 4'd0) ? d[p*4 + 3] : rest_neg[p];
  end

  always_comb begin
    zero = 1'b1;
    top  = '0;
    for (int p = 0; p < N; p++)
      if (d[p*4 +: 4] != 4'd0) begin
        zero = 1'b0;
        top  = (d[p*4 +: 4] == 4'd1 && rest_neg[p]) ? 5'(p - 1) : 5'(p);
      end
    neg = rest_neg[N];
  end

endmodule
