// sticky_gen - sticky bit and sticky sign of the right-shifted operand.
//
// So that the sticky information is not on the critical path, it is prepared from both
// operands as soon as they arrive, for every possible right shift amount k: the sticky bit of
// shift k says whether frame digits [k-1:0] hold anything non-zero, and the sticky sign is the
// sign of the most significant non-zero digit among them (the sign of the value shifted out).
// The swap flag then selects the vectors of the operand that becomes Y, and RSA selects one
// entry through a multiplexer.  The sign is that of the shifted-out part of Y itself; the
// effective operation is applied later.  Combinational.
module sticky_gen
  import mfa_pkg::*;
(
  input  sig_t       ca,
  input  sig_t       cb,
  input  logic       swap,
  input  logic [4:0] rsa,
  output logic       sticky,
  output logic       sticky_neg
);

  logic [FRAME:0] nz_a, ng_a, nz_b, ng_b, nz_y, ng_y;   // index = shift amount
  frame_t fa, fb;

  // sticky preparation
  assign fa = {ca, 4'b0000};
  assign fb = {cb, 4'b0000};
  assign nz_a[0] = 1'b0;
  assign ng_a[0] = 1'b0;
  assign nz_b[0] = 1'b0;
  assign ng_b[0] = 1'b0;
  for (genvar k = 1; k <= FRAME; k++) begin : g_prep
    assign nz_a[k] = nz_a[k-1] | (fa[(k-1)*4 +: 4] != 4'd0);
    assign ng_a[k] = (fa[(k-1)*4 +: 4] != 4'd0) ? fa[(k-1)*4 + 3] : ng_a[k-1];
    assign nz_b[k] = nz_b[k-1] | (fb[(k-1)*4 +: 4] != 4'd0);
    assign ng_b[k] = (fb[(k-1)*4 +: 4] != 4'd0) ? fb[(k-1)*4 + 3] : ng_b[k-1];
  end

  // sticky vector selection and multiplexer
  always_comb begin
    nz_y = swap ? nz_a : nz_b;
    ng_y = swap ? ng_a : ng_b;
    if (rsa >= 5'(FRAME)) begin
      sticky     = nz_y[FRAME];
      sticky_neg = ng_y[FRAME];
    end else begin
      sticky     = nz_y[rsa];
      sticky_neg = ng_y[rsa];
    end
  end

endmodule
