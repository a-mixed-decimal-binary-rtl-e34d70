// sd_adder - carry-free signed-digit adder/subtractor of two aligned significand frames.
//
// N digit cells (sd_digit_cell) work in parallel; each passes its outgoing transfer
// (-1, 0 or +1) only to its left neighbour, so the delay does not depend on N.  The result
// CR1 = x + y (sub = 0) or x - y (sub = 1) keeps the [-6,6] digit set.  The least significant
// cell receives no transfer.  The transfer out of the most significant digit is dropped: with
// operands of the adder's format (addendum digits 0 or 1, values below 2*radix^(N-2)) the top
// digit sum stays within [-3,3] and never produces one.
// Combinational.  N defaults to the 21-digit frame of the mixed adder (20 digits of the
// document's mixed significand plus one extension digit).
module sd_adder
  import mfa_pkg::*;
#(
  parameter int N = FRAME
) (
  input  logic [N*4-1:0] x,
  input  logic [N*4-1:0] y,
  input  logic           sub,
  input  radix_t         radix,
  output logic [N*4-1:0] s
);

  logic [N:0] t_posi, t_nega;
  assign t_posi[0] = 1'b0;
  assign t_nega[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    sd_digit_cell u_cell (
      .x        (x[i*4 +: 4]),
      .y        (y[i*4 +: 4]),
      .tin_posi (t_posi[i]),
      .tin_nega (t_nega[i]),
      .radix    (radix),
      .sub      (sub),
      .s        (s[i*4 +: 4]),
      .tout_posi(t_posi[i+1]),
      .tout_nega(t_nega[i+1])
    );
  end

endmodule
