// gf_alpha_mul: multiplies an element of GF(2^M) by the primitive element
// alpha = x.
//
// In the polynomial basis, multiplying by x is a one-place shift towards the
// high coefficients; the coefficient that falls out of x^(M-1) is reduced with
// x^M = POLY (the low part of p(x)), i.e. it is XORed into every position where
// p(x) has a term. For p(x) = x^16 + x^12 + x^3 + x + 1 this is
//   gamma_0 = beta_15, gamma_1 = beta_0 ^ beta_15, gamma_3 = beta_2 ^ beta_15,
//   gamma_12 = beta_11 ^ beta_15, every other gamma_k = beta_(k-1),
// three two-input XOR gates, one per term x^i with 0 < i < M. This structure
// is the published one; the parameterisation by M and POLY is this design's.
//
// Interface: beta (M bits) in, gamma = alpha*beta (M bits) out.
// Timing: purely combinational.
module gf_alpha_mul #(
  parameter int unsigned     M    = sa_pkg::DEF_M,
  parameter logic [M-1:0]    POLY = sa_pkg::DEF_POLY
) (
  input  logic [M-1:0] beta,
  output logic [M-1:0] gamma
);

  // Shift by one place, then fold the overflowing coefficient back in.
  always_comb begin
    gamma = {beta[M-2:0], 1'b0} ^ (beta[M-1] ? POLY : '0);
  end

endmodule
