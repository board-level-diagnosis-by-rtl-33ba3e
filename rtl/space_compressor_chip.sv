// space_compressor_chip: one chip of the combinational space compressor.
//
// The space compressor evaluates the two check rows of the Hamming code over
// GF(2^M): y = z_1 ^ ... ^ z_N and y* = z_1 ^ alpha z_2 ^ ... ^ alpha^(N-1) z_N.
// The example board splits it over two chips that are cascaded: chip I takes
// z_16..z_9 and produces the partial sums A and B, chip II continues them
// with z_8..z_1 and produces C = y and D = y*. This module is one such chip
// for K responses. The y chain is a plain XOR of a_in and all K words; the
// y* chain uses Horner's rule starting with the highest-numbered response:
//   b = b_in;  for k = K-1 downto 0:  b = alpha*b ^ z[k],
// so b_out = alpha^K b_in ^ sum_k alpha^k z[k]. Tying a_in and b_in to zero
// gives the first chip of the cascade. The cascade structure is the published
// one; the K-generic form and the port names are this design's.
//
// Interface: z[k] is the M-bit response of the k-th lowest-numbered chip
// that this slice serves; a_in/b_in are the partial sums from the previous
// slice; a_out/b_out go to the next slice.
// Timing: purely combinational (K alpha-multipliers deep on the y* chain).
module space_compressor_chip #(
  parameter int unsigned  K    = 8,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY
) (
  input  logic [K-1:0][M-1:0] z,
  input  logic [M-1:0]        a_in,
  input  logic [M-1:0]        b_in,
  output logic [M-1:0]        a_out,
  output logic [M-1:0]        b_out
);

  // b_chain[k+1] is the Horner partial sum before response k is folded in;
  // b_chain[0] is the slice output.
  logic [K:0][M-1:0] b_chain;
  logic [K-1:0][M-1:0] b_scaled;

  assign b_chain[K] = b_in;

  for (genvar k = 0; k < K; k++) begin : g_horner
    gf_alpha_mul #(.M(M), .POLY(POLY)) u_mul (
      .beta (b_chain[k+1]),
      .gamma(b_scaled[k])
    );
    assign b_chain[k] = b_scaled[k] ^ z[k];
  end

  assign b_out = b_chain[0];

  always_comb begin
    a_out = a_in;
    for (int k = 0; k < K; k++) a_out ^= z[k];
  end

endmodule
