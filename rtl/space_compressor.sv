// space_compressor: combinational decoder (syndrome former) of the
// single-error-correcting Hamming code over GF(2^M) with check matrix
//   H = [ 1  1      1        ...  1
//         1  alpha  alpha^2  ...  alpha^(N-1) ].
// For a board response z = (z_1, ..., z_N), one M-bit symbol per chip, it
// gives (y, y*) = z H^T:  y = sum z_i,  y* = sum alpha^(i-1) z_i.
// If only chip i is faulty with error e_i, the distortion of (y, y*) is
// (e_i, alpha^(i-1) e_i), which is what lets the decoder name the chip.
//
// Built, as on the example board, from two cascaded space-compressor chips:
// chip I serves the upper N - N/2 responses and chip II the lower N/2, with
// the partial sums A and B passed from chip I to chip II. The split into two
// chips follows the example; making it generic in N is this design's choice.
//
// Interface: z[i-1] is chip i's M-bit response; y and ystar are M bits.
// Timing: purely combinational; the y* path is N alpha-multipliers deep.
module space_compressor #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY
) (
  input  logic [N-1:0][M-1:0] z,
  output logic [M-1:0]        y,
  output logic [M-1:0]        ystar
);

  localparam int unsigned K_LO = N / 2;      // chip II: z_1 .. z_K_LO
  localparam int unsigned K_HI = N - K_LO;   // chip I : z_(K_LO+1) .. z_N

  logic [M-1:0] a_mid, b_mid;  // the A and B links between the two chips

  space_compressor_chip #(.K(K_HI), .M(M), .POLY(POLY)) u_chip1 (
    .z    (z[N-1:K_LO]),
    .a_in ('0),
    .b_in ('0),
    .a_out(a_mid),
    .b_out(b_mid)
  );

  space_compressor_chip #(.K(K_LO), .M(M), .POLY(POLY)) u_chip2 (
    .z    (z[K_LO-1:0]),
    .a_in (a_mid),
    .b_in (b_mid),
    .a_out(y),
    .b_out(ystar)
  );

endmodule
