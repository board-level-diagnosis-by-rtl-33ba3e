// Shared constants and types for the board-level signature-analysis diagnosis
// hardware.
//
// Symbols are elements of GF(2^M) held as M-bit vectors: bit k is the
// coefficient of x^k in the polynomial basis. The field is built with the
// primitive polynomial p(x) = x^16 + x^12 + x^3 + x + 1 for the 16-output-per-
// chip example board, and alpha = x is the primitive element. POLY holds the
// low M coefficients of p(x) (the x^M term is implied): 16'h100B sets bits
// 12, 3, 1 and 0. The defaults (16 chips of 16 outputs) are the example
// configuration; the decoder's state encoding is this design's own.
package sa_pkg;

  // Default number of outputs per chip (symbol width).
  localparam int unsigned DEF_M = 16;
  // Default number of chips on the board.
  localparam int unsigned DEF_N = 16;
  // Low M coefficients of p(x) = x^16 + x^12 + x^3 + x + 1.
  localparam logic [DEF_M-1:0] DEF_POLY = 16'h100B;

  // States of the comparator/decoder search.
  typedef enum logic [1:0] {
    DEC_IDLE   = 2'd0,  // waiting for a diagnose request
    DEC_SEARCH = 2'd1,  // stepping the autonomous LFSR and the chip counter
    DEC_DONE   = 2'd2   // result valid until the next request
  } dec_state_e;

endpackage
