// pi_lfsr: M-bit parallel-input LFSR, the time compressor stage.
//
// Each enabled clock the state is multiplied by alpha in GF(2^M) and the
// M-bit input symbol is added: s <- alpha*s xor y. In gate terms this is a
// Galois (internal-XOR) shift register: stage k takes stage k-1, plus the
// input bit y_k, plus the last stage's output where the feedback polynomial
// has a term q_k; stage 0 takes the input bit and the last stage's output.
// The feedback polynomial must be the same primitive polynomial that builds
// the field; both come from POLY. Used as LFSR 1 and LFSR 2 (time
// compression of y and y*) and, for serial diagnosis, as LFSR 3 (Horner
// evaluation of y* from the bus words).
//
// clr is a synchronous clear that acts before the input is added: with clr
// and en both high the register is loaded with y (cleared, then one symbol
// compressed), which lets a serial compressor start a new block on the same
// clock it hands the old one on. This clear-with-load is this design's own
// choice; the recurrence is the published one.
//
// Interface: clk, rst_n (async, active low, clears the state), clr, en,
// y (M bits), s (M bits, the current state / signature).
// Timing: s changes one clock after en; no combinational path from y to s.
module pi_lfsr #(
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] y,
  output logic [M-1:0] s
);

  logic [M-1:0] s_alpha;

  gf_alpha_mul #(.M(M), .POLY(POLY)) u_mul (.beta(s), .gamma(s_alpha));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
    end else if (clr || en) begin
      s <= (clr ? '0 : s_alpha) ^ (en ? y : '0);
    end
  end

endmodule
