// parallel_diag: redundant circuitry for parallel board-level diagnosis by
// space-time compression.
//
// All N chips receive the same test pattern at once and their responses are
// wired in parallel to the space compressor, which reduces the N M-bit
// symbols to the pair (y(t), y*(t)) of Hamming-code syndromes. LFSR 1 and
// LFSR 2 compress these two sequences in time, s <- alpha*s ^ y(t) and
// s* <- alpha*s* ^ y*(t), so that after T patterns they hold the board
// signature (s, s*). Because the space compressor and the time compressors are
// linear over GF(2^M) and use the same alpha, a single faulty chip i leaves
// the signature distortion in the relation ds* = alpha^(i-1) ds, which the
// comparator/decoder tests against the two stored references. The structure
// (space compressor, two time-compressor LFSRs, comparator/decoder, reference
// pair) is the published one; the control strobes are this design's.
//
// Interface: clear empties LFSR 1 and LFSR 2 before a test; capture
// compresses the board response z on this clock (one pattern per clock);
// ref_load writes ref_s/ref_ss into the reference store; diagnose starts the
// comparator/decoder once the last pattern has been captured. Results as in
// comparator_decoder.
// Timing: one pattern per clock; the signature is complete one clock after
// the last capture; location then takes at most N clocks.
module parallel_diag #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY,
  localparam int unsigned CW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                capture,
  input  logic [N-1:0][M-1:0] z,
  input  logic                ref_load,
  input  logic [M-1:0]        ref_s,
  input  logic [M-1:0]        ref_ss,
  input  logic                diagnose,
  output logic [M-1:0]        sig_s,
  output logic [M-1:0]        sig_ss,
  output logic                fault_detected,
  output logic                done,
  output logic                fault,
  output logic                located,
  output logic [CW-1:0]       chip_idx
);

  logic [M-1:0] y, ystar;
  logic [M-1:0] s_ref, ss_ref;

  space_compressor #(.N(N), .M(M), .POLY(POLY)) u_space (
    .z    (z),
    .y    (y),
    .ystar(ystar)
  );

  pi_lfsr #(.M(M), .POLY(POLY)) u_lfsr1 (
    .clk(clk), .rst_n(rst_n), .clr(clear), .en(capture && !clear),
    .y(y), .s(sig_s)
  );

  pi_lfsr #(.M(M), .POLY(POLY)) u_lfsr2 (
    .clk(clk), .rst_n(rst_n), .clr(clear), .en(capture && !clear),
    .y(ystar), .s(sig_ss)
  );

  reference_store #(.M(M)) u_ref (
    .clk(clk), .rst_n(rst_n), .load(ref_load),
    .s_in(ref_s), .ss_in(ref_ss), .s_ref(s_ref), .ss_ref(ss_ref)
  );

  comparator_decoder #(.N(N), .M(M), .POLY(POLY)) u_dec (
    .clk           (clk),
    .rst_n         (rst_n),
    .diagnose      (diagnose),
    .s_sig         (sig_s),
    .ss_sig        (sig_ss),
    .s_ref         (s_ref),
    .ss_ref        (ss_ref),
    .fault_detected(fault_detected),
    .done          (done),
    .fault         (fault),
    .located       (located),
    .chip_idx      (chip_idx)
  );

endmodule
