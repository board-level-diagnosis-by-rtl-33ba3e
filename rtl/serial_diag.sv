// serial_diag: redundant circuitry for serial board-level diagnosis, where
// each chip's test response is transferred over the system bus.
//
// The serial space compressor (T-flip-flop register and LFSR 3) turns the N
// bus words of each test pattern into the syndromes y(t) and y*(t); from there
// on the scheme is the same as for parallel diagnosis: LFSR 1 and LFSR 2
// compress the syndromes in time, and the comparator/decoder compares the
// final signature with the two stored references and names the single faulty
// chip. No wiring from the chips and no combinational space compressor are
// needed, at the price of N bus transfers per pattern. The structure is the
// published one; the strobes are this design's.
//
// Interface: clear restarts a test (empties LFSR 1-3 and the T-FF register);
// bus_valid/bus_word deliver the words z_N(t), ..., z_1(t) of each pattern in
// turn; ref_load writes the references; diagnose starts the decoder and must
// only be raised when busy is low, after the last pattern. Results as in
// comparator_decoder.
// Timing: N clocks per pattern when a word arrives every clock; the signature
// is complete on the clock edge after the one that takes the last word;
// location then takes at most N clocks.
module serial_diag #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY,
  localparam int unsigned CW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          bus_valid,
  input  logic [M-1:0]  bus_word,
  input  logic          ref_load,
  input  logic [M-1:0]  ref_s,
  input  logic [M-1:0]  ref_ss,
  input  logic          diagnose,
  output logic          busy,
  output logic [M-1:0]  sig_s,
  output logic [M-1:0]  sig_ss,
  output logic          fault_detected,
  output logic          done,
  output logic          fault,
  output logic          located,
  output logic [CW-1:0] chip_idx
);

  logic [M-1:0] y, ystar;
  logic         y_valid;
  logic [M-1:0] s_ref, ss_ref;

  serial_space_compressor #(.N(N), .M(M), .POLY(POLY)) u_space (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .bus_valid(bus_valid), .bus_word(bus_word),
    .y(y), .ystar(ystar), .y_valid(y_valid), .busy(busy)
  );

  pi_lfsr #(.M(M), .POLY(POLY)) u_lfsr1 (
    .clk(clk), .rst_n(rst_n), .clr(clear), .en(y_valid && !clear),
    .y(y), .s(sig_s)
  );

  pi_lfsr #(.M(M), .POLY(POLY)) u_lfsr2 (
    .clk(clk), .rst_n(rst_n), .clr(clear), .en(y_valid && !clear),
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

  // The decoder reads the signature only once every pattern has been handed on.
  a_diagnose_idle: assert property (@(posedge clk) disable iff (!rst_n)
    diagnose |-> !busy);

endmodule
