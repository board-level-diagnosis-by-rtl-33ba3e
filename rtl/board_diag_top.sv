// board_diag_top: the two board-level diagnosis schemes side by side.
//
// Both locate the single faulty chip among N chips with M outputs each from
// just two stored reference signatures. The parallel scheme (p_* ports) takes
// all N responses of a test pattern at once through a combinational space
// compressor, one pattern per clock. The serial scheme (s_* ports) takes the
// same responses one word per clock from the system bus and forms the
// syndromes with a T-flip-flop register and a third LFSR. Each scheme has its
// own controls and results; they share only clock and reset. The chips under
// test, the test pattern generator and the bus are outside this design: their
// signals are the ports. Defaults: N = 16 chips, M = 16 outputs per chip,
// p(x) = x^16 + x^12 + x^3 + x + 1.
//
// Interface and timing: see parallel_diag and serial_diag.
module board_diag_top #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY,
  localparam int unsigned CW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // parallel diagnosis
  input  logic                p_clear,
  input  logic                p_capture,
  input  logic [N-1:0][M-1:0] p_z,
  input  logic                p_ref_load,
  input  logic [M-1:0]        p_ref_s,
  input  logic [M-1:0]        p_ref_ss,
  input  logic                p_diagnose,
  output logic [M-1:0]        p_sig_s,
  output logic [M-1:0]        p_sig_ss,
  output logic                p_fault_detected,
  output logic                p_done,
  output logic                p_fault,
  output logic                p_located,
  output logic [CW-1:0]       p_chip_idx,
  // serial diagnosis
  input  logic                s_clear,
  input  logic                s_bus_valid,
  input  logic [M-1:0]        s_bus_word,
  input  logic                s_ref_load,
  input  logic [M-1:0]        s_ref_s,
  input  logic [M-1:0]        s_ref_ss,
  input  logic                s_diagnose,
  output logic                s_busy,
  output logic [M-1:0]        s_sig_s,
  output logic [M-1:0]        s_sig_ss,
  output logic                s_fault_detected,
  output logic                s_done,
  output logic                s_fault,
  output logic                s_located,
  output logic [CW-1:0]       s_chip_idx
);

  parallel_diag #(.N(N), .M(M), .POLY(POLY)) u_parallel (
    .clk(clk), .rst_n(rst_n),
    .clear(p_clear), .capture(p_capture), .z(p_z),
    .ref_load(p_ref_load), .ref_s(p_ref_s), .ref_ss(p_ref_ss),
    .diagnose(p_diagnose),
    .sig_s(p_sig_s), .sig_ss(p_sig_ss),
    .fault_detected(p_fault_detected), .done(p_done), .fault(p_fault),
    .located(p_located), .chip_idx(p_chip_idx)
  );

  serial_diag #(.N(N), .M(M), .POLY(POLY)) u_serial (
    .clk(clk), .rst_n(rst_n),
    .clear(s_clear), .bus_valid(s_bus_valid), .bus_word(s_bus_word),
    .ref_load(s_ref_load), .ref_s(s_ref_s), .ref_ss(s_ref_ss),
    .diagnose(s_diagnose), .busy(s_busy),
    .sig_s(s_sig_s), .sig_ss(s_sig_ss),
    .fault_detected(s_fault_detected), .done(s_done), .fault(s_fault),
    .located(s_located), .chip_idx(s_chip_idx)
  );

endmodule
