// serial_space_compressor: sequential space compressor for serial diagnosis.
//
// When the chips' responses reach the diagnostic hardware one M-bit word at a
// time over the system bus, the two syndromes of a board response are formed
// serially. The words of pattern t arrive in the order z_N, z_(N-1), ..., z_1.
// A T-flip-flop register accumulates y(t) = z_N ^ ... ^ z_1, and LFSR 3
// (parallel-input, s <- alpha*s ^ z, started from zero) ends holding
// y*(t) = alpha^(N-1) z_N ^ ... ^ alpha z_2 ^ z_1. After z_1 has been clocked
// in, the pair is handed to the time compressor and both registers are
// cleared for the next pattern. That much is the published scheme.
//
// This design's own choices: a word counter modulo N marks the end of each
// pattern (the divide-by-N clock of the time compressor becomes the one-clock
// strobe y_valid); the clear happens on the clock after the last word, and if
// the first word of the next pattern arrives on that same clock it is loaded
// directly, so words may arrive on every clock without a gap.
//
// Interface: clear restarts the word count and empties both registers;
// bus_valid/bus_word deliver one response word; y/ystar hold the finished
// syndromes while y_valid is high (one clock); busy is high while a pattern
// is partly received or not yet handed on.
// Timing: y_valid is high on the clock after the N-th word of a pattern.
module serial_space_compressor #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY,
  localparam int unsigned CW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         bus_valid,
  input  logic [M-1:0] bus_word,
  output logic [M-1:0] y,
  output logic [M-1:0] ystar,
  output logic         y_valid,
  output logic         busy
);

  logic [CW-1:0] word_cnt;   // words of the current pattern received so far
  logic          take;
  logic          last_word;

  assign take      = bus_valid && !clear;
  assign last_word = take && (word_cnt == CW'(N - 1));
  assign busy      = y_valid || (word_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_cnt <= '0;
      y_valid  <= 1'b0;
    end else if (clear) begin
      word_cnt <= '0;
      y_valid  <= 1'b0;
    end else begin
      y_valid <= last_word;
      if (last_word)  word_cnt <= '0;
      else if (take)  word_cnt <= word_cnt + 1'b1;
    end
  end

  tff_register #(.M(M)) u_tff (
    .clk(clk), .rst_n(rst_n), .clr(clear || y_valid), .en(take),
    .d(bus_word), .q(y)
  );

  pi_lfsr #(.M(M), .POLY(POLY)) u_lfsr3 (
    .clk(clk), .rst_n(rst_n), .clr(clear || y_valid), .en(take),
    .y(bus_word), .s(ystar)
  );

endmodule
