// reference_store: the two M-bit registers that hold the fault-free
// signatures s and s* of the board.
//
// Only two references are stored for the whole board, whatever the number of
// chips. They are precomputed (for instance by running the test on a known-
// good board, or by simulation) and written through load; how they are
// written is this design's choice.
//
// Interface: clk, rst_n (async, active low, clears both), load, s_in, ss_in
// (M bits each); s_ref, ss_ref (M bits each).
// Timing: the new values appear one clock after load.
module reference_store #(
  parameter int unsigned M = sa_pkg::DEF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] s_in,
  input  logic [M-1:0] ss_in,
  output logic [M-1:0] s_ref,
  output logic [M-1:0] ss_ref
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ref  <= '0;
      ss_ref <= '0;
    end else if (load) begin
      s_ref  <= s_in;
      ss_ref <= ss_in;
    end
  end

endmodule
