// tff_register: M-bit register of toggle flip-flops.
//
// Each enabled clock every bit toggles where the input word has a one, so
// after the words z_N, ..., z_1 have been clocked in from a cleared state the
// register holds their XOR, the space signature y(t) = z_N ^ ... ^ z_1 of
// serial diagnosis. clr is a synchronous clear applied before the toggle;
// clr and en together load the register with d (this design's choice, so a
// new block can start on the clock the old sum is handed on).
//
// Interface: clk, rst_n (async, active low), clr, en, d (M bits), q (M bits).
// Timing: q changes one clock after en.
module tff_register #(
  parameter int unsigned M = sa_pkg::DEF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (clr || en) begin
      q <= (clr ? '0 : q) ^ (en ? d : '0);
    end
  end

endmodule
