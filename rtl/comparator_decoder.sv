// comparator_decoder: compares the board signature with the reference and,
// on a mismatch, locates the single faulty chip.
//
// Comparator: ds = s_sig ^ s_ref and dss = ss_sig ^ ss_ref (2M XOR gates);
// fault_detected is the OR of all 2M distortion bits. Under the single-
// faulty-chip model, chip i is faulty exactly when ds != 0, dss != 0 and
// dss = alpha^(i-1) * ds.
//
// Decoder: on diagnose, an autonomous LFSR is loaded with ds and a counter
// modulo N is cleared. Each following clock the LFSR content alpha^j * ds is
// XORed with dss; the NOR of that sum is the stop-count signal. While it is
// low the LFSR shifts (multiplies by alpha) and the counter counts on the
// same clock; when it goes high the counter holds j = i-1, the number of the
// faulty chip less one. The comparator, the autonomous LFSR, the XOR/NOR
// match and the shared shift/count clock are the published structure. This
// design adds the small controller around it: a start request, a done flag,
// an early finish when no fault is seen, and a "not located" result when N
// positions have been tried without a match (a fault outside the single-
// faulty-chip model, or one signature masked to zero).
//
// Interface: clk, rst_n (async, active low); diagnose starts a search;
// s_sig/ss_sig are the signatures from LFSR 1 and LFSR 2 and s_ref/ss_ref the
// references (all M bits, held stable during a search); fault_detected is
// combinational; done, fault, located and chip_idx are registered results,
// valid while done is high, until the next diagnose.
// Timing: with diagnose sampled at clock edge 0, done rises at edge 1 when
// there is no fault, at edge i when chip i is found, and at edge N when no
// chip matches.
module comparator_decoder #(
  parameter int unsigned  N    = sa_pkg::DEF_N,
  parameter int unsigned  M    = sa_pkg::DEF_M,
  parameter logic [M-1:0] POLY = sa_pkg::DEF_POLY,
  localparam int unsigned CW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          diagnose,
  input  logic [M-1:0]  s_sig,
  input  logic [M-1:0]  ss_sig,
  input  logic [M-1:0]  s_ref,
  input  logic [M-1:0]  ss_ref,
  output logic          fault_detected,
  output logic          done,
  output logic          fault,
  output logic          located,
  output logic [CW-1:0] chip_idx
);

  import sa_pkg::*;

  logic [M-1:0] ds, dss;         // signature distortions
  logic [M-1:0] auto_q;          // autonomous LFSR: alpha^j * ds
  logic [M-1:0] auto_next;
  logic         stop_count;      // alpha^j * ds == ds*
  dec_state_e   state;

  // Comparator.
  assign ds             = s_sig ^ s_ref;
  assign dss            = ss_sig ^ ss_ref;
  assign fault_detected = |{ds, dss};

  // Match between the autonomous LFSR and ds*.
  assign stop_count = ~|(auto_q ^ dss);

  gf_alpha_mul #(.M(M), .POLY(POLY)) u_mul (.beta(auto_q), .gamma(auto_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEC_IDLE;
      auto_q   <= '0;
      chip_idx <= '0;
      done     <= 1'b0;
      fault    <= 1'b0;
      located  <= 1'b0;
    end else if (diagnose) begin
      state    <= DEC_SEARCH;
      auto_q   <= ds;              // load initial state
      chip_idx <= '0;
      done     <= 1'b0;
      fault    <= 1'b0;
      located  <= 1'b0;
    end else if (state == DEC_SEARCH) begin
      if (!fault_detected) begin
        state <= DEC_DONE;
        done  <= 1'b1;
      end else if (stop_count) begin
        state   <= DEC_DONE;
        done    <= 1'b1;
        fault   <= 1'b1;
        located <= 1'b1;
      end else if (chip_idx == CW'(N - 1)) begin
        state <= DEC_DONE;
        done  <= 1'b1;
        fault <= 1'b1;
      end else begin
        auto_q   <= auto_next;     // shift and count on the same clock
        chip_idx <= chip_idx + 1'b1;
      end
    end
  end

  // The counter never leaves 0 .. N-1.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    chip_idx <= CW'(N - 1));
  // A located chip always comes with a detected fault.
  a_located_fault: assert property (@(posedge clk) disable iff (!rst_n)
    located |-> fault);

endmodule
