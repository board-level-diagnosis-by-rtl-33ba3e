// Testbench for space_compressor_chip (K = 8 responses, M = 16). Drives random
// responses and random cascade inputs and compares a_out with the XOR of
// a_in and all responses, and b_out with alpha^K b_in + sum alpha^k z[k]
// computed with the reference field arithmetic. Also runs the two-chip
// cascade of the example board (a_in = b_in = 0 for the first chip).
module tb_space_compressor_chip;
  import sa_ref_pkg::*;

  localparam int unsigned K = 8;
  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic [K-1:0][M-1:0] z;
  logic [M-1:0] a_in, b_in, a_out, b_out;
  int checks = 0, failures = 0;

  space_compressor_chip dut (.z(z), .a_in(a_in), .b_in(b_in), .a_out(a_out), .b_out(b_out));

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t ea, eb;
    repeat (1000) begin
      for (int k = 0; k < K; k++) z[k] = M'($urandom);
      a_in = M'($urandom);
      b_in = ($urandom_range(0, 3) == 0) ? '0 : M'($urandom);
      ea = 32'(a_in);
      eb = gf_mul(32'(b_in), gf_alpha_pow(K, M, 32'(POLY)), M, 32'(POLY));
      for (int k = 0; k < K; k++) begin
        ea ^= 32'(z[k]);
        eb ^= gf_mul(32'(z[k]), gf_alpha_pow(k, M, 32'(POLY)), M, 32'(POLY));
      end
      #1;
      check("a_out", a_out, M'(ea));
      check("b_out", b_out, M'(eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
