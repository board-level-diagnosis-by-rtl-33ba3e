// Testbench for space_compressor (N = 16 chips, M = 16). Checks the syndromes
// y = sum z_i and y* = sum alpha^(i-1) z_i of random board responses against
// the reference model, then injects a random error into one chip i at a time
// and checks that the syndrome distortion is (e, alpha^(i-1) e), the property
// the faulty-chip location rests on.
module tb_space_compressor;
  import sa_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic [N-1:0][M-1:0] z;
  logic [M-1:0] y, ystar;
  int checks = 0, failures = 0;

  space_compressor dut (.z(z), .y(y), .ystar(ystar));

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
    sym_t ey, es;
    logic [M-1:0] y0, s0, e;
    repeat (500) begin
      ey = 0;
      es = 0;
      for (int i = 1; i <= N; i++) begin
        z[i-1] = M'($urandom);
        ey ^= 32'(z[i-1]);
        es ^= gf_mul(32'(z[i-1]), gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY));
      end
      #1;
      check("y", y, M'(ey));
      check("y*", ystar, M'(es));
    end
    // Single-chip error: distortion (e, alpha^(i-1) e).
    for (int i = 1; i <= N; i++) begin
      repeat (20) begin
        for (int j = 0; j < N; j++) z[j] = M'($urandom);
        #1;
        y0 = y;
        s0 = ystar;
        do e = M'($urandom); while (e == 0);
        z[i-1] ^= e;
        #1;
        check("dy", y ^ y0, e);
        check("dy*", ystar ^ s0, M'(gf_mul(32'(e), gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
