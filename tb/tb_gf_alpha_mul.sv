// Testbench for gf_alpha_mul at the default field (M = 16,
// p(x) = x^16 + x^12 + x^3 + x + 1). Compares the multiplier with the
// reference field multiplication by x for every single-bit operand and for
// random operands, then walks alpha^k through the multiplier itself and checks
// that alpha has multiplicative order exactly 2^16 - 1 (p(x) is primitive),
// so that alpha^0 .. alpha^(N-1) are distinct for any board of up to 65535
// chips.
module tb_gf_alpha_mul;
  import sa_ref_pkg::*;

  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic [M-1:0] beta, gamma;
  int checks = 0, failures = 0;

  gf_alpha_mul dut (.beta(beta), .gamma(gamma));

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] acc;
    int first_one;
    for (int b = 0; b < M; b++) begin
      beta = M'(1) << b;
      #1 check("unit", gamma, M'(gf_mul(32'(beta), 2, M, 32'(POLY))));
    end
    repeat (2000) begin
      beta = M'($urandom);
      #1 check("random", gamma, M'(gf_mul(32'(beta), 2, M, 32'(POLY))));
    end
    // Order of alpha, stepping through the multiplier.
    acc = 1;
    first_one = 0;
    for (int k = 1; k <= 65535; k++) begin
      beta = acc;
      #1 acc = gamma;
      if (acc == 1 && first_one == 0) first_one = k;
    end
    checks++;
    if (first_one != 65535) begin
      failures++;
      $display("FAIL order of alpha = %0d", first_one);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
