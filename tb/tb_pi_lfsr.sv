// Testbench for pi_lfsr (M = 16). Applies random enable, clear and input
// symbols for many clocks and tracks the expected state s <- alpha*s ^ y
// (clear first, then add the input) with the reference field arithmetic. Also
// checks the defining signature property: after compressing y(0..T-1) from
// zero, s = sum alpha^(T-1-t) y(t).
module tb_pi_lfsr;
  import sa_ref_pkg::*;

  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [M-1:0] y = '0, s;
  int checks = 0, failures = 0;

  pi_lfsr dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .y(y), .s(s));

  always #5 clk = ~clk;

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t model, sig;
    logic [M-1:0] seq[64];
    repeat (3) @(negedge clk);
    check("reset", s, '0);
    rst_n = 1;
    model = 0;
    repeat (3000) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) == 0);
      y   = M'($urandom);
      if (clr) model = 0;
      else if (en) model = gf_mul(model, 2, M, 32'(POLY));
      if (en) model ^= 32'(y);
      @(negedge clk);
      en = 0;
      clr = 0;
      check("step", s, M'(model));
    end
    // Signature of a sequence: sum alpha^(T-1-t) y(t).
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    sig = 0;
    for (int t = 0; t < 64; t++) seq[t] = M'($urandom);
    for (int t = 0; t < 64; t++) begin
      en = 1;
      y = seq[t];
      sig ^= gf_mul(32'(seq[t]), gf_alpha_pow(63 - t, M, 32'(POLY)), M, 32'(POLY));
      @(negedge clk);
    end
    en = 0;
    check("signature", s, M'(sig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
