// board_size_run: testbench helper that runs both diagnosis schemes of
// board_diag_top, built for a board of N chips with M = 16 outputs, through a
// good board, a single faulty chip at several positions (first, middle,
// last) and a two-chip fault, T = 32 patterns each, and counts checks and
// failures. The expected signatures come from the reference model. It raises
// finished when its sequence is over.
module board_size_run #(
  parameter int unsigned N = 8
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import sa_ref_pkg::*;

  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;
  localparam int unsigned T = 32;
  localparam int unsigned CW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic p_clear = 0, p_capture = 0, p_ref_load = 0, p_diagnose = 0;
  logic [N-1:0][M-1:0] p_z = '0;
  logic [M-1:0] p_ref_s = '0, p_ref_ss = '0, p_sig_s, p_sig_ss;
  logic p_fault_detected, p_done, p_fault, p_located;
  logic [CW-1:0] p_chip_idx;
  logic s_clear = 0, s_bus_valid = 0, s_ref_load = 0, s_diagnose = 0;
  logic [M-1:0] s_bus_word = '0, s_ref_s = '0, s_ref_ss = '0, s_sig_s, s_sig_ss;
  logic s_busy, s_fault_detected, s_done, s_fault, s_located;
  logic [CW-1:0] s_chip_idx;

  board_diag_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  function automatic sym_t resp(int seed, int f1, int f2, int i, int t);
    sym_t zi;
    zi = chip_resp(i, t, seed, M);
    if ((i == f1 || i == f2) && chip_resp(i + 100, t, seed + 1, 2) == 0)
      zi ^= chip_resp(i + 200, t, seed + 2, M) | 1;
    return zi;
  endfunction

  function automatic void model_sig(int seed, int f1, int f2, output sym_t s, output sym_t ss);
    sym_t y, ys, zi;
    s = 0;
    ss = 0;
    for (int t = 0; t < T; t++) begin
      y = 0;
      ys = 0;
      for (int i = 1; i <= N; i++) begin
        zi = resp(seed, f1, f2, i, t);
        y ^= zi;
        ys ^= gf_mul(zi, gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY));
      end
      s = gf_mul(s, 2, M, 32'(POLY)) ^ y;
      ss = gf_mul(ss, 2, M, 32'(POLY)) ^ ys;
    end
  endfunction

  task automatic run_test(int seed, int f1, int f2);
    sym_t es, ess, rs, rss;
    int lat;
    model_sig(seed, 0, 0, rs, rss);
    model_sig(seed, f1, f2, es, ess);
    @(negedge clk);
    {p_ref_load, s_ref_load, p_clear, s_clear} = '1;
    {p_ref_s, p_ref_ss, s_ref_s, s_ref_ss} = {M'(rs), M'(rss), M'(rs), M'(rss)};
    @(negedge clk);
    {p_ref_load, s_ref_load, p_clear, s_clear} = '0;
    for (int t = 0; t < T; t++) begin
      p_capture = 1;
      for (int i = 1; i <= N; i++) p_z[i-1] = M'(resp(seed, f1, f2, i, t));
      for (int i = N; i >= 1; i--) begin
        s_bus_valid = 1;
        s_bus_word = M'(resp(seed, f1, f2, i, t));
        @(negedge clk);
        p_capture = 0;
      end
    end
    s_bus_valid = 0;
    @(negedge clk);
    check("parallel sig s", p_sig_s, M'(es));
    check("parallel sig s*", p_sig_ss, M'(ess));
    check("serial sig s", s_sig_s, M'(es));
    check("serial sig s*", s_sig_ss, M'(ess));
    {p_diagnose, s_diagnose} = '1;
    @(negedge clk);
    {p_diagnose, s_diagnose} = '0;
    lat = 0;
    while (!(p_done && s_done) && lat < N + 5) begin
      @(negedge clk);
      lat++;
    end
    check("both done", p_done && s_done, 1);
    check("parallel fault", p_fault, f1 != 0);
    check("serial fault", s_fault, f1 != 0);
    if (f1 != 0 && f2 == 0 && es != rs) begin
      check("latency", lat, f1);
      check("parallel located", p_located, 1);
      check("serial located", s_located, 1);
      check("parallel chip", p_chip_idx, f1 - 1);
      check("serial chip", s_chip_idx, f1 - 1);
    end
  endtask

  initial begin
    finished = 0;
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_test(1, 0, 0);
    run_test(2, 1, 0);
    run_test(3, N / 2, 0);
    run_test(4, N - 1, 0);
    run_test(5, N, 0);
    run_test(6, 2, N - 2);
    finished = 1;
  end
endmodule
