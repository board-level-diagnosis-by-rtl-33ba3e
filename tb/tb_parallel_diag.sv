// Testbench for parallel_diag (N = 16 chips, M = 16, T = 40 patterns per
// test). The board is modelled by a fixed pseudo-random response per chip and
// pattern. The reference signatures are computed by the testbench model
// (s = sum_t alpha^(T-1-t) sum_i z_i(t), s* likewise with alpha^(i-1) z_i(t))
// and loaded. Each test captures one pattern per clock; the signature is
// checked against the model one clock after the last capture, then the
// decoder result is checked: no fault for a good board, chip i for a board
// whose chip i returns wrong responses on random patterns, and "fault, not
// located" or a wrong location is only tolerated for the two-chip faults,
// which lie outside the single-faulty-chip model.
module tb_parallel_diag;
  import sa_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned M = 16;
  localparam int unsigned T = 40;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic clk = 0, rst_n = 0;
  logic clear = 0, capture = 0, ref_load = 0, diagnose = 0;
  logic [N-1:0][M-1:0] z = '0;
  logic [M-1:0] ref_s = '0, ref_ss = '0, sig_s, sig_ss;
  logic fault_detected, done, fault, located;
  logic [3:0] chip_idx;
  int checks = 0, failures = 0;

  parallel_diag dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .capture(capture), .z(z),
    .ref_load(ref_load), .ref_s(ref_s), .ref_ss(ref_ss), .diagnose(diagnose),
    .sig_s(sig_s), .sig_ss(sig_ss), .fault_detected(fault_detected), .done(done),
    .fault(fault), .located(located), .chip_idx(chip_idx)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Model of the board signature with chips f1 and f2 (0 = none) distorted.
  function automatic void model_sig(int seed, int f1, int f2, int eseed,
                                    output sym_t s, output sym_t ss);
    sym_t y, ys, zi;
    s = 0;
    ss = 0;
    for (int t = 0; t < T; t++) begin
      y = 0;
      ys = 0;
      for (int i = 1; i <= N; i++) begin
        zi = chip_resp(i, t, seed, M);
        if ((i == f1 || i == f2) && chip_resp(i + 100, t, eseed, 2) == 0)
          zi ^= chip_resp(i + 200, t, eseed, M) | 1;
        y ^= zi;
        ys ^= gf_mul(zi, gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY));
      end
      s = gf_mul(s, 2, M, 32'(POLY)) ^ y;
      ss = gf_mul(ss, 2, M, 32'(POLY)) ^ ys;
    end
  endfunction

  // One test of the board with chips f1, f2 distorted.
  task automatic run_test(int seed, int f1, int f2, int eseed);
    sym_t es, ess, rs, rss, g;
    int lat;
    model_sig(seed, 0, 0, eseed, rs, rss);
    model_sig(seed, f1, f2, eseed, es, ess);
    @(negedge clk);
    ref_load = 1;
    ref_s = M'(rs);
    ref_ss = M'(rss);
    clear = 1;
    @(negedge clk);
    ref_load = 0;
    clear = 0;
    for (int t = 0; t < T; t++) begin
      capture = 1;
      for (int i = 1; i <= N; i++) begin
        z[i-1] = M'(chip_resp(i, t, seed, M));
        if ((i == f1 || i == f2) && chip_resp(i + 100, t, eseed, 2) == 0)
          z[i-1] ^= M'(chip_resp(i + 200, t, eseed, M) | 1);
      end
      @(negedge clk);
    end
    capture = 0;
    z = '0;
    check("sig s", sig_s, M'(es));
    check("sig s*", sig_ss, M'(ess));
    diagnose = 1;
    @(negedge clk);
    diagnose = 0;
    lat = 0;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check("done", done, 1);
    g = gf_mul(es ^ rs, gf_alpha_pow((f1 > 0) ? f1 - 1 : 0, M, 32'(POLY)), M, 32'(POLY));
    if (f1 == 0) begin
      check("no fault", fault, 0);
      check("latency", lat, 1);
    end else if (f2 == 0) begin
      check("fault", fault, 1);
      check("located", located, (es != rs) ? 1 : 0);
      if (es != rs) begin
        check("chip", chip_idx, f1 - 1);
        check("latency", lat, f1);
      end
    end else begin
      check("fault", fault, 1);
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_test(1, 0, 0, 0);
    for (int f = 1; f <= N; f++) run_test(f + 10, f, 0, f * 7);
    run_test(3, 0, 0, 0);
    run_test(4, 2, 9, 5);
    run_test(5, 16, 1, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
