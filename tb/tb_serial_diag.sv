// Testbench for serial_diag (N = 16 chips, M = 16, T = 24 patterns per test).
// Each pattern's responses are sent over the bus as z_N, ..., z_1, one word
// per clock (with random idle clocks in some tests), so a test takes N*T bus
// clocks. The reference signatures come from the testbench model and are
// loaded first. After the last word the signature must match the model one
// clock later, busy must then be low, and the decoder must report no fault
// for a good board and chip i, after i clocks, when chip i is faulty. Two-
// chip faults must be reported as faults.
module tb_serial_diag;
  import sa_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned M = 16;
  localparam int unsigned T = 24;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic clk = 0, rst_n = 0;
  logic clear = 0, bus_valid = 0, ref_load = 0, diagnose = 0;
  logic [M-1:0] bus_word = '0, ref_s = '0, ref_ss = '0, sig_s, sig_ss;
  logic busy, fault_detected, done, fault, located;
  logic [3:0] chip_idx;
  int checks = 0, failures = 0;

  serial_diag dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bus_valid(bus_valid), .bus_word(bus_word),
    .ref_load(ref_load), .ref_s(ref_s), .ref_ss(ref_ss), .diagnose(diagnose),
    .busy(busy), .sig_s(sig_s), .sig_ss(sig_ss), .fault_detected(fault_detected),
    .done(done), .fault(fault), .located(located), .chip_idx(chip_idx)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic sym_t resp(int seed, int f1, int f2, int eseed, int i, int t);
    sym_t zi;
    zi = chip_resp(i, t, seed, M);
    if ((i == f1 || i == f2) && chip_resp(i + 100, t, eseed, 2) == 0)
      zi ^= chip_resp(i + 200, t, eseed, M) | 1;
    return zi;
  endfunction

  function automatic void model_sig(int seed, int f1, int f2, int eseed,
                                    output sym_t s, output sym_t ss);
    sym_t y, ys, zi;
    s = 0;
    ss = 0;
    for (int t = 0; t < T; t++) begin
      y = 0;
      ys = 0;
      for (int i = 1; i <= N; i++) begin
        zi = resp(seed, f1, f2, eseed, i, t);
        y ^= zi;
        ys ^= gf_mul(zi, gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY));
      end
      s = gf_mul(s, 2, M, 32'(POLY)) ^ y;
      ss = gf_mul(ss, 2, M, 32'(POLY)) ^ ys;
    end
  endfunction

  task automatic run_test(int seed, int f1, int f2, int eseed, bit gaps);
    sym_t es, ess, rs, rss;
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
      for (int i = N; i >= 1; i--) begin
        if (gaps) begin
          bus_valid = 0;
          repeat ($urandom_range(0, 1)) @(negedge clk);
        end
        bus_valid = 1;
        bus_word = M'(resp(seed, f1, f2, eseed, i, t));
        @(negedge clk);
      end
    end
    bus_valid = 0;
    check("busy after last word", busy, 1);
    @(negedge clk);
    check("idle", busy, 0);
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
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_test(1, 0, 0, 0, 0);
    for (int f = 1; f <= N; f++) run_test(f + 20, f, 0, f * 3, f[0]);
    run_test(2, 0, 0, 0, 1);
    run_test(4, 3, 11, 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
