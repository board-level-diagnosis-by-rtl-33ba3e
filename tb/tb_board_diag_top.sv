// End-to-end testbench for board_diag_top at its default size: a board of
// N = 16 chips with M = 16 outputs each, p(x) = x^16 + x^12 + x^3 + x + 1.
//
// Every test applies T = 64 patterns to a modelled board. The same responses
// go to the parallel scheme (all 16 words per clock) and, word by word, to
// the serial scheme over the bus; both run at the same time. The reference
// signatures are computed by the testbench model and loaded into both
// reference stores. Checks per test: both signatures equal the model (and so
// each other), the parallel signature is complete one clock after the last
// pattern and the serial one a clock after the last bus word, and both
// decoders report no fault for a good board and the faulty chip, after
// exactly i clocks, when chip i alone is faulty. Two-chip faults must be
// flagged as faults.
//
// Mechanisms counted, each of which must occur at least once: good board
// passes, single faulty chip located (for every chip number), fault found but
// not located, parallel capture with idle clocks between patterns, serial
// bus stream without gaps (a new pattern's first word taken on the handoff
// clock), serial stream with gaps, reference reload, and a clear that aborts
// a test in progress.
module tb_board_diag_top;
  import sa_ref_pkg::*;

  localparam int unsigned N = sa_pkg::DEF_N;
  localparam int unsigned M = sa_pkg::DEF_M;
  localparam logic [M-1:0] POLY = sa_pkg::DEF_POLY;
  localparam int unsigned T = 64;
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

  int checks = 0, failures = 0;
  longint cyc = 0;

  // Mechanism counters.
  int n_pass = 0, n_not_located = 0, n_par_gaps = 0, n_ser_stream = 0;
  int n_ser_gaps = 0, n_ref_reload = 0, n_abort = 0;
  int n_located[N + 1];

  board_diag_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Response of chip i to pattern t; chips f1 and f2 (0 = none) are faulty
  // and return a wrong word on about a quarter of the patterns.
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

  task automatic par_stream(int seed, int f1, int f2, bit gaps);
    for (int t = 0; t < T; t++) begin
      if (gaps && t[2:0] == 3'd5) begin
        p_capture = 0;
        @(negedge clk);
        n_par_gaps++;
      end
      p_capture = 1;
      for (int i = 1; i <= N; i++) p_z[i-1] = M'(resp(seed, f1, f2, i, t));
      @(negedge clk);
    end
    p_capture = 0;
  endtask

  task automatic ser_stream(int seed, int f1, int f2, bit gaps);
    bit prev_valid;
    prev_valid = 0;
    for (int t = 0; t < T; t++) begin
      for (int i = N; i >= 1; i--) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          s_bus_valid = 0;
          @(negedge clk);
        end
        prev_valid = s_bus_valid;
        s_bus_valid = 1;
        s_bus_word = M'(resp(seed, f1, f2, i, t));
        // First word of a pattern right after the previous pattern's last word:
        // it is taken on the clock the previous pattern is handed on.
        if (i == N && t > 0 && s_bus_valid && prev_valid) n_ser_stream++;
        @(negedge clk);
      end
    end
    s_bus_valid = 0;
    if (gaps) n_ser_gaps++;
  endtask

  // Runs one decoder and checks its verdict; which = 0 parallel, 1 serial.
  task automatic decode(int which, int f1, int f2, bit sig_differs);
    int lat;
    logic done_v, fault_v, located_v;
    logic [CW-1:0] idx_v;
    if (which == 0) p_diagnose = 1; else s_diagnose = 1;
    @(negedge clk);
    p_diagnose = 0;
    s_diagnose = 0;
    lat = 0;
    forever begin
      done_v = (which == 0) ? p_done : s_done;
      if (done_v || lat > 100) break;
      @(negedge clk);
      lat++;
    end
    fault_v   = (which == 0) ? p_fault : s_fault;
    located_v = (which == 0) ? p_located : s_located;
    idx_v     = (which == 0) ? p_chip_idx : s_chip_idx;
    check("done", done_v, 1);
    if (f1 == 0) begin
      check("no fault", fault_v, 0);
      check("latency, good board", lat, 1);
      if (!fault_v) n_pass++;
    end else if (f2 == 0) begin
      check("fault", fault_v, 1);
      check("located", located_v, sig_differs);
      if (sig_differs) begin
        check("chip", idx_v, f1 - 1);
        check("latency, chip", lat, f1);
        if (located_v && idx_v == CW'(f1 - 1)) n_located[f1]++;
      end
    end else begin
      check("fault, two chips", fault_v, 1);
      if (fault_v && !located_v) n_not_located++;
    end
  endtask

  task automatic run_test(int seed, int f1, int f2, bit gaps);
    sym_t es, ess, rs, rss;
    model_sig(seed, 0, 0, rs, rss);
    model_sig(seed, f1, f2, es, ess);
    @(negedge clk);
    p_ref_load = 1;
    s_ref_load = 1;
    p_ref_s = M'(rs);
    p_ref_ss = M'(rss);
    s_ref_s = M'(rs);
    s_ref_ss = M'(rss);
    p_clear = 1;
    s_clear = 1;
    @(negedge clk);
    n_ref_reload++;
    p_ref_load = 0;
    s_ref_load = 0;
    p_clear = 0;
    s_clear = 0;
    fork
      begin
        par_stream(seed, f1, f2, gaps);
        check("parallel sig s", p_sig_s, M'(es));
        check("parallel sig s*", p_sig_ss, M'(ess));
        decode(0, f1, f2, es != rs);
      end
      begin
        ser_stream(seed, f1, f2, gaps);
        check("serial busy after last word", s_busy, 1);
        @(negedge clk);
        check("serial idle", s_busy, 0);
        check("serial sig s", s_sig_s, M'(es));
        check("serial sig s*", s_sig_ss, M'(ess));
        decode(1, f1, f2, es != rs);
      end
    join
  endtask

  // A test cut short by clear, then rerun: the clear must discard all of it.
  task automatic aborted_test(int seed);
    sym_t rs, rss;
    model_sig(seed, 0, 0, rs, rss);
    @(negedge clk);
    p_ref_load = 1;
    s_ref_load = 1;
    {p_ref_s, s_ref_s} = {M'(rs), M'(rs)};
    {p_ref_ss, s_ref_ss} = {M'(rss), M'(rss)};
    @(negedge clk);
    p_ref_load = 0;
    s_ref_load = 0;
    // Garbage part-way through a pattern.
    for (int k = 0; k < 21; k++) begin
      p_capture = 1;
      for (int i = 0; i < N; i++) p_z[i] = M'($urandom);
      s_bus_valid = 1;
      s_bus_word = M'($urandom);
      @(negedge clk);
    end
    p_capture = 0;
    s_bus_valid = 0;
    p_clear = 1;
    s_clear = 1;
    @(negedge clk);
    p_clear = 0;
    s_clear = 0;
    check("parallel cleared", p_sig_s, 0);
    check("serial cleared", {s_sig_s, s_sig_ss, 15'(0), s_busy}, 0);
    n_abort++;
    fork
      begin
        par_stream(seed, 0, 0, 0);
        decode(0, 0, 0, 0);
      end
      begin
        ser_stream(seed, 0, 0, 0);
        @(negedge clk);
        decode(1, 0, 0, 0);
      end
    join
  endtask

  initial begin
    #20000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= N; i++) n_located[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_test(1, 0, 0, 0);
    for (int f = 1; f <= N; f++) run_test(100 + f, f, 0, f % 3 == 0);
    run_test(7, 4, 13, 0);
    run_test(8, 1, 16, 1);
    aborted_test(9);
    run_test(10, 0, 0, 1);
    // Every mechanism must have happened.
    check("mech: good board passes", n_pass > 0, 1);
    for (int f = 1; f <= N; f++) check($sformatf("mech: chip %0d located", f), n_located[f] > 0, 1);
    check("mech: fault not located", n_not_located > 0, 1);
    check("mech: parallel idle clocks", n_par_gaps > 0, 1);
    check("mech: serial back-to-back handoff", n_ser_stream > 0, 1);
    check("mech: serial bus gaps", n_ser_gaps > 0, 1);
    check("mech: reference reload", n_ref_reload > 1, 1);
    check("mech: aborted test", n_abort > 0, 1);
    $display("mechanisms: pass=%0d not_located=%0d par_gaps=%0d ser_handoff=%0d ser_gaps=%0d reloads=%0d aborts=%0d",
             n_pass, n_not_located, n_par_gaps, n_ser_stream, n_ser_gaps, n_ref_reload, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
