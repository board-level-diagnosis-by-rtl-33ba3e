// Testbench for serial_space_compressor (N = 16, M = 16). Sends the words
// z_N(t), ..., z_1(t) of 60 patterns, part of them back to back (one word per
// clock, including across pattern boundaries) and part with random idle
// clocks between words. At every y_valid pulse the outputs must equal
// y = XOR of the pattern's words and y* = sum alpha^(i-1) z_i from the
// reference model, and the pulse must come exactly one clock after the
// pattern's last word. A clear in the middle of a pattern must discard it.
module tb_serial_space_compressor;
  import sa_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned M = 16;
  localparam int unsigned T = 60;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic clk = 0, rst_n = 0, clear = 0, bus_valid = 0;
  logic [M-1:0] bus_word = '0, y, ystar;
  logic y_valid, busy;
  int checks = 0, failures = 0;

  serial_space_compressor dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bus_valid(bus_valid), .bus_word(bus_word),
    .y(y), .ystar(ystar), .y_valid(y_valid), .busy(busy)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected syndromes per pattern, and the clock of each pattern's last word.
  sym_t exp_y[$], exp_ys[$];
  longint last_clk[$];
  longint cyc = 0;
  int got_pulses = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Monitor: compare at each pulse.
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      got_pulses++;
      if (exp_y.size() == 0) begin
        check("unexpected pulse", 1, 0);
      end else begin
        check("y", y, M'(exp_y.pop_front()));
        check("y*", ystar, M'(exp_ys.pop_front()));
        check("pulse timing", int'(cyc - last_clk.pop_front()), 1);
      end
    end
  end

  task automatic send_pattern(int t, bit gaps);
    sym_t ey, es, w;
    ey = 0;
    es = 0;
    for (int i = N; i >= 1; i--) begin
      if (gaps) begin
        bus_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      w = chip_resp(i, t, 77, M);
      ey ^= w;
      es ^= gf_mul(w, gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY));
      bus_valid = 1;
      bus_word = M'(w);
      if (i == 1) begin
        exp_y.push_back(ey);
        exp_ys.push_back(es);
        last_clk.push_back(cyc);
      end
      @(negedge clk);
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
    for (int t = 0; t < T; t++) send_pattern(t, t >= T / 2);
    bus_valid = 0;
    repeat (3) @(negedge clk);
    check("idle", busy, 0);
    // A clear in mid-pattern discards the partial pattern.
    for (int i = 0; i < 5; i++) begin
      bus_valid = 1;
      bus_word = M'($urandom);
      @(negedge clk);
    end
    check("busy", busy, 1);
    bus_valid = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    check("cleared", busy, 0);
    send_pattern(T, 0);
    bus_valid = 0;
    repeat (3) @(negedge clk);
    check("pulses", got_pulses, T + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
