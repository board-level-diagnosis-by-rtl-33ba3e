// Testbench for comparator_decoder (N = 16, M = 16). For every chip i it
// builds signatures whose distortion from random references is
// (e, alpha^(i-1) e) and checks that the decoder reports a located fault at
// chip index i-1 after exactly i clocks. It also checks the fault-free case
// (done after one clock, no fault), and distortions outside the single-chip
// model (only one signature distorted, or an unrelated pair), which must be
// reported as a fault that is not located after N clocks. fault_detected is
// checked combinationally in each case.
module tb_comparator_decoder;
  import sa_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned M = 16;
  localparam logic [M-1:0] POLY = 16'h100B;

  logic clk = 0, rst_n = 0, diagnose = 0;
  logic [M-1:0] s_sig = '0, ss_sig = '0, s_ref = '0, ss_ref = '0;
  logic fault_detected, done, fault, located;
  logic [3:0] chip_idx;
  int checks = 0, failures = 0;

  comparator_decoder dut (
    .clk(clk), .rst_n(rst_n), .diagnose(diagnose),
    .s_sig(s_sig), .ss_sig(ss_sig), .s_ref(s_ref), .ss_ref(ss_ref),
    .fault_detected(fault_detected), .done(done), .fault(fault),
    .located(located), .chip_idx(chip_idx)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run one search; return the number of clocks from the diagnose edge to done.
  task automatic run(output int lat);
    @(negedge clk);
    diagnose = 1;
    @(negedge clk);
    diagnose = 0;
    lat = 0;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
  endtask

  // Distortion pair for a case: kind 0 = single chip i, 1 = no fault,
  // 2 = only ds, 3 = only ds*, 4 = unrelated pair.
  task automatic apply(int kind, int i);
    logic [M-1:0] e, e2;
    s_ref  = M'($urandom);
    ss_ref = M'($urandom);
    do e = M'($urandom); while (e == 0);
    case (kind)
      0: begin
        s_sig  = s_ref ^ e;
        ss_sig = ss_ref ^ M'(gf_mul(32'(e), gf_alpha_pow(i - 1, M, 32'(POLY)), M, 32'(POLY)));
      end
      1: begin s_sig = s_ref; ss_sig = ss_ref; end
      2: begin s_sig = s_ref ^ e; ss_sig = ss_ref; end
      3: begin s_sig = s_ref; ss_sig = ss_ref ^ e; end
      default: begin
        // e2 = alpha^j e with j outside 0..N-1.
        e2 = M'(gf_mul(32'(e), gf_alpha_pow($urandom_range(N, 65534), M, 32'(POLY)), M, 32'(POLY)));
        s_sig = s_ref ^ e;
        ss_sig = ss_ref ^ e2;
      end
    endcase
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check("idle done", done, 0);
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 1; i <= N; i++) begin
        apply(0, i);
        #1 check("detect", fault_detected, 1);
        run(lat);
        check("fault", fault, 1);
        check("located", located, 1);
        check("chip", chip_idx, i - 1);
        check("latency", lat, i);
        // Result holds while the inputs stay.
        @(negedge clk);
        check("hold", {done, located, chip_idx}, {1'b1, 1'b1, 4'(i - 1)});
      end
    end
    for (int kind = 1; kind <= 4; kind++) begin
      repeat (10) begin
        apply(kind, 0);
        #1 check("detect", fault_detected, kind != 1);
        run(lat);
        check("fault", fault, kind != 1);
        check("located", located, 0);
        check("latency", lat, (kind == 1) ? 1 : N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
