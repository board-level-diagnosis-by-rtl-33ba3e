// Testbench for reference_store (M = 16): both registers clear on reset, take
// new values only on load, and hold them otherwise.
module tb_reference_store;
  localparam int unsigned M = 16;

  logic clk = 0, rst_n = 0, load = 0;
  logic [M-1:0] s_in = '0, ss_in = '0, s_ref, ss_ref;
  int checks = 0, failures = 0;

  reference_store dut (.clk(clk), .rst_n(rst_n), .load(load), .s_in(s_in), .ss_in(ss_in),
                       .s_ref(s_ref), .ss_ref(ss_ref));

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
    logic [M-1:0] es, ess;
    repeat (3) @(negedge clk);
    check("reset s", s_ref, '0);
    check("reset s*", ss_ref, '0);
    rst_n = 1;
    es = '0;
    ess = '0;
    repeat (500) begin
      load  = ($urandom_range(0, 2) == 0);
      s_in  = M'($urandom);
      ss_in = M'($urandom);
      if (load) begin
        es = s_in;
        ess = ss_in;
      end
      @(negedge clk);
      check("s", s_ref, es);
      check("s*", ss_ref, ess);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
