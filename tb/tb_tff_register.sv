// Testbench for tff_register (M = 16). Random enable, clear and data; the
// expected content toggles where the data word has ones (clear first, then
// toggle), and after N words from a clear it must be their XOR.
module tb_tff_register;
  localparam int unsigned M = 16;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [M-1:0] d = '0, q;
  int checks = 0, failures = 0;

  tff_register dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q));

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
    logic [M-1:0] model;
    repeat (3) @(negedge clk);
    check("reset", q, '0);
    rst_n = 1;
    model = '0;
    repeat (3000) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) == 0);
      d   = M'($urandom);
      for (int b = 0; b < M; b++) begin
        logic bit_next;
        bit_next = clr ? 1'b0 : model[b];
        if (en && d[b]) bit_next = !bit_next;
        model[b] = bit_next;
      end
      @(negedge clk);
      en = 0;
      clr = 0;
      check("step", q, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
