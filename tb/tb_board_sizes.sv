// Testbench running board_diag_top at the board sizes of the hardware
// comparison, N = 8, 24, 32 and 64 chips of M = 16 outputs (N = 16 is the
// default, covered by tb_board_diag_top). Each size is built as its own
// instance and diagnosed for a good board, single faulty chips at the first,
// middle and last positions, and a two-chip fault, with both schemes.
module tb_board_sizes;
  logic fin8, fin24, fin32, fin64;
  int c8, c24, c32, c64, f8, f24, f32, f64;

  board_size_run #(.N(8))  u_n8  (.finished(fin8),  .checks(c8),  .failures(f8));
  board_size_run #(.N(24)) u_n24 (.finished(fin24), .checks(c24), .failures(f24));
  board_size_run #(.N(32)) u_n32 (.finished(fin32), .checks(c32), .failures(f32));
  board_size_run #(.N(64)) u_n64 (.finished(fin64), .checks(c64), .failures(f64));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c24 + c32 + c64, f8 + f24 + f32 + f64 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin8 && fin24 && fin32 && fin64);
    $display("N=8: %0d checks, N=24: %0d, N=32: %0d, N=64: %0d", c8, c24, c32, c64);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c24 + c32 + c64, f8 + f24 + f32 + f64);
    $finish;
  end
endmodule
