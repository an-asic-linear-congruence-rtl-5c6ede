// tb_rp_n100: the residual processor built for N_MAX = 100 and filled to
// capacity: two 100 x 100 systems (one needing a pivot search past a zero,
// one with full-width signed inputs) back to back, checked for solution,
// determinant and the elimination cycle count (see rp_tb_body.svh).
// Watchdog: 3,000,000 cycles.
module tb_rp_n100;
  localparam int unsigned NT = 100;

  logic clk = 0, rst_n = 0;
  logic                   cmd_start = 0;
  logic [$clog2(NT+1)-1:0] cfg_n = '0;
  logic [23:0]            cfg_m = '0;
  logic [71:0]            db_in = '0;
  logic                   db_in_valid = 0, db_in_ready;
  logic [23:0]            db_out;
  logic                   db_out_valid, db_out_ready = 0;
  rp_pkg::phase_e         phase;
  logic [23:0]            det;
  logic                   singular;

  residual_processor #(.N_MAX(NT)) dut (.*);

  always #5 clk = ~clk;

  `include "rp_tb_body.svh"

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_problem(NT, 16777213, 1);
    run_problem(NT, 65521, 3);
    check(cnt_pivot_skip > 0, "pivot search skipped a zero");
    check(cnt_full_n == 2, "both systems at full dimension");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
