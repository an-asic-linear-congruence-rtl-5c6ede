// tb_residual_processor: end-to-end test of the residual processor at
// N_MAX = 8. Solves a series of random systems for several prime moduli and
// dimensions 1..8, including a zero first pivot, singular systems and large
// negative inputs, and checks solutions, determinants and the elimination
// cycle count (see rp_tb_body.svh). Watchdog: 2,000,000 cycles.
module tb_residual_processor;
  localparam int unsigned NT = 8;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_problem(3, 16777213, 0);
    run_problem(1, 65521, 0);
    run_problem(8, 16777213, 1);
    run_problem(4, 7, 1);
    run_problem(5, 13, 2);
    run_problem(8, 8388593, 3);
    run_problem(2, 3, 0);
    for (int r = 0; r < 12; r++)
      run_problem($urandom_range(1, NT), (r % 3 == 0) ? 11 : (r % 3 == 1) ? 1000003 : 16777213, r % 4);
    report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
