// tb_rp_full: the residual processor at its default size (N_MAX = 1000,
// z = 24, 72-bit inputs), solving small runtime-sized systems: the whole
// 1001-column memory and AU array is clocked, and the runtime dimension
// selects how much of it takes part. The second system has n = 100, the
// largest size the original design was verified at in simulation; its
// elimination alone takes 1,180,314 cycles. Checks as in rp_tb_body.svh (solution,
// determinant, cycle count). Watchdog: 3,000,000 cycles.
module tb_rp_full;
  localparam int unsigned NT = 1000;

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

  residual_processor dut (.*);

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
    run_problem(6, 16777213, 1);
    run_problem(100, 16777213, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
