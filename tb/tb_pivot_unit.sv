// tb_pivot_unit: offers candidate rows and values to the pivot unit as a
// sequence of elimination steps would, and checks against a model kept
// here: the first non-zero candidate of an unflagged row is taken, later
// ones are ignored until accept, accepted rows are never taken again, the
// pivot index vector records the rows in step order, perm_odd is the parity
// of flagged rows above the pivot, and clear restarts everything.
// Watchdog: 100,000 cycles.
module tb_pivot_unit;
  localparam int unsigned N = 12, Z = 24, AW = $clog2(N);
  logic clk = 0, rst_n = 0, clear = 0, cand_valid = 0, accept = 0;
  logic [AW-1:0] cand_row = '0, step = '0, vec_idx = '0, vec_row, pivot_row;
  logic [Z-1:0] cand_val = '0, pivot_val;
  logic found, perm_odd;
  int checks = 0, failures = 0;

  pivot_unit #(.N_MAX(N), .Z(Z)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit flagged [N];
    int order [N];
    int exp_row, par;
    logic [Z-1:0] exp_val, v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(!found, "clear re-arms");
      for (int i = 0; i < N; i++) flagged[i] = 0;
      for (int s = 0; s < N; s++) begin
        exp_row = -1;
        // offer every row once, in ascending order, some with zero values
        for (int i = 0; i < N; i++) begin
          v = ($urandom_range(0, 2) == 0) ? '0 : Z'($urandom_range(1, 1000));
          if (i == N - 1 && exp_row < 0) v = 7;  // keep the search successful
          cand_valid = 1; cand_row = AW'(i); cand_val = v;
          if (exp_row < 0 && !flagged[i] && v != 0) begin
            exp_row = i; exp_val = v;
          end
          @(negedge clk);
        end
        cand_valid = 0;
        if (exp_row < 0) begin
          check(!found, "no pivot when every unflagged row is zero");
          break;
        end
        check(found, "pivot found");
        check(int'(pivot_row) == exp_row, $sformatf("pivot row %0d, expected %0d", pivot_row, exp_row));
        check(pivot_val == exp_val, "pivot value");
        par = 0;
        for (int i = exp_row + 1; i < N; i++) par ^= int'(flagged[i]);
        check(perm_odd == par[0], "permutation parity");
        accept = 1; step = AW'(s);
        @(negedge clk);
        accept = 0;
        flagged[exp_row] = 1; order[s] = exp_row;
        check(!found, "accept re-arms");
        for (int k = 0; k <= s; k++) begin
          vec_idx = AW'(k);
          #1;
          check(int'(vec_row) == order[k], "pivot index vector");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
