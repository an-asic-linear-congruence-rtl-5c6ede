// tb_arith_unit: drives one arithmetic unit through the row-slot sequence
// (shift a word in, z multiplication steps with a serial factor, finish,
// shift the result out). A pivot-row pass must give c*x mod m and keep it;
// the following elimination passes must give x - c*P mod m, with P the kept
// pivot-row value. Results are compared bit by bit with values computed
// here with the % operator. Watchdog: 200,000 cycles.
module tb_arith_unit;
  localparam int unsigned Z = 24;
  logic clk = 0, rst_n = 0, so_in = 0, si_out;
  int checks = 0, failures = 0;
  longint unsigned moduli [4] = '{16777213, 65521, 7, 1000003};

  rp_idb_if #(.Z(Z)) idb ();
  arith_unit #(.Z(Z)) dut (.clk, .rst_n, .idb(idb.au), .so_in, .si_out);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pass(bit piv, longint unsigned x, longint unsigned c, output longint unsigned r);
    idb.piv_row = piv;
    for (int b = Z - 1; b >= 0; b--) begin
      idb.x_shift = 1; so_in = x[b];
      @(negedge clk);
    end
    idb.x_shift = 0;
    idb.mul_clr = 1;
    @(negedge clk);
    idb.mul_clr = 0;
    for (int b = Z - 1; b >= 0; b--) begin
      idb.mul_en = 1; idb.c_bit = c[b];
      @(negedge clk);
    end
    idb.mul_en = 0;
    idb.finish = 1;
    @(negedge clk);
    idb.finish = 0;
    r = 0;
    for (int b = Z - 1; b >= 0; b--) begin
      r[b] = si_out;
      idb.r_shift = 1;
      @(negedge clk);
    end
    idb.r_shift = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned m, x, c, p, r, want;
    idb.m = '0; idb.x_shift = 0; idb.mul_clr = 0; idb.mul_en = 0;
    idb.c_bit = 0; idb.piv_row = 0; idb.finish = 0; idb.r_shift = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      m = moduli[it % 4];
      idb.m = Z'(m);
      x = longint'($urandom) % m; c = longint'($urandom) % m;
      if (it % 10 == 0) c = m - 1;
      pass(1, x, c, r);
      p = (x * c) % m;
      check(r == p, $sformatf("pivot pass m=%0d: %0d*%0d = %0d, got %0d", m, c, x, p, r));
      for (int k = 0; k < 3; k++) begin
        x = longint'($urandom) % m; c = longint'($urandom) % m;
        pass(0, x, c, r);
        want = (x + m - (c * p) % m) % m;
        check(r == want, $sformatf("elim pass m=%0d: %0d - %0d*%0d = %0d, got %0d", m, x, c, p, want, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
