// tb_det_unit: feeds random pivot sequences with random permutation
// parities to the determinant unit and checks the signed product mod m
// after each, the z-cycle multiplication time, clear, and the zero output.
// Watchdog: 200,000 cycles.
module tb_det_unit;
  localparam int unsigned Z = 24;
  logic clk = 0, rst_n = 0, clear = 0, mul_start = 0, perm_odd = 0, zero = 0, busy;
  logic [Z-1:0] m = '0, pivot = '0, det;
  int checks = 0, failures = 0;
  longint unsigned moduli [3] = '{16777213, 65521, 13};

  det_unit #(.Z(Z)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned mm, prod, want;
    bit neg;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 30; seq++) begin
      mm = moduli[seq % 3]; m = Z'(mm);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(det == Z'(1), "clear gives 1");
      prod = 1; neg = 0;
      for (int k = 0; k < 8; k++) begin
        pivot = Z'(1 + longint'($urandom) % (mm - 1));
        perm_odd = 1'($urandom_range(0, 1));
        prod = (prod * longint'(pivot)) % mm;
        neg ^= perm_odd;
        mul_start = 1;
        @(negedge clk);
        mul_start = 0; cyc = 0;
        while (busy) begin
          @(negedge clk);
          cyc++;
        end
        check(cyc == Z, $sformatf("multiply took %0d cycles", cyc));
        want = neg ? (mm - prod) % mm : prod;
        check(longint'(det) == want, $sformatf("det %0d, expected %0d", det, want));
      end
      zero = 1;
      #1;
      check(det == '0, "zero forces 0");
      zero = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
