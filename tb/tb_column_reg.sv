// tb_column_reg: loads random words into the column register, shifts them
// out MSB first while shifting a second word in, and checks the serial
// output bit by bit, the parallel output after z shifts, hold when idle and
// load priority over shift. Watchdog: 20,000 cycles.
module tb_column_reg;
  localparam int unsigned Z = 24;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, si = 0, so;
  logic [Z-1:0] d = '0, po;
  int checks = 0, failures = 0;

  column_reg #(.Z(Z)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [Z-1:0] w1, w2;
    @(negedge clk);
    check(po == '0, "reset clears");
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      w1 = Z'($urandom); w2 = Z'($urandom);
      load = 1; d = w1;
      @(negedge clk);
      load = 0;
      check(po == w1, "parallel load");
      repeat (2) @(negedge clk);
      check(po == w1, "hold");
      for (int b = Z - 1; b >= 0; b--) begin
        check(so == w1[b], $sformatf("serial out bit %0d", b));
        shift = 1; si = w2[b];
        @(negedge clk);
      end
      shift = 0;
      check(po == w2, "serial in word");
      load = 1; shift = 1; d = w1; si = 1;
      @(negedge clk);
      load = 0; shift = 0;
      check(po == w1, "load wins over shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
