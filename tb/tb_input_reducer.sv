// tb_input_reducer: reduces random signed 72-bit integers (small, large,
// negative, the extreme values) modulo several primes and compares with the
// % operator on a wider signed value. Also checks the latency of
// ceil(72 / BPC) cycles and that in_ready is low while busy.
// Watchdog: 200,000 cycles.
module tb_input_reducer;
  localparam int unsigned Z = 24, Q = 3, BPC = 8, W = Q * Z;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [Z-1:0] m = '0, out;
  logic [W-1:0] in = '0;
  int checks = 0, failures = 0;
  longint unsigned moduli [4] = '{16777213, 65521, 3, 8388593};

  input_reducer #(.Z(Z), .Q(Q), .BPC(BPC)) dut (.*);
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
    logic signed [W+8:0] v, r;
    longint unsigned mm;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      mm = moduli[it % 4];
      case (it % 6)
        0: in = {1'b1, {(W-1){1'b0}}};                 // most negative
        1: in = {1'b0, {(W-1){1'b1}}};                 // most positive
        2: in = W'($signed($urandom)) ;                // 32-bit signed
        3: in = W'({$urandom, $urandom, $urandom});    // full width
        4: in = -W'(mm) * W'($urandom_range(0, 1000)); // multiple of m
        default: in = W'($urandom_range(0, 5));
      endcase
      m = Z'(mm);
      v = (W+9)'($signed(in));
      r = v % $signed((W+9)'(mm));
      if (r < 0) r = r + $signed((W+9)'(mm));
      in_valid = 1;
      check(in_ready, "ready when idle");
      @(negedge clk);
      in_valid = 0; cyc = 0;
      while (!out_valid) begin
        check(!in_ready, "not ready while busy");
        @(negedge clk);
        cyc++;
      end
      check(cyc == (W + BPC - 1) / BPC, $sformatf("latency %0d", cyc));
      check(longint'(out) == longint'(r), $sformatf("%0d mod %0d = %0d, got %0d", $signed(in), mm, r, out));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
