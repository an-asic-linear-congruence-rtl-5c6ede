// tb_mod_inverse: inverts random and edge-case residues (1, 2, m-1, m-2)
// for several primes up to 2^24 - 3, checks a * inv = 1 (mod m) and
// inv < m, and checks that done comes within 2z + 1 cycles of start (the
// bound the elimination schedule relies on). Watchdog: 200,000 cycles.
module tb_mod_inverse;
  localparam int unsigned Z = 24;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [Z-1:0] a = '0, m = '0, inv;
  int checks = 0, failures = 0;
  longint unsigned moduli [5] = '{16777213, 8388593, 65521, 3, 1000003};

  mod_inverse #(.Z(Z)) dut (.*);
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
    longint unsigned mm, aa;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      mm = moduli[it % 5];
      case (it % 7)
        0: aa = 1;
        1: aa = mm - 1;
        2: aa = (mm > 2) ? 2 : 1;
        3: aa = (mm > 3) ? mm - 2 : 1;
        default: aa = 1 + longint'($urandom) % (mm - 1);
      endcase
      m = Z'(mm); a = Z'(aa); start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check((longint'(inv) * aa) % mm == 1 && longint'(inv) < mm,
            $sformatf("inverse of %0d mod %0d: got %0d", aa, mm, inv));
      check(cyc <= 2 * Z + 1, $sformatf("latency %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
