// tb_sram_column: writes random words to random addresses of one SRAM
// column, keeps a shadow copy, and checks every read one cycle after its
// address, that a write does not change the read port, and that an idle
// cycle (ce low) neither reads nor writes. Watchdog: 20,000 cycles.
module tb_sram_column;
  localparam int unsigned WORDS = 40, Z = 24, AW = $clog2(WORDS);
  logic clk = 0, ce = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [Z-1:0] din = '0, dout;
  logic [Z-1:0] shadow [WORDS];
  int checks = 0, failures = 0;

  sram_column #(.WORDS(WORDS), .Z(Z)) dut (.*);
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
    logic [Z-1:0] held;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      ce = 1; we = 1; addr = AW'(i); din = Z'($urandom); shadow[i] = din;
      @(negedge clk);
    end
    for (int it = 0; it < 400; it++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      case ($urandom_range(0, 2))
        0: begin  // read
          ce = 1; we = 0; addr = AW'(a);
          @(negedge clk);
          check(dout == shadow[a], $sformatf("read %0d", a));
        end
        1: begin  // write, read port must hold
          held = dout;
          ce = 1; we = 1; addr = AW'(a); din = Z'($urandom); shadow[a] = din;
          @(negedge clk);
          check(dout == held, "write leaves dout");
        end
        default: begin  // idle
          held = dout;
          ce = 0; we = 1; addr = AW'(a); din = ~shadow[a];
          @(negedge clk);
          check(dout == held, "idle leaves dout");
        end
      endcase
    end
    ce = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
