// tb_rp_memory: loads a random 6 x 7 matrix word by word into the column
// memory, then for every row reads it, loads the column registers, checks
// the first column on po1 and every column's bits on so while shifting in
// new words on si, writes the row back and reads it again to check the
// write-back of all columns. Watchdog: 50,000 cycles.
module tb_rp_memory;
  localparam int unsigned N = 6, Z = 24, NC = N + 1, AW = $clog2(N), CW = $clog2(NC);
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] addr = '0;
  logic rd_en = 0, wb_en = 0, ld_we = 0, reg_load = 0, reg_shift = 0;
  logic [CW-1:0] ld_col = '0;
  logic [Z-1:0] ld_data = '0, po1;
  logic [NC-1:0] si = '0, so;
  logic [Z-1:0] mat [N][NC];
  logic [Z-1:0] nw [NC];
  int checks = 0, failures = 0;

  rp_memory #(.N_MAX(N), .Z(Z)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < NC; j++) begin
        mat[i][j] = Z'($urandom);
        ld_we = 1; addr = AW'(i); ld_col = CW'(j); ld_data = mat[i][j];
        @(negedge clk);
      end
    ld_we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N; i++) begin
        addr = AW'(i); rd_en = 1;
        @(negedge clk);
        rd_en = 0; reg_load = 1;
        @(negedge clk);
        reg_load = 0;
        check(po1 == mat[i][0], $sformatf("po1 row %0d", i));
        for (int j = 0; j < NC; j++) nw[j] = Z'($urandom);
        for (int b = Z - 1; b >= 0; b--) begin
          for (int j = 0; j < NC; j++) begin
            check(so[j] == mat[i][j][b], $sformatf("so row %0d col %0d bit %0d", i, j, b));
            si[j] = nw[j][b];
          end
          reg_shift = 1;
          @(negedge clk);
        end
        reg_shift = 0;
        check(po1 == nw[0], "po1 after shift-in");
        wb_en = 1;
        @(negedge clk);
        wb_en = 0;
        for (int j = 0; j < NC; j++) mat[i][j] = nw[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
