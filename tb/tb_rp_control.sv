// tb_rp_control: tests the control unit on its own, with the real pivot
// unit but with the matrix memory replaced by a model here: the first-column
// value the memory shows on po1 for row r during step s is a table value
// h(r, s) (the reduced input for s = 0, pseudo-random with zeros after).
// Checks: every loaded element is written once to its row and column with
// its residue; the elimination phase lasts ((5z-2)n + 3)n + 14 cycles; every
// step visits the pivot row first and then the other rows in ascending
// order; every row slot has the strobe pattern read, load, z shifts in,
// clear, z multiply steps, finish, z shifts out, write-back at the same row;
// the serial factor is h(r, s) for a normal row and h(p, s)^-1 for the
// pivot row; the pivot of each step is the first unflagged non-zero row;
// the output words come from the pivot rows in step order; a step with no
// pivot ends the run as singular. Watchdog: 400,000 cycles.
module tb_rp_control;
  import rp_pkg::*;
  localparam int unsigned N = 6, Z = 24, AW = $clog2(N), NC = N + 1, CW = $clog2(NC),
                          NW = $clog2(N + 1), W = 3 * Z;

  logic clk = 0, rst_n = 0;
  logic cmd_start = 0;
  logic [NW-1:0] cfg_n = '0;
  logic [Z-1:0] cfg_m = '0;
  logic [W-1:0] db_in = '0;
  logic db_in_valid = 0, db_in_ready;
  logic [Z-1:0] db_out;
  logic db_out_valid, db_out_ready = 1;
  phase_e phase;
  logic [Z-1:0] det;
  logic singular;
  logic [AW-1:0] mem_addr;
  logic mem_rd, mem_wb, mem_ld_we, reg_load, reg_shift;
  logic [CW-1:0] mem_ld_col;
  logic [Z-1:0] mem_ld_data;
  logic [Z-1:0] po1 = '0;
  logic pv_clear, pv_cand_valid, pv_accept, pv_found, pv_perm_odd;
  logic [AW-1:0] pv_cand_row, pv_step, pv_vec_idx, pv_vec_row, pv_row;
  logic [Z-1:0] pv_cand_val, pv_val;
  rp_idb_if #(.Z(Z)) idb ();

  rp_control #(.N_MAX(N), .Z(Z)) dut (.*, .idb(idb.ctrl));
  pivot_unit #(.N_MAX(N), .Z(Z)) u_pivot (
    .clk, .rst_n, .clear(pv_clear), .cand_valid(pv_cand_valid), .cand_row(pv_cand_row),
    .cand_val(pv_cand_val), .accept(pv_accept), .step(pv_step), .vec_idx(pv_vec_idx),
    .vec_row(pv_vec_row), .found(pv_found), .pivot_row(pv_row), .pivot_val(pv_val),
    .perm_odd(pv_perm_odd)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unsigned m;
  int n;
  longint unsigned h [N+1][N];   // h[s][r]
  logic signed [W-1:0] a_in [N][NC];
  longint unsigned a_red [N][NC];
  bit written [N][NC];
  int step_tb;

  function automatic longint unsigned powmod(longint unsigned b, longint unsigned e);
    longint unsigned r = 1;
    b = b % m;
    while (e != 0) begin
      if (e[0]) r = (r * b) % m;
      b = (b * b) % m;
      e = e >> 1;
    end
    return r;
  endfunction

  // memory model: po1 follows the table
  always @(posedge clk) begin
    if (pv_accept) step_tb <= step_tb + 1;
    if (reg_load && phase == PH_ELIM) po1 <= Z'(h[step_tb-1][mem_addr]);
    if (reg_load && phase == PH_OUT)  po1 <= Z'(h[n][mem_addr]);
    if (idb.finish) po1 <= Z'(h[step_tb][mem_addr]);
  end

  // load monitor
  always @(posedge clk) begin
    if (mem_ld_we) begin
      check(!written[mem_addr][mem_ld_col], "element written once");
      written[mem_addr][mem_ld_col] = 1;
      check(longint'(mem_ld_data) == a_red[mem_addr][mem_ld_col],
            $sformatf("load [%0d][%0d] = %0d, expected %0d", mem_addr, mem_ld_col,
                      mem_ld_data, a_red[mem_addr][mem_ld_col]));
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected pivot of step s (s >= 1 uses the slot order of step s-1).
  function automatic int exp_pivot(int s, bit flg[N]);
    for (int r = 0; r < n; r++) if (!flg[r] && h[s][r] != 0) return r;
    return -1;
  endfunction

  task automatic run(int nn, longint unsigned mm, int zero_step);
    bit flg [N];
    int piv [N];
    int p, row, t, slot_rows [N];
    longint unsigned fac, want_fac, elim;
    int cnt_x, cnt_m, cnt_r, cnt_f, cnt_c;
    bit sing_exp;
    n = nn; m = mm;
    for (int i = 0; i < n; i++) for (int j = 0; j <= n; j++) begin
      logic signed [W+8:0] v, r;
      a_in[i][j] = W'($signed({$urandom, $urandom})) >>> $urandom_range(0, 40);
      v = (W+9)'($signed(a_in[i][j]));
      r = v % $signed((W+9)'(m));
      if (r < 0) r = r + $signed((W+9)'(m));
      a_red[i][j] = longint'(r);
      written[i][j] = 0;
    end
    for (int r = 0; r < n; r++) h[0][r] = a_red[r][0];
    for (int s = 1; s <= n; s++)
      for (int r = 0; r < n; r++) h[s][r] = ($urandom_range(0, 3) == 0) ? 0 : 1 + longint'($urandom) % (m - 1);
    if (zero_step > 0) for (int r = 0; r < n; r++) h[zero_step][r] = 0;
    step_tb = 0;

    @(negedge clk);
    cmd_start = 1; cfg_n = NW'(n); cfg_m = Z'(m);
    @(negedge clk);
    cmd_start = 0;
    for (int i = 0; i < n; i++) for (int j = 0; j <= n; j++) begin
      db_in = a_in[i][j]; db_in_valid = 1;
      do @(posedge clk); while (!db_in_ready);
      @(negedge clk);
      db_in_valid = 0;
    end
    while (phase == PH_LOAD) @(negedge clk);
    for (int i = 0; i < n; i++) for (int j = 0; j <= n; j++) check(written[i][j], "every element written");

    elim = 0;
    sing_exp = 0;
    for (int r = 0; r < n; r++) flg[r] = 0;
    for (int s = 0; s < n && !sing_exp; s++) begin
      p = exp_pivot(s, flg);
      if (p < 0) begin
        sing_exp = 1;
        break;
      end
      piv[s] = p;
      // expected slot order
      slot_rows[0] = p;
      row = 1;
      for (int r = 0; r < n; r++) if (r != p) slot_rows[row++] = r;
      // wait for the first read of the step
      while (!mem_rd && phase == PH_ELIM) begin elim++; @(negedge clk); end
      for (int sl = 0; sl < n; sl++) begin
        cnt_x = 0; cnt_m = 0; cnt_r = 0; cnt_f = 0; cnt_c = 0; fac = 0;
        want_fac = (sl == 0) ? powmod(h[s][p], m - 2) : h[s][slot_rows[sl]];
        for (t = 0; t < 5 * Z - 2; t++) begin
          if (t == 0) check(mem_rd && int'(mem_addr) == slot_rows[sl],
                            $sformatf("step %0d slot %0d reads row %0d, expected %0d", s, sl, mem_addr, slot_rows[sl]));
          if (t == 1) check(reg_load, "register load at t=1");
          if (idb.x_shift) cnt_x++;
          if (idb.mul_en) begin cnt_m++; fac = {fac[62:0], idb.c_bit}; end
          if (idb.mul_clr) cnt_c++;
          if (idb.finish) begin cnt_f++; check(idb.piv_row == (sl == 0), "pivot-row flag"); end
          if (idb.r_shift) cnt_r++;
          if (mem_wb) check(int'(mem_addr) == slot_rows[sl] && cnt_r == Z, "write-back after shift-out, same row");
          elim++;
          @(negedge clk);
        end
        check(cnt_x == Z && cnt_m == Z && cnt_r == Z && cnt_f == 1 && cnt_c == 1, "slot strobe counts");
        check(fac == want_fac, $sformatf("step %0d slot %0d factor %0d, expected %0d", s, sl, fac, want_fac));
      end
      flg[p] = 1;
    end
    while (phase == PH_ELIM) begin elim++; @(negedge clk); end

    if (sing_exp) begin
      check(singular && phase == PH_DONE, "singular run stops");
    end else begin
      check(!singular, "not singular");
      check(elim == elim_cycles(n, Z), $sformatf("elimination phase length %0d", elim));
      for (int k = 0; k < n; k++) begin
        while (!db_out_valid) @(negedge clk);
        check(longint'(db_out) == h[n][piv[k]], $sformatf("output %0d from pivot row %0d", k, piv[k]));
        @(negedge clk);
      end
      check(phase == PH_DONE, "done");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 16777213, 0);
    run(6, 13, 0);
    run(4, 65521, 2);
    run(6, 7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
