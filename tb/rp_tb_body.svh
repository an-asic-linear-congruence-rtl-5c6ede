// rp_tb_body.svh: shared body of the residual processor end-to-end tests.
//
// Included inside a testbench module that declares localparam NT (the
// N_MAX of the device under test), the clock clk, the reset rst_n and the
// device's port signals, and instantiates the device as dut. It drives
// whole problems through the host ports and checks every answer against a
// reference worked out here: residues with the % operator, Gaussian
// elimination with row swaps and a Fermat inverse, and A x = b (mod m)
// verified directly. It also checks the elimination cycle count against
// ((5z-2)n + 3)n + 14 and counts how often each mechanism of the design was
// exercised (pivot search past a zero, odd row permutation, singular matrix,
// negative and wider-than-64-bit inputs, stalls on either bus, restart).

localparam int unsigned ZT = 24;
localparam int unsigned WT = 3 * ZT;

int checks = 0, failures = 0;
int cnt_pivot_skip = 0, cnt_odd_perm = 0, cnt_singular = 0, cnt_negative = 0;
int cnt_wide = 0, cnt_in_stall = 0, cnt_out_stall = 0, cnt_restart = 0, cnt_full_n = 0;
int problems = 0;

logic signed [WT-1:0] a_in [NT][NT+1];
longint unsigned      a_mod [NT][NT+1];
longint unsigned      x_got [NT];

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

function automatic longint unsigned powmod(longint unsigned b, longint unsigned e, longint unsigned m);
  longint unsigned r = 1;
  b = b % m;
  while (e != 0) begin
    if (e[0]) r = (r * b) % m;
    b = (b * b) % m;
    e = e >> 1;
  end
  return r;
endfunction

function automatic bit is_prime(longint unsigned m);
  if (m < 3 || m[0] == 1'b0) return 0;
  for (longint unsigned d = 3; d * d <= m; d += 2) if (m % d == 0) return 0;
  return 1;
endfunction

function automatic longint unsigned reduce(logic signed [WT-1:0] v, longint unsigned m);
  logic signed [WT+8:0] wide, r;
  wide = (WT+9)'(v);
  r = wide % $signed((WT+9)'(m));
  if (r < 0) r = r + $signed((WT+9)'(m));
  return longint'(r);
endfunction

// Reference: Gaussian elimination mod m. Returns 1 if singular.
function automatic bit ref_solve(int n, longint unsigned m, output longint unsigned x[NT],
                                 output longint unsigned det, output bit swapped, output bit odd);
  longint unsigned t [NT][NT+1];
  longint unsigned inv, f, tmp;
  int perm_sign = 0;
  int pr;
  swapped = 0;
  for (int i = 0; i < n; i++) for (int j = 0; j <= n; j++) t[i][j] = a_mod[i][j];
  det = 1;
  for (int k = 0; k < n; k++) begin
    pr = -1;
    for (int i = k; i < n; i++) if (pr < 0 && t[i][k] != 0) pr = i;
    if (pr < 0) begin
      det = 0;
      odd = perm_sign[0];
      return 1;
    end
    if (pr != k) begin
      swapped = 1;
      perm_sign ^= 1;
      for (int j = 0; j <= n; j++) begin
        tmp = t[k][j]; t[k][j] = t[pr][j]; t[pr][j] = tmp;
      end
    end
    det = (det * t[k][k]) % m;
    inv = powmod(t[k][k], m - 2, m);
    for (int j = 0; j <= n; j++) t[k][j] = (t[k][j] * inv) % m;
    for (int i = 0; i < n; i++) begin
      if (i != k) begin
        f = t[i][k];
        for (int j = 0; j <= n; j++) t[i][j] = (t[i][j] + m - (f * t[k][j]) % m) % m;
      end
    end
  end
  if (perm_sign[0] && det != 0) det = m - det;
  odd = perm_sign[0];
  for (int i = 0; i < n; i++) x[i] = t[i][n];
  return 0;
endfunction

// kind 0: random; 1: zero at a_11 (pivot search); 2: singular (row copy);
// 3: large and negative values
task automatic make_problem(int n, longint unsigned m, int kind);
  for (int i = 0; i < n; i++) begin
    for (int j = 0; j <= n; j++) begin
      logic signed [WT-1:0] v;
      v = WT'($signed({$urandom, $urandom}));
      if (kind != 3) v = v >>> ($urandom_range(0, 40));
      if (kind == 3 && ($urandom_range(0, 3) == 0)) v = WT'({$urandom, $urandom, $urandom});
      a_in[i][j] = v;
    end
  end
  if (kind == 1 && n > 1) begin
    a_in[0][0] = WT'(m) * WT'($urandom_range(0, 5));
    a_in[1][0] = -WT'($urandom_range(1, 1000) * 3) * WT'(m) - 1;
  end
  if (kind == 2 && n > 1) begin
    int r;
    r = $urandom_range(1, n - 1);
    for (int j = 0; j <= n; j++) a_in[r][j] = a_in[0][j] + WT'(m) * WT'($urandom_range(0, 9));
  end
  for (int i = 0; i < n; i++) for (int j = 0; j <= n; j++) a_mod[i][j] = reduce(a_in[i][j], m);
endtask

task automatic run_problem(int n, longint unsigned m, int kind);
  longint unsigned xr [NT];
  longint unsigned det_ref, s;
  bit sing_ref, swapped, odd;
  longint unsigned elim_cyc, want_cyc;
  int k;
  bit neg_seen = 0, wide_seen = 0;

  check(is_prime(m), $sformatf("modulus %0d is an odd prime", m));
  make_problem(n, m, kind);
  sing_ref = ref_solve(n, m, xr, det_ref, swapped, odd);
  if (problems > 0) cnt_restart++;
  problems++;
  if (n == NT) cnt_full_n++;

  @(negedge clk);
  cmd_start = 1; cfg_n = $bits(cfg_n)'(n); cfg_m = ZT'(m);
  @(negedge clk);
  cmd_start = 0;
  check(phase == rp_pkg::PH_LOAD, "load phase entered");

  for (int i = 0; i < n; i++) begin
    for (int j = 0; j <= n; j++) begin
      if ($urandom_range(0, 3) == 0) begin
        db_in_valid = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      db_in = a_in[i][j];
      db_in_valid = 1;
      if (a_in[i][j] < 0) neg_seen = 1;
      if (a_in[i][j] > 72'sh7fff_ffff_ffff_ffff || a_in[i][j] < -72'sh8000_0000_0000_0000) wide_seen = 1;
      do begin
        @(posedge clk);
        if (!db_in_ready) cnt_in_stall++;
      end while (!db_in_ready);
      @(negedge clk);
      db_in_valid = 0;
    end
  end
  if (neg_seen) cnt_negative++;
  if (wide_seen) cnt_wide++;

  // elimination: count cycles spent in the elimination phase
  elim_cyc = 0;
  while (phase == rp_pkg::PH_LOAD) @(negedge clk);
  while (phase == rp_pkg::PH_ELIM) begin
    elim_cyc++;
    @(negedge clk);
  end

  if (sing_ref) begin
    cnt_singular++;
    check(singular == 1'b1, $sformatf("n=%0d m=%0d: singular flagged", n, m));
    check(phase == rp_pkg::PH_DONE, "singular ends in done");
    check(det == '0, "singular det is 0");
    return;
  end

  want_cyc = rp_pkg::elim_cycles(n, ZT);
  check(elim_cyc == want_cyc,
        $sformatf("n=%0d: elimination took %0d cycles, expected %0d", n, elim_cyc, want_cyc));
  check(singular == 1'b0, "non-singular not flagged");
  if (swapped) cnt_pivot_skip++;
  if (odd) cnt_odd_perm++;

  k = 0;
  while (k < n) begin
    db_out_ready = ($urandom_range(0, 2) != 0);
    if (db_out_valid && !db_out_ready) cnt_out_stall++;
    if (db_out_valid && db_out_ready) begin
      x_got[k] = longint'(db_out);
      check(x_got[k] == xr[k],
            $sformatf("n=%0d m=%0d x[%0d] = %0d, expected %0d", n, m, k, x_got[k], xr[k]));
      k++;
    end
    @(negedge clk);
  end
  db_out_ready = 0;
  check(phase == rp_pkg::PH_DONE, "done after output");
  check(longint'(det) == det_ref, $sformatf("n=%0d m=%0d det = %0d, expected %0d", n, m, det, det_ref));
  // direct check of A x = b (mod m)
  for (int i = 0; i < n; i++) begin
    s = 0;
    for (int j = 0; j < n; j++) s = (s + a_mod[i][j] * x_got[j]) % m;
    check(s == a_mod[i][n], $sformatf("row %0d of A x = b", i));
  end
endtask

task automatic report_mechanisms();
  $display("mechanisms: pivot_skip=%0d odd_perm=%0d singular=%0d negative=%0d wide=%0d in_stall=%0d out_stall=%0d restart=%0d full_n=%0d",
           cnt_pivot_skip, cnt_odd_perm, cnt_singular, cnt_negative, cnt_wide,
           cnt_in_stall, cnt_out_stall, cnt_restart, cnt_full_n);
  check(cnt_pivot_skip > 0, "pivot search skipped a zero");
  check(cnt_odd_perm > 0, "odd row permutation (negative determinant sign)");
  check(cnt_singular > 0, "singular matrix detected");
  check(cnt_negative > 0, "negative input reduced");
  check(cnt_wide > 0, "input wider than 64 bits reduced");
  check(cnt_in_stall > 0, "input bus stalled");
  check(cnt_out_stall > 0, "output bus stalled");
  check(cnt_restart > 0, "second problem after the first");
  check(cnt_full_n > 0, "problem at full dimension");
endtask
