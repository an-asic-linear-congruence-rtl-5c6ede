// residual_processor: a residual processor (RP) that solves one system of
// linear congruences A x = b (mod m), A of size n x n, m an odd prime.
//
// Structure: a matrix memory of N_MAX + 1 SRAM columns, each with a column
// register; an array of N_MAX + 1 bit-serial arithmetic units (AU_2 ..
// AU_{N_MAX+2}), AU_j reading column j serially (SO_j) and writing column
// j-1 (SI_{j-1}); the pivot unit (zero detect, pivot found, pivot index,
// pivot flags, pivot index vector); and the control unit with its counters,
// address multiplexer, input reduction, inversion and determinant units. The
// control unit reaches all AUs over the shared internal bus IDB_IN.
//
// Every elimination step processes every row once, all columns in parallel,
// and shifts the matrix one column to the left, so the pivot column is always
// the first column (read in parallel on PO_1) and, after n steps, the first
// column holds the solution. n (1..N_MAX) and m are given at run time; N_MAX,
// the word length Z and the input word length Q*Z are fixed at elaboration.
//
// Host protocol: pulse cmd_start with cfg_n and cfg_m; send the n*(n+1)
// signed Q*Z-bit elements of (A|b) row by row on db_in (valid/ready); after
// exactly ((5Z-2)n + 3)n + 14 cycles of phase PH_ELIM, x_1 .. x_n leave on
// db_out (valid/ready) and the processor settles in PH_DONE with det(A) mod m
// on det. A singular matrix ends in PH_DONE with singular = 1, det = 0 and no
// output words. Defaults: N_MAX = 1000 and Z = 24, Q = 3 (72-bit inputs).
// The serial output of column 1 (so[0]) has no reader: column 1 is only read
// in parallel on PO_1, so a lint tool reports that bit as unused.
module residual_processor
  import rp_pkg::*;
#(
  parameter int unsigned N_MAX = 1000,
  parameter int unsigned Z     = 24,
  parameter int unsigned Q     = 3,
  parameter int unsigned BPC   = 8,
  localparam int unsigned AW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned NC   = N_MAX + 1,
  localparam int unsigned CW   = $clog2(NC),
  localparam int unsigned NW   = $clog2(N_MAX + 1),
  localparam int unsigned W    = Q * Z
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_start,
  input  logic [NW-1:0] cfg_n,
  input  logic [Z-1:0]  cfg_m,
  input  logic [W-1:0]  db_in,
  input  logic          db_in_valid,
  output logic          db_in_ready,
  output logic [Z-1:0]  db_out,
  output logic          db_out_valid,
  input  logic          db_out_ready,
  output phase_e        phase,
  output logic [Z-1:0]  det,
  output logic          singular
);
  rp_idb_if #(.Z(Z)) idb ();

  logic [AW-1:0] mem_addr;
  logic          mem_rd, mem_wb, mem_ld_we, reg_load, reg_shift;
  logic [CW-1:0] mem_ld_col;
  logic [Z-1:0]  mem_ld_data, po1;
  logic [NC-1:0] si, so;

  logic          pv_clear, pv_cand_valid, pv_accept, pv_found, pv_perm_odd;
  logic [AW-1:0] pv_cand_row, pv_step, pv_vec_idx, pv_vec_row, pv_row;
  logic [Z-1:0]  pv_cand_val, pv_val;

  rp_control #(.N_MAX(N_MAX), .Z(Z), .Q(Q), .BPC(BPC)) u_ctrl (
    .clk, .rst_n,
    .cmd_start, .cfg_n, .cfg_m, .db_in, .db_in_valid, .db_in_ready,
    .db_out, .db_out_valid, .db_out_ready, .phase, .det, .singular,
    .mem_addr, .mem_rd, .mem_wb, .mem_ld_we, .mem_ld_col, .mem_ld_data,
    .reg_load, .reg_shift, .po1,
    .idb(idb.ctrl),
    .pv_clear, .pv_cand_valid, .pv_cand_row, .pv_cand_val, .pv_accept,
    .pv_step, .pv_vec_idx, .pv_vec_row, .pv_found, .pv_row, .pv_val,
    .pv_perm_odd
  );

  pivot_unit #(.N_MAX(N_MAX), .Z(Z)) u_pivot (
    .clk, .rst_n, .clear(pv_clear),
    .cand_valid(pv_cand_valid), .cand_row(pv_cand_row), .cand_val(pv_cand_val),
    .accept(pv_accept), .step(pv_step), .vec_idx(pv_vec_idx),
    .vec_row(pv_vec_row), .found(pv_found), .pivot_row(pv_row),
    .pivot_val(pv_val), .perm_odd(pv_perm_odd)
  );

  rp_memory #(.N_MAX(N_MAX), .Z(Z)) u_mem (
    .clk, .rst_n, .addr(mem_addr), .rd_en(mem_rd), .wb_en(mem_wb),
    .ld_we(mem_ld_we), .ld_col(mem_ld_col), .ld_data(mem_ld_data),
    .reg_load, .reg_shift, .si, .so, .po1
  );

  // AU_{k+2} reads SO_{k+2} (index k+1) and writes SI_{k+1} (index k); the
  // last one has no column to its right and writes zeros.
  for (genvar k = 0; k < NC; k++) begin : g_au
    logic so_in;
    if (k + 1 < NC) begin : g_src
      assign so_in = so[k+1];
    end else begin : g_edge
      assign so_in = 1'b0;
    end
    arith_unit #(.Z(Z)) u_au (
      .clk, .rst_n, .idb(idb.au), .so_in, .si_out(si[k])
    );
  end
endmodule
