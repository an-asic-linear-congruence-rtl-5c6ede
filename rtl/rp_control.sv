// rp_control: the control unit of the residual processor, with its step
// counter, row counter and memory address multiplexer, the input reduction
// unit, the inversion unit INV and the determinant unit AU_D.
//
// Operation, one problem at a time:
//  1. cmd_start (in IDLE or DONE) takes the runtime dimension cfg_n
//     (1..N_MAX) and the odd prime modulus cfg_m, clears the pivot unit and
//     the determinant, and enters LOAD.
//  2. LOAD: n*(n+1) signed q*z-bit elements arrive on db_in, row by row, each
//     row a_i1 .. a_in then b_i (valid/ready). Each is reduced mod m and
//     written straight into its SRAM column. Values written into column 1 are
//     offered to the pivot search, so the first pivot is known at the end of
//     the load.
//  3. ELIM: PRE_CYC cycles, then n steps. A step spends STEP_OVH_CYC cycles
//     accepting the pivot (flag, pivot index vector, start of INV and of the
//     determinant product) and then n row slots of 5z-2 cycles: the pivot row
//     first, then every other row in ascending order. In a slot the row is
//     read (t=0), loaded into the column registers (t=1), shifted serially
//     into the AUs (t=2..z+1), multiplied bit-serially by the row factor sent
//     over IDB_IN (t=2z+2..3z+1; the factor is a_p1^-1 for the pivot row and
//     a_i1 otherwise), finished (t=3z+2), shifted back one column to the left
//     (t=3z+3..4z+2) and written back (t=4z+3). The new first-column value
//     goes to the pivot search for the next step. POST_CYC cycles end the
//     phase, which thus lasts exactly elim(n, z) = ((5z-2)n + 3)n + 14 cycles.
//     If a step finds no pivot the matrix is singular: the unit stops with
//     singular = 1 and det = 0 and sends no solution.
//  4. OUT: after n steps the first column holds the solution, row p_k holding
//     x_k; the pivot index vector gives p_k, and x_1..x_n leave on db_out.
//  5. DONE: det holds det(A) mod m until the next command.
// The phases, the column-shifting elimination, the elimination time and the
// pivot bookkeeping units follow the document; the slot schedule inside the
// 5z-2 cycles, the pivot order, the host protocol and the handling of a
// singular matrix are this design's choices.
module rp_control
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
  // host side
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
  output logic          singular,
  // memory
  output logic [AW-1:0] mem_addr,
  output logic          mem_rd,
  output logic          mem_wb,
  output logic          mem_ld_we,
  output logic [CW-1:0] mem_ld_col,
  output logic [Z-1:0]  mem_ld_data,
  output logic          reg_load,
  output logic          reg_shift,
  input  logic [Z-1:0]  po1,
  // internal data bus to the arithmetic units
  rp_idb_if.ctrl        idb,
  // pivot unit
  output logic          pv_clear,
  output logic          pv_cand_valid,
  output logic [AW-1:0] pv_cand_row,
  output logic [Z-1:0]  pv_cand_val,
  output logic          pv_accept,
  output logic [AW-1:0] pv_step,
  output logic [AW-1:0] pv_vec_idx,
  input  logic [AW-1:0] pv_vec_row,
  input  logic          pv_found,
  input  logic [AW-1:0] pv_row,
  input  logic [Z-1:0]  pv_val,
  input  logic          pv_perm_odd
);
  localparam int unsigned L  = slot_cycles(Z);
  localparam int unsigned TW = $clog2(L + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_PRE, S_STEP, S_ROW, S_POST, S_OUT, S_DONE
  } state_e;

  state_e        state;
  logic [NW-1:0] n_r;
  logic [Z-1:0]  m_r;
  logic [31:0]   n_elems, accepted;
  logic [AW-1:0] ld_row;
  logic [CW-1:0] ld_col;
  logic [31:0]   cnt;
  logic [AW-1:0] step, step_piv, cur_row, next_row;
  logic [NW-1:0] slot;
  logic [TW-1:0] t;
  logic [Z-1:0]  fac, inv_r;
  logic [1:0]    osub;
  logic [NW-1:0] out_k;
  logic          singular_r;
  logic          last_step, last_slot;

  // sub-units inside the control unit
  logic         red_in_valid, red_in_ready, red_out_valid;
  logic [Z-1:0] red_out;
  logic         inv_start, inv_busy, inv_done;
  logic [Z-1:0] inv_val;
  logic         det_clear, det_start, det_busy;

  input_reducer #(.Z(Z), .Q(Q), .BPC(BPC)) u_reduce (
    .clk, .rst_n, .m(m_r), .in(db_in), .in_valid(red_in_valid),
    .in_ready(red_in_ready), .out(red_out), .out_valid(red_out_valid)
  );

  mod_inverse #(.Z(Z)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(pv_val), .m(m_r),
    .busy(inv_busy), .done(inv_done), .inv(inv_val)
  );

  det_unit #(.Z(Z)) u_det (
    .clk, .rst_n, .m(m_r), .clear(det_clear), .mul_start(det_start),
    .pivot(pv_val), .perm_odd(pv_perm_odd), .zero(singular_r),
    .busy(det_busy), .det(det)
  );

  assign last_step = (32'(step) == 32'(n_r) - 1);
  assign last_slot = (32'(slot) == 32'(n_r) - 1);

  // ---------------- host side ----------------
  assign red_in_valid = (state == S_LOAD) && db_in_valid && (accepted < n_elems);
  assign db_in_ready  = (state == S_LOAD) && red_in_ready && (accepted < n_elems);
  assign db_out       = po1;
  assign db_out_valid = (state == S_OUT) && (osub == 2'd2);
  assign singular     = singular_r;

  always_comb begin
    unique case (state)
      S_IDLE:                        phase = PH_IDLE;
      S_LOAD:                        phase = PH_LOAD;
      S_PRE, S_STEP, S_ROW, S_POST:  phase = PH_ELIM;
      S_OUT:                         phase = PH_OUT;
      default:                       phase = PH_DONE;
    endcase
  end

  // ---------------- sub-unit strobes ----------------
  assign inv_start = (state == S_STEP) && (cnt == 0) && pv_found;
  assign det_start = inv_start;
  assign det_clear = ((state == S_IDLE) || (state == S_DONE)) && cmd_start;
  assign pv_clear  = det_clear;
  assign pv_accept = inv_start;
  assign pv_step   = step;
  assign pv_vec_idx = AW'(out_k);

  // ---------------- memory address multiplexer ----------------
  always_comb begin
    unique case (state)
      S_LOAD:  mem_addr = ld_row;
      S_OUT:   mem_addr = pv_vec_row;
      default: mem_addr = cur_row;
    endcase
  end

  // ---------------- row slot schedule ----------------
  always_comb begin
    mem_rd        = 1'b0;
    mem_wb        = 1'b0;
    reg_load      = 1'b0;
    reg_shift     = 1'b0;
    idb.m         = m_r;
    idb.x_shift   = 1'b0;
    idb.mul_clr   = 1'b0;
    idb.mul_en    = 1'b0;
    idb.c_bit     = fac[Z-1];
    idb.piv_row   = (slot == '0);
    idb.finish    = 1'b0;
    idb.r_shift   = 1'b0;
    pv_cand_valid = 1'b0;
    pv_cand_row   = cur_row;
    pv_cand_val   = po1;
    mem_ld_we     = 1'b0;
    mem_ld_col    = ld_col;
    mem_ld_data   = red_out;
    if (state == S_LOAD) begin
      mem_ld_we     = red_out_valid;
      pv_cand_valid = red_out_valid && (ld_col == '0);
      pv_cand_row   = ld_row;
      pv_cand_val   = red_out;
    end else if (state == S_ROW) begin
      mem_rd      = (32'(t) == 0);
      reg_load    = (32'(t) == 1);
      idb.x_shift = (32'(t) >= 2) && (32'(t) <= Z + 1);
      idb.mul_clr = (32'(t) == 2 * Z + 1);
      idb.mul_en  = (32'(t) >= 2 * Z + 2) && (32'(t) <= 3 * Z + 1);
      idb.finish  = (32'(t) == 3 * Z + 2);
      idb.r_shift = (32'(t) >= 3 * Z + 3) && (32'(t) <= 4 * Z + 2);
      reg_shift   = idb.x_shift || idb.r_shift;
      mem_wb      = (32'(t) == 4 * Z + 3);
      pv_cand_valid = mem_wb && !last_step;
    end else if (state == S_OUT) begin
      mem_rd   = (osub == 2'd0);
      reg_load = (osub == 2'd1);
    end
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_r        <= '0;
      m_r        <= Z'(3);
      n_elems    <= '0;
      accepted   <= '0;
      ld_row     <= '0;
      ld_col     <= '0;
      cnt        <= '0;
      step       <= '0;
      step_piv   <= '0;
      cur_row    <= '0;
      next_row   <= '0;
      slot       <= '0;
      t          <= '0;
      fac        <= '0;
      inv_r      <= '0;
      osub       <= '0;
      out_k      <= '0;
      singular_r <= 1'b0;
    end else begin
      if (inv_done) inv_r <= inv_val;

      unique case (state)
        S_IDLE, S_DONE: begin
          if (cmd_start) begin
            state      <= S_LOAD;
            n_r        <= cfg_n;
            m_r        <= cfg_m;
            n_elems    <= 32'(cfg_n) * (32'(cfg_n) + 1);
            accepted   <= '0;
            ld_row     <= '0;
            ld_col     <= '0;
            singular_r <= 1'b0;
          end
        end

        S_LOAD: begin
          if (red_in_valid && red_in_ready) accepted <= accepted + 1;
          if (red_out_valid) begin
            if (32'(ld_col) == 32'(n_r)) begin
              ld_col <= '0;
              if (32'(ld_row) == 32'(n_r) - 1) begin
                state <= S_PRE;
                cnt   <= '0;
              end
              ld_row <= ld_row + 1'b1;
            end else begin
              ld_col <= ld_col + 1'b1;
            end
          end
        end

        S_PRE: begin
          cnt <= cnt + 1;
          if (cnt == PRE_CYC - 1) begin
            state <= S_STEP;
            cnt   <= '0;
            step  <= '0;
          end
        end

        S_STEP: begin
          cnt <= cnt + 1;
          if (cnt == 0) begin
            if (!pv_found) begin
              singular_r <= 1'b1;
              state      <= S_DONE;
            end
            step_piv <= pv_row;
          end
          if (cnt == STEP_OVH_CYC - 1) begin
            state    <= S_ROW;
            slot     <= '0;
            t        <= '0;
            cur_row  <= step_piv;
            next_row <= '0;
          end
        end

        S_ROW: begin
          t <= t + 1'b1;
          if (32'(t) == 2 && slot != '0) fac <= po1;
          if (32'(t) == 2 * Z + 1 && slot == '0) fac <= inv_r;
          if (idb.mul_en) fac <= fac << 1;
          if (32'(t) == L - 1) begin
            t <= '0;
            if (last_slot) begin
              if (last_step) begin
                state <= S_POST;
              end else begin
                state <= S_STEP;
                step  <= step + 1'b1;
              end
              cnt <= '0;
            end else begin
              slot <= slot + 1'b1;
              if (next_row == step_piv) begin
                cur_row  <= next_row + 1'b1;
                next_row <= next_row + AW'(2);
              end else begin
                cur_row  <= next_row;
                next_row <= next_row + 1'b1;
              end
            end
          end
        end

        S_POST: begin
          cnt <= cnt + 1;
          if (cnt == POST_CYC - 1) begin
            state <= S_OUT;
            osub  <= '0;
            out_k <= '0;
          end
        end

        S_OUT: begin
          if (osub != 2'd2) begin
            osub <= osub + 1'b1;
          end else if (db_out_ready) begin
            osub  <= '0;
            out_k <= out_k + 1'b1;
            if (32'(out_k) == 32'(n_r) - 1) state <= S_DONE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The inverse must be ready before the pivot row is multiplied.
  a_inv_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ROW && slot == '0 && 32'(t) == 2 * Z + 1) |-> !inv_busy);
  // The determinant product of the previous step has finished.
  a_det_ready: assert property (@(posedge clk) disable iff (!rst_n)
    det_start |-> !det_busy);
  // The slot schedule needs z >= 6 to fit into 5z-2 cycles.
  if (Z < 6) begin : g_bad_z
    $error("rp_control needs Z >= 6");
  end
endmodule
