// pivot_unit: zero detect, pivot found flag, pivot index, pivot flags and
// pivot index vector of the residual processor.
//
// The pivot for the next elimination step is searched on the fly: whenever a
// new value is written into the first matrix column (while loading, or while
// a step writes back a row), the control unit offers it as a candidate. The
// zero detect takes the first candidate that is non-zero and whose row has
// not been a pivot row yet (its pivot flag is clear); its row becomes the
// pivot index and its value is kept for the inversion and determinant units.
// accept, given at the start of a step, sets that row's pivot flag, stores
// the row in the pivot index vector at position step (so the solution can be
// read out in unknown order later) and re-arms the search. perm_odd tells
// whether an odd number of earlier pivot rows have a larger
// row index than the current pivot row, which is the parity that step adds to
// the row permutation (used for the sign of the determinant). clear resets
// the flags and the search before a new problem. The vector is read
// combinationally at vec_idx. The block names follow the block diagram; how
// the search works is this design's choice.
module pivot_unit #(
  parameter int unsigned N_MAX = 1000,
  parameter int unsigned Z     = 24,
  localparam int unsigned AW   = (N_MAX > 1) ? $clog2(N_MAX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          cand_valid,
  input  logic [AW-1:0] cand_row,
  input  logic [Z-1:0]  cand_val,
  input  logic          accept,
  input  logic [AW-1:0] step,
  input  logic [AW-1:0] vec_idx,
  output logic [AW-1:0] vec_row,
  output logic          found,
  output logic [AW-1:0] pivot_row,
  output logic [Z-1:0]  pivot_val,
  output logic          perm_odd
);
  logic [N_MAX-1:0] flags;
  logic [AW-1:0]    vec [N_MAX];
  logic             zero_n;

  assign zero_n  = |cand_val;
  assign vec_row = vec[vec_idx];

  // parity of flagged rows with an index above pivot_row
  always_comb begin
    perm_odd = 1'b0;
    for (int unsigned i = 0; i < N_MAX; i++) begin
      if (i > 32'(pivot_row)) perm_odd = perm_odd ^ flags[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags     <= '0;
      found     <= 1'b0;
      pivot_row <= '0;
      pivot_val <= '0;
    end else if (clear) begin
      flags <= '0;
      found <= 1'b0;
    end else if (accept) begin
      flags[pivot_row] <= 1'b1;
      found            <= 1'b0;
    end else if (cand_valid && !found && zero_n && !flags[cand_row]) begin
      found     <= 1'b1;
      pivot_row <= cand_row;
      pivot_val <= cand_val;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) vec[step] <= pivot_row;
  end
endmodule
