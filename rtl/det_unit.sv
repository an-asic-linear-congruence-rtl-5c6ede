// det_unit: the determinant unit (AU_D / DET) of the residual processor.
//
// det(A) mod m is the product of the pivots met during Gauss-Jordan
// elimination with normalised pivot rows, times the sign of the row
// permutation the pivot choice makes. clear sets the running product to 1 and
// the sign to +. Each mul_start (taken when idle) multiplies the product by
// pivot, bit-serially over z cycles (MSB first, the same interleaved modular
// multiplication as the AUs), and toggles the sign when perm_odd is set
// (perm_odd: the step added an odd number of inversions to the permutation).
// det shows the signed result, m - product for a negative sign, and 0 when
// zero is set (singular matrix). The unit's name and job follow the
// document; the way it is computed is this design's choice.
module det_unit #(
  parameter int unsigned Z = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Z-1:0] m,
  input  logic         clear,
  input  logic         mul_start,
  input  logic [Z-1:0] pivot,
  input  logic         perm_odd,
  input  logic         zero,
  output logic         busy,
  output logic [Z-1:0] det
);
  localparam int unsigned CW = $clog2(Z + 1);

  logic [Z-1:0]  prod, acc, acc_nxt, opnd;
  logic [CW-1:0] cnt;
  logic          neg;

  modmul_step #(.Z(Z)) u_step (
    .acc(acc), .y(prod), .m(m), .b(opnd[Z-1]), .nxt(acc_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod <= Z'(1);
      acc  <= '0;
      opnd <= '0;
      cnt  <= '0;
      neg  <= 1'b0;
      busy <= 1'b0;
    end else if (clear) begin
      prod <= Z'(1);
      neg  <= 1'b0;
      busy <= 1'b0;
    end else if (!busy) begin
      if (mul_start) begin
        busy <= 1'b1;
        acc  <= '0;
        opnd <= pivot;
        cnt  <= '0;
        neg  <= neg ^ perm_odd;
      end
    end else begin
      acc  <= acc_nxt;
      opnd <= opnd << 1;
      cnt  <= cnt + 1'b1;
      if (cnt == CW'(Z - 1)) begin
        prod <= acc_nxt;
        busy <= 1'b0;
      end
    end
  end

  always_comb begin
    if (zero)                   det = '0;
    else if (neg && prod != '0) det = m - prod;
    else                        det = prod;
  end
endmodule
