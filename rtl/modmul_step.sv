// modmul_step: one step of MSB-first interleaved modular multiplication.
//
// Computes nxt = (2*acc + b*y) mod m with two conditional subtractions.
// Operands must already be reduced (acc < m, y < m) and m must be odd and at
// least 3. Repeating the step over the bits of a multiplier c, most
// significant bit first and starting from acc = 0, leaves acc = c*y mod m; with
// y = 1 the same step shifts a bit string into a residue (2*acc + b mod m).
// Purely combinational. Shared by the arithmetic units, the determinant unit
// and the input reduction unit. The original design does not describe its
// arithmetic; this method is this design's choice.
module modmul_step #(
  parameter int unsigned Z = 24
) (
  input  logic [Z-1:0] acc,
  input  logic [Z-1:0] y,
  input  logic [Z-1:0] m,
  input  logic         b,
  output logic [Z-1:0] nxt
);
  logic [Z:0] dbl, sum;

  always_comb begin
    dbl = {acc, 1'b0};
    if (dbl >= {1'b0, m}) dbl = dbl - {1'b0, m};
    sum = dbl + (b ? {1'b0, y} : '0);
    if (sum >= {1'b0, m}) sum = sum - {1'b0, m};
    nxt = sum[Z-1:0];
  end
endmodule
