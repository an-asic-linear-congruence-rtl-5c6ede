// arith_unit: one arithmetic unit AU_j of the residual processor.
//
// AU_j reads column j of the current row serially from SO_j and writes its
// result serially to SI_{j-1}, one column to the left. Every elimination step
// therefore shifts the matrix one column left, so the pivot column is always
// the first column and the eliminated column drops out. The rightmost AU has
// no column to read (so_in tied to 0) and fills the freed last column with 0.
//
// For the pivot row p of a step it scales: r = c * a_pj mod m with
// c = a_p1^-1, and keeps r as its pivot-row value P. For every other row i
// it eliminates: r = a_ij - c * P mod m with c = a_i1. The multiplication is
// bit-serial, one bit of c per mul_en cycle, MSB first (interleaved modular
// multiplication), z cycles per product. All strobes come over the shared
// IDB_IN bus (rp_idb_if); see that file for their meaning. Timing: z cycles
// of x_shift, z cycles of mul_en, one finish cycle, z cycles of r_shift.
// The serial SO/SI connections and the left shift by one column follow the
// block diagram's numbering (AU_2..AU_{n+2} between SO_2..SO_{n+1} and
// SI_1..SI_{n+1}); the arithmetic inside is this design's own.
module arith_unit #(
  parameter int unsigned Z = 24
) (
  input  logic clk,
  input  logic rst_n,
  rp_idb_if.au idb,
  input  logic so_in,    // SO_j
  output logic si_out    // to SI_{j-1}
);
  logic [Z-1:0] x, p, acc, r, acc_nxt, y;
  logic [Z:0]   diff;

  assign y = idb.piv_row ? x : p;

  modmul_step #(.Z(Z)) u_step (
    .acc(acc), .y(y), .m(idb.m), .b(idb.c_bit), .nxt(acc_nxt)
  );

  // x - acc mod m
  always_comb begin
    diff = {1'b0, x} - {1'b0, acc};
    if (diff[Z]) diff = diff + {1'b0, idb.m};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x   <= '0;
      p   <= '0;
      acc <= '0;
      r   <= '0;
    end else begin
      if (idb.x_shift) x <= {x[Z-2:0], so_in};
      if (idb.mul_clr)     acc <= '0;
      else if (idb.mul_en) acc <= acc_nxt;
      if (idb.finish) begin
        if (idb.piv_row) begin
          p <= acc;
          r <= acc;
        end else begin
          r <= diff[Z-1:0];
        end
      end else if (idb.r_shift) begin
        r <= {r[Z-2:0], 1'b0};
      end
    end
  end

  assign si_out = r[Z-1];
endmodule
