// rp_idb_if: the internal data bus IDB_IN from the control unit to all
// arithmetic units.
//
// Every AU listens to the same bus, so one interface instance is shared by the
// whole AU array. It carries the modulus, the row multiplier one bit per cycle
// (c_bit, MSB first) and the strobes of the row-slot schedule:
//   x_shift  take one bit of the column word from SO_j into the AU
//   mul_clr  clear the product accumulator
//   mul_en   one multiplication step with c_bit
//   piv_row  the current row is the pivot row (scale instead of eliminate)
//   finish   form the result and keep it for shifting out
//   r_shift  shift one result bit out towards SI_{j-1}
// The bus contents are this design's choice; the block diagram only shows
// that such a bus joins the control unit and the AUs.
interface rp_idb_if #(
  parameter int unsigned Z = 24
);
  logic [Z-1:0] m;
  logic         x_shift;
  logic         mul_clr;
  logic         mul_en;
  logic         c_bit;
  logic         piv_row;
  logic         finish;
  logic         r_shift;

  modport ctrl (output m, x_shift, mul_clr, mul_en, c_bit, piv_row, finish, r_shift);
  modport au   (input  m, x_shift, mul_clr, mul_en, c_bit, piv_row, finish, r_shift);
endinterface
