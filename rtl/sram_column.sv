// sram_column: one SRAM block of the matrix memory, holding one column
// a_{1,j} .. a_{n,j} of the augmented matrix.
//
// The matrix memory is built from one synchronous single-port RAM per column,
// as the RP's memory is built from compiler-generated SRAM macros sized for
// the maximum dimension. This model stands for such a macro: one port, a
// chip enable and a write enable; a read returns the word on the clock edge
// after the address (read latency 1); a write stores din at addr and leaves
// dout unchanged. The contents are not reset. The macro's exact pin list is
// not known, so these ports are this design's choice.
module sram_column #(
  parameter int unsigned WORDS = 1000,
  parameter int unsigned Z     = 24,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          ce,    // access this cycle
  input  logic          we,    // 1: write din, 0: read into dout
  input  logic [AW-1:0] addr,
  input  logic [Z-1:0]  din,
  output logic [Z-1:0]  dout
);
  logic [Z-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= din;
      else    dout      <= mem[addr];
    end
  end
endmodule
