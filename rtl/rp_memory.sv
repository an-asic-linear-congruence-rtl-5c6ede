// rp_memory: the matrix memory of the residual processor.
//
// Holds the augmented matrix (A|b) mod m as NC = N_MAX + 1 columns. Each
// column is an SRAM block (sram_column) with its own column register
// (column_reg). All columns share one row address, so a read fetches a whole
// matrix row at once and a write-back stores a whole row at once; this is
// what lets every arithmetic unit work on its own column in parallel.
//
// Row operations: rd_en reads row addr into every SRAM output (one cycle
// later), reg_load copies the SRAM outputs into the column registers,
// reg_shift shifts every column register by one bit (SO_j out, SI_j in), and
// wb_en writes every column register back to row addr. Host loading writes one
// word ld_data to column ld_col, row addr, with ld_we; it has priority over a
// write-back in the same cycle. The first column's register is visible in
// parallel on po1 (PO_1). Column j of the ports is column j+1 of the matrix.
module rp_memory #(
  parameter int unsigned N_MAX = 1000,
  parameter int unsigned Z     = 24,
  localparam int unsigned NC   = N_MAX + 1,
  localparam int unsigned AW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned CW   = $clog2(NC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr,
  input  logic          rd_en,
  input  logic          wb_en,
  input  logic          ld_we,
  input  logic [CW-1:0] ld_col,
  input  logic [Z-1:0]  ld_data,
  input  logic          reg_load,
  input  logic          reg_shift,
  input  logic [NC-1:0] si,
  output logic [NC-1:0] so,
  output logic [Z-1:0]  po1
);
  for (genvar j = 0; j < NC; j++) begin : g_col
    logic         ld_here, ce, we;
    logic [Z-1:0] din, dout, q;

    assign ld_here = ld_we && (ld_col == CW'(j));
    assign ce      = rd_en || wb_en || ld_here;
    assign we      = wb_en || ld_here;
    assign din     = ld_here ? ld_data : q;

    sram_column #(.WORDS(N_MAX), .Z(Z)) u_sram (
      .clk, .ce, .we, .addr, .din, .dout
    );

    column_reg #(.Z(Z)) u_reg (
      .clk, .rst_n, .load(reg_load), .d(dout), .shift(reg_shift),
      .si(si[j]), .so(so[j]), .po(q)
    );

    if (j == 0) begin : g_po1
      assign po1 = q;
    end
  end
endmodule
