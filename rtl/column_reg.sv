// column_reg: the column register REG_j between an SRAM block and the
// arithmetic units.
//
// It is a z-bit register with a parallel load from the SRAM block and a
// serial shift. While shifting, the most significant bit leaves on the serial
// output SO_j and the serial input SI_j enters at the least significant bit,
// so z shift cycles move the old word out and a new word in, MSB first. The
// parallel output po (PO_1 for the first column) shows the register at all
// times and is also the data written back to the SRAM block. A load takes
// priority over a shift. Reset clears it. The register's role (parallel side
// to the SRAM, serial side to the AUs) follows the block diagram; the
// shift order and priority are this design's choice.
module column_reg #(
  parameter int unsigned Z = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // parallel load from d
  input  logic [Z-1:0] d,
  input  logic         shift,  // shift one bit: out at MSB, in at LSB
  input  logic         si,
  output logic         so,
  output logic [Z-1:0] po
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     po <= '0;
    else if (load)  po <= d;
    else if (shift) po <= {po[Z-2:0], si};
  end

  assign so = po[Z-1];
endmodule
