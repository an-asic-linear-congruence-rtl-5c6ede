// input_reducer: modulo reduction of the input matrix elements.
//
// Every matrix element arrives as a signed q*z-bit integer (two's complement)
// and is reduced to a residue in [0, m) before it is stored. The unit takes
// the magnitude and shifts it into a residue MSB first, r = (2r + bit) mod m,
// BPC bits per clock cycle, so an element takes ceil(q*z / BPC) cycles after
// start; a negative input then becomes m - r. in_ready is high when idle; an
// element is taken on in_valid && in_ready; out_valid pulses for one cycle
// with the residue on out. m must be odd and at least 3. The reduction and the
// q*z-bit input word follow the document; the serial method and BPC are this
// design's choice.
module input_reducer #(
  parameter int unsigned Z   = 24,
  parameter int unsigned Q   = 3,
  parameter int unsigned BPC = 8,
  localparam int unsigned W  = Q * Z
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Z-1:0] m,
  input  logic [W-1:0] in,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [Z-1:0] out,
  output logic         out_valid
);
  localparam int unsigned STEPS = (W + BPC - 1) / BPC;
  localparam int unsigned WP    = STEPS * BPC;   // padded width
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic [WP-1:0] mag;
  logic [Z-1:0]  r;
  logic [Z-1:0]  chain [BPC+1];
  logic [CW-1:0] cnt;
  logic          neg, busy;
  logic [W-1:0]  abs_in;

  assign abs_in   = in[W-1] ? (~in + 1'b1) : in;
  assign in_ready = !busy;

  assign chain[0] = r;
  for (genvar k = 0; k < BPC; k++) begin : g_bit
    modmul_step #(.Z(Z)) u_step (
      .acc(chain[k]), .y(Z'(1)), .m(m), .b(mag[WP-1-k]), .nxt(chain[k+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      mag       <= '0;
      r         <= '0;
      cnt       <= '0;
      neg       <= 1'b0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          mag  <= WP'(abs_in);
          neg  <= in[W-1];
          r    <= '0;
          cnt  <= '0;
        end
      end else begin
        r   <= chain[BPC];
        mag <= mag << BPC;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(STEPS - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out       <= (neg && chain[BPC] != '0) ? m - chain[BPC] : chain[BPC];
        end
      end
    end
  end
endmodule
