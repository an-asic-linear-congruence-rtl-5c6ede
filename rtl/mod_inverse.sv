// mod_inverse: the inversion unit INV, a^-1 mod m for an odd modulus m.
//
// Binary extended Euclidean algorithm. It keeps u = x1*a and v = x2*a (mod m),
// starting from u = a, x1 = 1, v = m, x2 = 0, and every cycle does one of:
// halve an even u (or v) and halve its coefficient mod m; or, with both odd,
// replace the larger by half the difference and do the same to the
// coefficients. Each cycle removes at least one bit from u or v, so the
// answer (x1 when u = 1, x2 when v = 1) is ready at most 2z + 1 cycles after
// start. a must be non-zero and below m, and gcd(a, m) = 1 (m prime).
// start is taken when idle; done pulses for one cycle with inv valid and inv
// holds until the next start. The document names the unit and its job; the
// algorithm is this design's choice.
module mod_inverse #(
  parameter int unsigned Z = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Z-1:0] a,
  input  logic [Z-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [Z-1:0] inv
);
  logic [Z-1:0] u, v, x1, x2, mr;

  // (x / 2) mod mr for x < mr, mr odd
  function automatic logic [Z-1:0] half_mod(logic [Z-1:0] x, logic [Z-1:0] mod);
    logic [Z:0] t;
    t = x[0] ? ({1'b0, x} + {1'b0, mod}) : {1'b0, x};
    t = t >> 1;
    return t[Z-1:0];
  endfunction

  // (x - y) mod mr for x, y < mr
  function automatic logic [Z-1:0] sub_mod(logic [Z-1:0] x, logic [Z-1:0] y, logic [Z-1:0] mod);
    logic [Z:0] t;
    t = {1'b0, x} - {1'b0, y};
    if (t[Z]) t = t + {1'b0, mod};
    return t[Z-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      inv  <= '0;
      u    <= '0;
      v    <= '0;
      x1   <= '0;
      x2   <= '0;
      mr   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          u    <= a;
          v    <= m;
          x1   <= Z'(1);
          x2   <= '0;
          mr   <= m;
        end
      end else if (u == Z'(1)) begin
        inv  <= x1;
        done <= 1'b1;
        busy <= 1'b0;
      end else if (v == Z'(1)) begin
        inv  <= x2;
        done <= 1'b1;
        busy <= 1'b0;
      end else if (!u[0]) begin
        u  <= u >> 1;
        x1 <= half_mod(x1, mr);
      end else if (!v[0]) begin
        v  <= v >> 1;
        x2 <= half_mod(x2, mr);
      end else if (u >= v) begin
        u  <= (u - v) >> 1;
        x1 <= half_mod(sub_mod(x1, x2, mr), mr);
      end else begin
        v  <= (v - u) >> 1;
        x2 <= half_mod(sub_mod(x2, x1, mr), mr);
      end
    end
  end
endmodule
