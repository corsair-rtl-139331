// corsair_mac: the multiply and double-accumulate unit of the cell.
//
// Computes p = x*y + a + b for 8-bit x, y, a, b. Because
// (2^8-1)^2 + 2*(2^8-1) = 2^16-1, the sum always fits in 16 bits, so no carry
// is lost: the high byte is fed back as the next carry and the low byte is a
// result or pending byte. Purely combinational; the cell completes one such
// step in every bus cycle. The unit follows the described design; its
// description as a single expression is left to synthesis.
module corsair_mac
  import corsair_pkg::*;
(
  input  byte_t       x,
  input  byte_t       y,
  input  byte_t       a,
  input  byte_t       b,
  output logic [15:0] p
);
  always_comb p = 16'(x * y) + 16'(a) + 16'(b);
endmodule
