// bcd_digit_mult: multiplies two BCD digits into a two-digit BCD product.
//
// X * Y = 10*B + C with X, Y in 0..9 and the product in 0..81. Rather than
// a 256-entry table, a standard 4x4 unsigned binary multiplier produces
// the binary product p6..p0 (p7 is always zero for BCD inputs and is
// dropped), and a binary-to-BCD correction turns it into the tens digit B
// and the units digit C. Combinational.
//
// Ports: x, y (BCD digits) -> tens (B), units (C).
// The multiplier-plus-correction structure follows the design; the
// particular correction circuit (shift-and-add-3) is this implementation's
// choice. Inputs above 9 are not detected. Bit 7 of the binary product is
// left unused on purpose (zero for every BCD input), which lint reports.
module bcd_digit_mult
  import bcd_pkg::*;
(
  input  bcd_digit_t x,
  input  bcd_digit_t y,
  output bcd_digit_t tens,
  output bcd_digit_t units
);

  logic [7:0] p;

  mult4x4 u_mul (
    .x(x),
    .y(y),
    .p(p)
  );

  bin2bcd_product u_conv (
    .p    (p[6:0]),
    .tens (tens),
    .units(units)
  );

endmodule
