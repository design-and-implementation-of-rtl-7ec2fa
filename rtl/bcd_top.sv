// bcd_top: the pipelined 64-bit BCD adder and the BCD digit multiplier.
//
// The two units are independent and stand side by side, each with its own
// ports; no connection between them is defined.
//
// Adder: clk, rst_n (synchronous, active low), a, b (16 packed BCD digits),
// cin -> s, cout valid after the rising edge following the one that
// captured the operands; one new addition per clock.
// Multiplier: mx, my (BCD digits) -> mtens, munits, combinational.
module bcd_top
  import bcd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] s,
  output logic        cout,
  input  bcd_digit_t  mx,
  input  bcd_digit_t  my,
  output bcd_digit_t  mtens,
  output bcd_digit_t  munits
);

  bcd64_pipelined u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

  bcd_digit_mult u_mul (
    .x    (mx),
    .y    (my),
    .tens (mtens),
    .units(munits)
  );

endmodule
