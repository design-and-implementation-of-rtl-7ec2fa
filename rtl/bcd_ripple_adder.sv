// bcd_ripple_adder: multi-digit BCD adder built from digit adders in series.
//
// DIGITS one-digit BCD adders are chained, the decimal carry of digit i
// feeding the carry in of digit i+1. The default of six digits is the first
// (24-bit) combinational block of the pipelined 64-bit adder; five digits
// gives its two other blocks, and sixteen digits the plain, unpipelined
// 64-bit adder. Combinational; the delay grows with DIGITS through the
// carry chain.
//
// Ports: a, b (DIGITS packed BCD digits, digit 0 in bits 3:0), cin
//        -> sum (DIGITS digits), cout (carry out of the top digit).
module bcd_ripple_adder #(
  parameter int unsigned DIGITS = 6
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);

  logic [DIGITS:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_digit_adder u_digit (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .sum (sum[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  assign cout = c[DIGITS];

endmodule
