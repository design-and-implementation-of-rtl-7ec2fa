// bcd_digit_adder: one-digit BCD adder with a single binary adder.
//
// A conventional BCD digit adder adds the two digits in binary and then,
// when the binary sum exceeds 9, adds 0110 with a second 4-bit adder. Here
// the second adder is replaced by a few gates: because the correction
// constant is always 0000 or 0110, its effect on each sum bit is fixed.
//
//   cc     = Co | (S3 & S2) | (S3 & S1)        binary sum > 9
//   Sum0   = S0
//   Sum1   = S1 ^ cc
//   Sum2   = (cc & ~S1) ^ S2
//   Sum3   = (cc & (S1 | S2)) ^ S3
//   cout   = cc
//
// Sum3 takes the carry that adding 0110 sends into bit 3, which is
// S1 | S2; the gate budget of the design (three XOR, two AND, one OR, one
// NOT after the binary adder) matches this form.
//
// Ports: a, b (BCD digits 0..9), cin -> sum (BCD digit), cout.
// Combinational. The carry in, which lets digits be chained, is this
// design's addition to the single-digit circuit; inputs above 9 are not
// detected.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);

  logic [3:0] s;
  logic       co;
  logic       cc;

  rca4 u_bin (
    .x (a),
    .y (b),
    .ci(cin),
    .s (s),
    .co(co)
  );

  always_comb begin
    cc     = co | (s[3] & s[2]) | (s[3] & s[1]);
    sum[0] = s[0];
    sum[1] = s[1] ^ cc;
    sum[2] = (cc & ~s[1]) ^ s[2];
    sum[3] = (cc & (s[1] | s[2])) ^ s[3];
    cout   = cc;
  end

endmodule
