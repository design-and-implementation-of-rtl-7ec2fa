// bcd_pkg: types shared by the BCD arithmetic blocks.
//
// A BCD digit is four bits weighted 8-4-2-1 holding 0..9. Multi-digit
// numbers are packed with digit 0 (least significant) in bits 3:0,
// digit i in bits 4i+3:4i.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  // Number of digits in the 64-bit operands of the pipelined adder.
  localparam int unsigned WORD_DIGITS = 16;

endpackage
