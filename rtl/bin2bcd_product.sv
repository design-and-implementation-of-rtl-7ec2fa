// bin2bcd_product: converts a binary digit product (0..81) to two BCD digits.
//
// Shift-and-add-3: the seven product bits are shifted, most significant
// first, into a two-digit BCD register; before each shift, any digit of 5
// or more has 3 added so that the doubling carries correctly into the next
// decimal place. After seven shifts the register holds tens (B) and units
// (C) with p = 10*B + C. The document asks only that the binary product be
// corrected to two BCD digits of the same value; this converter is the
// implementation's choice. Combinational (the loop unrolls into logic).
//
// Ports: p (7 bits, 0..81) -> tens, units (BCD digits). units[0] is p[0]
// itself: ten is even, so no correction ever touches the lowest bit.
module bin2bcd_product
  import bcd_pkg::*;
(
  input  logic [6:0] p,
  output bcd_digit_t tens,
  output bcd_digit_t units
);

  logic [7:0] bcd;  // {tens, units}

  always_comb begin
    bcd = '0;
    for (int k = 6; k >= 0; k--) begin
      if (bcd[3:0] >= 4'd5) bcd[3:0] = bcd[3:0] + 4'd3;
      if (bcd[7:4] >= 4'd5) bcd[7:4] = bcd[7:4] + 4'd3;
      bcd = {bcd[6:0], p[k]};
    end
    tens  = bcd[7:4];
    units = bcd[3:0];
  end

endmodule
