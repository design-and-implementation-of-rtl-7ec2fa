// mult4x4: unsigned 4x4 binary multiplier.
//
// Forms the sixteen partial-product bits x[i] & y[j], each of weight
// 2^(i+j), arranged as four rows shifted by one place per multiplier bit,
// and adds the rows into the 8-bit product p. Which reduction scheme to
// use is left open by the design; here the rows are summed by plain
// carry-propagate additions. Combinational.
//
// Ports: x, y (4 bits) -> p (8 bits). For BCD digit inputs (0..9) the
// product is at most 81, so p[7] is always 0.
module mult4x4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);

  // pp[j] is the row x & y[j], already shifted to weight 2^j.
  logic [7:0] pp [4];

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      pp[j] = '0;
      for (int i = 0; i < 4; i++)
        pp[j][i+j] = x[i] & y[j];
    end
    p = (pp[0] + pp[1]) + (pp[2] + pp[3]);
  end

endmodule
