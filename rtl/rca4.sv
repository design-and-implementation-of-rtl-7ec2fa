// rca4: 4-bit binary ripple-carry adder.
//
// The single binary adder inside the one-digit BCD adder. Four full adders
// in a chain; bit k produces s[k] = x^y^c and passes the majority of
// (x, y, c) on as the next carry. Purely combinational.
//
// Ports: x, y (4 bits), ci -> s (4 bits), co.
// The ripple structure is this design's choice for the "binary adder"
// block of the proposed digit adder, matching the gate count the design's
// comparison assumes for a ripple adder.
module rca4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);

  logic [4:0] c;

  assign c[0] = ci;

  for (genvar k = 0; k < 4; k++) begin : g_fa
    assign s[k]   = x[k] ^ y[k] ^ c[k];
    assign c[k+1] = (x[k] & y[k]) | (x[k] & c[k]) | (y[k] & c[k]);
  end

  assign co = c[4];

endmodule
