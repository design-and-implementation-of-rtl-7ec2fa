// tb_rca4: exhaustive check of the 4-bit ripple-carry adder.
//
// Applies all 512 combinations of x, y and ci and compares {co, s} with the
// integer sum x + y + ci.
module tb_rca4;

  logic [3:0] x, y, s;
  logic       ci, co;
  int checks = 0, failures = 0;

  rca4 dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          x = 4'(i); y = 4'(j); ci = c[0];
          #1;
          checks++;
          if ({co, s} != 5'(i + j + c)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> co=%0b s=%0d", i, j, c, co, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
