// tb_bcd_digit_mult: exhaustive check of the BCD digit multiplier.
//
// All 100 digit pairs; expected B = (X*Y)/10 and C = (X*Y)%10.
module tb_bcd_digit_mult;

  logic [3:0] x, y, tens, units;
  int checks = 0, failures = 0;

  bcd_digit_mult dut (.x(x), .y(y), .tens(tens), .units(units));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        x = 4'(i); y = 4'(j);
        #1;
        checks++;
        if (tens != 4'((i * j) / 10) || units != 4'((i * j) % 10)) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d%0d", i, j, tens, units);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
