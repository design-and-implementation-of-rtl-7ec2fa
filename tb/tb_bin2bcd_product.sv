// tb_bin2bcd_product: checks the product-to-BCD converter for every value
// 0..81 against tens = p / 10 and units = p % 10.
module tb_bin2bcd_product;

  logic [6:0] p;
  logic [3:0] tens, units;
  int checks = 0, failures = 0;

  bin2bcd_product dut (.p(p), .tens(tens), .units(units));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 81; v++) begin
      p = 7'(v);
      #1;
      checks++;
      if (tens != 4'(v / 10) || units != 4'(v % 10)) begin
        failures++;
        $display("FAIL %0d -> %0d%0d", v, tens, units);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
