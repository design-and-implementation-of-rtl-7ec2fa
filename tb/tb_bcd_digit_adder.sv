// tb_bcd_digit_adder: exhaustive check of the one-digit BCD adder.
//
// All 200 combinations of BCD digits a, b (0..9) and cin. The expected
// digit and carry are (a+b+cin) mod 10 and (a+b+cin) >= 10. Also counts
// how many cases take the +6 correction path (binary sum above 9) and how
// many of those come from the binary adder's own carry (sum 16..19), and
// fails if either path was never exercised.
module tb_bcd_digit_adder;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  int n_corr = 0, n_bincarry = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int c = 0; c < 2; c++) begin
          int t;
          t = i + j + c;
          a = 4'(i); b = 4'(j); cin = c[0];
          #1;
          checks++;
          if (sum != 4'(t % 10) || cout != (t >= 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> cout=%0b sum=%0d (want %0d)", i, j, c, cout, sum, t);
          end
          if (t >= 10) n_corr++;
          if (t >= 16) n_bincarry++;
        end
    checks++;
    if (n_corr == 0 || n_bincarry == 0) failures++;
    $display("correction cases=%0d, of which binary carry=%0d", n_corr, n_bincarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
