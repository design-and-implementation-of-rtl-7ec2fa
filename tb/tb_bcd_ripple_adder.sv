// tb_bcd_ripple_adder: checks the chained BCD adder at 6 digits (the first
// pipeline block) and at 16 digits (the unpipelined 64-bit adder).
//
// Random BCD operands plus the corner cases 0+0, 99..9 + 0 + 1 (a carry
// that ripples through every digit) and 99..9 + 99..9 + 1. Expected sum and
// carry come from integer addition of the decimal values.
module tb_bcd_ripple_adder;
  import bcd_tb_pkg::*;

  localparam int N6 = 6, N16 = 16;

  logic [4*N6-1:0]  a6, b6, s6;
  logic [4*N16-1:0] a16, b16, s16;
  logic             ci6, co6, ci16, co16;
  int checks = 0, failures = 0;

  bcd_ripple_adder dut6 (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));
  bcd_ripple_adder #(.DIGITS(N16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint unsigned x6, longint unsigned y6, bit c6,
                     longint unsigned x16, longint unsigned y16, bit c16);
    longint unsigned t6, t16;
    logic [63:0] w6, w16;
    a6 = to_bcd(x6, N6)[4*N6-1:0];   b6 = to_bcd(y6, N6)[4*N6-1:0];   ci6 = c6;
    a16 = to_bcd(x16, N16);          b16 = to_bcd(y16, N16);          ci16 = c16;
    #1;
    t6  = x6 + y6 + longint'(c6);
    t16 = x16 + y16 + longint'(c16);
    w6  = to_bcd(t6 % pow10(N6), N6);
    w16 = to_bcd(t16 % pow10(N16), N16);
    checks++;
    if (s6 != w6[4*N6-1:0] || co6 != (t6 >= pow10(N6))) begin
      failures++;
      $display("FAIL 6-digit %0d+%0d+%0d", x6, y6, c6);
    end
    checks++;
    if (s16 != w16 || co16 != (t16 >= pow10(N16))) begin
      failures++;
      $display("FAIL 16-digit %0d+%0d+%0d", x16, y16, c16);
    end
  endtask

  initial begin
    run(0, 0, 0, 0, 0, 0);
    run(pow10(N6) - 1, 0, 1, pow10(N16) - 1, 0, 1);
    run(pow10(N6) - 1, pow10(N6) - 1, 1, pow10(N16) - 1, pow10(N16) - 1, 1);
    for (int k = 0; k < 3000; k++)
      run(rand_dec(N6), rand_dec(N6), 1'($urandom),
          rand_dec(N16), rand_dec(N16), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
