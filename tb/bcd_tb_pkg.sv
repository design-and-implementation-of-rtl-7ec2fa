// bcd_tb_pkg: reference helpers for the BCD testbenches.
//
// Converts between ordinary binary integers and packed BCD (digit 0 in
// bits 3:0) by repeated division by ten, so that expected results are
// computed with plain integer arithmetic, independently of the adders and
// converters under test.
package bcd_tb_pkg;

  // Packs the low `digits` decimal digits of v into BCD.
  function automatic logic [63:0] to_bcd(longint unsigned v, int digits);
    logic [63:0] r = '0;
    for (int i = 0; i < digits; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // Value of a packed BCD number of `digits` digits.
  function automatic longint unsigned from_bcd(logic [63:0] d, int digits);
    longint unsigned r = 0;
    for (int i = digits - 1; i >= 0; i--)
      r = r * 10 + longint'(d[4*i +: 4]);
    return r;
  endfunction

  // Random value with `digits` decimal digits, each digit drawn 0..9.
  function automatic longint unsigned rand_dec(int digits);
    longint unsigned r = 0;
    for (int i = 0; i < digits; i++)
      r = r * 10 + longint'($urandom_range(9, 0));
    return r;
  endfunction

  // 10**n as an unsigned 64-bit value (n <= 19).
  function automatic longint unsigned pow10(int n);
    longint unsigned r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction

endpackage
