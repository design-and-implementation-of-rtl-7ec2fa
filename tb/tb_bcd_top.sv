// tb_bcd_top: end-to-end test of the whole design at its default sizes.
//
// Runs the pipelined 16-digit BCD adder and the BCD digit multiplier at the
// same time. The adder takes a new operand pair every clock: random
// operands mixed with pairs whose carry must cross the flip-flop after
// block 0, the one after block 1, or leave the top digit, and the pair
// 99..9 + 0 + 1 whose carry ripples through all sixteen digits. Each result
// is compared, one clock after its operands were captured, with integer
// addition of the decimal values. Meanwhile the multiplier steps through
// all 100 digit pairs, several times over, and is compared with X*Y split
// into tens and units. A reset in the middle of the stream must clear the
// adder output and the stream must restart cleanly after it.
//
// Counted mechanisms (each must occur at least once): carry through the
// block 0 -> 1 flip-flop, carry through the block 1 -> 2 flip-flop, carry
// out of digit 15, full 16-digit ripple, three additions in flight, reset
// clearing the pipeline, multiplier products that need a tens digit.
module tb_bcd_top;
  import bcd_tb_pkg::*;

  localparam int ND = 16;
  localparam int NCYC = 3000;
  localparam int RST_AT = 1500;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] a = '0, b = '0, s;
  logic        cin = 1'b0, cout;
  logic [3:0]  mx = '0, my = '0, mtens, munits;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_cout = 0, n_full_ripple = 0, n_inflight3 = 0;
  int n_reset = 0, n_mul_tens = 0;

  longint unsigned xa[NCYC], xb[NCYC];
  bit              xc[NCYC];

  bcd_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .s(s), .cout(cout),
    .mx(mx), .my(my), .mtens(mtens), .munits(munits)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pick(int k, output longint unsigned x, output longint unsigned y, output bit c);
    case (k % 8)
      0: begin x = pow10(ND) - 1; y = 0; c = 1; end
      1: begin x = rand_dec(ND); y = pow10(6) - x % pow10(6); c = 0; end
      2: begin x = rand_dec(5) * pow10(11) + pow10(11) - 1;
               y = rand_dec(5) * pow10(11) + pow10(6); c = 0; end
      default: begin x = rand_dec(ND); y = rand_dec(ND); c = 1'($urandom); end
    endcase
  endtask

  function automatic void check_add(int k);
    longint unsigned t, lo6, lo11;
    logic [63:0] w;
    t    = xa[k] + xb[k] + longint'(xc[k]);
    w    = to_bcd(t % pow10(ND), ND);
    lo6  = xa[k] % pow10(6) + xb[k] % pow10(6) + longint'(xc[k]);
    lo11 = xa[k] % pow10(11) + xb[k] % pow10(11) + longint'(xc[k]);
    checks++;
    if (s !== w || cout !== (t >= pow10(ND))) begin
      failures++;
      if (failures < 10)
        $display("FAIL add slot %0d: %0d+%0d+%0d got %h/%0b want %h", k, xa[k], xb[k], xc[k], s, cout, w);
    end
    if (lo6 >= pow10(6)) n_c1++;
    if (lo11 >= pow10(11)) n_c2++;
    if (t >= pow10(ND)) n_cout++;
    if (xa[k] == pow10(ND) - 1 && xb[k] == 0 && xc[k]) n_full_ripple++;
  endfunction

  function automatic void check_mul();
    int p;
    p = int'(mx) * int'(my);
    checks++;
    if (mtens !== 4'(p / 10) || munits !== 4'(p % 10)) begin
      failures++;
      if (failures < 10) $display("FAIL mul %0d*%0d got %0d%0d", mx, my, mtens, munits);
    end
    if (p >= 10) n_mul_tens++;
  endfunction

  task automatic check_reset();
    checks++;
    if (s !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL reset: s=%h cout=%0b", s, cout);
    end else n_reset++;
  endtask

  initial begin
    int since_rst;
    a = '1; b = '1; cin = 1'b1;
    repeat (3) @(posedge clk);
    #1 check_reset();
    @(negedge clk);
    rst_n = 1'b1;
    since_rst = 0;
    for (int k = 0; k < NCYC; k++) begin
      longint unsigned x, y;
      bit c;
      if (k == RST_AT) begin
        // reset in mid-stream; the pair applied here is lost on purpose
        rst_n = 1'b0;
        @(posedge clk);
        @(posedge clk);
        #1 check_reset();
        @(negedge clk);
        rst_n = 1'b1;
        since_rst = 0;
      end
      pick(k, x, y, c);
      x = x % pow10(ND); y = y % pow10(ND);
      xa[k] = x; xb[k] = y; xc[k] = c;
      a = to_bcd(x, ND); b = to_bcd(y, ND); cin = c;
      mx = 4'((k / 10) % 10); my = 4'(k % 10);
      #1 check_mul();
      @(posedge clk);
      #1;
      if (since_rst >= 1) check_add(k - 1);
      if (since_rst >= 2) n_inflight3++;
      since_rst++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 check_add(NCYC - 1);
    $display("carry FF0=%0d FF1=%0d cout=%0d full ripple=%0d three in flight=%0d resets=%0d products>=10=%0d",
             n_c1, n_c2, n_cout, n_full_ripple, n_inflight3, n_reset, n_mul_tens);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_cout == 0 || n_full_ripple == 0 ||
        n_inflight3 == 0 || n_reset < 2 || n_mul_tens == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
