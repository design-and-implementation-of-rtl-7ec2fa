// tb_bcd64_pipelined: streams additions through the pipelined 16-digit adder.
//
// A new operand pair is applied every clock (on the falling edge). After
// each rising edge the output is compared with the integer sum of the pair
// captured at the rising edge before, which checks both the value and the
// latency (operands captured at edge n, result valid after edge n+1); any
// other latency fails because consecutive sums differ. The stream mixes random operands with pairs whose carry must
// cross one or both inter-block flip-flops (digit 5 -> 6, digit 10 -> 11)
// or leave digit 15, and the testbench counts each such event and fails
// if one never happened. It also checks that reset clears the output and
// that an addition applied just after reset comes out intact.
module tb_bcd64_pipelined;
  import bcd_tb_pkg::*;

  localparam int ND = 16;
  localparam int NCYC = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] a = '0, b = '0, s;
  logic        cin = 1'b0, cout;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_cout = 0, n_full_ripple = 0, n_inflight3 = 0;

  // operands applied before rising edge k
  longint unsigned xa[NCYC+4], xb[NCYC+4];
  bit              xc[NCYC+4];

  bcd64_pipelined dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operand pair for slot k: random, or a pattern aimed at the block carries.
  task automatic pick(int k, output longint unsigned x, output longint unsigned y, output bit c);
    case (k % 8)
      0: begin x = pow10(ND) - 1; y = 0; c = 1; end                 // ripple through all 16
      1: begin x = rand_dec(ND); y = pow10(6) - x % pow10(6); c = 0; end  // carry out of block 0
      2: begin x = rand_dec(5) * pow10(11) + pow10(11) - 1;           // carry out of block 1 only
               y = rand_dec(5) * pow10(11) + pow10(6); c = 0; end
      default: begin x = rand_dec(ND); y = rand_dec(ND); c = 1'($urandom); end
    endcase
  endtask

  function automatic void check_slot(int k);
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
        $display("FAIL slot %0d: %0d+%0d+%0d got s=%h cout=%0b want %h", k, xa[k], xb[k], xc[k], s, cout, w);
    end
    if (lo6 >= pow10(6)) n_c1++;
    if (lo11 >= pow10(11)) n_c2++;
    if (t >= pow10(ND)) n_cout++;
    if (xa[k] == pow10(ND) - 1 && xb[k] == 0 && xc[k]) n_full_ripple++;
  endfunction

  initial begin
    // reset with garbage on the inputs
    a = '1; b = '1; cin = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL reset did not clear output: s=%h cout=%0b", s, cout);
    end
    @(negedge clk);
    rst_n = 1'b1;
    // stream: slot k is applied after negedge, captured at the following posedge
    for (int k = 0; k < NCYC; k++) begin
      longint unsigned x, y;
      bit c;
      pick(k, x, y, c);
      x = x % pow10(ND); y = y % pow10(ND);
      xa[k] = x; xb[k] = y; xc[k] = c;
      a = to_bcd(x, ND); b = to_bcd(y, ND); cin = c;
      @(posedge clk);
      #1;
      if (k >= 1) check_slot(k - 1);
      if (k >= 2) n_inflight3++;  // slots k-2, k-1, k are in stage 2, stage 1 and the input block
      @(negedge clk);
    end
    // drain
    @(posedge clk);
    #1;
    check_slot(NCYC - 1);
    $display("carries block0->1=%0d block1->2=%0d cout=%0d full ripple=%0d three in flight=%0d",
             n_c1, n_c2, n_cout, n_full_ripple, n_inflight3);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_cout == 0 || n_full_ripple == 0 || n_inflight3 == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
