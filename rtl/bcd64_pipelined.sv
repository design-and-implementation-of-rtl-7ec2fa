// bcd64_pipelined: 16-digit (64-bit) BCD adder in three pipeline blocks.
//
// A 16-digit chain of one-digit BCD adders is long because the decimal
// carry ripples through every digit. Here the chain is cut into three
// combinational blocks of D0 = 6, D1 = 5 and D2 = 5 digit adders, and the
// carry leaving block 0 and block 1 is held in a flip-flop before it enters
// the next block. The clock period is then set by the longest block rather
// than by the whole chain, and three additions are in flight at once.
//
// So that a new addition can start every cycle, the operand digits of
// block 1 wait one register and those of block 2 two registers, in step
// with the carry; the sum digits of block 0 wait two registers and those of
// block 1 one register, so that all 64 sum bits of one addition leave
// together. (The carry flip-flops between blocks are the design's own; the
// operand skew and sum deskew registers are this implementation's choice
// to make the pipeline accept a new operand pair each clock.)
//
// Timing: operands and cin set up before rising edge n are taken into the
// stage-1 registers at edge n and into the stage-2 registers at edge n+1;
// s and cout come combinationally from block 2 and are valid after edge
// n+1, one clock after the operands. One new addition is accepted every
// clock; at any time one addition is in block 0, one in block 1 and one in
// block 2.
//
// Ports: clk, rst_n (synchronous, active low, clears every pipeline
// register), a, b (16 packed BCD digits), cin -> s (16 BCD digits), cout.
module bcd64_pipelined
  import bcd_pkg::*;
#(
  parameter int unsigned D0 = 6,
  parameter int unsigned D1 = 5,
  parameter int unsigned D2 = 5
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [4*(D0+D1+D2)-1:0]         a,
  input  logic [4*(D0+D1+D2)-1:0]         b,
  input  logic                            cin,
  output logic [4*(D0+D1+D2)-1:0]         s,
  output logic                            cout
);

  localparam int unsigned W0 = 4 * D0;
  localparam int unsigned W1 = 4 * D1;
  localparam int unsigned W2 = 4 * D2;

  if (D0 + D1 + D2 != WORD_DIGITS) begin : g_size_check
    $error("bcd64_pipelined: D0+D1+D2 must equal %0d", WORD_DIGITS);
  end

  // ---------------- block 0: digits 0 .. D0-1 ----------------
  logic [W0-1:0] sum0;
  logic          c1;

  bcd_ripple_adder #(.DIGITS(D0)) u_blk0 (
    .a   (a[W0-1:0]),
    .b   (b[W0-1:0]),
    .cin (cin),
    .sum (sum0),
    .cout(c1)
  );

  // stage-1 registers
  logic               c1_q;
  logic [W0-1:0]      sum0_q1;
  logic [W1+W2-1:0]   a_q1, b_q1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c1_q    <= 1'b0;
      sum0_q1 <= '0;
      a_q1    <= '0;
      b_q1    <= '0;
    end else begin
      c1_q    <= c1;
      sum0_q1 <= sum0;
      a_q1    <= a[W0 +: W1+W2];
      b_q1    <= b[W0 +: W1+W2];
    end
  end

  // ---------------- block 1: digits D0 .. D0+D1-1 ----------------
  logic [W1-1:0] sum1;
  logic          c2;

  bcd_ripple_adder #(.DIGITS(D1)) u_blk1 (
    .a   (a_q1[W1-1:0]),
    .b   (b_q1[W1-1:0]),
    .cin (c1_q),
    .sum (sum1),
    .cout(c2)
  );

  // stage-2 registers
  logic          c2_q;
  logic [W0-1:0] sum0_q2;
  logic [W1-1:0] sum1_q2;
  logic [W2-1:0] a_q2, b_q2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c2_q    <= 1'b0;
      sum0_q2 <= '0;
      sum1_q2 <= '0;
      a_q2    <= '0;
      b_q2    <= '0;
    end else begin
      c2_q    <= c2;
      sum0_q2 <= sum0_q1;
      sum1_q2 <= sum1;
      a_q2    <= a_q1[W1 +: W2];
      b_q2    <= b_q1[W1 +: W2];
    end
  end

  // ---------------- block 2: digits D0+D1 .. 15 ----------------
  logic [W2-1:0] sum2;

  bcd_ripple_adder #(.DIGITS(D2)) u_blk2 (
    .a   (a_q2),
    .b   (b_q2),
    .cin (c2_q),
    .sum (sum2),
    .cout(cout)
  );

  assign s = {sum2, sum1_q2, sum0_q2};

endmodule
