# A BCD adder with one binary adder per digit, a pipelined 64-bit BCD adder, and a BCD digit multiplier

In binary-coded decimal (BCD), each decimal digit is stored as four bits weighted 8-4-2-1 and holds
only 0..9. To add two BCD digits, the textbook circuit uses two 4-bit binary adders. The first adds
the digits. When that sum exceeds 9, the second adds 6 (0110) to skip the six unused codes and to
produce the decimal carry. The second adder lengthens every digit's critical path.

This design removes the second adder. The correction constant can only be 0000 or 0110, so its
effect on each sum bit is a fixed function of a single "correct" signal. That function takes a
handful of gates. The one-digit adder built this way is then chained into a 16-digit (64-bit) BCD
adder. The chain is cut into three pipeline blocks, which shortens the clock period and lets three
additions be in flight at once. A BCD digit multiplier (X × Y = 10·B + C) stands alongside the
adder, built from a 4×4 binary multiplier and a binary-to-BCD correction.

All RTL is synthesizable SystemVerilog-2017 and has no vendor primitives.

## The one-digit adder (`bcd_digit_adder`)

```
 a[3:0] b[3:0] cin
    │     │     │
  ┌─┴─────┴─────┴─┐
  │   rca4 (4-bit │   S3..S0, Co
  │ ripple adder) │──────────────┐
  └───────────────┘              │
        cc = Co | S3&S2 | S3&S1  │  (binary sum > 9)
        Sum0 = S0                │
        Sum1 = S1 ^ cc           │
        Sum2 = S2 ^ (cc & ~S1)   │
        Sum3 = S3 ^ (cc & (S1|S2))
        cout = cc
```

**Why these equations work.** Adding 0110 to S3S2S1S0 leaves bit 0 alone. Bit 1 gets a constant 1,
so it flips and carries out S1. Bit 2 gets S2 + 1 + S1. It flips exactly when S1 = 0 and carries
out when S1 | S2. Bit 3 therefore flips exactly when S1 | S2. Gating each flip with `cc` applies
the correction only when it is needed. The carry that the +6 would push out of bit 3 is not
computed: the decimal carry out is `cc` itself.

**Why `cc` is right.** The binary sum of two digits and a carry lies in 0..19.
- For 10..15, `Co` is 0, and S3 is 1 together with S2 or S1.
- For 16..19, `Co` is 1.
- Each value from 0 to 9 makes all three terms 0.

**Sum3.** The form of Sum3 is the one point where this RTL departs from a formula as it is
sometimes written, `Sum3 = (cc & S1 & S2) ^ S3`. That AND form gives a wrong digit whenever
exactly one of S1 and S2 is set, which happens for binary sums 10 to 13, 18 and 19 (for example
5 + 5 → 8). The OR form above is the carry into bit 3, and it keeps the stated gate budget after
the binary adder: three XOR, two AND, one OR, one NOT. With the AND form substituted, 68 of the
201 exhaustive checks of `tb_bcd_digit_adder` fail.

The carry input is an addition to the bare single-digit circuit. It lets digits be chained. Inputs
above 9 are not detected or flagged.

`rca4` is a plain four-stage ripple-carry adder (`s = x^y^c`, carry = majority).

## Chaining digits (`bcd_ripple_adder`)

`DIGITS` digit adders are wired in series. Digit i sits in bits 4i+3:4i, and its `cout` feeds
the `cin` of digit i+1. The default, `DIGITS = 6`, is the first pipeline block (24 bits).
`DIGITS = 5` gives the other two blocks. `DIGITS = 16` is the plain, unpipelined 64-bit adder,
which the pipelined version is meant to beat. The delay of this block grows linearly with
`DIGITS` through the decimal carry chain.

## The pipelined 64-bit adder (`bcd64_pipelined`)

The 16 digits are split into blocks of 6, 5 and 5 digits (parameters `D0`, `D1`, `D2`, which must
sum to 16). The decimal carry leaving block 0 and block 1 is held in a flip-flop before it enters
the next block. The clock period is then set by one 6-digit ripple chain instead of a 16-digit
one.

A carry register alone would only be correct if the operands were held steady for three cycles.
To accept a new operand pair every clock, this implementation adds two kinds of register:
- **Skew registers** delay the operand digits, so that each block sees the digits of the same
  addition as the carry it receives.
- **Deskew registers** delay the sum digits, so that all 64 sum bits of one addition leave
  together.

```
cycle n (edge n captures)        cycle n+1 (edge n+1 captures)      after edge n+1
 block 0: digits 0-5   ──c1──▶ FF ─▶ block 1: digits 6-10 ──c2──▶ FF ─▶ block 2: digits 11-15 ─▶ s[63:44], cout
 a,b[63:24] ─────────────────▶ FF ─▶ a,b[63:44] ──────────────────▶ FF ─▶
 sum[23:0]  ─────────────────▶ FF ─────────────────────────────────▶ FF ─▶ s[23:0]
                                     sum[43:24] ──────────────────▶ FF ─▶ s[43:24]
```

**Timing.**
- Operands and `cin` set up before rising edge n give `s` and `cout` valid after edge n+1. That is
  two register stages, a result one clock after its operands were captured.
- One addition is accepted every clock.
- The final block is combinational from registers, so `s` and `cout` are not registered outputs.
  Add an output register if the surrounding logic needs one; the latency then becomes one clock
  longer.

**Reset.** `rst_n` is synchronous and active low, and clears every pipeline register. After reset
the output reads 0 with `cout = 0` until new results arrive. The sum of an operand pair applied
while `rst_n` is low is discarded.

The pipeline holds 190 flip-flops in all, the two carry flip-flops included: 40+40+24+1 in
stage 1 and 20+20+24+20+1 in stage 2.

## The BCD digit multiplier (`bcd_digit_mult`, `mult4x4`, `bin2bcd_product`)

For digits X, Y in 0..9 the product lies in 0..81. It is returned as a tens digit B and a units
digit C.
- **`mult4x4`.** This unsigned binary multiplier forms the 16 partial-product bits `x[i] & y[j]` at
  weight 2^(i+j). It adds the four shifted rows with ordinary additions. For BCD inputs, bit 7 of
  the result is always 0 and is dropped.
- **`bin2bcd_product`.** This block converts the 7-bit binary product with shift-and-add-3. Seven
  times, it adds 3 to any BCD digit of 5 or more and then shifts the next product bit in. The
  result is exact for 0..81.

Any reduction tree or binary-to-BCD circuit with the same function can replace these two. Only the
split "binary multiply, then correct to two BCD digits" is part of the design. Everything is
combinational. Inputs above 9 are not detected.

## Top level (`bcd_top`)

`bcd_top` places the two units side by side; they share nothing.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | adder clock, rising edge |
| `rst_n` | in | 1 | adder synchronous reset, active low |
| `a`, `b` | in | 64 | 16 packed BCD digits, digit 0 in bits 3:0 |
| `cin` | in | 1 | carry into digit 0 |
| `s` | out | 64 | BCD sum, valid one clock after the operands are captured |
| `cout` | out | 1 | decimal carry out of digit 15 |
| `mx`, `my` | in | 4 | BCD digits to multiply |
| `mtens`, `munits` | out | 4 | product = 10·`mtens` + `munits` (combinational) |

`bcd_pkg` holds the shared digit type `bcd_digit_t` and the word size (16 digits).

## Files

| file | contents |
|------|----------|
| `rtl/bcd_pkg.sv` | digit type and word size |
| `rtl/rca4.sv` | 4-bit ripple-carry binary adder |
| `rtl/bcd_digit_adder.sv` | one-digit BCD adder with gate-level correction |
| `rtl/bcd_ripple_adder.sv` | `DIGITS`-digit chained BCD adder |
| `rtl/bcd64_pipelined.sv` | 6/5/5-digit three-block pipelined 64-bit BCD adder |
| `rtl/mult4x4.sv` | 4×4 binary multiplier |
| `rtl/bin2bcd_product.sv` | 0..81 binary to two BCD digits |
| `rtl/bcd_digit_mult.sv` | BCD digit multiplier |
| `rtl/bcd_top.sv` | top level |
| `tb/bcd_tb_pkg.sv` | reference conversions between integers and packed BCD |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks the RTL against values computed with ordinary integer arithmetic. Each ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog. For example, to run the
end-to-end test of the top level with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bcd_pkg.sv tb/bcd_tb_pkg.sv tb/tb_bcd_top.sv --top-module tb_bcd_top
./obj_dir/Vtb_bcd_top
```

Substitute any other `tb_<module>` the same way. Coverage of each testbench:
- **Exhaustive:**
  - `tb_rca4`: all 512 input combinations.
  - `tb_bcd_digit_adder`: all 200 digit pairs with carry.
  - `tb_mult4x4`: all 256 operand pairs.
  - `tb_bin2bcd_product`: every value 0..81.
  - `tb_bcd_digit_mult`: all 100 digit pairs.
- **Random plus carry corner cases:** `tb_bcd_ripple_adder`, at 6 and at 16 digits.
- **Streaming:** `tb_bcd64_pipelined` sends a new pair every clock for 4000 clocks. It checks each
  sum exactly one clock after capture, which pins the latency. It counts carries through each
  inter-block flip-flop, the carry out of digit 15, and 16-digit ripples, and checks reset.
- **End to end:** `tb_bcd_top` runs the top at its default sizes. It streams 3000 additions with a
  reset in the middle of the stream, while stepping the multiplier through all digit pairs. It
  fails if any of these mechanisms never happened:
  - a carry through either flip-flop
  - a carry out of digit 15
  - a full ripple
  - three additions in flight
  - reset clearing the pipeline
  - a product of 10 or more

All the testbenches pass, and each takes well under a second of simulation.

## How far to trust it, and where it departs

- **Tested function.** The digit-level circuits are verified exhaustively. The 16-digit paths are
  verified on several thousand random and targeted operands per run.
- **Sum3.** The digit adder uses the OR form of the Sum3 correction (see above). The AND form
  gives wrong digits.
- **Skew and deskew registers.** The operand skew and sum deskew registers in the pipelined adder
  are this implementation's own. With only the two carry flip-flops, operands would have to be held
  for three clocks, and the three blocks' sum digits would belong to different additions.
- **Block sizes.** The blocks are 6, 5 and 5 digits, totalling 16.
- **Reset and carry in.** The reset polarity (active low, synchronous) and the per-digit carry in
  are choices of this implementation.
- **Multiplier internals.** The partial-product reduction and the binary-to-BCD circuit are the
  simplest standard ones. No particular scheme is prescribed.
- **Not included:**
  - the two-adder and multiplexer-based BCD adders that serve only as points of comparison
  - a three-operand decimal adder
  - a decimal floating-point unit with operation select, rounding mode, ready and exception
    flags, for which no function is defined here
  - any multi-digit multiplier built from the digit multiplier
- **Timing.** No timing figures are claimed for this RTL. Delays depend on the target technology.
  In the pipelined adder, the longest path is the 6-digit block: 6 × (4-bit ripple + correction).
