// Quick decimal adder (QAD): an m-digit BCD adder whose only rippling signal
// is the one-bit decimal carry K, built entirely from reversible gates.
//
// Each digit adds its BCD pair in binary and derives the 6-correction bit L
// in parallel with all other digits. The decimal carries then ripple
// through one small K stage per digit (K_i = S3 S0 K_{i-1} + L_i, K_0 =
// cin), and each digit's special adder adds {0, K_i, K_i, K_{i-1}} to its
// binary sum. The carry out is K of the most significant digit.
//
// Interface: a, b and sum hold DIGITS BCD digits, digit i in bits
// [4i+3:4i]. Inputs must be valid BCD (0..9 per digit). garbage collects
// every unused reversible gate output, digit i in slice
// [i*DIGIT_GARBAGE +: DIGIT_GARBAGE]. parity_err is 1 if any block's output
// parity (garbage included) differs from its input parity (constants
// included), which a correct parity-preserving network never shows.
//
// Timing: purely combinational, no clock. Counted in gate levels from the
// inputs (GATE_DELAY = 1 makes each gate one time unit), the published
// bounds for m digits are: cout by 11 + m and sum by 17 + m with
// CARRY_SELECT = 1, cout by 10 + 2m and sum by 15 + 2m with CARRY_SELECT = 0
// (qad_pkg::bound_dcout/bound_dsum). A change on cin alone reaches cout after
// m (carry select) or 2m gate delays, and the top sum digit five gates later.
//
// DIGITS = 4 is the published configuration. CARRY_SELECT = 1 (the faster
// published K stage) and XOR_F2G = 0 (Fredkin gates only) are the defaults.
`timescale 1ns/1ps
module qad_adder
  import qad_pkg::*;
#(
  parameter int unsigned DIGITS       = 4,
  parameter bit          CARRY_SELECT = 1'b1,
  parameter bit          XOR_F2G      = 1'b0,
  parameter int unsigned GATE_DELAY   = 0
) (
  input  logic [4*DIGITS-1:0]             a,
  input  logic [4*DIGITS-1:0]             b,
  input  logic                            cin,
  output logic [4*DIGITS-1:0]             sum,
  output logic                            cout,
  output logic [DIGITS*DIGIT_GARBAGE-1:0] garbage,
  output logic                            parity_err
);

  logic [DIGITS:0]   k;      // k[0] = cin, k[i+1] = decimal carry out of digit i
  logic [DIGITS-1:0] perr;

  assign k[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    qad_digit #(
      .CARRY_SELECT(CARRY_SELECT),
      .XOR_F2G     (XOR_F2G),
      .GATE_DELAY  (GATE_DELAY)
    ) u_digit (
      .a      (a[4*i +: 4]),
      .b      (b[4*i +: 4]),
      .cin    (k[i]),
      .d      (sum[4*i +: 4]),
      .k      (k[i+1]),
      .garbage(garbage[i*DIGIT_GARBAGE +: DIGIT_GARBAGE]),
      .perr   (perr[i])
    );
  end

  assign cout       = k[DIGITS];
  assign parity_err = |perr;

endmodule
