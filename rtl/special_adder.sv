// Special adder: the last stage of a decimal digit, d = S + N mod 16 with
// N = {0, K, K, Cin}.
//
// Adding N corrects the binary digit sum S and adds the incoming carry in
// one step: N = 6 + Cin when the digit's decimal carry K is set, Cin when it
// is not. Because N3 is always 0 and N2 = N1 = K, the adder shrinks to a
// half adder on bit 0 (S0 + Cin), full adders on bits 1 and 2 (Si + K +
// carry) and an XOR on bit 3 (S3 ^ carry); the carry out of bit 3 is not
// needed. With Fredkin gates only this is 3 + 5 + 5 + 2 = 15 gates; with
// XOR_F2G = 1 the XOR is one Feynman double gate (14 gates).
//
// Cin enters the half adder on its fast input (one gate to the carry) and K
// enters each full adder on its A input, so K passes through at most five
// gates to d3 and Cin through at most six. The structure follows the
// published digit diagram; the choice of which adder input takes K and Cin
// is this design's, picked to meet the published delay counts.
`timescale 1ns/1ps
module special_adder
  import qad_pkg::*;
#(
  parameter bit          XOR_F2G    = 1'b0,
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic [3:0]               s,
  input  logic                     k,
  input  logic                     cin,
  output logic [3:0]               d,
  output logic [SPADD_GARBAGE-1:0] garbage,
  output logic                     perr
);

  localparam int unsigned FA0 = HA_GARBAGE;
  localparam int unsigned XG  = HA_GARBAGE + 2 * FA_GARBAGE;

  logic [2:0] c;         // carries out of bits 0..2
  logic [2:0] pe;
  logic       xor_perr;

  rev_ha #(.GATE_DELAY(GATE_DELAY)) u_ha (
    .a(cin), .b(s[0]), .sum(d[0]), .carry(c[0]),
    .garbage(garbage[HA_GARBAGE-1:0]), .perr(pe[0])
  );

  rev_fa #(.GATE_DELAY(GATE_DELAY)) u_fa1 (
    .a(k), .b(s[1]), .c(c[0]), .sum(d[1]), .carry(c[1]),
    .garbage(garbage[FA0 +: FA_GARBAGE]), .perr(pe[1])
  );

  rev_fa #(.GATE_DELAY(GATE_DELAY)) u_fa2 (
    .a(k), .b(s[2]), .c(c[1]), .sum(d[2]), .carry(c[2]),
    .garbage(garbage[FA0 + FA_GARBAGE +: FA_GARBAGE]), .perr(pe[2])
  );

  if (XOR_F2G) begin : g_xor_f2g
    // F2G(c2, S3, 0) -> c2, c2 ^ S3, c2
    logic c2_g, c2_cp;
    f2g #(.GATE_DELAY(GATE_DELAY)) x1 (.a(c[2]), .b(s[3]), .c(1'b0), .p(c2_g), .q(d[3]), .r(c2_cp));
    assign garbage[XG +: XOR_GARBAGE] = {c2_g, c2_cp, 1'b0};
    assign xor_perr = (c[2] ^ s[3]) ^ (d[3] ^ c2_g ^ c2_cp);
  end else begin : g_xor_frg
    // FRG(S3, 1, 0) -> S3, S3', S3 ; FRG(c2, S3, S3') -> c2, c2 ^ S3, -
    logic s3_cp, s3_n, s3_cp2, c2_g, x2_r;
    frg #(.GATE_DELAY(GATE_DELAY)) x1 (.a(s[3]), .b(1'b1),  .c(1'b0), .p(s3_cp), .q(s3_n), .r(s3_cp2));
    frg #(.GATE_DELAY(GATE_DELAY)) x2 (.a(c[2]), .b(s3_cp), .c(s3_n), .p(c2_g),  .q(d[3]), .r(x2_r));
    assign garbage[XG +: XOR_GARBAGE] = {s3_cp2, c2_g, x2_r};
    // Constants 1, 0 give input parity c2 ^ S3 ^ 1.
    assign xor_perr = (c[2] ^ s[3] ^ 1'b1) ^ (d[3] ^ s3_cp2 ^ c2_g ^ x2_r);
  end

  assign perr = (|pe) | xor_perr;

endmodule
