// One decimal digit of the quick decimal adder (QAD).
//
// A BCD digit pair is added in binary (bin_adder4, S and Cout), the
// 6-correction bit L = Cout + S3 (S1 + S2) marks a sum above nine (corr6),
// and only then is the incoming carry used: K = S3 S0 Cin + L is the decimal
// carry out (kgen, or kgen_csel with CARRY_SELECT = 1), and the special adder
// adds N = {0, K, K, Cin} to S to give the BCD digit d. Everything up to L
// depends on a and b alone, so in a multi-digit adder all digits compute it
// in parallel and only K ripples.
//
// Timing (gate levels, GATE_DELAY = 1): L after 10, K two (kgen) or one
// (kgen_csel) gate after the later of L and Cin, d3 five gates after K.
//
// The binary sum S drives the 6-correction circuit, the K generator and the
// special adder directly (the copy gates a strict fan-out-of-one netlist
// would need for this are not part of the published gate counts and are not
// modelled); Cin likewise drives both the K generator and the special adder.
// perr is the OR of the parity checks of the four parts.
`timescale 1ns/1ps
module qad_digit
  import qad_pkg::*;
#(
  parameter bit          CARRY_SELECT = 1'b1,
  parameter bit          XOR_F2G      = 1'b0,
  parameter int unsigned GATE_DELAY   = 0
) (
  input  logic [3:0]               a,
  input  logic [3:0]               b,
  input  logic                     cin,
  output logic [3:0]               d,
  output logic                     k,
  output logic [DIGIT_GARBAGE-1:0] garbage,
  output logic                     perr
);

  localparam int unsigned G_CORR = BIN4_GARBAGE;
  localparam int unsigned G_KGEN = G_CORR + CORR6_GARBAGE;
  localparam int unsigned G_SPAD = G_KGEN + KGEN_GARBAGE;

  logic [3:0] s;
  logic       bcout, l;
  logic [3:0] pe;

  bin_adder4 #(.GATE_DELAY(GATE_DELAY)) u_add (
    .a(a), .b(b), .s(s), .cout(bcout),
    .garbage(garbage[BIN4_GARBAGE-1:0]), .perr(pe[0])
  );

  corr6 #(.GATE_DELAY(GATE_DELAY)) u_corr (
    .s(s[3:1]), .cout(bcout), .l(l),
    .garbage(garbage[G_CORR +: CORR6_GARBAGE]), .perr(pe[1])
  );

  if (CARRY_SELECT) begin : g_kcsel
    kgen_csel #(.GATE_DELAY(GATE_DELAY)) u_k (
      .s3(s[3]), .s0(s[0]), .l(l), .cin(cin), .k(k),
      .garbage(garbage[G_KGEN +: KGEN_GARBAGE]), .perr(pe[2])
    );
  end else begin : g_k
    kgen #(.GATE_DELAY(GATE_DELAY)) u_k (
      .s3(s[3]), .s0(s[0]), .l(l), .cin(cin), .k(k),
      .garbage(garbage[G_KGEN +: KGEN_GARBAGE]), .perr(pe[2])
    );
  end

  special_adder #(.XOR_F2G(XOR_F2G), .GATE_DELAY(GATE_DELAY)) u_spadd (
    .s(s), .k(k), .cin(cin), .d(d),
    .garbage(garbage[G_SPAD +: SPADD_GARBAGE]), .perr(pe[3])
  );

  assign perr = |pe;

endmodule
