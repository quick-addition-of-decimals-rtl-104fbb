// 6-correction circuit: L = Cout + S3 (S1 + S2), from three Fredkin gates.
//
// L is 1 when the binary digit sum is above nine (S >= 10 or a binary carry
// out), i.e. when 6 must be added to turn it back into a BCD digit.
//
//   g1 = FRG(S1, S2, 1)        -> S1, S1 + S2 (OR), -
//   g2 = FRG(S3, S1 + S2, 0)   -> S3, -, S3 (S1 + S2) (AND)
//   g3 = FRG(Cout, S3(S1+S2), 1) -> Cout, L (OR), -
//
// L follows S3 and Cout by two gate levels. The gates and their constant
// inputs follow the published figure; its pass-through outputs (S3, Cout)
// are counted as garbage here. perr is this design's parity checker.
`timescale 1ns/1ps
module corr6
  import qad_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic [3:1]               s,      // S3..S1 of the binary sum
  input  logic                     cout,
  output logic                     l,
  output logic [CORR6_GARBAGE-1:0] garbage,
  output logic                     perr
);

  logic s1_g, s12_or, g1_r;
  logic s3_g, g2_q, s3_and;
  logic cout_g, g3_r;

  frg #(.GATE_DELAY(GATE_DELAY)) g1 (.a(s[1]), .b(s[2]),   .c(1'b1), .p(s1_g),   .q(s12_or), .r(g1_r));
  frg #(.GATE_DELAY(GATE_DELAY)) g2 (.a(s[3]), .b(s12_or), .c(1'b0), .p(s3_g),   .q(g2_q),   .r(s3_and));
  frg #(.GATE_DELAY(GATE_DELAY)) g3 (.a(cout), .b(s3_and), .c(1'b1), .p(cout_g), .q(l),      .r(g3_r));

  assign garbage = {s1_g, g1_r, s3_g, g2_q, cout_g, g3_r};

  // Constants 1, 0, 1 give input parity s1 ^ s2 ^ s3 ^ cout.
  assign perr = (s[1] ^ s[2] ^ s[3] ^ cout) ^ (l ^ (^garbage));

endmodule
