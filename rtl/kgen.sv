// Decimal carry generator: K = S3 S0 Cin + L, from three Fredkin gates.
//
// K is the decimal carry out of a digit and also says whether the special
// adder must add 6. It is 1 when the binary digit sum already exceeds nine
// (L) or when it is exactly nine and a carry comes in (S3 S0 Cin; S3 S0 is
// 1 for 9 and for sums that already set L).
//
//   g1 = FRG(S3, S0, 0)       -> S3, -, S3 S0     (ready before Cin)
//   g2 = FRG(Cin, S3 S0, 0)   -> Cin, -, Cin S3 S0
//   g3 = FRG(L, Cin S3 S0, 1) -> L, K, -
//
// Once L is known, a change of Cin reaches K through two gates, so a chain
// of digits ripples its decimal carry at two gate delays per digit. Gates
// and constants follow the published figure; pass-through outputs are
// counted as garbage. perr is this design's parity checker.
`timescale 1ns/1ps
module kgen
  import qad_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic                    s3,
  input  logic                    s0,
  input  logic                    l,
  input  logic                    cin,
  output logic                    k,
  output logic [KGEN_GARBAGE-1:0] garbage,
  output logic                    perr
);

  logic s3_g, g1_q, s30;
  logic cin_g, g2_q, cs30;
  logic l_g, g3_r;

  frg #(.GATE_DELAY(GATE_DELAY)) g1 (.a(s3),  .b(s0),  .c(1'b0), .p(s3_g),  .q(g1_q), .r(s30));
  frg #(.GATE_DELAY(GATE_DELAY)) g2 (.a(cin), .b(s30), .c(1'b0), .p(cin_g), .q(g2_q), .r(cs30));
  frg #(.GATE_DELAY(GATE_DELAY)) g3 (.a(l),   .b(cs30), .c(1'b1), .p(l_g),  .q(k),    .r(g3_r));

  assign garbage = {s3_g, g1_q, cin_g, g2_q, l_g, g3_r};

  // Constants 0, 0, 1 give input parity s3 ^ s0 ^ cin ^ l ^ 1.
  assign perr = (s3 ^ s0 ^ cin ^ l ^ 1'b1) ^ (k ^ (^garbage));

endmodule
