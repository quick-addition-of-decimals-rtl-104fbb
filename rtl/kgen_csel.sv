// Carry-select decimal carry generator, from three Fredkin gates.
//
// Both possible decimal carries are formed before the carry in arrives:
// K1 = S3 S0 + L (carry in = 1) and K0 = L (carry in = 0). The carry in then
// picks one through a single Fredkin gate used as a 2:1 multiplexer, so a
// chain of digits ripples its decimal carry at one gate delay per digit
// instead of two.
//
//   g1 = FRG(S3, S0, 0)     -> S3, -, S3 S0
//   g2 = FRG(L, S3 S0, 1)   -> L = K0, L + S3 S0 = K1, -
//   g3 = FRG(Cin, K0, K1)   -> Cin, K, -
//
// Gates, constants and the K0/K1 names follow the published figure; its
// pass-through outputs are counted as garbage. perr is this design's parity
// checker.
`timescale 1ns/1ps
module kgen_csel
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
  logic k0, k1, g2_r;
  logic cin_g, g3_r;

  frg #(.GATE_DELAY(GATE_DELAY)) g1 (.a(s3),  .b(s0),  .c(1'b0), .p(s3_g),  .q(g1_q), .r(s30));
  frg #(.GATE_DELAY(GATE_DELAY)) g2 (.a(l),   .b(s30), .c(1'b1), .p(k0),    .q(k1),   .r(g2_r));
  frg #(.GATE_DELAY(GATE_DELAY)) g3 (.a(cin), .b(k0),  .c(k1),   .p(cin_g), .q(k),    .r(g3_r));

  assign garbage = {s3_g, g1_q, g2_r, cin_g, g3_r, 1'b0};

  // Constants 0, 1 give input parity s3 ^ s0 ^ l ^ cin ^ 1. The zero pad in
  // the garbage bus is not a gate output and does not change the parity.
  assign perr = (s3 ^ s0 ^ l ^ cin ^ 1'b1) ^ (k ^ (^garbage));

endmodule
