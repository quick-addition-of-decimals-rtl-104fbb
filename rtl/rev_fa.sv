// Parity-preserving reversible full adder built from five Fredkin gates at
// three levels.
//
//   g1 = FRG(B, 1, 0)           -> B, B', B
//   g2 = FRG(A, B, B')          -> A, A^B, A xnor B
//   g3 = FRG(C, 1, 0)           -> C, C', C
//   g4 = FRG(A^B, C, C')        -> A^B, A^B^C (sum), -
//   g5 = FRG(A xnor B, C, B)    -> -, carry, -
//
// g5 is a multiplexer: when A and B differ it passes C, otherwise B (= A).
// C, the carry in, passes through only two gates (g3, then g4 or g5), so a
// chain of these adders ripples at two gate delays per bit. A passes through
// g2 and then g4/g5: two levels as well. Inputs plus the four constants
// (7 bits) equal outputs plus garbage (7 bits). perr compares their parity
// as in the half adder; the checker is this design's own addition.
//
// The gate count, the levels and the constant inputs follow the published
// full-adder figure; the exact wiring between gates was worked out from the
// drawing and the function it must compute.
`timescale 1ns/1ps
module rev_fa
  import qad_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic                  a,
  input  logic                  b,
  input  logic                  c,      // carry in
  output logic                  sum,
  output logic                  carry,
  output logic [FA_GARBAGE-1:0] garbage,
  output logic                  perr
);

  logic b_cp, b_n, b_cp2;   // g1
  logic a_g, axb, axnb;     // g2
  logic c_cp, c_n, c_cp2;   // g3
  logic axb_g, g4_r;        // g4 besides the sum
  logic g5_p, g5_r;         // g5 besides the carry

  frg #(.GATE_DELAY(GATE_DELAY)) g1 (.a(b),    .b(1'b1), .c(1'b0), .p(b_cp), .q(b_n), .r(b_cp2));
  frg #(.GATE_DELAY(GATE_DELAY)) g2 (.a(a),    .b(b_cp), .c(b_n),  .p(a_g),  .q(axb), .r(axnb));
  frg #(.GATE_DELAY(GATE_DELAY)) g3 (.a(c),    .b(1'b1), .c(1'b0), .p(c_cp), .q(c_n), .r(c_cp2));
  frg #(.GATE_DELAY(GATE_DELAY)) g4 (.a(axb),  .b(c_cp), .c(c_n),  .p(axb_g), .q(sum), .r(g4_r));
  frg #(.GATE_DELAY(GATE_DELAY)) g5 (.a(axnb), .b(c_cp2), .c(b_cp2), .p(g5_p), .q(carry), .r(g5_r));

  assign garbage = {a_g, axb_g, g4_r, g5_p, g5_r};

  // Constants 1, 0, 1, 0 give input parity a ^ b ^ c.
  assign perr = (a ^ b ^ c) ^ (sum ^ carry ^ (^garbage));

endmodule
