// Parity-preserving reversible half adder built from three Fredkin gates.
//
//   g1 = FRG(B, 1, 0)        -> B, B', B        (copy and complement of B)
//   g2 = FRG(A, B, 0)        -> A, A'B, AB      (R is the carry)
//   g3 = FRG(A, B, B')       -> A, A^B, A xnor B (Q is the sum)
//
// The carry leaves after two gate levels from B and one from A, the sum
// after two levels from A and three from B. Inputs plus constants (5 bits)
// equal outputs plus garbage (5 bits), with equal numbers of ones. perr is a
// checker outside the reversible network: the parity of the inputs and
// constants against the parity of every output, garbage included; it is 0
// unless a gate misbehaves.
//
// The three gates and their constant inputs follow the published half-adder
// figure; which gate output feeds which input was read from the drawing and
// the stated function. The perr checker is this design's own addition.
`timescale 1ns/1ps
module rev_ha
  import qad_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic                  a,
  input  logic                  b,
  output logic                  sum,
  output logic                  carry,
  output logic [HA_GARBAGE-1:0] garbage,
  output logic                  perr
);

  logic b_cp, b_n, b_cp2;  // g1 outputs
  logic a_cp, anb;         // g2 outputs besides the carry
  logic a_g, xnr;          // g3 outputs besides the sum

  frg #(.GATE_DELAY(GATE_DELAY)) g1 (.a(b),    .b(1'b1), .c(1'b0), .p(b_cp), .q(b_n),  .r(b_cp2));
  frg #(.GATE_DELAY(GATE_DELAY)) g2 (.a(a),    .b(b_cp2), .c(1'b0), .p(a_cp), .q(anb), .r(carry));
  frg #(.GATE_DELAY(GATE_DELAY)) g3 (.a(a_cp), .b(b_cp), .c(b_n),   .p(a_g),  .q(sum), .r(xnr));

  assign garbage = {anb, a_g, xnr};

  // Constants 1, 0, 0 give input parity a ^ b ^ 1.
  assign perr = (a ^ b ^ 1'b1) ^ (sum ^ carry ^ (^garbage));

endmodule
