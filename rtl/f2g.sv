// Feynman double gate: P = A, Q = A ^ B, R = A ^ C.
//
// A 3-input, 3-output reversible, parity-preserving gate that works as an
// XOR (Q) or, with B = 0, as a copying gate. It is not conservative. The adder
// uses Fredkin gates only by default; this gate serves only the optional form
// of the special adder whose top-bit XOR is one gate instead of two.
//
// Timing: combinational; GATE_DELAY as in the Fredkin gate.
`timescale 1ns/1ps
module f2g #(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  if (GATE_DELAY == 0) begin : g_ideal
    assign p = a;
    assign q = a ^ b;
    assign r = a ^ c;
  end else begin : g_delayed
    assign #(GATE_DELAY) p = a;
    assign #(GATE_DELAY) q = a ^ b;
    assign #(GATE_DELAY) r = a ^ c;
  end

endmodule
