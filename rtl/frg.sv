// Fredkin gate (controlled swap), the only gate type of the adder.
//
// A 3-input, 3-output reversible and conservative gate: P = A,
// Q = A'B ^ AC, R = AB ^ A'C. With A = 0 the data inputs pass straight
// through, with A = 1 they are swapped, so the number of ones on the outputs
// always equals the number on the inputs (and so does the parity). With
// constant inputs it works as an AND (R with C = 0), an OR (Q with C = 1), a
// copy/invert (A, 1, 0 -> A, A', A) or a 2:1 multiplexer with A as select.
//
// Timing: purely combinational. GATE_DELAY (default 0) adds a
// delay in simulation time units to every output, so a testbench can count
// the gate levels a signal passes through; synthesis ignores it.
`timescale 1ns/1ps
module frg #(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic a,  // control
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  if (GATE_DELAY == 0) begin : g_ideal
    assign p = a;
    assign q = a ? c : b;
    assign r = a ? b : c;
  end else begin : g_delayed
    assign #(GATE_DELAY) p = a;
    assign #(GATE_DELAY) q = a ? c : b;
    assign #(GATE_DELAY) r = a ? b : c;
  end

endmodule
