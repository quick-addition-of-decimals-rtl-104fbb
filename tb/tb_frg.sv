// Self-checking testbench for the Fredkin gate: all eight input patterns,
// each output against the gate equations P = A, Q = A'B ^ AC, R = AB ^ A'C,
// plus conservation of the number of ones.
`timescale 1ns/1ps
module tb_frg;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  frg dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P");
      check(q == ((~a & b) ^ (a & c)), "Q");
      check(r == ((a & b) ^ (~a & c)), "R");
      check($countones({a, b, c}) == $countones({p, q, r}), "conservative");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
