// Self-checking testbench for the reversible half adder: all four input
// pairs against a + b, conservation of ones over inputs plus the constant
// inputs (1, 0, 0) against outputs plus garbage, and a quiet parity check.
`timescale 1ns/1ps
module tb_rev_ha;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic a, b, sum, carry, perr;
  logic [HA_GARBAGE-1:0] garbage;

  rev_ha dut (.a(a), .b(b), .sum(sum), .carry(carry), .garbage(garbage), .perr(perr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b -> sum=%0b carry=%0b g=%b", what, a, b, sum, carry, garbage);
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
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check({carry, sum} == 2'(int'(a) + int'(b)), "sum/carry");
      check(int'(a) + int'(b) + 1 == $countones({sum, carry, garbage}), "conservative");
      check(perr == 1'b0, "parity check quiet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
