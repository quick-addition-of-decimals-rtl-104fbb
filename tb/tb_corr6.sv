// Self-checking testbench for the 6-correction circuit: all sixteen
// (S3..S1, Cout) patterns against L = Cout + S3 (S1 + S2), conservation of
// ones (constants 1, 0, 1), a quiet parity check, and with one time unit per
// gate the two gate delays from S3 to L.
`timescale 1ns/1ps
module tb_corr6;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic [3:1] s;
  logic       cout, l, l_t, perr, perr_t;
  logic [CORR6_GARBAGE-1:0] garbage, garbage_t;

  corr6 dut (.s(s), .cout(cout), .l(l), .garbage(garbage), .perr(perr));
  corr6 #(.GATE_DELAY(1)) dut_t (.s(s), .cout(cout), .l(l_t), .garbage(garbage_t), .perr(perr_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%b cout=%0b -> l=%0b", what, s, cout, l);
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
    for (int v = 0; v < 16; v++) begin
      {s, cout} = 4'(v);
      #10;
      // Independent reference: the 5-bit binary sum {cout, S} exceeds nine.
      check(l == ((int'({cout, s, 1'b0}) > 9) || (int'({cout, s, 1'b1}) > 9)), "L");
      check(l_t == l, "timed copy agrees");
      check($countones({s, cout}) + 2 == $countones({l, garbage}), "conservative");
      check(perr == 1'b0, "parity check quiet");
    end
    // S3 rises with S1 = 1: L must follow after two gates.
    s = 3'b001; cout = 1'b0;
    #10;
    s = 3'b101;
    begin
      logic prev;
      int   last;
      prev = l_t; last = 0;
      #0.5;
      for (int step = 1; step <= 20; step++) begin
        #1;
        if (l_t != prev) last = step;
        prev = l_t;
      end
      check(l_t == 1'b1, "S3 rise sets L");
      check(last == 2, "S3 to L in two gate delays");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
