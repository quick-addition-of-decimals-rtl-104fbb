// Self-checking testbench for the 4-bit reversible binary adder: all 256
// operand pairs against a + b, conservation of ones (the seven constant
// ones of one half adder and three full adders included) and a quiet parity
// check. A second copy with one time unit per gate checks that the carry out
// of 15 + 1 ripples out after 2 + 2(n-1) = 8 gate delays.
`timescale 1ns/1ps
module tb_bin_adder4;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s, s_t;
  logic       cout, cout_t, perr, perr_t;
  logic [BIN4_GARBAGE-1:0] garbage, garbage_t;

  bin_adder4 dut (.a(a), .b(b), .s(s), .cout(cout), .garbage(garbage), .perr(perr));
  bin_adder4 #(.GATE_DELAY(1)) dut_t (.a(a), .b(b), .s(s_t), .cout(cout_t),
                                      .garbage(garbage_t), .perr(perr_t));


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d -> s=%0d cout=%0b", what, a, b, s, cout);
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
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #50;
      check({cout, s} == 5'(int'(a) + int'(b)), "sum");
      check({cout_t, s_t} == {cout, s}, "timed copy agrees");
      check($countones({a, b}) + 7 == $countones({s, cout, garbage}), "conservative");
      check(perr == 1'b0, "parity check quiet");
    end
    // Carry ripple: 15 + 0 settled, then b = 1 makes the carry ripple.
    a = 4'hF; b = 4'h0;
    #50;
    b = 4'h1;
    begin
      // Sample half-way between gate events and keep the last step at which
      // the carry out still changed.
      logic prev;
      int   last;
      prev = cout_t;
      last = 0;
      #0.5;
      for (int step = 1; step <= 40; step++) begin
        #1;
        if (cout_t != prev) last = step;
        prev = cout_t;
      end
      check(cout_t == 1'b1, "ripple result");
      checks++;
      if (last != 8) begin
        failures++;
        $display("FAIL carry ripple took %0d gate delays, expected 8", last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
