// Self-checking testbench for the special adder: every S, K and Cin against
// d = S + {0, K, K, Cin} mod 16, for both top-bit XOR forms (two Fredkin
// gates, or one Feynman double gate). The Fredkin-only form must conserve
// the number of ones (six constant ones, K counted once per full adder); both must keep the parity check
// quiet. With one time unit per gate, K must reach d3 through five gates
// and Cin through six.
`timescale 1ns/1ps
module tb_special_adder;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] s, d, d_f2g, d_t;
  logic       k, cin, perr, perr_f2g, perr_t;
  logic [SPADD_GARBAGE-1:0] garbage, garbage_f2g, garbage_t;

  special_adder dut (.s(s), .k(k), .cin(cin), .d(d), .garbage(garbage), .perr(perr));
  special_adder #(.XOR_F2G(1'b1)) dut_f2g (.s(s), .k(k), .cin(cin), .d(d_f2g),
                                           .garbage(garbage_f2g), .perr(perr_f2g));
  special_adder #(.GATE_DELAY(1)) dut_t (.s(s), .k(k), .cin(cin), .d(d_t),
                                         .garbage(garbage_t), .perr(perr_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%0d k=%0b cin=%0b -> d=%0d d_f2g=%0d", what, s, k, cin, d, d_f2g);
    end
  endtask

  // Steps (gate delays) until d_t stops changing after the stimulus just applied.
  task automatic settle(output int last);
    logic [3:0] prev;
    prev = d_t; last = 0;
    #0.5;
    for (int step = 1; step <= 30; step++) begin
      #1;
      if (d_t != prev) last = step;
      prev = d_t;
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
    int last;
    for (int v = 0; v < 64; v++) begin
      {s, k, cin} = 6'(v);
      #20;
      check(d == 4'(int'(s) + 6 * int'(k) + int'(cin)), "sum");
      check(d_f2g == d, "F2G form agrees");
      check(d_t == d, "timed copy agrees");
      // K feeds both full adders, so it enters the gate network twice.
      check($countones({s, k, k, cin}) + 6 == $countones({d, garbage}), "conservative");
      check(perr == 1'b0 && perr_f2g == 1'b0, "parity check quiet");
    end
    // K path: S = 9, Cin = 1 settled; K rises, 9 + 7 = 16 -> d = 0.
    s = 4'd9; k = 1'b0; cin = 1'b1;
    #20;
    k = 1'b1;
    settle(last);
    check(d_t == 4'd0, "K step result");
    check(last == 5, "K to d3 in five gate delays");
    // Cin path arriving together with K (carry-select timing).
    s = 4'd9; k = 1'b0; cin = 1'b0;
    #20;
    k = 1'b1; cin = 1'b1;
    settle(last);
    check(d_t == 4'd0, "K and Cin step result");
    check(last == 6, "Cin with K to d3 in six gate delays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
