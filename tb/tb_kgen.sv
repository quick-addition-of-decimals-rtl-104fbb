// Self-checking testbench for the kgen decimal carry generator: all sixteen
// (S3, S0, L, Cin) patterns against K = S3 S0 Cin + L (constants 0, 0, 1), and with one time unit per gate the two gate delays from Cin to K.
// Conservation of ones and the parity check are checked too.
`timescale 1ns/1ps
module tb_kgen;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic s3, s0, l, cin, k, k_t, perr, perr_t;
  logic [KGEN_GARBAGE-1:0] garbage, garbage_t;

  kgen dut (.s3(s3), .s0(s0), .l(l), .cin(cin), .k(k), .garbage(garbage), .perr(perr));
  kgen #(.GATE_DELAY(1)) dut_t (.s3(s3), .s0(s0), .l(l), .cin(cin), .k(k_t),
                               .garbage(garbage_t), .perr(perr_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s3=%0b s0=%0b l=%0b cin=%0b -> k=%0b", what, s3, s0, l, cin, k);
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
      {s3, s0, l, cin} = 4'(v);
      #10;
      check(k == ((s3 && s0 && cin) || l), "K");
      check(k_t == k, "timed copy agrees");
      check($countones({s3, s0, l, cin}) + 1 == $countones({k, garbage}), "conservative");
      check(perr == 1'b0, "parity check quiet");
    end
    // Digit sum nine (S3 = S0 = 1, L = 0): a rising carry in must reach K.
    {s3, s0, l, cin} = 4'b1100;
    #10;
    cin = 1'b1;
    begin
      logic prev;
      int   last;
      prev = k_t; last = 0;
      #0.5;
      for (int step = 1; step <= 20; step++) begin
        #1;
        if (k_t != prev) last = step;
        prev = k_t;
      end
      check(k_t == 1'b1, "carry in propagates");
      check(last == 2, "Cin to K in 2 gate delay(s)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
