// Self-checking testbench for one quick-decimal-adder digit: every BCD pair
// and carry in (200 cases) against the decimal sum, for the carry-select K
// stage, the two-gate K stage and the one-Feynman-gate XOR form. Each must
// keep its parity check quiet. With one time unit per gate, the digit must
// settle within the published gate-delay bounds for m = 1: K by 12 (carry
// select) or 12 (two-gate K stage), d by 18 or 17.
`timescale 1ns/1ps
module tb_qad_digit;
  import qad_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic       cin;
  logic [3:0] d_cs, d_rc, d_x, d_cs_t, d_rc_t;
  logic       k_cs, k_rc, k_x, k_cs_t, k_rc_t;
  logic       pe_cs, pe_rc, pe_x, pe_cs_t, pe_rc_t;
  logic [DIGIT_GARBAGE-1:0] g_cs, g_rc, g_x, g_cs_t, g_rc_t;

  qad_digit dut_cs (.a(a), .b(b), .cin(cin), .d(d_cs), .k(k_cs), .garbage(g_cs), .perr(pe_cs));
  qad_digit #(.CARRY_SELECT(1'b0)) dut_rc (
    .a(a), .b(b), .cin(cin), .d(d_rc), .k(k_rc), .garbage(g_rc), .perr(pe_rc));
  qad_digit #(.XOR_F2G(1'b1)) dut_x (
    .a(a), .b(b), .cin(cin), .d(d_x), .k(k_x), .garbage(g_x), .perr(pe_x));
  qad_digit #(.GATE_DELAY(1)) dut_cs_t (
    .a(a), .b(b), .cin(cin), .d(d_cs_t), .k(k_cs_t), .garbage(g_cs_t), .perr(pe_cs_t));
  qad_digit #(.CARRY_SELECT(1'b0), .GATE_DELAY(1)) dut_rc_t (
    .a(a), .b(b), .cin(cin), .d(d_rc_t), .k(k_rc_t), .garbage(g_rc_t), .perr(pe_rc_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b -> d=%0d k=%0b (rc %0d %0b, f2g %0d %0b)",
               what, a, b, cin, d_cs, k_cs, d_rc, k_rc, d_x, k_x);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int max_k_cs = 0, max_k_rc = 0, max_d_cs = 0, max_d_rc = 0;

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int c = 0; c < 2; c++) begin
          int t;
          logic [3:0] pd_cs, pd_rc;
          logic       pk_cs, pk_rc;
          // Start every timed case from a settled zero input.
          a = 4'd0; b = 4'd0; cin = 1'b0;
          #40;
          a = 4'(x); b = 4'(y); cin = 1'(c);
          pd_cs = d_cs_t; pd_rc = d_rc_t; pk_cs = k_cs_t; pk_rc = k_rc_t;
          #0.5;
          for (int step = 1; step <= 40; step++) begin
            #1;
            if (d_cs_t != pd_cs && step > max_d_cs) max_d_cs = step;
            if (d_rc_t != pd_rc && step > max_d_rc) max_d_rc = step;
            if (k_cs_t != pk_cs && step > max_k_cs) max_k_cs = step;
            if (k_rc_t != pk_rc && step > max_k_rc) max_k_rc = step;
            pd_cs = d_cs_t; pd_rc = d_rc_t; pk_cs = k_cs_t; pk_rc = k_rc_t;
          end
          t = x + y + c;
          check(d_cs == 4'(t % 10) && k_cs == (t >= 10), "carry-select digit");
          check(d_rc == 4'(t % 10) && k_rc == (t >= 10), "two-gate K digit");
          check(d_x == 4'(t % 10) && k_x == (t >= 10), "F2G XOR digit");
          check(d_cs_t == d_cs && k_cs_t == k_cs && d_rc_t == d_rc && k_rc_t == k_rc,
                "timed copies agree");
          check(!pe_cs && !pe_rc && !pe_x && !pe_cs_t && !pe_rc_t, "parity checks quiet");
        end
    $display("settling in gate delays: carry select K %0d d %0d, two-gate K: K %0d d %0d",
             max_k_cs, max_d_cs, max_k_rc, max_d_rc);
    check(max_k_cs <= int'(bound_dcout(1, 1'b1)), "carry-select K within bound");
    check(max_d_cs <= int'(bound_dsum(1, 1'b1)),  "carry-select d within bound");
    check(max_k_rc <= int'(bound_dcout(1, 1'b0)), "two-gate K within bound");
    check(max_d_rc <= int'(bound_dsum(1, 1'b0)),  "two-gate d within bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
