// End-to-end testbench for the 4-digit quick decimal adder.
//
// Five copies of the adder see the same operands: the default (carry-select
// K stage, Fredkin gates only), the two-gate K stage, the one-Feynman-gate
// XOR form, and timed copies of the first two with one time unit per gate.
// Directed corner cases and random BCD operands are compared with a decimal
// reference computed from the digits as integers. The testbench counts how
// often each mechanism of the design was exercised and fails if one never
// was: a digit whose binary sum needs the 6-correction (L), a digit at
// exactly nine that passes an incoming carry on (the case carry select
// resolves with K1), a carry rippling through all digits, and a decimal
// overflow out of the top digit.
//
// Timing: every timed case starts from settled inputs; the last output
// change is located to the gate delay. Random cases must settle within the
// published bounds (sum 17 + m and carry out 11 + m gate delays for carry
// select, 15 + 2m and 10 + 2m for the two-gate K stage). A lone carry-in
// step through 9999 must reach the carry out after m gate delays with carry
// select and 2m without, and the top sum digit five gates after that
// digit's K.
`timescale 1ns/1ps
module tb_qad_adder;
  import qad_pkg::*;
  localparam int unsigned M = 4;
  localparam int unsigned W = 4 * M;
  localparam int unsigned G = M * DIGIT_GARBAGE;

  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] s_cs, s_rc, s_x, s_cs_t, s_rc_t;
  logic         c_cs, c_rc, c_x, c_cs_t, c_rc_t;
  logic         pe_cs, pe_rc, pe_x, pe_cs_t, pe_rc_t;
  logic [G-1:0] g_cs, g_rc, g_x, g_cs_t, g_rc_t;

  qad_adder #(.DIGITS(M)) dut_cs (
    .a(a), .b(b), .cin(cin), .sum(s_cs), .cout(c_cs), .garbage(g_cs), .parity_err(pe_cs));
  qad_adder #(.DIGITS(M), .CARRY_SELECT(1'b0)) dut_rc (
    .a(a), .b(b), .cin(cin), .sum(s_rc), .cout(c_rc), .garbage(g_rc), .parity_err(pe_rc));
  qad_adder #(.DIGITS(M), .XOR_F2G(1'b1)) dut_x (
    .a(a), .b(b), .cin(cin), .sum(s_x), .cout(c_x), .garbage(g_x), .parity_err(pe_x));
  qad_adder #(.DIGITS(M), .GATE_DELAY(1)) dut_cs_t (
    .a(a), .b(b), .cin(cin), .sum(s_cs_t), .cout(c_cs_t), .garbage(g_cs_t), .parity_err(pe_cs_t));
  qad_adder #(.DIGITS(M), .CARRY_SELECT(1'b0), .GATE_DELAY(1)) dut_rc_t (
    .a(a), .b(b), .cin(cin), .sum(s_rc_t), .cout(c_rc_t), .garbage(g_rc_t), .parity_err(pe_rc_t));

  // Mechanism counters.
  int n_six_corr = 0, n_nine_pass = 0, n_full_ripple = 0, n_overflow = 0;
  int max_s_cs = 0, max_c_cs = 0, max_s_rc = 0, max_c_rc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%0b -> sum=%h cout=%0b (rc %h %0b, f2g %h %0b)",
               what, a, b, cin, s_cs, c_cs, s_rc, c_rc, s_x, c_x);
    end
  endtask

  function automatic longint unsigned bcd_value(logic [W-1:0] v);
    longint unsigned r = 0;
    for (int i = M - 1; i >= 0; i--) r = r * 10 + longint'(v[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [W-1:0] random_bcd();
    logic [W-1:0] v;
    for (int i = 0; i < M; i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  // Apply operands, locate the last change on each timed output and check
  // everything against the decimal reference.
  task automatic apply(input logic [W-1:0] na, input logic [W-1:0] nb, input logic ncin,
                       output int ls_cs, output int lc_cs, output int ls_rc, output int lc_rc);
    logic [W-1:0]    ps_cs, ps_rc;
    logic            pc_cs, pc_rc;
    longint unsigned ref_v, mod;
    logic [W-1:0]    ref_s;
    logic            ref_c, carry;
    a = na; b = nb; cin = ncin;
    ps_cs = s_cs_t; ps_rc = s_rc_t; pc_cs = c_cs_t; pc_rc = c_rc_t;
    ls_cs = 0; lc_cs = 0; ls_rc = 0; lc_rc = 0;
    #0.5;
    for (int step = 1; step <= 60; step++) begin
      #1;
      if (s_cs_t != ps_cs) ls_cs = step;
      if (s_rc_t != ps_rc) ls_rc = step;
      if (c_cs_t != pc_cs) lc_cs = step;
      if (c_rc_t != pc_rc) lc_rc = step;
      ps_cs = s_cs_t; ps_rc = s_rc_t; pc_cs = c_cs_t; pc_rc = c_rc_t;
    end
    // Decimal reference.
    mod   = 1;
    for (int i = 0; i < M; i++) mod *= 10;
    ref_v = bcd_value(na) + bcd_value(nb) + longint'(ncin);
    ref_c = ref_v >= mod;
    ref_v = ref_v % mod;
    for (int i = 0; i < M; i++) begin
      ref_s[4*i +: 4] = 4'(ref_v % 10);
      ref_v /= 10;
    end
    check(s_cs == ref_s && c_cs == ref_c, "carry-select adder");
    check(s_rc == ref_s && c_rc == ref_c, "two-gate K adder");
    check(s_x == ref_s && c_x == ref_c, "F2G XOR adder");
    check(s_cs_t == ref_s && c_cs_t == ref_c && s_rc_t == ref_s && c_rc_t == ref_c,
          "timed adders");
    check(!pe_cs && !pe_rc && !pe_x && !pe_cs_t && !pe_rc_t, "parity checks quiet");
    // Mechanisms, from the operand digits.
    carry = ncin;
    begin
      int run = 0;
      for (int i = 0; i < M; i++) begin
        int ds;
        ds = int'(na[4*i +: 4]) + int'(nb[4*i +: 4]);
        if (ds > 9) n_six_corr++;
        if (ds == 9 && carry) begin n_nine_pass++; run++; end
        carry = (ds + int'(carry)) > 9;
      end
      if (ncin && run == int'(M)) n_full_ripple++;
    end
    if (ref_c) n_overflow++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ls_cs, lc_cs, ls_rc, lc_rc;
    logic [W-1:0] nines;
    for (int i = 0; i < M; i++) nines[4*i +: 4] = 4'd9;

    a = '0; b = '0; cin = 1'b0;
    #50;

    // Carry-in step through 9999 + 0000: the whole decimal carry chain.
    apply(nines, '0, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    apply(nines, '0, 1'b1, ls_cs, lc_cs, ls_rc, lc_rc);
    $display("cin step: carry select cout %0d sum %0d, two-gate K cout %0d sum %0d",
             lc_cs, ls_cs, lc_rc, ls_rc);
    check(lc_cs == int'(M),         "carry select: one gate per digit to cout");
    check(ls_cs == int'(M) + 5,     "carry select: top digit five gates after its K");
    check(lc_rc == 2 * int'(M),     "two-gate K: two gates per digit to cout");
    check(ls_rc == 2 * int'(M) + 5, "two-gate K: top digit five gates after its K");

    // Directed corners.
    apply('0, '0, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    apply(nines, nines, 1'b1, ls_cs, lc_cs, ls_rc, lc_rc);
    apply(nines, {{(W-4){1'b0}}, 4'd1}, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    apply({M{4'd5}}, {M{4'd4}}, 1'b1, ls_cs, lc_cs, ls_rc, lc_rc);
    apply({M{4'd8}}, {M{4'd8}}, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);

    // Random operands, each from settled random operands.
    for (int n = 0; n < 600; n++) begin
      apply(random_bcd(), random_bcd(), 1'($urandom_range(1)), ls_cs, lc_cs, ls_rc, lc_rc);
      if (ls_cs > max_s_cs) max_s_cs = ls_cs;
      if (lc_cs > max_c_cs) max_c_cs = lc_cs;
      if (ls_rc > max_s_rc) max_s_rc = ls_rc;
      if (lc_rc > max_c_rc) max_c_rc = lc_rc;
    end
    $display("random settling: carry select sum %0d cout %0d, two-gate K sum %0d cout %0d",
             max_s_cs, max_c_cs, max_s_rc, max_c_rc);
    check(max_s_cs <= int'(bound_dsum(M, 1'b1)),  "carry select sum within bound");
    check(max_c_cs <= int'(bound_dcout(M, 1'b1)), "carry select cout within bound");
    check(max_s_rc <= int'(bound_dsum(M, 1'b0)),  "two-gate K sum within bound");
    check(max_c_rc <= int'(bound_dcout(M, 1'b0)), "two-gate K cout within bound");

    $display("mechanisms: 6-correction %0d, nine passing a carry %0d, full ripple %0d, overflow %0d",
             n_six_corr, n_nine_pass, n_full_ripple, n_overflow);
    check(n_six_corr > 0,    "6-correction exercised");
    check(n_nine_pass > 0,   "carry through a nine exercised");
    check(n_full_ripple > 0, "full ripple exercised");
    check(n_overflow > 0,    "decimal overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
