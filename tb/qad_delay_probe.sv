// Gate-delay probe for one adder size, used by tb_qad_delay_scaling.
//
// Holds an M-digit quick decimal adder with one time unit per gate, once
// with the carry-select K stage and once with the two-gate K stage, and on
// `start` measures:
//   - a carry-in step through an all-nines operand: the carry out must
//     change after exactly M (carry select) or 2M (two-gate K) gate delays,
//     and the last sum bit five gates after the top digit's K;
//   - a step from zero to 99..9 + 00..1, which makes digit 0 generate a
//     carry from its 6-correction bit and all others pass it on;
//   - N_RANDOM random BCD operand changes.
// Every result is checked against a decimal reference and every settling
// time against the published bounds (qad_pkg::bound_dsum/bound_dcout). The
// largest settling times are reported on the ports when `done` rises.
`timescale 1ns/1ps
module qad_delay_probe
  import qad_pkg::*;
#(
  parameter int unsigned M        = 4,
  parameter int unsigned N_RANDOM = 20
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   max_sum_cs,
  output int   max_cout_cs,
  output int   max_sum_rc,
  output int   max_cout_rc
);
  localparam int unsigned W = 4 * M;
  localparam int unsigned G = M * DIGIT_GARBAGE;
  localparam int          WINDOW = 3 * int'(M) + 40;

  logic [W-1:0] a, b, s_cs, s_rc;
  logic         cin, c_cs, c_rc, pe_cs, pe_rc;
  logic [G-1:0] g_cs, g_rc;

  qad_adder #(.DIGITS(M), .GATE_DELAY(1)) u_cs (
    .a(a), .b(b), .cin(cin), .sum(s_cs), .cout(c_cs), .garbage(g_cs), .parity_err(pe_cs));
  qad_adder #(.DIGITS(M), .CARRY_SELECT(1'b0), .GATE_DELAY(1)) u_rc (
    .a(a), .b(b), .cin(cin), .sum(s_rc), .cout(c_rc), .garbage(g_rc), .parity_err(pe_rc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d %s", M, what);
    end
  endtask

  // Decimal reference: digit-serial addition of the operands.
  task automatic reference(output logic [W-1:0] rs, output logic rc);
    logic carry = cin;
    for (int i = 0; i < int'(M); i++) begin
      int t;
      t = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + int'(carry);
      rs[4*i +: 4] = 4'(t % 10);
      carry = t >= 10;
    end
    rc = carry;
  endtask

  task automatic apply(input logic [W-1:0] na, input logic [W-1:0] nb, input logic ncin,
                       output int ls_cs, output int lc_cs, output int ls_rc, output int lc_rc);
    logic [W-1:0] ps_cs, ps_rc, rs;
    logic         pc_cs, pc_rc, rc;
    a = na; b = nb; cin = ncin;
    ps_cs = s_cs; ps_rc = s_rc; pc_cs = c_cs; pc_rc = c_rc;
    ls_cs = 0; lc_cs = 0; ls_rc = 0; lc_rc = 0;
    #0.5;
    for (int step = 1; step <= WINDOW; step++) begin
      #1;
      if (s_cs != ps_cs) ls_cs = step;
      if (s_rc != ps_rc) ls_rc = step;
      if (c_cs != pc_cs) lc_cs = step;
      if (c_rc != pc_rc) lc_rc = step;
      ps_cs = s_cs; ps_rc = s_rc; pc_cs = c_cs; pc_rc = c_rc;
    end
    reference(rs, rc);
    check(s_cs == rs && c_cs == rc, "carry-select result");
    check(s_rc == rs && c_rc == rc, "two-gate K result");
    check(!pe_cs && !pe_rc, "parity checks quiet");
    check(ls_cs <= int'(bound_dsum(M, 1'b1)) && lc_cs <= int'(bound_dcout(M, 1'b1)),
          "carry-select settling within bound");
    check(ls_rc <= int'(bound_dsum(M, 1'b0)) && lc_rc <= int'(bound_dcout(M, 1'b0)),
          "two-gate K settling within bound");
    if (ls_cs > max_sum_cs)  max_sum_cs  = ls_cs;
    if (lc_cs > max_cout_cs) max_cout_cs = lc_cs;
    if (ls_rc > max_sum_rc)  max_sum_rc  = ls_rc;
    if (lc_rc > max_cout_rc) max_cout_rc = lc_rc;
  endtask

  function automatic logic [W-1:0] random_bcd();
    logic [W-1:0] v;
    for (int i = 0; i < int'(M); i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  initial begin
    int ls_cs, lc_cs, ls_rc, lc_rc;
    logic [W-1:0] nines, one;
    done = 1'b0; checks = 0; failures = 0;
    max_sum_cs = 0; max_cout_cs = 0; max_sum_rc = 0; max_cout_rc = 0;
    a = '0; b = '0; cin = 1'b0;
    for (int i = 0; i < int'(M); i++) nines[4*i +: 4] = 4'd9;
    one = W'(1);
    wait (start);
    #(WINDOW);

    apply(nines, '0, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    apply(nines, '0, 1'b1, ls_cs, lc_cs, ls_rc, lc_rc);
    check(lc_cs == int'(M),         "carry select: carry in to carry out in M gates");
    check(ls_cs == int'(M) + 5,     "carry select: sum settles five gates after the top K");
    check(lc_rc == 2 * int'(M),     "two-gate K: carry in to carry out in 2M gates");
    check(ls_rc == 2 * int'(M) + 5, "two-gate K: sum settles five gates after the top K");

    apply('0, '0, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    apply(nines, one, 1'b0, ls_cs, lc_cs, ls_rc, lc_rc);
    check(c_cs && s_cs == '0, "generated carry ripples to the top");

    for (int n = 0; n < int'(N_RANDOM); n++)
      apply(random_bcd(), random_bcd(), 1'($urandom_range(1)), ls_cs, lc_cs, ls_rc, lc_rc);
    done = 1'b1;
  end
endmodule
