// Workload testbench: gate-delay growth of the quick decimal adder with the
// number of digits. For m = 1 and 8 digits (4 digits is covered by
// tb_qad_adder; the published delay plot reaches 100 digits, which this
// gate-delay simulation does not build in reasonable time) it measures, with one time unit
// per gate, the settling of the carry-select and two-gate-K forms (see
// qad_delay_probe) and checks each against the published formulas: sum by
// 17 + m or 15 + 2m gate delays, carry out by 11 + m or 10 + 2m. It prints
// the largest settling time seen next to the formula for each size. A
// 100-digit adder without gate delays, the largest size of that plot, is
// checked for function on random operands and an all-nines carry chain.
`timescale 1ns/1ps
module tb_qad_delay_scaling;
  import qad_pkg::*;
  localparam int NP = 2;
  localparam int unsigned SIZES [NP] = '{1, 8};

  int checks = 0, failures = 0;
  logic start = 1'b0;
  logic [NP-1:0] done;
  int c  [NP], f  [NP];
  int sc [NP], cc [NP], sr [NP], cr [NP];

  for (genvar i = 0; i < NP; i++) begin : g_size
    qad_delay_probe #(.M(SIZES[i]), .N_RANDOM(40)) u_probe (
      .start(start), .done(done[i]), .checks(c[i]), .failures(f[i]),
      .max_sum_cs(sc[i]), .max_cout_cs(cc[i]), .max_sum_rc(sr[i]), .max_cout_rc(cr[i]));
  end

  // 100-digit functional check.
  localparam int unsigned BIG = 100;
  logic [4*BIG-1:0] big_a, big_b, big_s;
  logic             big_cin, big_cout, big_perr;
  logic [BIG*DIGIT_GARBAGE-1:0] big_g;

  qad_adder #(.DIGITS(BIG)) u_big (
    .a(big_a), .b(big_b), .cin(big_cin), .sum(big_s), .cout(big_cout),
    .garbage(big_g), .parity_err(big_perr));

  task automatic big_run(input logic [4*BIG-1:0] x, input logic [4*BIG-1:0] y, input logic c);
    logic [4*BIG-1:0] rs;
    logic             carry;
    big_a = x; big_b = y; big_cin = c;
    #1;
    carry = c;
    for (int i = 0; i < int'(BIG); i++) begin
      int t;
      t = int'(x[4*i +: 4]) + int'(y[4*i +: 4]) + int'(carry);
      rs[4*i +: 4] = 4'(t % 10);
      carry = t >= 10;
    end
    checks++;
    if (big_s != rs || big_cout != carry || big_perr) begin
      failures++;
      $display("FAIL 100-digit sum");
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4*BIG-1:0] x, y;
    #1;
    for (int i = 0; i < int'(BIG); i++) x[4*i +: 4] = 4'd9;
    big_run(x, '0, 1'b1);
    checks++;
    if (!(big_cout && big_s == '0)) begin
      failures++;
      $display("FAIL 100-digit carry chain");
    end
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < int'(BIG); i++) begin
        x[4*i +: 4] = 4'($urandom_range(9));
        y[4*i +: 4] = 4'($urandom_range(9));
      end
      big_run(x, y, 1'($urandom_range(1)));
    end
    start = 1'b1;
    wait (&done);
    for (int i = 0; i < NP; i++) begin
      $display("m=%0d: carry select sum %0d (bound %0d) cout %0d (bound %0d); two-gate K sum %0d (bound %0d) cout %0d (bound %0d)",
               SIZES[i], sc[i], bound_dsum(SIZES[i], 1'b1), cc[i], bound_dcout(SIZES[i], 1'b1),
               sr[i], bound_dsum(SIZES[i], 1'b0), cr[i], bound_dcout(SIZES[i], 1'b0));
      checks   += c[i];
      failures += f[i];
    end
    // The carry-select form must be the faster one beyond a single digit.
    for (int i = 1; i < NP; i++) begin
      checks++;
      if (!(sc[i] < sr[i] && cc[i] < cr[i])) begin
        failures++;
        $display("FAIL m=%0d: carry select not faster", SIZES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
