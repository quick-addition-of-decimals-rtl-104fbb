// Testbench for the quick decimal adder exactly as configured by default
// (4 digits, carry-select K stage, Fredkin gates only, no gate delay).
// Corner cases and 20000 random BCD operand pairs with random carry in are
// checked against a decimal reference, and the parity check must stay quiet.
`timescale 1ns/1ps
module tb_qad_adder_full;
  import qad_pkg::*;
  localparam int unsigned M = 4;
  localparam int unsigned W = 4 * M;

  int checks = 0, failures = 0;
  logic [W-1:0] a, b, sum;
  logic         cin, cout, parity_err;
  logic [M*DIGIT_GARBAGE-1:0] garbage;

  qad_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
                 .garbage(garbage), .parity_err(parity_err));

  function automatic int unsigned to_int(logic [W-1:0] v);
    int unsigned r = 0;
    for (int i = M - 1; i >= 0; i--) r = r * 10 + int'(v[4*i +: 4]);
    return r;
  endfunction

  task automatic run(input int unsigned x, input int unsigned y, input logic c);
    int unsigned t;
    for (int i = 0; i < M; i++) begin
      a[4*i +: 4] = 4'(x % 10); x /= 10;
      b[4*i +: 4] = 4'(y % 10); y /= 10;
    end
    cin = c;
    #1;
    t = to_int(a) + to_int(b) + int'(c);
    checks++;
    if (to_int(sum) != t % 10000 || cout != (t >= 10000) || parity_err) begin
      failures++;
      $display("FAIL %h + %h + %0b -> %h cout %0b perr %0b", a, b, c, sum, cout, parity_err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, 0, 0);
    run(9999, 0, 1);
    run(9999, 9999, 1);
    run(5000, 4999, 1);
    run(1234, 8766, 0);
    for (int n = 0; n < 20000; n++)
      run($urandom_range(9999), $urandom_range(9999), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
