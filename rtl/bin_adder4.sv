// Four-bit reversible binary adder: the first stage of every decimal digit.
//
// A half adder on bit 0 and full adders on bits 1 to 3, carries rippling
// upward. There is no carry in: the digit's incoming decimal carry is added
// later by the special adder, so all digits of a multi-digit adder run this
// stage in parallel. The half adder's carry is ready after two gate levels
// and each full adder adds two, so the carry out leaves after 2 + 2(n-1) = 8
// gate levels, as the published analysis states. S = a + b mod 16 and
// cout = (a + b) >= 16. perr is the OR of the sub-adders' parity checks.
`timescale 1ns/1ps
module bin_adder4
  import qad_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic [3:0]              a,
  input  logic [3:0]              b,
  output logic [3:0]              s,
  output logic                    cout,
  output logic [BIN4_GARBAGE-1:0] garbage,
  output logic                    perr
);

  logic [3:0] c;       // c[i] is the carry out of bit i
  logic [3:0] pe;

  rev_ha #(.GATE_DELAY(GATE_DELAY)) u_ha (
    .a(a[0]), .b(b[0]), .sum(s[0]), .carry(c[0]),
    .garbage(garbage[HA_GARBAGE-1:0]), .perr(pe[0])
  );

  for (genvar i = 1; i < 4; i++) begin : g_fa
    rev_fa #(.GATE_DELAY(GATE_DELAY)) u_fa (
      .a(a[i]), .b(b[i]), .c(c[i-1]), .sum(s[i]), .carry(c[i]),
      .garbage(garbage[HA_GARBAGE + (i-1)*FA_GARBAGE +: FA_GARBAGE]), .perr(pe[i])
    );
  end

  assign cout = c[3];
  assign perr = |pe;

endmodule
