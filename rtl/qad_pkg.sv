// Shared constants of the reversible quick decimal adder.
//
// Every building block is a network of 3-input/3-output reversible gates. The
// outputs a block does not pass on are its garbage outputs; their counts are
// fixed by the gate networks and are collected here so that the enclosing
// blocks can size their garbage buses. The counts follow from the gate
// networks: half adder 3 gates, full adder 5 gates, 6-correction 3 gates, K
// generation 3 gates, special adder 15 Fredkin gates (or 14 gates when its
// top-bit XOR is a single Feynman double gate).
`timescale 1ns/1ps
package qad_pkg;

  // Garbage outputs of each leaf network.
  localparam int unsigned HA_GARBAGE    = 3;
  localparam int unsigned FA_GARBAGE    = 5;
  localparam int unsigned CORR6_GARBAGE = 6;
  localparam int unsigned KGEN_GARBAGE  = 6;

  // Four-bit binary adder: one half adder and three full adders.
  localparam int unsigned BIN4_GARBAGE  = HA_GARBAGE + 3 * FA_GARBAGE;

  // Special adder: half adder, two full adders and the top-bit XOR. The
  // two-Fredkin-gate XOR leaves three garbage outputs; the one-gate Feynman
  // form leaves two and pads the third with zero so both share one width.
  localparam int unsigned XOR_GARBAGE   = 3;
  localparam int unsigned SPADD_GARBAGE = HA_GARBAGE + 2 * FA_GARBAGE + XOR_GARBAGE;

  // One decimal digit of the adder.
  localparam int unsigned DIGIT_GARBAGE = BIN4_GARBAGE + CORR6_GARBAGE + KGEN_GARBAGE
                                        + SPADD_GARBAGE;

  // Gate-level delay of an m-digit adder with 4-bit digits, counted in gate
  // delays from the BCD inputs (published estimates, used as upper bounds).
  function automatic int unsigned bound_dcout(int unsigned m, bit carry_select);
    return carry_select ? 5 + 2 * (4 - 1) + m : 4 + 2 * (4 - 1) + 2 * m;
  endfunction

  function automatic int unsigned bound_dsum(int unsigned m, bit carry_select);
    return carry_select ? 11 + 2 * (4 - 1) + m : 9 + 2 * (4 - 1) + 2 * m;
  endfunction

endpackage
