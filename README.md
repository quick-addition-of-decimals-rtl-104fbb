# Quick decimal adder in reversible Fredkin-gate logic

A multi-digit BCD adder in which the only signal that ripples from digit to
digit is a single decimal-carry bit, built from one kind of gate: the Fredkin
(controlled-swap) gate. Because the Fredkin gate is reversible and
conservative (it never changes the number of ones passing through it), every
block also preserves parity, which makes a simple parity check possible.

This RTL models the gate network at gate level, so that it can be simulated,
checked for function, and timed in gate delays. It is ordinary synthesizable
SystemVerilog. Synthesis maps it to conventional logic. It is a reference
model of the reversible circuit, not a reversible implementation.

## The idea: only the decimal carry ripples

A conventional BCD adder adds two digits and a carry in binary, corrects the
result by adding 6 when it exceeds 9, and passes the carry on. The carry in
is needed at the very first step, so a whole digit adder sits on the carry
path of every digit.

The quick decimal adder (QAD) reorders the work so that each digit needs the
incoming carry as late as possible:

1. **Binary sum, no carry in.** `S = a + b` (4 bits plus a binary carry
   `Cout`). All digits do this at the same time.
2. **6-correction bit.** `L = Cout + S3 (S1 + S2)`, which is 1 when `a + b > 9`.
   This is also carry-independent.
3. **Decimal carry.** Only now is the carry in used:
   `K = S3 S0 Cin + L`. A digit carries out if its pair already exceeds
   nine, or if it is exactly nine and a carry comes in. (`S3 S0` is also 1
   for 11, 13 and 15, but `L` already covers those.)
4. **Special adder.** The BCD digit is `d = S + N mod 16` with
   `N = {0, K, K, Cin}`. That is, it adds 6 + Cin when K is set and Cin
   otherwise. `N3` is always 0 and `N2 = N1 = K`, so this adder is smaller
   than a full 4-bit adder: a half adder on bit 0, full adders on bits 1 and
   2, and an XOR on bit 3.

Across `m` digits, steps 1 and 2 run in parallel. The carry chain is then
just `m` copies of step 3, and only the last digit's special adder follows
the end of the chain.

Why `S + N mod 16` is right: when `K = 1` the true digit total is
`a + b + Cin >= 10`, and the wanted digit is that total minus 10. Since
`S = (a + b) mod 16`, `S + 6 + Cin` taken mod 16 gives exactly that.

### Carry-select K stage

K can also be formed in two halves. Before the carry arrives, compute both
candidates: `K1 = S3 S0 + L` (for `Cin = 1`) and `K0 = L` (for `Cin = 0`).
Then let `Cin` select one through a single Fredkin gate used as a 2:1
multiplexer. This costs no extra gates (three in either form) and halves the
per-digit carry delay from two gates to one. It is the default
(`CARRY_SELECT = 1`). The two-gate form is kept as `CARRY_SELECT = 0`.

## Building everything from Fredkin gates

A Fredkin gate `FRG(A, B, C)` outputs `P = A`, `Q = A'B ^ AC` and
`R = AB ^ A'C`: it swaps B and C when A is 1. With constant inputs, one gate
can act as:

| use | inputs | output used |
|---|---|---|
| AND | `FRG(x, y, 0)` | `R = x y` |
| OR | `FRG(x, y, 1)` | `Q = x + y` |
| copy and invert | `FRG(x, 1, 0)` | `P = x`, `Q = x'`, `R = x` |
| XOR / XNOR | `FRG(x, y, y')` | `Q = x ^ y`, `R = x xnor y` |
| 2:1 mux | `FRG(s, d0, d1)` | `Q = s ? d1 : d0` |

The blocks are built as follows (`g1`, `g2`, ... is the order of the gates):

| block | gates | network |
|---|---|---|
| `rev_ha` half adder | 3 | `g1 = FRG(B,1,0)`, `g2 = FRG(A,B,0)` → carry on R, `g3 = FRG(A,B,B')` → sum on Q |
| `rev_fa` full adder | 5, 3 levels | `g1 = FRG(B,1,0)`, `g2 = FRG(A,B,B')` → A^B, A xnor B; `g3 = FRG(C,1,0)`; `g4 = FRG(A^B,C,C')` → sum; `g5 = FRG(A xnor B, C, B)` → carry |
| `bin_adder4` | 18 | half adder on bit 0, full adders on bits 1–3 |
| `corr6` (L) | 3 | OR(S1,S2), AND with S3, OR with Cout |
| `kgen` (K) | 3 | AND(S3,S0), AND with Cin, OR with L |
| `kgen_csel` (K) | 3 | AND(S3,S0); `FRG(L, S3S0, 1)` → K0 = L on P, K1 on Q; `FRG(Cin, K0, K1)` → K |
| `special_adder` | 15 | half adder (Cin, S0), full adders (K, S1, c0) and (K, S2, c1), XOR `FRG(S3,1,0)` + `FRG(c2,S3,S3')` |

With `XOR_F2G = 1`, the special adder's XOR is one Feynman double gate
(`f2g`: `P = A, Q = A^B, R = A^C`) instead, giving 14 gates. The default
keeps a single gate type.

In the full adder, the carry in `C` passes through only two gates (`g3`,
then `g5`). A chain of these adders therefore ripples at two gate delays per
bit, and the half adder's carry is ready after two. The carry out of the
4-bit adder is thus ready after `2 + 2(n-1) = 8` gate delays.

In the special adder, Cin goes into the half adder's A input, which is one
gate from its carry. K goes into the A input of each full adder. From K to
the top sum bit is then five gates, and from a Cin that arrives together
with K it is six.

## Timing in gate delays

The design is combinational: there is no clock and no state. Its speed is
counted in Fredkin gate delays. Every gate takes the parameter `GATE_DELAY`
(default 0, which synthesis ignores). With `GATE_DELAY = 1`, simulation time
equals gate levels, and the testbenches locate each output's last change to
the gate.

The published estimates for an `m`-digit adder of 4-bit digits
(`n = 4`) are:

| | two-gate K (`CARRY_SELECT=0`) | carry select (`CARRY_SELECT=1`) |
|---|---|---|
| carry out | `4 + 2(n-1) + 2m = 10 + 2m` | `5 + 2(n-1) + m = 11 + m` |
| sum | `9 + 2(n-1) + 2m = 15 + 2m` | `11 + 2(n-1) + m = 17 + m` |

The same formulas are in `qad_pkg::bound_dcout` and `qad_pkg::bound_dsum`.
They count from the BCD inputs, with the digit-0 carry in treated as arriving
when L is ready. In this netlist the carry in can arrive at time 0, so for
the two-gate form the real paths are one gate shorter than the formulas. The
testbenches therefore check the formulas as upper bounds, and they check the
per-digit behaviour exactly:

* A carry-in step through `99..9 + 0` reaches the carry out after exactly
  `m` gate delays with carry select, and `2m` without.
* The sum settles exactly five gates after the top digit's K.

Largest settling times seen in one run, in gate delays (bound in parentheses; random operands make the 1-digit figures vary by one between runs):

| digits | carry select: sum | carry select: cout | two-gate K: sum | two-gate K: cout |
|---|---|---|---|---|
| 1 | 17 (18) | 12 (12) | 16 (17) | 11 (12) |
| 4 | 20 (21) | 15 (15) | 22 (23) | 17 (18) |
| 8 | 21 (25) | 16 (19) | 27 (31) | 22 (26) |

These come from random operands plus the worst cases named above, so they
are lower bounds on the true worst case. Beyond one digit, carry select is
faster, and the gap grows by one gate per digit.

## Garbage outputs and the parity check

A reversible gate has as many outputs as inputs. Outputs that no other gate
uses are *garbage*. Every block brings its garbage out on a `garbage` bus.
For example, the full adder has 3 inputs and 4 constant inputs, and 2
results and 5 garbage outputs. Per digit there are 46 garbage bits: 18 in
the binary adder, 6 in `corr6`, 6 in the K stage and 16 in the special
adder. `qad_pkg` holds these widths. The adder's `garbage` port is
`DIGITS * 46` bits wide, digit `i` at `[i*46 +: 46]`.

Since every gate preserves parity, the parity of a block's inputs plus its
constants equals the parity of its outputs plus its garbage. Each block
computes this comparison as `perr` in ordinary logic beside the reversible
network. The top ORs all of them into `parity_err`. In a fault-free circuit
`parity_err` is always 0. A single flipped bit among a block's outputs or
garbage makes it 1; a fault inside a block that spreads to an even number of
that block's outputs is not caught. This
checker is an addition here: the original description only points out that
parity preservation makes such detection possible.

## Interface of the top, `qad_adder`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | `4*DIGITS` | BCD operands; digit `i` in bits `[4i+3:4i]` |
| `cin` | in | 1 | carry into digit 0 |
| `sum` | out | `4*DIGITS` | BCD sum |
| `cout` | out | 1 | decimal carry out (K of the top digit) |
| `garbage` | out | `DIGITS*46` | unused gate outputs |
| `parity_err` | out | 1 | some block's parity check failed |

| parameter | default | meaning |
|---|---|---|
| `DIGITS` | 4 | number of BCD digits (the published configuration is 4 digits, 16 bits) |
| `CARRY_SELECT` | 1 | 1: carry-select K stage; 0: two-gate K stage |
| `XOR_F2G` | 0 | 1: special-adder XOR from one Feynman double gate |
| `GATE_DELAY` | 0 | simulation delay per gate, in ns |

Operands must be valid BCD (each digit 0–9). The result for other codes is
not defined.

## Where this departs from, or goes beyond, the original circuit

* **Fan-out.** Strictly reversible circuits allow each output to drive one
  input. The original gate counts include no copy gates at the digit level,
  yet the binary sum `S`, `Cin` and `K` each feed several blocks (K, for
  instance, feeds both full adders of the special adder and the next digit).
  Here these signals are wired directly. Inside each block, every gate output
  drives at most one input.
* **Gate wiring.** The original figures give each block's gate count, gate
  type, constant inputs and signal names. They do not label which output of
  one gate drives which input of the next. That wiring was reconstructed to
  give the stated functions, gate counts and delay counts. The testbenches
  confirm the delay counts listed above.
* **Input roles in the special adder** (Cin on the half adder's fast input,
  K on the full adders' A inputs) were chosen to meet the published
  five-gate and six-gate figures.
* **Parity checker and garbage ports** are additions, described above.
* **Not modelled:** the conventional BCD adder and the earlier reversible
  adders that the original work compares against; area and delay figures
  from standard-cell synthesis, which depend on a cell library.

## Files

`rtl/` holds one module per file and the package `qad_pkg`:

`frg`, `f2g` (gates) → `rev_ha`, `rev_fa` → `bin_adder4`, `corr6`,
`kgen`, `kgen_csel`, `special_adder` → `qad_digit` → `qad_adder` (top).

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. In addition:

* `tb_qad_adder`: end-to-end test of five 4-digit variants. It runs corners
  and 600 random sums, and gate-delay checks on timed copies. It counts the
  6-correction, carry-through-nine, full-ripple and overflow cases, and fails
  if any of them never occurs.
* `tb_qad_adder_full`: the default configuration, unmodified, on 20 000
  random sums.
* `tb_qad_delay_scaling` with the helper `qad_delay_probe`: gate-delay
  measurements at 1 and 8 digits against the formulas above. It also runs a
  functional check of a 100-digit adder without gate delays.

To simulate with Verilator 5 from the project root:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/qad_pkg.sv tb/tb_qad_adder.sv --top-module tb_qad_adder -o sim
./obj_dir/sim
```

The testbenches need `--timing`. The timed copies make `tb_qad_adder` take
about a minute to build. Changing `DIGITS` needs no other edit: all widths
follow from it and from `qad_pkg`. Simulating with `GATE_DELAY = 1` makes
the C++ model grow quickly with the digit count. Tens of digits are
practical; a hundred is not.
