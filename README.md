# Chinese-abacus multipliers (4x4 and 8x8 bits)

This is a pair of unsigned, purely combinational multipliers that count
instead of add. Most multipliers add their partial products with
full-adder arrays, so carries ripple bit by bit. Here each partial product
is first turned into **radix-4 digits held as beads**. A digit of value
0..3 is three wires set from the bottom up: `000`, `001`, `011`, `111`.
This is the idea of an abacus rod. Two such digits of equal weight are then
added by a multiplexer-like cell that just shifts one bead pattern up by
the count of the other, so there is no carry inside a digit. Carries only
appear where a bead count is folded back into a digit, and they then move
one radix-4 digit (two bits) at a time.

The design follows the multiplier described in *"A Multiplier Based on the
Algorithm of Chinese Abacus"*. The cell equations and the block diagrams of
the 4x4 multiplier and of the 8x4 converter come from that description. The
wiring of the 8x8 multiplier around its two converters is this design's own.
It is described under "8x8 multiplier" below, and all departures are listed
at the end.

| Module | Function |
|---|---|
| `abacus_top` | both multipliers side by side: `p4 = a4*b4`, `p8 = a8*b8` |
| `abacus_mul4x4` | 4x4 multiplier |
| `abacus_mul8x8` | 8x8 multiplier |

There is no clock, reset or handshake. A product is valid one propagation
delay after its operands change.

## The bead code

Every internal value is a thermometer code. Bit 0 is the first bead to be
set, and the value is the number of ones. `abacus_pkg` names the three
widths used:

| type | beads | value | used for |
|---|---|---|---|
| `bead2_t` | 2 | 0..2 | the top digit of a 2x2 product, some top digits |
| `bead3_t` | 3 | 0..3 | one radix-4 digit |
| `bead6_t` | 6 | 0..6 | the sum of two digits before carries are taken out |

`abacus3_t` is a packed struct `{h, m, l}` of three `bead3_t` digits, with
weights 16, 4 and 1. It is the output of a 4x2 converter.

Only valid thermometer codes may be applied to the bead inputs of a cell.
The cells decode their inputs as one-hot cases, and an invalid code gives
meaningless outputs. Every cell with bead inputs therefore has a deferred
assertion (`assert final`) that reports a bad code in simulation. The PS
cell also asserts that its one unrepresentable sum, 2 + carry, never
occurs.

## The three steps

Take `B x A` with A split into bit pairs. The 4x4 multiplier is laid out
like this:

```
              digit:   3     2     1     0
  B x A1A0                     H     M     L     (abacus_bpa4x2)
  B x A3A2             H     M     L             (abacus_bpa4x2, one digit up)
                       |     |     |     |
                      TB1  PA+TB PA+TB decode
                    P7P6  P5P4  P3P2  P1P0
```

1. **Binary product to abacus (BPA).** `abacus_bpa4x2` turns a 4-bit B
   times a 2-bit A (0..45) into three bead digits. Inside it, two `abacus_bt`
   cells each multiply a pair of B bits by A. The multiplier pair acts as a
   selector: it passes, doubles or triples the pair. Each result (0..9) comes
   out as three low beads and two beads of weight 4. `abacus_pr` adds the two
   weight-4 groups that overlap and gives a carry of weight 16.
   `abacus_ps` adds that carry to the top beads.
2. **Parallel addition (PA).** Where two converter digits overlap,
   `abacus_pa` counts both into a six-bead sum (0..6). It has no carry
   logic: X selects one of four cases, and each case shifts Y up by X
   places.
3. **Thermometric to binary (TB).** `abacus_therm2bin` adds the carry from
   the digit below to the six-bead count. It returns two product bits and a
   carry. The carry is set when the count reaches 4, or 3 with a carry in.
   These cells form the only ripple chain of the 4x4 multiplier: three digit
   positions. The lowest digit needs no addition, so `abacus_bead3_to_bin`
   only decodes it. The top digit is the high converter's H digit plus the
   last carry, and `abacus_therm2bin_top` (TB1) converts it without a carry
   out.

The worked example from the source checks the code. 13 x 2 converts to
`001|011|011` (16 + 8 + 2 = 26). 13 x 14 gives the digits `2,3,1,2`, which
is 182.

## The 8x4 converter: adding more than two digits in bead form

This is the least obvious part. An 8x8 product is built from two 8x4
partial products, and each one already needs four 4x2 converters whose
digits overlap up to three deep:

```
  digit:              5     4     3     2     1     0
  B[3:0] x A[1:0]                       H     M     L
  B[3:0] x A[3:2]                 H     M     L
  B[7:4] x A[1:0]                 M     L                (two digits up)
  B[7:4] x A[3:2]           H     M     L                (three digits up)
                                  ^ plus the H of B[7:4] x A[1:0] at digit 4
  cell:             PA3_3 PAC7_4 PA11_5 PA11_5 PA7_4  (pass)
```

The result must stay in bead form, so the column cells return a bead digit
and carry *beads* rather than binary bits:

- `abacus_pta_cell` (PTA) folds a six-bead count plus a carry (0..7) into
  three beads (value mod 4) and one carry bead of weight 4.
- `abacus_pa7_4` is PA followed by PTA. It takes two digits and a carry,
  and returns a digit and a carry: 7 beads in, 4 out.
- `abacus_pa11_5` is two PA7_4 cells in a row. It takes three digits and
  two carries, and returns a digit and **two** carries. The second carry is
  passed on as a separate bead, not merged, so the next column takes two
  carry inputs.
- `abacus_pa3_3` adds a carry to a two-bead digit.
- `abacus_pac7_4` is PA3_3 followed by PA7_4. It takes a two-bead digit, a
  three-bead digit and two carries, and returns a digit and one carry.

Every sum in this chain stays within its cell's range. An H digit of a 4x2
converter never exceeds 2. A PA11_5's first stage sees at most 2 + 3 + 1
beads, and its second stage at most 3 + 3 + 1. The exhaustive testbench of
`abacus_bpa8x4` confirms this for all 4096 input pairs.

## 8x8 multiplier

`abacus_mul8x8` places two `abacus_bpa8x4` converters, for `B x A[3:0]` and
`B x A[7:4]`. The second one sits two digits higher. Digit positions 2 to 5
overlap and each gets a PA cell and a TB cell, which makes four of each.
This matches the make-up the source gives for the 8x8 version. The source
does not draw the rest, so this design chooses it to match the 4x4
multiplier:

- Digits 0 and 1 come from the low converter alone and are only decoded.
- Digit 6 is the high converter's digit 4 plus a carry. It uses a TB cell
  whose upper beads are tied to zero, because its carry can be set.
- Digit 7 uses the TB1 cell.

The TB carry chain therefore runs over six digit positions.

## Departures from the source and choices made here

- **PR cell, K1 output.** The published equation and the published circuit
  differ in the sign of Y0 for the case X = 3. The RTL uses the inverted
  Y0. With Y0 itself, 3 + 1 would give the invalid bead pattern `010`.
- **PA3_3 cell.** The truth table gives `110` for Y = 2 with a carry, and
  the equations give `111`. The RTL uses the equations: 2 + 1 = 3.
- **TB cell, carry out.** The RTL uses the carry equation
  `Cout = Cin*K2 + K3`. The labels of the corresponding circuit drawing do
  not match it.
- **PAC7_4 inputs.** The 8x4 converter diagram draws the two-bead H digit
  toward PAC7_4's three-bead input. The cell's own diagram and description
  have a two-bead Y and a three-bead X. The H digit goes to the two-bead
  port.
- **TB1.** This cell is drawn but has no published equations. It computes
  `(K + Cin) mod 4`.
- **Unused carry inputs** that the diagrams tie to a fixed level are tied
  to 0.
- **Wider multipliers.** The source names 16x16 and 32x32 as possible
  extensions but does not say how the wider converters combine their
  columns, so they are not built.
- **Timing.** The source reports delay and power from transistor-level
  simulation, comparing against a Braun array multiplier. None of that is
  modelled here. The RTL has no cycle-level latency.

## Testbenches and simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
applies every valid bead input, or every operand pair, and compares the
result with plain integer arithmetic. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

`tb_abacus_top` runs both multipliers over all of their operands: 256 pairs
for the 4x4 and 65536 for the 8x8. It also counts how often each carry
mechanism fired, and counts a failure if one never did:

- the PR carry
- the TB carry into the top digit, for both sizes
- the PA7_4 carry
- the double carry out of a PA11_5
- the PAC7_4 carry
- a full six-bead PA count

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl rtl/abacus_pkg.sv tb/tb_abacus_top.sv \
          --top-module tb_abacus_top
./obj_dir/Vtb_abacus_top
```

Replace `tb_abacus_top` with any other `tb_<module>`. The package must come
first, and `-Irtl` lets Verilator find the other modules by file name. The
full sweep takes well under a second. All modules lint cleanly with
`verilator --lint-only -Wall`.
