# Vedic squarer and multiplier

Squaring is a multiplication with both operands equal, so a general multiplier
can do it, but a dedicated squarer can be smaller and faster. This RTL holds
two combinational units, built from rules of Vedic arithmetic, that square
4-bit numbers so they can be compared:

- an **Urdhva-Tiryagbhyam (UT) multiplier** ("vertically and crosswise"). It is
  a general N x N multiplier, built hierarchically from 2 x 2 multipliers and
  ripple-carry adders. It squares a number when both inputs are driven with it.
- a **Yavadunam squarer** ("by the deficiency"). It splits the square around
  the base 2^(N-1). The only multiplication it needs is the square of an
  (N-1)-bit deficiency.

Both units default to N = 4, the size at which they are evaluated. Both are
purely combinational: no clock, no reset, no registers.

## Yavadunam squaring

Let B = 2^(N-1) (B = 8 for N = 4). The input p lies either at or above B, or
below it. The squarer has one datapath for each case. Both compute in parallel,
and the MSB of p selects which result is shown.

**Mode 1, p >= B** (`yava_mode1`). Write p = B + d, where d is p with its MSB
removed. Then

    p^2 = B*(p + d) + d^2

d^2 has 2(N-1) bits. Its low N-1 bits are the low N-1 bits of the square
(the *LHS*). Its upper N-1 bits are a *carry* that is added to p + d to give
the upper N+1 bits (the *RHS*). So `q = {RHS, LHS}`, 2N bits in all.
Example: p = 1001 (9), d = 1, d^2 = 000001, LHS = 001, RHS = 9 + 1 + 0 = 01010,
so q = 01010_001 = 81.

**Mode 2, p < B** (`yava_mode2`). The deficiency D = B - p is formed as the
(N-1)-bit two's complement of p, with the MSB (known to be 0) dropped first.
Then

    p^2 = B*(p - D) + D^2

Again, D^2 gives the LHS (its low N-1 bits) and a carry (its upper N-1 bits).
Here p - D can be negative, so two comparators find its sign and the magnitude
|p - D| is formed. A mux then takes one of two results:

- `RHS = carry + |p - D|` when p >= D;
- `RHS = carry - |p - D|` when p < D.

Then `r = {RHS, LHS}`, 2N-2 bits in all. Example: p = 0011 (3), D = 5,
D^2 = 011_001, p - D = -2, RHS = 3 - 2 = 1, so r = 001_001 = 9.
For p = 0 the (N-1)-bit two's complement wraps to D = 0 instead of B. The
datapath then gives 0, which is still the right square, so no special case is
needed.

**Outputs** (`yavadunam_squarer`). `q` carries the square in mode 1 and is 0
in mode 2. `r` carries it in mode 2 and is 0 in mode 1. At N = 4 this makes
4 + 8 + 6 = 18 pins. Mode 1 is chosen for p >= B, so p = 8 is squared
by mode 1. The two modes use these rules:

| input      | mode | live output      | other output |
|------------|------|------------------|--------------|
| p >= 2^(N-1) | 1  | `q` (2N bits)    | `r` = 0      |
| p <  2^(N-1) | 2  | `r` (2N-2 bits)  | `q` = 0      |

The deficiency is squared with the `*` operator on N-1 bits, which is 3 bits
at N = 4. This is the only general multiplication in the squarer, and it is
much narrower than the N x N product a multiplier forms.

## Urdhva-Tiryagbhyam multiplication

**2 x 2 cell** (`vedic_mult_2x2`). The cell works on three columns:

- `Y0 = A0&B0` (vertical);
- a half adder adds the crosswise terms `A1&B0 + A0&B1`, giving `Y1` and
  carry `C1`;
- a second half adder adds `A1&B1 + C1` (vertical), giving `Y2` and `C2`.

The product is `{C2, Y2, Y1, Y0}`, so 11 x 11 = 1001.

**N x N multiplier** (`ut_multiplier`). Split x and y into halves of H = N/2
bits. Four half-width multipliers form the products:

- `l1 = xL*yL`
- `l2 = xH*yL`
- `l3 = xL*yH`
- `l4 = xH*yH`

At N = 4 these are four 2 x 2 cells. Three N-bit ripple-carry adders then
combine them:

    add1 = l2 + l3                          carry cd
    add2 = add1 + (l1 >> H)                 carry cd1
    add3 = l4 + {cd|cd1, add2[N-1:H]}       (bit H holds the carry)
    mult = {add3, add2[H-1:0], l1[H-1:0]}

The two middle carries cannot both be 1, because
l2 + l3 + (l1 >> H) < 2^(N+1). So ORing them is exact, and the third adder
never carries out. For N > 4 the same step repeats level by level. Level 1 is
a grid of 2 x 2 cells on 2-bit digits, and each higher level builds products
of digits twice as wide from four products of the level below. The same RTL
therefore builds the 8-bit and 32-bit multipliers described alongside the
4-bit one. N must be a power of two and at least 2;
an assertion checks this when simulation starts.

Example, 1011 x 1011 (11 x 11):

- The products are l1 = 11x11 = 1001, l2 = 10x11 = 0110, l3 = 11x10 = 0110
  and l4 = 10x10 = 0100.
- add1 = 1100, add2 = 1100 + 0010 = 1110 and add3 = 0100 + 0011 = 0111.
- The product is 0111_10_01 = 121.

## Files

| file | contents |
|------|----------|
| `rtl/half_adder.sv` | one-bit half adder |
| `rtl/vedic_mult_2x2.sv` | 2 x 2 UT cell, two half adders |
| `rtl/ripple_carry_adder.sv` | W-bit ripple-carry adder (default W = 4) |
| `rtl/ut_multiplier.sv` | hierarchical N x N UT multiplier (default N = 4) |
| `rtl/yava_mode1.sv` | Yavadunam datapath for p >= 2^(N-1) |
| `rtl/yava_mode2.sv` | Yavadunam datapath for p < 2^(N-1) |
| `rtl/yavadunam_squarer.sv` | both modes plus output selection |
| `rtl/vedic_square_top.sv` | top: UT multiplier and Yavadunam squarer side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

Top-level ports (`vedic_square_top`, parameter `N = 4`):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`, `y` | in | N | UT multiplier operands |
| `mult` | out | 2N | x * y |
| `p` | in | N | number to square |
| `q` | out | 2N | p^2 if p >= 2^(N-1), else 0 |
| `r` | out | 2N-2 | p^2 if p < 2^(N-1), else 0 |

The two units share no signals.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. A watchdog counts a failure if the run hangs. To build and run one,
for example the end-to-end test of the top at its default size:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_square_top.sv \
        --top-module tb_vedic_square_top -Mdir obj_top
    ./obj_top/Vtb_vedic_square_top

What the testbenches cover:

- `tb_vedic_square_top` runs at the defaults with no parameter overrides.
  - It checks all 256 products and all 16 squares.
  - It checks that the UT multiplier with x = y gives the same square as the
    Yavadunam squarer.
  - It counts that each mechanism occurred: mode 1, mode 2, a negative and a
    non-negative p - D, and a carry out of the first and of the second adder.
- `tb_ut_multiplier` runs:
  - N = 4 and N = 8 exhaustively;
  - N = 16 and N = 32 on random pairs.
- `tb_yava_mode1`, `tb_yava_mode2` and `tb_yavadunam_squarer` run N = 4 and
  N = 8 exhaustively.

All runs take well under a second.

## Reported results and what this RTL does not model

At N = 4 the two units were synthesized for a Xilinx FPGA:

| unit | delay | LUTs | I/O |
|------|-------|------|-----|
| Yavadunam squarer | 5.731 ns | 12 | 18 |
| UT multiplier | 11.448 ns | 24 | 16 |

These are results for that FPGA flow, not properties of this RTL. The RTL has
the same I/O counts, but its timing and area depend on the tool and target.

The differences from the original description:

- **Mode-1 step.** The mode-1 RHS adds the carry (upper bits of d^2) to p + d.
  The written step says the low bits, but only the carry gives the correct
  square.
- **Mode-2 subtraction.** In mode 2 the negative case subtracts the magnitude
  |p - D| from the carry, not the two's-complement difference.
- **Second adder carry.** In the UT multiplier the routing of the second adder's
  carry is a choice made here. It is ORed with the first adder's carry into
  bit H of the third adder's operand.
- **Adder cell and carry-in.** The ripple-carry adder's full-adder equations
  are standard ones chosen here. It also has a carry-in, which the multiplier
  ties to 0.
- **Scope.** Only the two binary units above are implemented. The Booth
  multiplier that serves as a speed reference for them is not part of this
  design.
