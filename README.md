# Serial and parallel multipliers: add-and-shift, radix-2 Booth, radix-4 Booth

How fast a multiplier is, how big, and how much power it uses depend mostly on how
many partial products it has to add, and on whether it adds them one after another or
all at once. This RTL puts the classic answers side by side, all at the same operand
width (8 bits by default) so they can be simulated, synthesized and compared:

| unit | operands | partial products (N = 8) | how they are added | result |
|---|---|---|---|---|
| `shift_add_mult` | unsigned | 8, one per clock step | one N-bit ripple adder, used again and again | 1 + 2N + (ones in the multiplier) clocks |
| `booth_seq_mult` | signed | 8 steps (digits -1, 0, +1) | one (N+1)-bit ripple adder that adds or subtracts | N clocks |
| `booth_r2_mult` | signed | 8 rows (digits -1, 0, +1) | all at once: unit-adder tree, carry-save row, ripple adder | registered, 1 clock |
| `booth_r4_mult` | signed | 4 rows (digits -2 .. +2) | same tree, half the rows | registered, 1 clock |
| `serial_3a_mult` | unsigned | 4 steps of two bits | 0/a/2a/3a multiplexer and one adder | 1 + N/2 clocks |
| `serial_csa_mult` | unsigned | 4 steps of two bits | two multiplexers, carry-save row, adder | N/2 clocks |

The three main units are the serial add-and-shift multiplier and the two parallel Booth
multipliers. Radix-4 ("modified") Booth recoding halves the number of rows against
radix 2. That is the main point of the comparison. `booth_seq_mult` runs Booth's
algorithm step by step on an add-and-shift datapath. The two serial two-bit units show
the digit-serial way of using radix 4, without Booth recoding.

`mult_top` instantiates all six next to each other. They share only the clock and the
reset.

## Add-and-shift multiplier

The datapath holds four registers. M holds the multiplicand and Q the multiplier. A holds
the upper half of the product and C the carry out of the N-bit adder. The controller
`shift_add_ctrl` is a five-state machine:

```
IDLE  --start-->  INIT  ------>  TEST --Q0=1--> ADD ---> SHIFT
 ^  stop=1        load M,Q        |                       |  ^
 |                clear C,A       +------Q0=0-------------+  |
 |                                                           |
 +------- after the N-th shift ------- SHIFT --otherwise--> TEST
```

- **TEST** looks at Q[0]. If it is 1, **ADD** sets {C, A} = A + M.
- **SHIFT** moves {C, A, Q} right by one place and counts the shifts.
- After N shifts the product is {A, Q}, and the machine returns to IDLE, where `stop` is
  high.
- Each state lasts one clock. A product therefore takes 1 + 2N + popcount(multiplier)
  clocks, which is 17 to 25 at N = 8.

The operands are loaded in INIT, one clock after `start` is taken, so hold them for that
clock. The result stays on `product` until the next `start`.

## Booth recoding

A Booth multiplier recodes the multiplier b into signed digits. Where b has a run of
ones, the multiplier subtracts once at the start of the run and adds once at its end.
Negative operands in two's complement therefore need no special case.

- **Radix 2** (`booth2_encoder`): each bit pair {b(i), b(i-1)} gives one digit, with
  b(-1) = 0. The pair 10 gives -1, 01 gives +1, and 00 or 11 give 0. That makes N rows.
- **Radix 4** (`booth4_encoder`): each overlapping triple {b(2i+1), b(2i), b(2i-1)} gives
  the digit -2·b(2i+1) + b(2i) + b(2i-1), which lies in {-2, -1, 0, +1, +2}. That makes
  N/2 rows, with row i worth 4^i.

Both encoders drive the same three select lines, defined as the struct `booth_sel_t` in
`mult_pkg`:

| line | meaning |
|---|---|
| `mul` | the digit is not zero |
| `shift` | the digit's magnitude is 2 (radix 4 only) |
| `twocom` | the digit is negative |

## Partial-product rows and the sign-correction constant

This part of the design is the least obvious.

`booth_ppg` precomputes five candidate rows from the multiplicand x: -2x, -x, 0, +x and
+2x. A 5:1 multiplexer driven by the select lines picks one of them. The negative rows
come from tmp = ~x + 1. Every candidate is written in two's complement with its **sign
bit inverted**:

```
shift = {~tmp[N], tmp[N-1:0], 0}    // -2x
two   = {~tmp[N], tmp}              // -x
zero  = {1, 0...0}                  //  0
org   = {~x[N-1], x[N-1], x}        // +x   (x sign-extended to N+1 bits)
mul   = {~x[N-1], x, 0}             // +2x
```

Flipping the top bit of a W-bit two's-complement number adds 2^(W-1) to its value. The
result also reads correctly as an unsigned number. So the rows can be zero-extended and
added, with no sign-extension bits, and a single constant removes all the offsets.

Row i is `N+2` bits wide and is shifted left by `step·i`, where step = 2 for radix 4 and
1 for radix 2. It adds 2^(N+1+step·i) to the sum. The constant is

```
K = -2^(N+1) · Σ_i 2^(step·i)   (mod 2^(2N))
```

The function `mult_pkg::booth_corr` computes K at elaboration time. At N = 8, K = 0x5600
for radix 4 and K = 0x0200 for radix 2. `pp_adder` adds K as one extra row.

**Why N+2 bits.** The textbook form of these candidates is N+1 bits wide, with tmp only N
bits wide. That form gives wrong results for x = -2^(N-1), for example -128 at N = 8:
negating x overflows there, and so does doubling -x. This design forms tmp one bit wider,
and every row gets one more bit. The radix-2 multiplier reuses the same generator and
never selects ±2x, so its rows are one bit wider than they strictly need to be.

## Adding the rows

`pp_adder` adds ROWS rows and the constant K. ROWS must be a power of two.

1. **Unit-adder rows** (`ua_row`) each reduce four numbers to two, computing
   (A+B)+(C+D) in two full-adder delays instead of three for ((A+B)+C)+D. One column
   of a row is a `unit_adder`. It takes data bits X3..X0 and a carry C1 from the column
   to its right, and gives S (weight 1) plus C and C0 (weight 2 each). C0 goes to the
   next column. Inside are two full adders in series, and C0 does not depend on C1, so
   nothing ripples along the row. log2(ROWS)-1 levels bring the rows down to two: one
   level for radix 4 at N = 8, two levels for radix 2.
2. **One carry-save row** (`csa`, a row of full adders) folds in K.
3. **A ripple-carry adder** (`rca`) produces the final sum.

All of this arithmetic is modulo 2^(2N). Carries above the product width are dropped on
purpose; those are the `unused_*` signals in `csa` and `ua_row`.

Both Booth multipliers register the sum when `valid_in` is high. `valid_out` and
`product` follow one clock later, at a throughput of one product per clock.

## Sequential Booth multiplier

`booth_seq_mult` is the add-and-shift datapath running Booth's algorithm. The register
{A, Q, q_1} starts as zeros in A, the multiplier in Q and a 0 in q_1. Each clock looks at
the two rightmost bits {Q[0], q_1}:

| {Q[0], q_1} | action on A |
|---|---|
| 01 | add M |
| 10 | subtract M, as A + ~M + 1 through the same adder |
| 00 or 11 | no change |

Then the whole register shifts right by one place, and A's sign bit is copied. After N
clocks {A, Q} holds the signed product.

A and M carry one guard bit. Without it, subtracting M = -2^(N-1) would overflow.

## Two-bits-per-clock serial multipliers

Both units shift the multiplier right by two places each clock and add a multiple of a
to the upper half H. The product is {H, X} after N/2 clocks.

- **`serial_3a_mult`** picks 0, a, 2a or 3a with a 4:1 multiplexer. It computes 3a = a + 2a
  with the same adder in an extra load clock, so a product takes 1 + N/2 clocks.
- **`serial_csa_mult`** avoids 3a. One multiplexer gives 0 or 2a from x(j+1) and another
  gives 0 or a from x(j). A carry-save row merges the two with the old H, and an adder
  resolves the result into the new H. A product takes N/2 clocks.

Both units take `start` while `done` is high, and they capture the operands in that same
clock.

## Top level (`mult_top`)

Parameter: `N`, default 8.

| prefix | unit | ports |
|---|---|---|
| `sa_` | add-and-shift | `sa_start`, `sa_a`, `sa_b`, `sa_stop`, `sa_product` |
| `bs_` | sequential Booth | `bs_start`, `bs_a`, `bs_b`, `bs_done`, `bs_product` |
| `bo_`, `r2_`, `r4_` | both parallel Booth units, which share `bo_valid_in`, `bo_a` and `bo_b` | `r2_valid`, `r2_product`, `r4_valid`, `r4_product` |
| `s3_` | 0/a/2a/3a unit | `s3_start`, `s3_a`, `s3_x`, `s3_done`, `s3_product` |
| `sc_` | carry-save unit | `sc_start`, `sc_a`, `sc_x`, `sc_done`, `sc_product` |

The reset `rst_n` is asynchronous and active low, and it clears every register.

## Simulating

Each testbench checks itself and ends with a line `TB_RESULT checks=<n> failures=<m>`.
It also has a watchdog that stops the run and counts a failure. For example:

```
verilator --binary --timing --assert -y rtl rtl/mult_pkg.sv tb/tb_mult_top.sv \
          --top-module tb_mult_top
./obj_dir/Vtb_mult_top
```

Replace `tb_mult_top` with any other `tb_*` file to test one unit. What each testbench
covers:

- **`tb_mult_top`** runs all six units at once at the default size, with 20,000 Booth
  operand pairs and hundreds of serial products. It checks every product and every
  latency. It also counts each mechanism: TEST→ADD and TEST→SHIFT, adder carry-outs,
  every Booth digit, idle Booth clocks, every multiplexer choice, and the sequential Booth
  add, subtract and shift-only steps. A mechanism that never occurs counts as a failure.
- **`tb_booth_r2_mult`, `tb_booth_r4_mult` and `tb_booth_seq_mult`** apply all 65,536
  signed 8×8 pairs and also check a 16-bit instance.
- **The adders, encoders and the generator** are tested exhaustively or at random
  against plain `+` and `*`.

## How this RTL relates to its source, and its limits

- **Width.** The controller counts to 8, which sets the default width N = 8. The Booth
  and serial units are parameterized. `pp_adder` needs a power-of-two row count, so
  N must be a power of two for radix 2, and N/2 must be one for radix 4.
- **Signedness.** Only the Booth units are signed. The add-and-shift unit and the two
  serial two-bit units are unsigned.
- **Parallel Booth.** The radix-2 and radix-4 Booth units in the comparison are parallel
  arrays: all rows are formed at once and added by a tree. The step-by-step form of the
  algorithm is provided separately as `booth_seq_mult`.
- **Result register.** The "accumulator" after the adder is a result register. It does
  not sum successive products.
- **Own choices.** These are choices made for this RTL:
  - the select-line meanings;
  - the tree order;
  - the widened N+2-bit rows;
  - the guard bit in `booth_seq_mult`;
  - the ripple-carry adders;
  - all handshakes.
- **Not included:**
  - the FIR filter in which the multipliers were originally compared;
  - a bitwise Booth selector, (x(j)·two + x(j-1)·one) XOR neg, which appears only as the
    conventional alternative;
  - radix-8, Wallace-tree and carry-select variants, which are only suggested as further
    work.
- **No power, area or delay figures.** This RTL produces none of its own. Synthesize the
  units to compare them.
