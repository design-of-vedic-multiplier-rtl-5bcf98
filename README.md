# Self-testing 64-bit Vedic multiplier

A 64 x 64 -> 128-bit unsigned multiplier built with the Urdhva Tiryakbhyam
("vertically and crosswise") method of Vedic arithmetic. Next to it is a
built-in self test (BIST). On request it feeds the multiplier pseudo-random
operands and checks every product against a second, plain multiplier. It then
reports whether the array is computing correctly, and what fraction of its
products were right.

Everything is combinational except the pattern generator and the result
counters. The design is parameterised by the operand width `N` (default 64).
It has also been simulated at 16 and 32 bits.

## The multiplication method

The method forms a product column by column. Each column's sum of partial
products absorbs the carry of the column before it, so no separate carry chain
runs over the whole result afterwards.

### The 2x2 cell (`vedic_2x2`)

Take `a = {AH, AL}` and `b = {BH, BL}`. The cell works in three steps:

| step | pattern    | sum                   | gives            |
|------|------------|-----------------------|------------------|
| 1    | vertical   | AL*BL                 | R0L, carry C1    |
| 2    | crosswise  | AH*BL + BH*AL + C1    | R1L, carry C2    |
| 3    | vertical   | AH*BH + C2            | R2L, R2H         |

The product is `{R2H, R2L, R1L, R0L}`. C1 is always 0, because a product of
two single bits cannot carry. The cell keeps it so that the pattern stays
visible.

The same steps work for decimal digits. For example, 576 x 324 = 186624 takes
five column steps. The multiplier testbench uses this example as a test
vector.

### Scaling to N bits (`vedic_mult`, `vedic_combine`)

The wide multiplier applies the same vertical/crosswise pattern to operand
*halves* instead of bits:

```
a = {aH, aL}, b = {bH, bL}, each half S bits
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
p  = q0 + ((q1 + q2) << S) + (q3 << 2S)
```

`vedic_combine` carries out one such step:

- the low S bits of `q0` pass straight through;
- one (2S+1)-bit adder forms the crosswise sum `q1 + q2`, with its carry;
- one 3S-bit adder adds that sum to `{q3, q0[2S-1:S]}`.

`vedic_mult` builds the whole array level by level with a generate loop:

- **Level 0** is an array of `(N/2)^2` 2x2 cells. There is one cell for each
  pair of a 2-bit slice of `a` and a 2-bit slice of `b`.
- **Level l** holds `(N/2^(l+1))^2` blocks. Block `(i, j)` is the product of
  slice `i` of `a` and slice `j` of `b`. Both slices are `2^(l+1)` bits wide.
  The block is joined from four blocks of level `l-1`:
  - `(2i, 2j)` gives q0;
  - `(2i+1, 2j)` gives q1;
  - `(2i, 2j+1)` gives q2;
  - `(2i+1, 2j+1)` gives q3.
- **The last level** has a single block, which is the product.

Inside level `l`, the products are stored in `g_lvl[l].prod[i*K + j]`, where
`K` is the number of slices per operand at that level.

At N = 64 this makes 1024 cells and 341 combiners in six levels. `N` must be a
power of two and at least 2. Elaboration stops with an error otherwise.

The multiplier is written as a loop over levels rather than as a module that
instantiates itself. The loop gives the same hardware.

## The self test (`vedic_mult_64bit_using_BIST`)

```
            +-----------+  pattern          +-------------+
  clk ----->| bist_lfsr |--+--------------->| operand_mux |--op_a--+--> vedic_mult --+--> y
  bist_on ->|  (en)     |  |  bit-reversed  |   x 2       |--op_b--+--> ref_mult ---+|
            +-----------+  +--------------->|  (bist_on)  |                        ||
  a, b ------------------------------------>|             |            product_compare --> correct
                                            +-------------+                        |
                                                     bist_counter <---------------+
                                                     (correct_out, incorrect_out, performance)
```

The top has six ports: `a[63:0]`, `b[63:0]`, `bist_on`, `clk`, `y[127:0]` and
`correct`. That is 259 port bits.

- **Normal mode (`bist_on = 0`).** `y = a * b`, from the Vedic array.
  `correct` still compares the array against the reference multiplier for
  the operands on the ports. This makes it a continuous concurrent check.
- **Self-test mode (`bist_on = 1`).** The operands come from a 64-bit LFSR:
  - operand A is the LFSR state;
  - operand B is the same state bit-reversed, so the two operands differ.

  The LFSR steps once per clock, starting from all ones on the first
  self-test cycle of every session. The sequence is therefore the same each
  time, and `y` shows the Vedic product of the pattern.
- **Scoring.** `bist_counter` counts one comparison at each rising edge while
  `bist_on` is high:
  - `correct_out` counts the cycles with `correct = 1`;
  - `incorrect_out` counts the cycles with `correct = 0`;
  - `performance` is `floor(100 * correct_out / (correct_out + incorrect_out))`.

  A session with one bad product in 100 reads 99 / 1 / 99. With one bad
  product in 40 it reads 39 / 1 / 97.
- **Sessions.** The first enabled edge after `bist_on` was low restarts both
  counts. While `bist_on` is low the counts hold, so they can be read after
  the test.

`correct_out`, `incorrect_out` and `performance` are **internal signals of
the top, not ports**. They are meant to be watched in simulation (for example
`dut.performance`) or brought out by whoever integrates the block. A synthesis
run of the top alone removes the counter, because nothing observes it. If you
need the score in hardware, add ports for it.

### Timing

- The paths `a`/`b` -> `y` and `a`/`b` -> `correct` are purely combinational.
- In self-test mode, the paths from the LFSR register -> `y` and `correct` are
  also combinational.
- A pattern is present for one full clock cycle. Its comparison is counted at
  the rising edge that ends that cycle.
- There is no pipelining and no latency in cycles.

### Reset

There is no reset input. The LFSR and the counters get their power-up values
from declaration initialisers: the LFSR starts at its seed, the counters at
zero. FPGA flows honour these initialisers. The logic also restarts cleanly
whenever `bist_on` rises. For an ASIC, add a reset to `bist_lfsr` and
`bist_counter`.

## Choices made in this implementation

The following are decisions of this design, not part of the method:

- The four-way split per level and the two adders in `vedic_combine`.
- The select polarity of `bist_on` (1 = self test).
- The LFSR pattern generator:
  - Fibonacci structure, shifting towards the MSB;
  - seed all ones;
  - reloads the seed while disabled;
  - polynomial from `lfsr_taps()` in `vedic_bist_pkg`, for example
    x^64 + x^63 + x^61 + x^60 + 1 at 64 bits. These are standard
    maximal-length polynomials; the 16-bit one is verified to have period
    2^16 - 1.
- Operand B as the bit-reversed pattern.
- `ref_mult` written with the `*` operator. It is a reference, so its
  structure is left to synthesis.
- 32-bit counters (`CNT_W`) and a 7-bit percentage.

## Limits and departures

- **No fault injection.** The hardware has no fault-injection input. A
  fault-free array always scores 100 %. The testbenches obtain the 99 % and
  97 % results by corrupting the Vedic product with a simulation `force` for
  one cycle.
- **Single-point check.** The check compares the array against a second
  multiplier. A fault in `ref_mult`, `product_compare` or the counter is not
  told apart from a fault in the array.
- **Area and speed.** Reference figures for an FPGA implementation are about
  17.5 k LUTs and a 27.6 ns longest combinational path at 64 bits, and 25.3 ns
  and 21.9 ns at 32 and 16 bits. They were not reproduced here. The
  multiplier is unpipelined, so expect a long path.
- **No ALU.** The multiplier is meant as part of a 64-bit ALU, but no other
  ALU operation is specified, and none is included.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_bist_pkg.sv` | percentage constants, LFSR polynomial table `lfsr_taps()` |
| `rtl/vedic_2x2.sv` | 2x2 Urdhva Tiryakbhyam cell |
| `rtl/vedic_combine.sv` | one combining level (four S x S -> one 2S x 2S product) |
| `rtl/vedic_mult.sv` | N x N Vedic multiplier (default 64) |
| `rtl/bist_lfsr.sv` | pattern generator |
| `rtl/operand_mux.sv` | operand select |
| `rtl/ref_mult.sv` | reference multiplier |
| `rtl/product_compare.sv` | product equality, drives `correct` |
| `rtl/bist_counter.sv` | correct/incorrect counts and percentage |
| `rtl/vedic_mult_64bit_using_BIST.sv` | top: multiplier with self test |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_bist_sizes.sv`, `tb/bist_size_run.sv` | top at N = 16 and N = 32 |

## Simulating

Every testbench checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and it has a watchdog that stops it if it
hangs.

Example, the end-to-end test of the 64-bit top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vedic_bist_pkg.sv tb/tb_vedic_mult_64bit_using_BIST.sv \
    --top-module tb_vedic_mult_64bit_using_BIST
./obj_dir/Vtb_vedic_mult_64bit_using_BIST
```

Use the same command with another `tb/tb_*.sv` file and its module name to run
the other tests.

What the testbenches cover:

- **`tb_vedic_mult_64bit_using_BIST`**: the whole design at its default size.
  - Normal-mode products, checked against a shift-and-add model.
  - A 100-pattern and a 40-pattern self-test session with one corrupted
    product each. Every `y` is checked against the testbench's own model of
    the pattern sequence. The counts must end at 99/1/99 and 39/1/97.
  - The counts must hold in between sessions.
  - Each mechanism (normal multiply, self-test pattern, mode switch, detected
    fault, session restart) must have occurred.
- **`tb_vedic_mult`**: N = 4 and N = 8 exhaustively; N = 64 with corner cases
  and 5000 random pairs.
- **`tb_bist_sizes`**: the same end-to-end flow at N = 16 and N = 32.

To change the width, set `N` on `vedic_mult_64bit_using_BIST`. For widths not
in `lfsr_taps()` (2 to 64, powers of two), add a polynomial there.
