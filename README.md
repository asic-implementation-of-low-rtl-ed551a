# Folded binary magnitude comparator

This comparator decides whether an unsigned word B is greater than, equal to,
or less than another word A. A tree comparator needs one comparison cell for
every pair of bits. This one does not. It cuts both words into *digits* of
`DIGIT` bits and sends them, one digit at a time, through a single small
datapath, starting at the most significant digit (MSD). Reusing one datapath
for every digit is the "folding".

Each digit goes through a cheap equality test (XOR, then OR). While the digits
are equal, the walk moves on towards the LSB. At the first unequal digit the
walk stops. That digit alone goes to an encoder built from carry-lookahead
(CLA) carry logic, which says which word is greater. The lower digits are
never moved or tested. This saves switching activity when the operands differ
high up, which is the intended low-power, low-activity case. If every digit
is equal, the result is EQ.

The default size is 16-bit operands in 2-bit digits, which gives 8 digits.

## Block structure

```
                 +---------------- precompute_unit ----------------+
 a,b,start ----> | input_buffer --msb--> digit_buffer --> digit_eq |--diff_valid/all_eq--+
                 |      ^                     ^             (S)   |                     |
                 |      |  digit_counter -----+  sequencer FSM    |                     v
                 +------------------------------------------------+   a_digit,b_digit  aefbc
                                                    |                  --> cla_encoder  result
                                                    +------------------->  (cla_cell x NP) regs
```

| module | role |
|---|---|
| `input_buffer` | Input buffer (IB). Holds A and B and shifts both left one bit per tick, so their MSBs leave first. |
| `digit_counter` | Loaded with `DIGIT-1` at the start of each digit. Counts down once per bit moved. At 0 the digit is complete. |
| `digit_buffer` | Digit buffer (DB). Two `DIGIT`-bit shift registers, filled from the IB's MSBs. |
| `digit_equality` | Bitwise XOR of the two digits, then an OR of the results. `S = 1` means the digits differ. |
| `precompute_unit` | The four parts above plus the sequencer: IDLE, then SHIFT (`DIGIT` clocks), then CHECK (1 clock). CHECK either stops, reports all-equal, or moves to the next digit. |
| `cla_cell` | Two-bit comparison: `g = ~A1·B1 + ~(A1⊕B1)·~A0·B0` (B pair > A pair), and `p` (pair equal). |
| `cla_encoder` | Cuts one digit into 2-bit pairs. Uses the cells to form the pair carries and ORs them into `b_gr`. |
| `aefbc` | Top level. Joins the pre-computation unit and the encoder and registers `eq`, `b_gr` and `digits_checked`. |
| `aefbc_pkg` | Sequencer state type and a counter-width helper. |

## The walk, clock by clock

Let the start be sampled at clock edge 0. For each digit:

* `DIGIT` SHIFT clocks each move one bit of A and one bit of B from the IB into
  the DB. The counter was loaded with `DIGIT-1`, and the shift made while it
  reads 0 is the digit's last one.
* One CHECK clock evaluates `S` on the full DB.
  * If `S = 1`, `diff_valid` pulses and the walk ends. The DB still holds the
    unequal digit, and the encoder reads it combinationally.
  * If `S = 0` and the digit is not the last, the counter is reloaded and
    shifting goes on. The IB already presents the next digit's MSB.
  * If `S = 0` on the last digit, `all_eq` pulses.

So the decision on digit *k* (k = 1 for the MSD) takes `DIGIT+1` clocks per
digit. `done` at the top is visible after edge `k·(DIGIT+1)`. Equal operands
take `WIDTH/DIGIT · (DIGIT+1)` clocks.

At the defaults this is 3 clocks when the MSD differs and 24 clocks for equal
operands.

## How the encoder combines pairs

For a 2-bit digit, `cla_cell` is the whole encoder. Its output is the carry
`C = G1 + P1·G0`, with `G_i = ~A_i·B_i` (bit generate) and
`P_i = ~(A_i ⊕ B_i)` (bit equal). That carry is 1 exactly when B is greater.

A wider digit is handled two bits at a time, starting from the MSB. The
encoder computes one carry per pair and ORs them into `b_gr`. A plain OR of
the pairs' own `g` outputs would be wrong. For A = 1001 and B = 0110, the
lower pair favours B while the upper pair already decides for A. So each
pair's carry passes through the equality of every higher pair:

```
cout[j] = g[j] & p[j+1] & ... & p[NP-1]        b_gr = |cout
```

This is the lookahead carry expression `G3 + P3·G2 + P3·P2·G1 + ...` at pair
level. The `cout` vector is a port, so the per-pair carries can be watched.
For A = 0110 and B = 1010 they are 1 (upper pair) and 0 (lower pair), and
`b_gr = 1`. An odd `DIGIT` is zero-extended at the top, which changes no
comparison.

The encoder's answer only means something for unequal digits. The top uses
it only on `diff_valid`.

## Interface of `aefbc`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `start` | in | 1 | sample `a`/`b` and begin; ignored while `busy` |
| `a`, `b` | in | `WIDTH` | unsigned operands |
| `busy` | out | 1 | a walk is in progress |
| `done` | out | 1 | one-cycle pulse: the three outputs below are new |
| `eq` | out | 1 | A = B |
| `b_gr` | out | 1 | B > A. With `eq = 0` and `b_gr = 0`, A > B. |
| `digits_checked` | out | `clog2(WIDTH/DIGIT)+1` | digits the walk examined (position of the first unequal digit) |

`eq`, `b_gr` and `digits_checked` hold until the next result. `a` and `b`
only need to be valid in the start cycle, because the IB keeps its own copy.
A new start may come in the cycle right after `done`.

Parameters: `WIDTH` (16) and `DIGIT` (2). `WIDTH` must be a multiple of
`DIGIT`. An elaboration-time assertion checks this.

## What is fixed and what was chosen here

These parts follow the comparator's published description:

* the split into digits;
* the shared IB, counter and DB;
* bit-serial filling of the DB, paced by a counter that is initialised from
  the digit size;
* the XOR/OR equality test, walked MSD first, stopping at the first unequal
  digit;
* the EQ output;
* the 2-bit CLA comparison equation;
* encoding wider digits two bits at a time from the MSB, with the carries
  ORed into the result.

The following are choices made for this RTL:

* **Default digit size.** 2-bit digits for the 16-bit default. The 2-bit
  grouping is the one reported as lower power and fewer gates at 8 bits.
* **Gated pair carries.** Each pair's carry is gated by the equality of the
  higher pairs, as explained above. The description only says the carries
  are ORed.
* **Handshake and timing.** The start/busy/done handshake, the registered
  and held outputs, and the exact cycle budget (`DIGIT` shift clocks plus 1
  check clock per digit) are choices made here.
* **Reset.** An asynchronous active-low reset clears every register to zero.
* **Extra outputs.** The `digits_checked` output and the encoder's `p` and
  `cout` outputs exist for observation and chaining.

The published evaluation uses a factorial calculator built by other authors
around the comparator. Its structure is not specified, so it is not included.
The published delay, power and gate-count figures come from a vendor
synthesis flow and were not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_cla_cell`, `tb_digit_equality`: exhaustive.
* `tb_cla_encoder`: exhaustive for 2-, 3- and 4-bit digits, random for 8-bit
  digits. It also checks the pair carries of the worked 4-bit case and the
  case where a lower pair favours B.
* `tb_input_buffer`, `tb_digit_buffer`, `tb_digit_counter`: compared against
  reference shift registers and counters.
* `tb_precompute_unit`: random operands with a chosen first unequal digit. It
  checks the pulse kind, the pulse cycle `k·(DIGIT+1)-1`, the DB contents and
  that a start while busy is ignored.
* `tb_aefbc`: end-to-end test at the default size. It uses directed and
  random operands and checks results, latency and `digits_checked`. It counts
  early stops, last-digit differences, equal operands, B greater, A greater,
  ignored starts and back-to-back operation, and fails if any of these never
  happened.
* `tb_aefbc_workloads`: runs the 4-bit/2-bit-digit, 8-bit/4-bit-digit and
  8-bit/2-bit-digit configurations side by side over all 65,536 8-bit operand
  pairs. It also replays the worked examples: A = 10110110 and B = 10111010
  stop at the third 2-bit digit or the second 4-bit digit. A = 0001 and
  B = 0100 stop at the first digit. B is greater in all of them.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/aefbc_pkg.sv \
          tb/tb_aefbc.sv --top-module tb_aefbc -Mdir obj_tb_aefbc
./obj_tb_aefbc/Vtb_aefbc
```

Replace `tb_aefbc` with any other testbench name. Every testbench finishes in
well under a second.

Lint notes: Verilator reports `SYNCASYNCNET` because the sequencer's
assertions sample `rst_n` synchronously while the flops use it
asynchronously. It also reports `PINCONNECTEMPTY` for the counter value and
the encoder carries, which the top does not use. Both are expected.
