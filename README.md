# Overlapped min-sum LDPC decoder for IEEE 802.11n (n = 648, rate 1/2)

A min-sum LDPC decoder normally alternates two phases: every check node
(row) is updated, then every variable node (column). Whichever unit type is
not in use sits idle, so half of the hardware is idle at any time. This
decoder instead processes the block rows and block columns of the parity
check matrix in an order where a column can start as soon as the rows it
depends on are done, and the next iteration's rows can start as soon as
their columns are done. Check node and variable node work of neighbouring
iterations then run at the same time. With three groups of 27 check node
units and four groups of 27 variable node units, an iteration takes
**6 slots instead of 10**. A 20-iteration decode takes 6·20 + 2 = 122 slots
instead of 200, about 39 % less time.

The result is bit-exact with the plain "flooding" min-sum algorithm. The
overlap changes when each message is computed, never which messages it uses.

## The code

The code is the IEEE 802.11n rate-1/2 code with 648-bit code words. Its
parity check matrix H (324 × 648) is a 12 × 24 array of 27 × 27 blocks. Each
block is either zero or a cyclically shifted identity. The base matrix with
the shift values is `BASE` in `rtl/ldpc_pkg.sv`; −1 marks a zero block. A
block with shift s connects check lane z of its block row to bit lane
(z + s) mod 27 of its block column. Rows have 7 or 8 nonzero blocks.
Columns have 2, 3 or 12. In total there are 88 nonzero blocks, which makes
2376 edges.

Code bit `c*27 + lane` is lane `lane` of block column `c`. Columns 0–11 are
the information part; columns 12–23 are the parity part.

## The overlapped schedule

A *slot* is one step of the schedule. In one slot each of the three CNU
groups updates one whole block row (27 check nodes), and each of the four
VNU groups updates one whole block column (27 bits). Block rows and columns
below use 0-based base-matrix indices.

| slot in period | CNU groups (block rows) | VNU groups (block columns) |
|---|---|---|
| 0 | 2, 4, 5 | 9, 5, 12, 7 (previous iteration) |
| 1 | 3, 0, 1 | 20, 21, 22, 23 (previous iteration) |
| 2 | 6, 7, 8 | 15, 16, 13, 14 |
| 3 | 9, 10, 11 | 17, 18, 6, 19 |
| 4 | — | 1, 3, 10, 11 |
| 5 | — | 0, 2, 4, 8 |

Iteration k runs its rows in slots 6k … 6k+3 and its columns in slots
6k+2 … 6k+7. So its last two column slots coincide with the first two row
slots of iteration k+1 (tables `ROW_SCHED` and `COL_SCHED` in `ldpc_pkg`).
The order is valid because the base matrix has a staircase of zero blocks.
Two conditions hold for every nonzero block (r, c):

* the row slot of r comes before the column slot of c, so a column only
  reads check messages of the current iteration;
* the column slot of c comes before the row slot of r plus 6, so the next
  iteration's rows only read variable messages that are finished.

Each edge has exactly one writer in each direction per iteration. Together
these two conditions also rule out any write-after-read conflict. The
decoder therefore computes exactly what a flooding min-sum decoder computes:
all rows, then all columns, every iteration. The end-to-end testbench checks
this bit for bit.

A slot lasts `SLOT_CLKS` = 3 clocks. The operation is issued in the first
clock. The units have a latency of 2, so their results are written in the
third clock. The next slot then reads them.

A decode of I iterations takes **(6·I + 2)·3 + 1 clocks** from `start` to
`done`: 367 clocks for 20 iterations. The CNUs are busy in 4 of every 6
slots and the VNUs in all 6.

## Check node unit (`cnu`)

The unit implements the min-sum row update

    L(r_i) = ( Π_{k≠i} sign q_k ) · min_{k≠i} |q_k|

for up to eight inputs. There is no scaling or offset.

* **Sign / magnitude split.** Each 6-bit two's complement input becomes a
  sign bit and a 5-bit magnitude. −32 is clipped to 31.
* **Sign update** (`cnu_sign_update`). An XOR tree forms the XOR of all
  signs. Each output XORs its own input's sign back out.
* **Magnitude update** (`cnu_min_network`). For each input it finds the
  minimum of the other seven. It uses twenty 2-input comparators in four
  columns:
  * the minima of the four input pairs;
  * the minima of two neighbouring pairs;
  * for each pair, the minimum of the three other pairs;
  * finally, each input takes the three-pair minimum of its own pair and
    compares it with its partner input in the pair.

  A register sits between the third and fourth comparator columns. The
  inputs pass through a matching one-clock delay on their way to the last
  column.
* **Recombination.** The sign is applied to the magnitude again, and the
  output is registered. Outputs are two's complement in [−31, 31].

Rows of degree 7 use a mask. The missing input is forced to the largest
magnitude and a positive sign, and its output is 0 and never stored.

## Variable node unit (`vnu`)

The unit forms `sum = L(c) + Σ in[j]` over all twelve inputs, which is the
largest column degree. Unused inputs are fed with 0. Then:

* each output is `sum − in[j]`, saturated to [−31, 31];
* `sum` itself (10 bits) is the soft value L(Q);
* its sign is the hard decision: bit = 1 when L(Q) < 0.

The first register stage holds the sum and a delayed copy of the inputs. The
second holds the outputs. Latency is 2 clocks.

## Message memory and routing (`msg_mem`)

There is one 6-bit word per edge and direction: the variable-to-check word
`q` and the check-to-variable word `r`. There is also one word per code bit
for the channel value. Everything is flip-flops, so a slot reads and writes
all the words it needs in one clock.

Every edge word is stored at its *bit* lane. The circulant shift is
therefore fixed wiring on the check-node side, and no barrel shifter is
needed. The matrix is kept in its original order and only processed in the
schedule's order, so no input or output permutation buffers are needed
either.

* `row_slot` selects which three block rows the CNU groups see.
* `col_slot` selects which four block columns the VNU groups see. The value
  6 means none.

Loading a block column of channel values also sets all of that column's `q`
words to the channel value (q = L(c) before the first iteration).

## Control (`ldpc_ctrl`) and stopping

The controller steps through the schedule. The first clock after an
iteration's last column slot evaluates the parity check (`parity_check`,
H·ĉᵀ over the hard-decision register). The decode stops at that point if
either:

* `early_stop_en` is set and the parity check passes; or
* `MAX_ITER` (default 20) iterations are done.

Row work of the next iteration that has already started is harmless: it does
not touch the hard decisions.

## Interface of the top (`ldpc_decoder`)

| port | dir | meaning |
|---|---|---|
| `llr_we`, `llr_blk[4:0]`, `llr_in[27][6]` | in | load the channel LLRs of block column `llr_blk`, while not busy; positive = bit 0 |
| `start` | in | start a decode |
| `early_stop_en` | in | allow stopping as soon as the parity check passes |
| `busy`, `done` | out | decoding; one-clock pulse at the end |
| `iterations[7:0]` | out | iterations run |
| `early_stop` | out | the decode ended on the parity check |
| `parity_ok` | out | `hard` satisfies all 324 checks |
| `overlap` | out | row and column work in the current slot |
| `hard[647:0]` | out | decoded word, bit `c*27+lane` |

To decode a frame:

1. Load all 24 block columns.
2. Pulse `start`.
3. Wait for `done`. The outputs hold until the next start.

Parameters are `MAX_ITER` (20) and `SLOT_CLKS` (3; it must be at least 3).

## Design choices and departures

* **Main configuration.** This is the 3:4 arrangement: 3 × 27 CNUs and
  4 × 27 VNUs, with its 6-slot schedule. The published work also mentions
  4:8 and 2:4 arrangements but gives no slot order for them. They are not
  built.
* **Lane parallelism and slot length.** All 27 lanes of a block are
  processed at once, and a slot is 3 clocks. The published cycle counts
  instead charge 27 clocks per slot. So slot counts (122 per 20-iteration
  decode) compare directly with them, but clock counts do not.
* **Number formats.** Messages are 6-bit two's complement everywhere. The
  check node unit splits them into sign and magnitude internally.
  Saturation is symmetric (±31). The 10-bit sum width and the handling of
  −32 are this design's own.
* **Hard-decision sign.** A negative soft value is bit 1, consistent with
  LLR = log(P(0)/P(1)).
* **Own choices.** The comparator wiring between columns, all register
  positions, the memory organisation, the controller, early stopping and
  the load/start/done handshake are this design's own. The published work
  does not describe memory or control.
* **Reset.** Registers in the units and the controller use an asynchronous
  active-low reset. The message storage has no reset: loading writes every
  `q` word, and the schedule writes every `r` word before it is read.
* **Size.** After generic synthesis the decoder comes to about 37 k
  word-level cells and 52 k flip-flop bits, plus the 3.9 k-bit LLR store.
  Most of it is the 189 processing units and the 28.5 k bits of edge
  messages.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cnu_sign_update` | sign products against a direct XOR, random masks |
| `tb_cnu_min_network` | minimum of the other seven, one-clock latency |
| `tb_cnu` | min-sum row update incl. −32/+31 and degree-7 rows, two-clock latency |
| `tb_vnu` | extrinsic outputs, saturation, soft value, hard bit |
| `tb_parity_check` | full syndrome of code words and corrupted words |
| `tb_msg_mem` | circulant routing and storage in every slot, both directions |
| `tb_ldpc_ctrl` | issue pattern clock by clock, done time, both stop rules |
| `tb_ldpc_decoder` | full decoder at default size against a flooding min-sum model |

`tb/ldpc_ref_pkg.sv` holds the reference models:

* a systematic encoder that solves the parity blocks through the
  dual-diagonal structure;
* a syndrome function;
* a noisy BPSK channel quantised to 6 bits;
* a flooding min-sum decoder with the same fixed-point rules.

The end-to-end test decodes five frames: a clean frame, two noisy frames
that are corrected in 1–2 iterations, a hopeless frame that runs into the
20-iteration limit, and a frame with early stopping disabled. For each frame
it checks the hard decisions, the iteration count, the stop reason and the
exact clock count. It also requires that overlapped slots, early stops,
limit stops and corrected frames each occurred.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ldpc_decoder \
        -Irtl -Itb rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/*.sv tb/tb_ldpc_decoder.sv
    ./obj_dir/Vtb_ldpc_decoder

The full decoder takes a few minutes to compile and well under a second to
run. For the smaller blocks, list `rtl/ldpc_pkg.sv`, the block's file(s) and
its testbench, adding `tb/ldpc_ref_pkg.sv` for `tb_parity_check`.

## Limits

* Only the n = 648, rate-1/2 code is supported. The schedule depends on the
  zero-block pattern of this particular base matrix. Another code needs a
  new `BASE` and a re-checked schedule.
* There is no scaled or offset min-sum, and no soft output port. The 10-bit
  soft values exist inside the VNUs.
