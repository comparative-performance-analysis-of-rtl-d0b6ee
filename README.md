# Sequential sum-product LDPC decoder (CCSDS AR4JA, rate 1/2, k = 1024)

This is a small, fully sequential LDPC decoder. It decodes the CCSDS
AR4JA rate-1/2 code with 1024 information bits using the sum-product
algorithm (SPA), in half-precision floating point (fp16). It puts no
parallelism in the datapath. One finite-state machine at a time walks the
parity-check matrix edge by edge, and every arithmetic step takes its own
clock cycle. The design aims to be easy to follow and check, not fast: one
decoding iteration takes about 573,000 clock cycles.

The architecture follows a published sequential RTL decoder, from a thesis
that compares HLS and hand-written RTL for LDPC decoding. It keeps that
design's units, state names, number format, lookup-table steps, clamp
values and stopping rule. Where that description says nothing, the choices
are this design's own. The section *Departures and trust* lists all of
them.

## The code

The parity-check matrix H has 3M rows and 5M columns, with M = 512. That
gives 1536 checks, 2560 code bits and 7680 ones. It is built from M×M
blocks:

```
        | 0   0      I   0      I+P1      |
   H =  | I   I      0   I      P2+P3+P4  |
        | I   P5+P6  0   P7+P8  I         |
```

`+` is the modulo-2 sum and `Pk` is a permutation matrix. Row `i` of `Pk`
has its one in column

```
pi_k(i) = M/4 * ((theta_k + floor(4i/M)) mod 4) + ((phi_k(floor(4i/M)) + i) mod M/4)
```

- **Row weights:** 3 in row block 0, 6 elsewhere.
- **Column weights:** 2, 3, 1, 3 and 6 for the five column blocks.
- **Code bits:** columns 0–1023 are the information bits. The last column
  block (bits 2048–2559) is punctured, meaning it is never transmitted.
  Its channel LLRs are 0.

The `theta_k` and `phi_k(j)` constants for M = 512 are in `spa_pkg.sv`
(`THETA`, `PHI`). They are the CCSDS 131.0-B table values as recalled for
this design, and have not been checked against the standard. Any values
give a valid code, and the hardware does not depend on them. Before you
use this on a real link, compare them with the standard.

## How H is held: `spa_hmatrix`

H is never stored as a dense matrix. After reset, `spa_hmatrix` walks the
15 (row block, column block, permutation) terms of the construction,
producing one edge per clock cycle (7680 cycles). It fills four tables:

| table | indexed by | holds |
|---|---|---|
| row count | row | weight of the row (3 or 6) |
| row list | row, slot 0..5 | column of that edge |
| column count | column | weight of the column (1..6) |
| column list | column, slot 0..5 | row of that edge **and** its slot within that row |

The last field of the column list, the row slot, is what lets
variable-node and decision units address the message memories.
`gen_done` (the top's `ready`) rises when the tables are full. Both read
ports are synchronous, with one cycle of latency.

## Messages and memory layout

There is one 16-bit message per edge, in two memories, both
`spa_ram` simple dual-port RAMs with synchronous read:

- **Lji** holds variable-to-check messages. The variable-node unit writes
  them and the check-node unit reads them.
- **Lij** holds check-to-variable messages. The check-node unit writes
  them, and the variable-node and decision units read them.

Edge `(row, slot)` is at address `row*6 + slot`, so each memory holds
1536·6 = 9216 entries. Rows of weight 3 leave slots 3–5 unused. A third
`spa_ram` keeps the 2560 channel LLRs. The variable-node and decision
units read it.

## The check-node datapath

This is the core of the design and where nearly all its cycles go. For
row `i` and each of its edges `j`, `spa_check_node` computes

```
Lij = 2 * atanh( prod over j' != j of tanh(Lj'i / 2) )
```

It uses tables instead of tanh and atanh hardware. The FSM states carry
the names of the reference state diagram. For one output edge, the steps
are:

1. **GET_LJI:** read one incoming message.
2. **DIVIDE_2:** halve it by decrementing the exponent.
3. **CHECK_LIMIT:** clamp the magnitude to 5.109 (0x451C), the end of the
   tanh table.
4. **CONV_FIX_T:** convert the magnitude to unsigned Q6.10 fixed point,
   truncating (`fp16_to_fixed`).
5. **COMPUTE_IDX:** form the table index, round(x / 0.01), clamped to the
   table (`lut_index`).
6. **GET_TANH:** read `tanh_lut`, 512 entries of tanh(k·0.01) in fp16,
   with synchronous read.
7. **INIT_PRODUCT / multiply:** multiply into the running product with
   `fp16_mul`. The sign is the XOR of the input signs, because tanh is odd.
8. Repeat steps 1–7 for every other edge of the row. Then:
   - **COMPARE:** clamp |product| to 0.999 (0x3BFE).
   - **CONV_FIX_A / COMPUTE_ATANH:** convert and index with step 0.005, then
     read `atanh_lut` (256 entries of atanh(k·0.005); entries from index 200
     on hold atanh(0.999)).
   - **MULTIPLY_2:** double by incrementing the exponent.
   - **WRITE_LIJ:** write the result with the product's sign.

The product for each output edge is computed from scratch. This is the
plain O(d²) form, which explains the `9(d-1)` term in the timing below.

**The limit this sets.** The 0.999 clamp caps every check-to-variable
message at 2·atanh(0.999) ≈ 7.60. Column block 2 has weight 1, so each of
its parity bits is corrected by a single check. If the channel LLR of such
a bit points the wrong way with magnitude above 7.6, no check message can
flip it. The frame then runs to the iteration limit while its information
bits are already right. At Eb/N0 = 5–6 dB that needs a noise sample beyond
about 3.9σ on one of the 512 weight-1 bits, which happens in roughly 2–3 % of
frames. It comes with the clamp, not with this implementation.

## Variable node, decision, iteration control

- **`spa_var_node`** (Lji update). For column `c` and each edge `t`, it
  computes Lji = L(c) + Σ Lij over the other edges of the column. The sum
  starts with the channel LLR and adds edges in slot order, using
  `fp16_add`.
- **`spa_init`**. It reads the 2560 channel LLRs from the external source,
  stores them in the LLR memory, and copies each into Lji for every edge of
  its column. This is the first half-iteration.
- **`spa_decision`**. Pass 1 goes over the columns. It computes the total
  LLR (channel plus every Lij of the column) and decides bit = 1 exactly
  when the total is negative; −0 counts as 0. It streams the bits out on
  `dec_valid/dec_addr/dec_data` and keeps them in a bit register. Pass 2
  checks the parity of each row in turn and stops at the first row that
  fails.
- **`spa_iter_ctrl`**. After each decision it counts the iteration. If
  parity holds, it finishes with `converged = 1`. If `MAX_ITER` iterations
  have run, it finishes with `converged = 0`. Otherwise it starts the next
  check-node pass.

## Schedule and timing

Only one unit is busy at a time. The top gives the memory ports and both
H-store ports to whichever unit is busy:

```
start -> init -> CN -> VN -> decision -> iteration control -+-> done
                 ^                                          |
                 +------------------------------------------+
```

Cycles per item (d = weight of the row or column):

| unit | per item | pass total at M = 512 |
|---|---|---|
| check node | row: 3 + d(8 + 9(d−1)) | 370,178 |
| variable node | column: 3 + d(4 + 5(d−1)) | 151,042 |
| decision, column pass | column: 3 + 5d | 46,082 |
| decision, row pass | row: 3 + 2d, stops at the first failing row | ≤ 19,968 |
| init (once per frame) | column: 3 + 2d | 23,042 |

Each pass adds 2 cycles for its start and done.

One iteration therefore takes about 567,000–587,000 cycles, or 5.7 ms at
100 MHz. A frame at 3 dB that needs 9 iterations took 5,159,593 cycles.
The reference implementation reported about 20 ms per iteration at
100 MHz. The full-size testbench checks that this design stays well below
that figure. Before the first frame, building H takes 7680 cycles after
reset.

## Top level: `spa_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | start a frame; taken while `ready` is high |
| `ready` | out | 1 | H built and decoder idle |
| `llr_addr`, `llr_rd` | out | 12, 1 | channel LLR request |
| `llr_data` | in | 16 | fp16 LLR, one cycle after the request (negative means 1; 0 for punctured bits) |
| `dec_valid`, `dec_addr`, `dec_data` | out | 1, 12, 1 | decoded bits, streamed in every decision pass; the last pass before `done` is the result |
| `done` | out | 1 | one-cycle pulse at the end of the frame |
| `converged`, `iterations` | out | 1, 4 | parity satisfied; iterations run (valid at `done`) |
| `debug` | in | 1 | pause everything and allow memory inspection |
| `dbg_addr` | in | 14 | edge address (`row*6 + slot`) to inspect |
| `dbg_lji`, `dbg_lij` | out | 16 | Lji and Lij at `dbg_addr`, one cycle later |

Parameters are `M` (default 512) and `MAX_ITER` (default 15; the
`iterations` width is clog2(MAX_ITER+1)). Smaller `M` (a power of two, at
least 16) gives a smaller code of the same structure, which the testbenches
use.

**Debug mode.** While `debug` is high, every unit has `en = 0` and freezes,
and the memories' read ports serve `dbg_addr`. Units resume one cycle after
`debug` falls. That extra cycle lets each memory read a unit was waiting on
be issued again with the unit's own address, so a paused decode produces
exactly the same messages as one that was never paused. Assertions in
`spa_top` check that at most one unit is busy and that nothing is written
while paused.

## Number format

All messages and LLRs are IEEE half precision. `fp16_mul` and `fp16_add`
are combinational:

- rounding is to nearest, ties to even;
- subnormal results are flushed to zero;
- overflow saturates to ±65504;
- there are no infinities or NaNs;
- an exact cancellation in the adder gives +0.

Halving, doubling, clamping and sign handling are exponent or bit
operations in `spa_pkg`. The tanh and atanh tables are computed at
elaboration in integer fixed point with 62 fraction bits, then rounded to
fp16, so no data files are needed:

- tanh(k/100) = (1 − t)/(1 + t), with t = e^(−k/50) built by repeated
  multiplication;
- atanh(k/200) = ½·ln((200 + k)/(200 − k)), with the logarithm computed
  bit by bit by repeated squaring.

The testbenches confirm that every entry equals the correctly rounded
double-precision value.

## Departures and trust

What follows the reference design:

- the unit structure and hand-off order;
- the check-node state names;
- fp16 messages;
- the tanh and atanh steps (0.01 and 0.005);
- the ±0.999 product clamp;
- the negative-means-1 decision;
- the parity-based stop;
- the 15-iteration limit used in its RTL evaluation (its floating-point
  model used 20).

This design's own choices:

- **θ/φ constants**: taken from the CCSDS tables as recalled, not checked
  (see above).
- **On-chip H generation**: the reference stored precomputed index arrays.
  Here the same sparse lists are computed after reset. The column list
  also carries the row slot.
- **Edge-indexed message memories** at `row*6 + slot`.
- **A separate channel-LLR memory**: the reference block diagram shows
  the initialiser writing the LLRs into the Lji memory and the decision
  block reading Lji. Here the variable-node and decision units take the
  channel LLR from its own store. The decision unit sums it with the Lij
  messages, as the decision rule is written.
- **Table sizes**: 512 tanh and 256 atanh entries. The check-limit bound
  5.109 equals the tanh table's end.
- **Q6.10 truncating conversion** and round-to-nearest indexing.
- **fp16 corner cases**: rounding mode, flush-to-zero and saturation.
- **Interfaces**: the start/ready/done protocol, the LLR source with
  one-cycle latency for all 2560 positions, and the bit-serial decoded
  output.
- **The `dbg_addr` input**: the reference only exposed the two memories
  for inspection.
- **FSM timing**: the state order and the one-cycle memory waits. The
  result is about 3.5× fewer cycles per iteration than the reference
  reported, with the same sequential structure.

Sign convention: the SPA derivation in the reference defines the LLR as
log P(1)/P(0), yet decodes a negative LLR as 1. This RTL follows the
decoding rule, so feed LLRs with positive meaning bit 0, for example
2y/σ² for BPSK with 0 → +1.

Not included: the HLS version of the decoder, and anything the reference
lists only as future work (pipelining, parallel node units).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_spa_ref.sv` is a
package of independent models: exact fp16 rounding, the table contents,
the check-node update, a Gaussian source, an encoder by GF(2) elimination
of H, and the syndrome.

| testbench | what it checks |
|---|---|
| `tb_fp16_mul`, `tb_fp16_add` | 20,000 random and corner-case operand pairs, bit-exact |
| `tb_fp16_to_fixed` | all 65,536 inputs |
| `tb_lut_index` | all inputs for both table steps |
| `tb_tanh_lut`, `tb_atanh_lut` | every entry |
| `tb_spa_ram` | random traffic, including read-during-write (old data) |
| `tb_spa_hmatrix` | every row and column list against an independent build, row and column weights, 7680 ones, column lists pointing back at the right row slots, generation time |
| `tb_spa_init`, `tb_spa_check_node`, `tb_spa_var_node`, `tb_spa_decision` | M = 16: every written message or decided bit bit-exact against the model, cycle counts against the formulas above |
| `tb_spa_iter_ctrl` | convergence, the limit, clearing on a new frame, pauses |
| `tb_spa_top` | M = 16 end to end: clean, noisy, paused and undecodable frames; counts every mechanism |
| `tb_spa_top_full` | default size: one frame at 3 dB decodes to the sent codeword; cycles per iteration |
| `tb_spa_workload` | default size: 4 frames at each of 2–6 dB; information-bit errors (final and after 5 iterations), convergence, iteration counts |

The `tb_spa_top` mechanism counts are:

- a first-iteration stop;
- multi-iteration convergence;
- a frame that hits the limit;
- debug pauses and reads;
- punctured bits recovered.

A sample run of `tb_spa_workload`, with bit error rates over the
information bits. BER-iter-5 uses the decisions streamed in the 5th
iteration:

```
Eb/N0  channel-BER  BER-iter-5  decoded-BER  avg-iter  converged
 2 dB     9.81e-02    6.98e-02     4.88e-04     13.00  3/4
 3 dB     8.20e-02    3.96e-02     0.00e+00      9.50  4/4
 4 dB     5.47e-02    1.95e-03     0.00e+00      6.25  4/4
 5 dB     3.44e-02    0.00e+00     0.00e+00      7.25  3/4
 6 dB     2.51e-02    0.00e+00     0.00e+00      6.50  3/4
```

The single frame at 5 dB and at 6 dB that did not converge each have one
wrong weight-1 parity bit, as explained in the check-node section.

With `FRAMES` set to 20, the frame count of the original evaluation, the
same bench gave:

```
Eb/N0  channel-BER  BER-iter-5  decoded-BER  avg-iter  converged
 2 dB     1.02e-01    8.05e-02     2.10e-03     13.10  16/20
 3 dB     7.93e-02    2.68e-02     0.00e+00      8.15  20/20
 4 dB     5.66e-02    2.78e-03     0.00e+00      6.05  20/20
 5 dB     3.87e-02    0.00e+00     0.00e+00      4.90  20/20
 6 dB     2.45e-02    0.00e+00     0.00e+00      4.10  20/20
```

All frames from 3 dB up converge, and from 5 dB up they converge in about
5 iterations or fewer. That run takes about 4.5 minutes. The
converged frames at 5 and 6 dB needed fewer than 5 iterations on average.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/spa_pkg.sv tb/tb_spa_ref.sv tb/tb_spa_top.sv --top-module tb_spa_top
./obj_dir/Vtb_spa_top
```

Put any other testbench name in place of `tb_spa_top`. Approximate run
times:

| testbench | time |
|---|---|
| `tb_spa_top` | about 2 s |
| `tb_spa_top_full` | about 4 s |
| `tb_spa_workload` | about 1 minute |

To decode your own data, drive `llr_data` from a 2560-entry table indexed
by `llr_addr`, registered for one cycle as in `tb_spa_top_full`. Pulse
`start`, wait for `done`, and collect `dec_data` at `dec_addr` whenever
`dec_valid` is high.

## Files

- `rtl/spa_pkg.sv`: types, H construction constants, fp16 helpers
- `rtl/spa_top.sv`: top level, port sharing, debug pause
- `rtl/spa_hmatrix.sv`: sparse H generation and store
- `rtl/spa_init.sv`, `rtl/spa_check_node.sv`, `rtl/spa_var_node.sv`,
  `rtl/spa_decision.sv`, `rtl/spa_iter_ctrl.sv`: the processing units
- `rtl/fp16_mul.sv`, `rtl/fp16_add.sv`, `rtl/fp16_to_fixed.sv`,
  `rtl/lut_index.sv`, `rtl/tanh_lut.sv`, `rtl/atanh_lut.sv`: the arithmetic
  and tables
- `rtl/spa_ram.sv`: message and LLR memory
- `tb/`: one testbench per module, plus the end-to-end, full-size and
  workload benches and the `tb_spa_ref` model package
