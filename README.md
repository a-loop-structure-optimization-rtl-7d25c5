# Loop-optimized FNTT processor (65,536-point number theoretic transform)

Multiplying integers with tens of thousands of digits is the slow step in
processing data under fully homomorphic encryption. The fast way to do it is
through the number theoretic transform (NTT): transform both digit sequences,
multiply them point by point, transform back, and propagate carries. This RTL
implements the transform itself, the fast NTT (FNTT), as a hardware processor
for M = 65,536 points.

The architecture follows the paper "A Loop Structure Optimization Targeting
High-level Synthesis of Fast Number Theoretic Transform". That paper starts
from the textbook triple loop of the FNTT (stage, group, butterfly) and
reshapes it for a pipelined processor:

* **Loop flattening.** Inside a stage, the group and butterfly loops become one
  counter over the M/2 butterflies of the stage. Every stage then has the same
  trip count. No stage pays the cost of many short loops near the output.
* **One pipeline per stage.** Each stage gets its own pipeline, and the stages
  run one after another. A single pipeline spanning stages would compete for
  the memory it reads and writes.
* **Trip count reduction.** Every stage except the last performs two
  butterflies per iteration, which halves its trip count to M/4. This only
  pays off when the data array is split into two banks, so that four words
  can be read and four written per cycle.

The result is one transform in 409,697 clock cycles at M = 65,536. That runs
from the first input word to the last result. The paper reports 410,480
cycles for its processor.

## What is computed

For inputs x(0..M-1), each a residue below P, the processor produces

    X(k) = sum_{t=0}^{M-1} x(t) * ALPHA^(t*k)  mod P,   k = 0 .. M-1

The constants obey the rules the paper sets:

* P is the smallest prime with P >= 81*M (the largest possible convolution
  value of two decimal digit strings) and P = 1 (mod M).
* ALPHA has multiplicative order exactly M mod P. This implementation picks
  the smallest such ALPHA.

For M = 65,536 this gives P = 5,308,417 = 81*2^16 + 1, ALPHA = 167, and
23-bit words.

Because ALPHA^(M/2) = -1 (mod P), an M-point transform splits into two
M/2-point transforms. Stage s (s = 0..m-1, m = log2 M) works on groups of
`point = M >> s` words, with `op = point/2`. For butterfly n of group g:

    idx1 = point*g + n,  idx2 = idx1 + op
    data[s+1][idx1] = (data[s][idx1] + data[s][idx2])              mod P
    data[s+1][idx2] = (data[s][idx1] - data[s][idx2]) * ALPHA^(n*2^s) mod P

This is the decimation-in-frequency butterfly. After m stages, row data[m]
holds X in bit-reversed order. The readout reverses the address bits, so
results leave in natural order k = 0, 1, ..., M-1.

## The data array and its two banks

The storage keeps one row per stage boundary, data[0] .. data[m]: 17 rows of
65,536 words. Row 0 is filled by the input, stage s reads row s and writes
row s+1, and row m is read out. Keeping all rows means each row has exactly
one writer and one reader, and these are never active at the same time. The
port multiplexing in `fntt_processor` is therefore a plain "writer if
writing, else reader" choice per port.

Each row is split by index parity into two `data_bank` RAMs of M/2 words:
even indices in bank 0, odd in bank 1, word address = index >> 1. This split
is what makes two butterflies per cycle possible:

* In every stage but the last, op >= 2 and n is even. So idx1 and idx2 are
  both even, and the second butterfly's idx3 = idx1+1 and idx4 = idx2+1 are
  both odd.
* Each bank therefore serves exactly two reads per iteration, one per RAM
  port. The results go back to the same positions in the next row, again two
  writes per bank.
* In the last stage op = 1, and the single butterfly works on (idx1, idx1+1):
  one word from each bank.

The total is 2*(m+1) = 34 banks of 32,768 x 23 bits, plus the twiddle table:
26.4 Mbit of RAM at M = 65,536.

## Stage pipeline (`stage_unit`, `bf_index_gen`)

`bf_index_gen` is the flattened loop of one stage S. A counter k runs over the
butterflies: in steps of 2 (trip count M/4) for S < m-1, in steps of 1 (trip
count M/2) for the last stage. Group, position and indices follow directly
from k:

    shift = m-1-S,  g = k >> shift,  n = k - (g << shift)
    idx1 = (g << (shift+1)) + n,  idx2 = idx1 + op,  idx3 = idx1 + 1,  idx4 = idx3 + op
    twiddle exponents: n << S and (n+1) << S

`stage_unit` wraps this counter in a pipeline that accepts one iteration per
clock:

| cycle | action |
|---|---|
| 0 | indices computed; four RAM reads and two twiddle reads issued |
| 1 | read data arrive; the two butterflies start |
| 5 | results written to row S+1 (the address travels along in a 5-deep delay line) |

`done` pulses in the cycle of the last write, TC + 5 cycles after `start`.
The sequencer starts the next stage one cycle later, so a stage occupies
TC + 6 cycles. There is one `stage_unit` per stage (16 at M = 65,536), each
with its own butterflies, as in the paper's processor. Only one of them is
active at a time.

`butterfly` computes the modular sum and difference in one cycle. It then
multiplies the difference by the twiddle in `mod_mul`, a 3-cycle Barrett
multiplier (x = a*b; q = ((x >> (DW-1)) * floor(2^(2DW)/P)) >> (DW+1);
r = x - q*P, followed by at most two subtractions of P).

## Twiddle table (`twiddle_table`)

All exponents n*2^s are below M/2, so one table of ALPHA^i for i < M/2 serves
every stage. The table has two read ports, one per butterfly. It is not a
stored constant. After reset it fills itself by repeated multiplication
(entry i = entry i-1 * ALPHA mod P), one entry every 4 cycles: 131,069 cycles
at M = 65,536. `ready` stays low until the table is complete. This happens
once after reset, not once per transform.

## Sequencing and interface (`fntt_ctrl`, `fntt_processor`)

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; active-low asynchronous reset of the control state (RAMs are not cleared) |
| `ready` | out | idle and twiddle table built |
| `start` | in | one-cycle pulse while `ready` |
| `in_valid`, `in_ready`, `in_data[DW]` | in/out/in | M words x(0..M-1) in order; `in_valid` may drop at any time to stall |
| `out_valid`, `out_index[m]`, `out_data[DW]` | out | X(k) for k = 0..M-1, one per cycle, no back-pressure |
| `done` | out | pulses together with the last result |
| `busy` | out | transform in progress |

Cycle budget of one transform, without input stalls:

    M (load) + (m-1)*(M/4 + 6) + (M/2 + 6) + M + 1 (readout)

| M | cycles, this RTL | cycles, paper |
|---|---|---|
| 16 | 77 | 178 |
| 1,024 | 4,925 | 5,291 |
| 2,048 | 10,307 | 10,731 |
| 4,096 | 21,577 | 22,072 |
| 8,192 | 45,135 | 45,695 |
| 16,384 | 94,293 | 94,924 |
| 32,768 | 196,699 | 197,398 |
| 65,536 | 409,697 | 410,480 |

The paper's counts come from a high-level-synthesis tool. Its handshake
overheads are not known, so the small differences are expected.

## Parameters and other sizes

`fntt_processor` takes `M`, `P`, `ALPHA` and `DW`. The defaults in `fntt_pkg`
are for 65,536 points. The parameters must be changed together. P and ALPHA
must satisfy the rules above, and `DW` must satisfy P < 2^DW with DW <= 31:

| M | P | ALPHA | DW |
|---|---|---|---|
| 16 | 1,297 | 157 | 11 |
| 64 | 5,441 | 77 | 13 |
| 1,024 | 83,969 | 329 | 17 |
| 2,048 | 176,129 | 153 | 18 |
| 4,096 | 331,777 | 386 | 19 |
| 8,192 | 737,281 | 96 | 20 |
| 16,384 | 1,376,257 | 73 | 21 |
| 32,768 | 2,654,209 | 89 | 22 |
| 65,536 | 5,308,417 | 167 | 23 |

M must be a power of two, at least 4.

## Where this RTL departs from the paper, and what it leaves out

* The paper's processor was produced by high-level synthesis from C. This is
  hand-written RTL with the same structure: the flattened loops, the two-bank
  rows, two butterflies per iteration (one in the last stage), and one
  pipeline per stage run in sequence. The iteration latency, the Barrett
  multiplier, the handshakes and the output reordering are this design's own
  choices.
* The paper's C code holds data in 32-bit `int`. Here a word is exactly wide
  enough for a residue mod P (23 bits).
* The paper does not say how the twiddle factors reach the butterflies. The
  self-filling table is this design's choice, and it adds a one-time start-up
  delay of about 2M cycles.
* Resource, clock and slack figures of the FPGA implementation (block RAMs,
  DSP slices, LUTs, 10 ns clock) are properties of that tool flow and device.
  Nothing here reproduces them.
* Only the forward transform is built. The rest of the multiplication flow
  (pointwise products, inverse transform with ALPHA^-1 and 1/M, carry
  propagation) is outside this processor. The inverse transform has the same
  structure with ALPHA replaced by its inverse, followed by a scaling by
  M^-1 mod P.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a cycle watchdog.

| testbench | what it covers |
|---|---|
| `tb_mod_mul`, `tb_butterfly` | 20,000 random and corner operand sets against 64-bit integer arithmetic; exact latency |
| `tb_data_bank` | random two-port read/write traffic against a reference array |
| `tb_twiddle_table` | every entry against ALPHA^i; fill time; ALPHA^(M/2) = -1 |
| `tb_bf_index_gen` | all stages of a 64-point transform against the nested group/butterfly loops; every index touched exactly once per stage |
| `tb_stage_unit` | all four stages of a 16-point transform against reference butterflies; exactly one write per word; done timing |
| `tb_fntt_ctrl` | phase order, stall handling, start refusal before the table is ready, one-hot stage starts, readout count |
| `tb_fntt_processor` | three back-to-back 64-point transforms (random with input stalls, all P-1, impulse), every output against a direct O(M^2) NTT, exact cycle count, count of each mechanism |
| `tb_fntt_sizes` | one transform at each size 16 and 1,024 .. 32,768 (helper `tb_fntt_size_run`): cycle count (formula, and no more than the published count), order, 24 outputs per size against the direct sum |
| `tb_fntt_full` | one 65,536-point transform at the default parameters: fill time, cycle count (formula, and no more than the published 410,480), order and range of all outputs, 96 outputs against the direct sum |

The full-size transform is not checked against a complete reference, which
would take 4.3 billion modular products. It checks 96 outputs exactly and all
of them for range and order. The complete check against a direct NTT runs at
64 points.

Run any testbench with Verilator 5 from the repository root, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fntt_full \
        -y rtl -y tb +libext+.sv -Irtl rtl/fntt_pkg.sv tb/tb_fntt_full.sv
    ./obj_dir/Vtb_fntt_full

The full-size run simulates about 540,000 cycles and finishes in a few
seconds.

## Files

| file | content |
|---|---|
| `rtl/fntt_pkg.sv` | default sizes and the Barrett constant function |
| `rtl/fntt_processor.sv` | top level: sequencer, twiddle table, stage units, 2*(m+1) banks, port muxing, readout |
| `rtl/fntt_ctrl.sv` | load / stage / readout sequencer |
| `rtl/stage_unit.sv` | pipeline of one stage |
| `rtl/bf_index_gen.sv` | flattened loop counter and index arithmetic |
| `rtl/butterfly.sv` | modular DIF butterfly |
| `rtl/mod_mul.sv` | pipelined Barrett modular multiplier |
| `rtl/data_bank.sv` | two-port RAM bank of one row |
| `rtl/twiddle_table.sv` | self-filling table of ALPHA^i |
