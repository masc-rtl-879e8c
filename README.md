# MASC associative memory: a TCAM that searches several times per precharge

An associative memory sits beside a floating-point unit and remembers the
results of the operand patterns that occur most often. Every operation
issued to the FPU is also looked up in a ternary CAM. On a hit, the FPU is
clock-gated and the result comes from a small result memory. The cost of
this scheme is the search energy of the TCAM. In a conventional TCAM every
match line is precharged before each search, and every line that misses
discharges, so nearly all lines are recharged on every search.

The multiple-access single-charge (MASC) TCAM inverts the sense of the match
line. A line discharges only when its row **matches**. Miss lines keep their
charge, so one precharge serves several searches. After each search only the
lines that hit are recharged. All lines of a block are refreshed after a
fixed number of searches, because every miss leaks a little charge. Letting
the low-order blocks run longer between refreshes makes their sensing
approximate: a miss line that has drained far enough reads as a hit when
the key is within 1 or 2 bits of the stored pattern. The number of relaxed
blocks is chosen per application, trading output quality for hit rate.

This repository holds a synthesizable, cycle-level RTL model of that
architecture: the encoders, partial TCAMs, second stage, precharge
controller and result memory, assembled into one associative memory per FPU
kind.

## Structure

```
masc_gpu_assoc                 one associative memory per FPU kind
└─ masc_assoc_mem  (x4)        ADD 64-bit, MUL 64-bit, SQRT 32-bit, MAD 96-bit key
   ├─ masc_tcam                two-stage MASC TCAM
   │  ├─ masc_precharge_ctrl   refresh period and strobe per block
   │  ├─ masc_store_encoder    (per block) ternary pattern -> cell states
   │  ├─ masc_partial_tcam     (per block) rows of one encoding block
   │  │  └─ masc_search_encoder  key slice -> one-hot search lines
   │  └─ masc_second_stage     row hits in all blocks, lowest hit row
   └─ masc_result_mem          one precomputed result per row
masc_pkg                       modes, refresh periods, tolerance rule, key widths
```

## Search path: encoding blocks and two stages

The key is cut into `BLOCK_W`-bit slices. The default of 8 bits gives the
"8:4" split, four blocks per 32-bit operand, which is the split with the
best energy and sense margin. 2:16 and 4:8 splits are available by setting
`BLOCK_W` to 2 or 4.

**Encoding.** A block of `BLOCK_W` bits is stored as `2**BLOCK_W` resistive
cells per row (`masc_store_encoder`). Cell *j* is low resistance when search
value *j* matches the pattern. A fully specified pattern therefore has exactly
one low-resistance cell. The search slice is decoded into one-hot search lines
(`masc_search_encoder`), so exactly one cell per row and block is connected to
the match line. On a hit that cell is the low-resistance one and the line
discharges. On a miss it is a single high-resistance cell, whatever the data,
so leakage does not grow with the word size. Don't-care bits are supported by
programming one low-resistance cell per matching value. That is a choice of
this design.

**Stage one.** Each block is a `masc_partial_tcam`. All blocks are searched in
parallel, and each reports per row whether its match line discharged. This
per-row report is called `enl`.

**Stage two.** `masc_second_stage` marks a row as a hit when it hit in every
block. It also picks the lowest-numbered hit row for the result memory. Lowest
index wins; the original scheme does not say how several hits are resolved.

## Match-line charge, refresh and approximation

This is the part that departs furthest from ordinary TCAM RTL. The analog
quantity is the charge on each match line. It is represented by a per-row,
per-block **age**: the number of searches the line has served since it was
last precharged.

* A search whose line hits resets that line's age to 0. This is the
  selective hit-line precharge.
* A line that misses ages by one.
* A write precharges the written row.
* When `masc_precharge_ctrl` raises a block's `refresh`, every line of the
  block is precharged at that clock edge. This is the full refresh.

The sense amplifier's decision depends on the age the line has reached at the
current search (age + 1):

| age at search           | a row's block hits when the cared-for Hamming distance is |
|-------------------------|-----------------------------------------------------------|
| ≤ P (exact period)       | 0                                                         |
| P+1 … P+2               | ≤ 1                                                       |
| > P+2                   | ≤ 2                                                       |

The controller bounds the age by the block's refresh period:

| block width | exact period P | 1-HD period | 2-HD period |
|-------------|----------------|-------------|-------------|
| 8 bits      | 4              | 6           | 8           |
| 4 bits      | 5              | 7 (assumed) | 9 (assumed) |
| 2 bits      | 7              | 9 (assumed) | 11 (assumed)|

The exact periods of all three widths come from circuit-level results. So do
the 6- and 8-search periods that give 1- and 2-bit Hamming distance on 8-bit
blocks. The relaxed periods of 2- and 4-bit blocks reuse the same +2/+4
offsets, which is an assumption. A block at its exact period always searches
exactly. A block at a relaxed period searches exactly early in each period
and approximately late in it. This is the behaviour that ML-voltage decay
produces. Modelling it as a deterministic age rule is this design's choice:
the physical array shows it only statistically.

The Hamming tolerance is evaluated cheaply. Flipping one bit of the search
value is a fixed permutation of the one-hot search lines. So the patterns
"one bit away" and "two bits away" are formed once per block (`lines_hd1`,
`lines_hd2`), and each row only ANDs them with its cells.

**Energy.** Each partial TCAM reports how many lines it recharged at every
edge: the hit lines, or all rows on a full refresh. `masc_assoc_mem`
accumulates this in `precharge_count`. A conventional TCAM would recharge
`blocks x rows` lines per search. The ratio of the two counts shows the
precharge saving. On the full-size end-to-end test the saving is about 3.7x.
This is a count of events, not energy in joules.

## Approximation setting

`masc_precharge_ctrl` holds a mode (`APPROX_EXACT`, `APPROX_1HD`,
`APPROX_2HD`) and a count `cfg_blocks`. The lowest `cfg_blocks` blocks of
**every 32-bit operand** run the relaxed period of the mode. All other blocks
run the exact period. The count is per operand because the per-application
settings are fractions of a 32-bit word (for example 1 of 4 blocks, 25 %, on
8:4). Typical settings that keep image PSNR above 30 dB on 8:4 are 1–2
blocks at 1-HD, or 0–1 blocks at 2-HD. Writing a setting (`cfg_we`)
refreshes every block at that edge, so a new setting starts from full lines.
Each search counter raises `refresh` together with the search that completes
its period.

## Interfaces and timing

Top level, `masc_gpu_assoc`. Every port is an array indexed by FPU kind
(`masc_pkg::fpu_kind_e`: 0 ADD, 1 MUL, 2 SQRT, 3 MAD). Keys are carried
96 bits wide, and a unit ignores the bits above its own key width.

| port | dir | per unit | meaning |
|------|-----|----------|---------|
| `cfg_we`, `cfg_mode`, `cfg_blocks` | in | 1, 2, 3 bits | load approximation setting |
| `wr_en`, `wr_row`, `wr_key`, `wr_care`, `wr_data` | in | 1, 5, 96, 96, 32 | program one row: ternary pattern (`care` 1 = must match) and its result |
| `search_valid`, `search_key` | in | 1, 96 | FPU operands, one search per cycle |
| `fpu_stop` | out | 1 | hit: clock-gate the FPU for this operation |
| `out_valid`, `out_hit`, `out_row`, `out_data` | out | 1, 1, 5, 32 | response; `out_data` is the stored result on a hit, 0 on a miss |
| `search_count`, `precharge_count` | out | 32, 32 | searches and recharged match lines since reset |

Timing for a search sampled at rising edge *t*:

* From edge *t*: `fpu_stop` (and, inside, the row hits).
* From edge *t+1*: `out_*`.

Responses come back in order, one per search. Writes and setting changes
take effect at their edge. Do not write a row in the same cycle as a search.
Reset (`rst_n`, active low, asynchronous) clears every cell to high
resistance, so unwritten rows never hit. The contents of the result memory
are not reset.

The FPUs are outside this design. So is the choice between the FPU's result
and `out_data` on a hit, and so is the host software that profiles an
application and loads its frequent patterns.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `BLOCK_W` | 8 | top and below | encoding block width (2, 4 or 8; other values stop elaboration) |
| `ROWS` | 32 | top and below | TCAM rows per FPU (assumed main size) |
| `DATA_W` | 32 | top, assoc_mem, result_mem | result width |
| `KEY_W` | per FPU | assoc_mem, tcam | search word width (multiple of `BLOCK_W`) |

The row count is parameterised. A 32-row design with 2-bit blocks has 8 rows
per available slice state; 4-bit blocks give 2 and 8-bit blocks 1/8. Above 8
rows per state, partial-match recharges cost more than MASC saves. An 8-bit
block costs 256 cells per row. That is large in flip-flops: the default top
holds 32 blocks x 32 rows x 256 cells.

## Simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The RTL
testbenches compare against `tb/masc_ref_model.sv`, a behavioural model
written from the rules above. Example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/masc_pkg.sv tb/tb_masc_gpu_assoc.sv --top-module tb_masc_gpu_assoc -o sim
./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_masc_pkg` | refresh periods, tolerance thresholds, key widths |
| `tb_masc_search_encoder`, `tb_masc_store_encoder` | exhaustive / random encoding |
| `tb_masc_partial_tcam` | hit, 1- and 2-bit approximate hits by age, selective and full recharge counts |
| `tb_masc_second_stage` | AND across blocks, lowest hit row |
| `tb_masc_precharge_ctrl` | refresh spacing 4/6/8 for each setting, per-operand low blocks |
| `tb_masc_tcam`, `tb_masc_assoc_mem` | whole TCAM / associative memory against the model, latencies, counters |
| `tb_masc_gpu_assoc` | all four units at full size; counts exact, don't-care, multiple and approximate hits, misses, full refreshes, selective recharges, setting changes and FPU gating, and fails if any never happens |
| `tb_masc_splits` | one associative memory built with 2-, 4- and 8-bit blocks, run with per-application block counts for each split |

The full-size end-to-end test takes about two minutes to build with Verilator
and seconds to run.

## Departures and limits

* Cells, match lines and sense amplifiers are analog. Here they are a
  digital equivalent. Leakage is the age rule above, which is deterministic.
  Process variation does not appear.
* The relaxed refresh periods for 2- and 4-bit blocks are assumed.
* Several of the interface details are this design's own choices:
  * lowest-index resolution of multiple hits;
  * don't-care support in the encoded cells;
  * per-operand counting of approximated blocks;
  * a refresh on every setting change;
  * latencies of one cycle for the TCAM and one for the result memory.
* Energy, delay, PSNR and hit-rate results belong to the circuit and the
  application, not to the RTL. The only energy-related output is the count
  of recharged match lines.
