# PipeBSW: banded Smith-Waterman alignment in a two-stage pipeline

This is synthesizable SystemVerilog for a DNA short-read aligner. It scores a
read against a reference segment with the Smith-Waterman (S-W) recurrence and
traces the alignment back, all in hardware, with no host processor in the loop.
It follows the architecture published as *PipeBSW: A Two-Stage Pipeline
Structure for Banded Smith-Waterman Algorithm on FPGA*. Four ideas carry it:

* **Banded scoring.** After a seeding step such as BWT, a candidate read is
  close to its reference, so the optimal path stays near the main diagonal. Only
  positions within ±12 of the diagonal are recorded.
* **Lookahead cells.** A 3 × 3 cell fills its block in three cycles instead of
  five, by comparing all candidate paths of a position in parallel rather than
  waiting for its neighbour.
* **Direction matrix and a hardware backtracker.** Each position keeps only a
  2-bit "where did my score come from", not its score. A backtracking unit (BTU)
  walks these bits one position per cycle.
* **Two-stage pipeline.** Scoring (stage 1) and backtracking (stage 2) of
  different segments overlap. Three processing elements (PEs) are each used
  twice per read and do the work of six.

## Scoring rule

`H(i,j) = max(H(i-1,j-1) + S, H(i-1,j) - 1, H(i,j-1) - 1, 0)`, with S = +2 on
equal bases and −2 otherwise. Rows `i` index the reference and columns `j` the
read. Row 0 and column 0 of every segment are 0. Bases are 2 bits
(A, C, G, T = 0..3).

Every position records a 2-bit direction (`dir_t` in `pipebsw_pkg`):

| code | name     | source     | meaning                        |
|------|----------|------------|--------------------------------|
| 00   | match    | upper left | equal bases                    |
| 01   | mismatch | upper left | different bases, or baseline 0 |
| 10   | insertion| top        | reference base against a gap   |
| 11   | deletion | left       | read base against a gap        |

A score that falls to the baseline 0 is recorded as a mismatch. This makes the
aligner behave like a global aligner along the band. When candidates tie, the
priority is diagonal > top > left > baseline.

**Error counting.** Every position also carries three counters: the mismatches,
insertions and deletions on its best path. A position takes the counters of the
source it took its score from and adds one of the matching kind.

## Geometry: segments, band and L regions

This is the part to understand before reading the RTL.

A read and its reference are 156 bases each. They are cut into **six segments
of 36 bases**. The segment count is the top-level parameter `NSEG_P` (1..8),
and reads are 24·`NSEG_P` + 12 bases long. Segment `s` covers bases
`24s .. 24s+35` of both sequences, so consecutive segments overlap by 12 bases. Each segment is scored on its own as a
36 × 36 matrix that starts from zeros. The 12 overlapping rows and columns let
the scores settle before the part the segment is responsible for.

Inside a segment, the band is `|i − j| ≤ 12`. The band positions with
`max(i, j) = c` form an **"L" region**: 13 positions along row `c` and 13 down
column `c`, sharing the corner `(c, c)`. That is 25 positions. Position `p`
inside the region is

    p = 12 + (j − i)        p = 0..11: row arm, p = 12: corner, p = 13..24: column arm

Each region packs into a 50-bit word, with position `p` in bits `[2p+1:2p]`.
Regions `c = 12..35` (24 of them) form the segment's **direction matrix**:
24 × 50 = 1200 bits, against 2592 bits for the whole 36 × 36 segment. Region
`c` is stored in buffer entry `c − 12`. Regions 0..11 belong to the overlap and
are not stored.

Walking back from position `(c, p)`, a move lands in a predictable place:

| direction          | new entry                      | new position |
|--------------------|--------------------------------|--------------|
| match / mismatch   | entry − 1                      | p            |
| insertion (up)     | entry − 1 if p < 12, else same | p + 1        |
| deletion (left)    | entry − 1 if p > 12, else same | p − 1        |

A path therefore needs at least 24 steps (all diagonal). Each gap step taken
on the "wrong" arm adds one more step: 24–36 steps for a path that stays in the
band.

## The calculation cell (`calc_cell`)

The cell computes one 3 × 3 block, three positions per cycle:

    phase 0: H11  H12* H21*
    phase 1: H13  H22  H31
    phase 2: H23  H32  H33*          (* = lookahead)

`H12` cannot wait for `H11` in the same cycle. Its left candidate is `H11 − 1`,
which equals `max(H11's candidates) − 1`, so the cell forms the best of H11's
three non-baseline candidates once and shares it. It becomes H11's result (with
the baseline), H12's left candidate and H21's top candidate. `H33` is built the
same way from the shared partial maxima of `H23` and `H32`. Scores are bit-exact
with the serial recurrence. Directions and error counts are too, because the
same priority is applied.

The boundary (corner `H00`, top row `H01..H03`, left column `H10..H30`) must be
held for the three phases. After phase 2 the cell holds its bottom row
(`H30..H33`, where `H30` is its latched left input), its right column and its
nine directions until its next phase 0.

## The processing element (`processing_element`)

A segment is 12 × 12 blocks. **Thirteen cells** are laid across the
anti-diagonal. Cell `g` owns block lane `d = g − 6` (blocks with
`row − column = d`) and computes all blocks of that lane in turn. Round `k`
(0..22) computes the blocks on block anti-diagonal `k`, three cycles per round.
Adjacent lanes are busy on alternate rounds, so a cell always reads a stable
neighbour:

* top row from lane `d − 1`, as left by the previous round;
* left column from lane `d + 1`, also from the previous round;
* corner from its own `H33` of two rounds before.

Blocks outside lanes ±6 are not computed and act as unreachable, with a score
of −256. The recorded band (±12 positions) lies within lanes ±4. The two
extra lanes on each side give band-edge scores the same neighbours they would
have in a full matrix, unless a path strays more than 18 positions from the
diagonal.

After round `k` the PE copies the directions of the recorded positions that
round produced into a 24 × 25 × 2-bit scratch array. The copy happens in phase 0
of round `k+1`, while those cells are idle. Regions `3b..3b+2` are complete
after round `2b`. Their rows are then written to the direction buffer, one per
cycle, during the next three cycles. At the end, the 25 scores of the last
region (`c = 35`) are compared. The PE reports the index of the maximum, its
score and its error counts; ties go to the position nearest the diagonal.

**Timing:** `start` samples both 36-base segments. `done` pulses 73 cycles
later: 69 cycles of scoring, plus 4 cycles of write-back and the maximum
search. `busy` drops in the same cycle.

## Buffer and backtracking (`dir_buffer`, `btu`)

`dir_buffer` is a 24 × 50 register array. It has a synchronous write port and
an asynchronous read port, so the BTU can read an entry and act on it in the
same cycle.

The BTU starts with the entry pointer at 23 and the position pointer at the
maximum's index. Each cycle it:

* reads `rd_data[2p+1:2p]`;
* outputs the direction and the matrix coordinates `(i, j)`, offset by
  `24·segment` so they are coordinates within the read;
* moves the pointers as in the table above.

The walk ends when the entry pointer goes below 0. If the position pointer
would leave 0..24, the path has left the band: the walk stops and `band_exit`
is set. A walk of `n` steps takes `n + 1` cycles, one of them to load the
pointers.

## Error filter (`error_filter`)

The filter reads the error counts at the chosen maximum. If
mismatches + insertions + deletions exceed 10, the segment is a poor candidate:
it is reported as failed and never backtracked. The filter also outputs
`|insertions − deletions|`. A path can only leave the ±12 band with 12 or more
unbalanced gaps, which is why the filter normally keeps the BTU inside the band.

## The two-stage pipeline (`pipeline_ctrl`)

Segments are numbered in arrival order, `q = 0, 1, …`, across reads. Segment
`q` runs on PE `q mod 3`, and its directions go to buffer slot `q mod 6` (each
PE has two buffers, used in turn). Consecutive starts are at least **M = 27**
cycles apart. The PE needs 73 cycles, which is under 3 × 27, so PE 0 is free
again when segment 3 arrives:

    cycle   0    27   54   81  108  135  162 ...
    PE0     s0 --------------> s3 --------------> s0' ...
    PE1          s1 --------------> s4 ---------- ...
    PE2               s2 --------------> s5 ----- ...
    BTU                        bt0  bt1  bt2  bt3 ...   (s0 done at 74)

The single BTU handles segments strictly in order, as soon as each has been
scored. The waits are explicit:

* A start waits for the offer from the slicer, for the M-cycle stagger, for an
  idle PE, and for its buffer slot to have been backtracked or dropped (**PE
  waits for the BTU**).
* The BTU waits when its next segment is still being scored (**BTU waits for a
  PE**).

The two buffers per PE give the BTU close to 90 cycles after a segment is
scored before that segment's slot is needed again. So at M = 27 the PEs stall only after a run of long paths. The
controller brings each wait and each drop out as a one-cycle strobe.

The input side (`base_fifo` ×2 and `segment_slicer`) takes one reference base
and one read base per cycle. It fills one of two read slots (156 bases by
default) while the other is being handed out. At one base per cycle a read
takes 156 cycles to load, and the pipeline takes 6 × 27 = 162 cycles to issue
it, so the input keeps up.
Issuing one 156-base read pair every 162 cycles is 3.85 input bits per cycle:
about 640 Mbit/s at the 166.7 MHz the published design reached. The
end-to-end testbench measures 163 cycles per read, including reads whose long
paths make the PEs wait.

## Top level (`pipebsw_top`)

| port group | signals | notes |
|---|---|---|
| inputs | `ref_in_valid/base/ready`, `read_in_valid/base/ready` | a base is taken when valid and ready are both high |
| segment report | `rep_valid`, `rep_read_id`, `rep_seg_idx`, `rep_pass` | one per segment, in order, when its scoring ends |
| path | `path_valid`, `path_dir`, `path_i`, `path_j`, `path_read_id`, `path_seg_idx` | one step per cycle, from the segment's last position backwards |
| path end | `path_done`, `path_band_exit`, `path_steps` | |
| events | `ev_stagger_wait`, `ev_pe_wait_btu`, `ev_btu_wait_pe`, `ev_drop` | one-cycle strobes |

Parameters:

* `M` (27): minimum cycles between segment starts.
* `THRESH` (10): error limit of the filter.
* `FIFO_DEPTH` (64): depth of each input FIFO.
* `NSEG_P` (6): segments per read.
  * 8 gives 204-base reads, enough for 200-base reads padded by the sender.
  * Larger values do not fit the 3-bit segment number.

The geometry constants are in `pipebsw_pkg`. The RTL is written for 36-base
PEs, 13 cells, and a 12-base overlap and band. Changing those means reworking
the PE.

## Where this RTL departs from the published design

* **Segments are aligned separately.** Each segment is backtracked from the
  maximum of its own last L region. The six partial paths of a read are output
  one after another; they are not joined. The published design describes a
  single path walked from the last segment back to the first. Its pipeline
  timing, though, starts the BTU on the first segment as soon as that segment
  is scored, and that only works if each segment is walked on its own. This
  RTL follows the timing.
* **Two direction buffers per PE**, where the published design has one. A PE
  reused after 81 cycles would otherwise overwrite rows that a slow BTU walk has
  not yet read.
* **PE latency is 73 cycles** where the published design quotes 80, which
  includes an input stage that is not described. The M = 27 schedule works with
  either.
* **The BTU takes one cycle more than its step count** (25–37 cycles for
  24–36 steps). The extra cycle loads the pointers.
* **Critical-path retiming of the cell** (moving part of the `H12`/`H21`
  comparison later and part of `H33` earlier) is not reproduced. The split was
  not published.
* **Own choices, not specified by the published design:**
  * how the 13 cells are assigned to lanes;
  * the tie rules;
  * the direction codes;
  * the filter's use of the total error count at the maximum, per segment;
  * the fixed read length, 156 bases by default;
  * FIFO depth and handshakes;
  * output formats;
  * the band-exit stop in the BTU.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/bsw_ref_pkg.sv` is an
independent software model: it fills the matrix with the plain serial
recurrence over the same 13 lanes, finds the L-region maximum and walks the path
in matrix coordinates.

* `tb_calc_cell`: 3000 random blocks, every position, direction and error count,
  phase by phase.
* `tb_processing_element`: all 600 recorded directions, the maximum and its
  counts on random segments; latency of exactly 73 cycles.
* `tb_btu`: full paths on model matrices; 24..36 steps; one step per cycle;
  band exits.
* `tb_pipeline_ctrl`: behavioural PEs and BTU; exact 27-cycle stagger,
  PE/slot safety, order, drops, and both kinds of wait.
* `tb_dir_buffer`, `tb_error_filter`, `tb_base_fifo`, `tb_segment_slicer`: unit
  checks.
* `tb_pipebsw_top`: runs two complete instances side by side: the default
  design and one with `NSEG_P = 8`. Each gets 14 reads. The stimulus and
  checks for each instance are in `tb/pipebsw_e2e.sv`. It checks:
  * the filter decision of every segment;
  * every step of every path against the model;
  * the 27-cycle spacing of the first read;
  * that reads are never issued faster than `NSEG_P` × 27 cycles.

  It counts PE reuse, stagger waits, PE-waits-for-BTU (forced by reads with
  paired gap runs), BTU-waits-for-PE, drops and input back-pressure, and fails if
  any of them never happens. The measured rates are 163 cycles per read
  (floor 162) for 156-base reads, and 219 cycles (floor 216) for 204-base
  reads.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/pipebsw_pkg.sv tb/bsw_ref_pkg.sv tb/tb_pipebsw_top.sv \
        --top-module tb_pipebsw_top -o sim && ./obj_dir/sim

The two packages are named first. The `-y` options let Verilator find the
modules by file name. Substitute any other `tb_*` file and module name to run a
unit testbench. Each testbench finishes in a few seconds. The remaining lint
warnings are unused signals and parameters, plus the assertion reset sampling
explained in the module headers.

## Files

* `rtl/pipebsw_pkg.sv`: constants, types, candidate selection
* `rtl/calc_cell.sv`: 3 × 3 lookahead cell
* `rtl/processing_element.sv`: 13-cell banded PE
* `rtl/dir_buffer.sv`: 24 × 50 direction buffer
* `rtl/btu.sv`: backtracking unit
* `rtl/error_filter.sv`: error threshold
* `rtl/base_fifo.sv`: input FIFO
* `rtl/segment_slicer.sv`: read / segment slicing
* `rtl/pipeline_ctrl.sv`: two-stage pipeline controller
* `rtl/pipebsw_top.sv`: top level
* `tb/bsw_ref_pkg.sv`: software reference model
* `tb/pipebsw_e2e.sv`: end-to-end stimulus and checks for one instance
* `tb/tb_*.sv`: testbenches
