# Built-in self-test for neighborhood pattern- and bit-line-sensitive faults

In a dense DRAM a cell can be disturbed by its neighbours in two ways:
by the values and transitions of nearby cells (neighborhood
pattern-sensitive faults, NPSF) and by crosstalk from the neighbouring
bit-lines while a word-line is read or written (neighborhood bit-line
sensitive faults, NBLSF). This design is a bit-oriented memory array with
a built-in self-test (BIST) for both kinds of fault. It also tests for
sense-amplifier recovery faults and address decoder faults.

The main idea is a **four-cell neighborhood**. Every cell carries a label
1..4, repeating along each word-line. A test pattern is four bits, one per
label. Because a label repeats every fourth bit-line, the same value can go
to *every* cell of one label on a word-line at once, and all of those cells
can be compared at once. A whole pattern step therefore costs a few
operations per word-line, not per cell: the test length grows with √n, the
number of word-lines, rather than with n.

## Labels and tilings

Labels run `1 2 3 4 1 2 3 4 …` along a word-line. Every second pair of
word-lines is shifted by two bit-lines (`3 4 1 2 …`). There are two tilings,
and the NPSF test is run once with each:

| row mod 4 | group A | group B |
|-----------|---------|---------|
| 0         | 1 2 3 4 | 1 2 3 4 |
| 1         | 1 2 3 4 | 3 4 1 2 |
| 2         | 3 4 1 2 | 3 4 1 2 |
| 3         | 3 4 1 2 | 1 2 3 4 |

The column address bits A1A0 of a bit-line are its *class* (0..3). On an
unshifted row, label k sits on class k−1; on a shifted row it sits on class
(k+1) mod 4. `bist_pkg::label_class()` does this mapping, and the controller
uses it for every label-parallel access. Pattern bit B0 belongs to label 1,
B1 to label 2, B2 to label 3 and B3 to label 4.

## Test patterns

`tpg` produces 64 four-bit patterns. Consecutive patterns differ in exactly
one bit, so each step changes one label. A 4-bit counter is turned into
Gray code G3..G0 (G3 = b3, Gi = b(i+1) xor bi). A one-hot sequence
controller C0..C3 then picks one of four mappings, each for 16 patterns:

```
B3 = C0·G3 + C1·~G0 + C2·G1  + C3·G2
B2 = C0·G2 + C1·G3  + C2·~G0 + C3·G1
B1 = C0·G1 + C1·G2  + C2·G3  + C3·~G0
B0 = C0·G0 + C1·~G1 + C2·~G2 + C3·~G3
```

Pattern #1 is 0000, #17 is 1001, #33 is 0101, #49 is 0011 and #64 is 0010.
`tb/tb_tpg.sv` holds the full 64-entry table.

## The self-test sequence

After test entry, `bist_ctrl` runs the steps below. Each memory operation
takes one clock, with no idle cycles between steps. R is the number of
word-lines and C the number of bit-lines.

1. **NPSF, group A, then group B.** Write 0 to every cell: four label writes
   per word-line. Then, for each of the 64 patterns:
   - On every word-line, write the label whose bit changed to all cells of
     that label.
   - On every word-line, read that label back with one parallel compare.

   For pattern #1 right after the initialisation no bit changes, so label 1
   gets a non-transition write. Cost: 2 × 64 × 2R = 256R. With the
   `READ_BASE_CELLS` option each word-line instead reads labels 1, 2, 3 and 4
   in turn (see *Reading back the base cells*).
2. **NBLSF** (group A labelling). Write 0 everywhere. Then, for each of the
   64 patterns and each word-line, in order:
   - transition write of the changed label
   - read of that label
   - non-transition write (same label, same value)
   - read of that label

   Each read directly follows its write on the same word-line, which is
   what exposes bit-line crosstalk. Cost: 64 × 4R = 256R. With
   `READ_BASE_CELLS`, each write is followed by three reads: the written
   label, then the labels on the bit-lines to its left and right.
3. **Sense-amplifier recovery.** Uses pattern #7 (0101) and pattern #13
   (1010). Write the pattern on all word-lines but the last, and its
   complement on the last. Case 1 (write a long string, then read) reads
   only the last word-line. Case 2 (read a long string, then read) reads
   every word-line in order. Each case is run with both patterns.
   Cost: 24R + 8.
4. **Decoder tests.** A 6n march (↑W0; ↑R0 W1; ↓R1 W0 R0) with normal
   one-bit accesses: first down bit-line 0 (row decoder test), then along
   word-line 0 (column decoder test). Cost: 6R + 6C.

The three initialisations add 12R. A complete run takes **554R + 6C + 8
cycles**, which is 143,368 cycles at the default 256 × 256. NPSF and NBLSF
each cost 256·√n, as the algorithm intends.

What a check catches: every parallel compare flags a label whose cells
disagree with each other. It also flags a label whose cells agree on the
wrong value. The march reads compare the single addressed bit with the
expected value.

## Reading back the base cells

This is the least obvious part of the design. A pattern-sensitive fault
has a *base cell* (the victim) and its neighbours (the aggressors). For
some faults the written cell is itself the base cell:
- static faults, where a neighbour pattern forces the base cell's value;
- passive faults, where a neighbour pattern stops the base cell from
  changing.

Reading back the label just written catches those, and costs one compare
per word-line. That gives the 256·√n count above.

An *active* fault is different. Writing a transition into one label flips
a cell of another label. Only a read of the *other* labels after the write
sees it. Pattern #1 → #2 changes label 1, and that step is an active
neighborhood pattern for base labels 2, 3 and 4 at once.

The comparator checks one label per cycle. Covering active faults
therefore takes more compares per word-line after each write. The same
holds for bit-line faults, where the base cells of a written label are
the cells on the two bit-lines beside it. The label two bit-lines away
shares no bit-line boundary with the written one and is not read. The
parameter `READ_BASE_CELLS` selects between the two schemes:

| `READ_BASE_CELLS` | NPSF reads per write | NBLSF reads per write | NPSF | NBLSF | whole run |
|---|---|---|---|---|---|
| 0 (default) | written label | written label | 256R | 256R | 554R + 6C + 8 |
| 1 | labels 1..4 | written label, left and right neighbours | 640R | 512R | 1194R + 6C + 8 |

The simulated coupling defect shows the difference:
- with 0, it first shows up in the sense-amplifier recovery step, by
  chance;
- with 1, the NPSF read of its own word-line catches it first. In the
  8 × 8 test it is flagged 57 times per run, 24 of them by NBLSF
  neighbour reads.

## Hardware blocks

| module | role |
|---|---|
| `bist_memory_top` | the memory with BIST; wires everything below |
| `test_enable` | enters test mode on CAS-before-RAS; gives the BIST clock enable |
| `tpg` | 64-pattern generator (counter, Gray code, sequence controller) |
| `bist_ctrl` | sequences the four tests |
| `addr_gen` | sweeps word-line or bit-line addresses up or down, with an operation index per address |
| `row_decoder` | one-hot word-line decoder |
| `col_decoder` | bit-line decoder with the label-parallel test mode |
| `mem_array` | behavioural model of the cell array and sense amplifiers |
| `io_buffer` | write-data select (pattern or data pin) and read-bit mux |
| `par_comparator` | parallel comparator and error detector for one label |
| `error_holder` | sticky error, error count, context of the first failure |
| `bist_pkg` | phase enum, tiling functions, S/A recovery patterns |

**Modified column decoder.** Bit-lines come in groups of four. In normal
mode (`phi4 = 0`) the upper address bits pick a group and A1A0 pick a
bit-line in it. In test mode (`phi4 = 1`) every group is enabled, so A1A0
alone select one bit-line in four across the whole word-line. This is the
only change needed for parallel access, and it costs one extra transistor
per four bit-lines in a custom decoder.

**Parallel comparator.** `l_n[3:0]` stands for the active-low select lines
L1..L4, which choose bit-line class 0..3. All ones (normal mode) selects
nothing. For the selected sense-amplifier outputs the comparator reports:
- `s1`: all are 1
- `s2`: all are 0
- ERROR: neither of the two

ERROR is latched at the end of the compare cycle. The precharge, evaluate
and latch phases of the circuit are folded into this one clock. With
`check` set, ERROR is also raised when `s1` or `s2` disagrees with the
expected value `exp`.

**Test entry.** `/RAS` and `/CAS` each pass a two-flop synchronizer. A
falling `/CAS` while `/RAS` is high sets test mode, three clocks after the
edge. The controller starts on the rising edge of test mode. When the run
ends it clears test mode, and `bist_done`, `error`, `err_count` and
`first_*` hold the result until the next run.

## Interface and timing of `bist_memory_top`

- `clk`, `rst_n`: clock and asynchronous reset. The reset acts on a falling
  `rst_n`.
- `n_ras`, `n_cas`: strobes, used only for test entry.
- Normal access port: `acc_en`, `acc_we`, `acc_row`, `acc_col`, `acc_din`,
  `acc_dout`. A write happens at the clock edge while `acc_en` and `acc_we`
  are high. `acc_dout` is the addressed cell, combinational while `acc_en`
  is high. The port is ignored while `bist_busy` is high.
- Status: `test_mode`, `bist_busy`, `bist_done`, `bist_phase` (a
  `bist_pkg::phase_e`), `bist_group_b`.
- Result: `error`, `err_count`, and `first_phase`/`first_addr`/`first_tp`.
  `first_addr` is the word-line (or, in the column march, the bit-line) of
  the first failing check. `first_tp` is that check's pattern number minus 1.

Parameters:
- `ROWS`, `COLS` (default 256 × 256). `COLS` must be a multiple of 4, and
  `ROWS` at least 4.
- `DEFECT_KIND`, `DEFECT_ROW`, `DEFECT_COL`: place one defect in the array
  model for simulation. 0 means fault-free.
- `READ_BASE_CELLS` (default 0): read the base cells after each NPSF and
  NBLSF write.

## The cell-array model and its defects

`mem_array` is not synthesizable memory IP: it stands in for the analog
array. It keeps one bit per cell. A write sets every selected bit-line of
every open word-line. A read returns the open word-line (the OR of several
open word-lines). Coupling capacitances and timing are not modelled, so
bit-line crosstalk appears in simulation only as the injected defect
kind 5. One defect can be injected:

| `DEFECT_KIND` | defect |
|---|---|
| 1 / 2 | cell stuck at 0 / 1 |
| 3 | the cell inverts when its right-hand neighbour on the same word-line is written 0→1 |
| 4 | word-line `DEFECT_ROW` also opens word-line `DEFECT_ROW+1` (decoder multiple access) |
| 5 | bit-line crosstalk: a read directly after a write to the same word-line returns the cell inverted while its left-hand neighbour holds the opposite value |

In the 8 × 8 end-to-end test with default settings, the step that first
catches each kind is:
- stuck-at: the NPSF read;
- coupling (3): S/A recovery;
- multiple access (4): the row decoder march;
- crosstalk (5): NBLSF, the only step that reads a word-line in the cycle
  right after writing it.

## How far to trust it; departures

- The test algorithms, the tilings, the pattern equations, the decoder test
  mode and the comparator behaviour follow the published method closely.
  `tb_tpg` checks the pattern generator against the full pattern table, and
  `tb_bist_pkg` checks the tilings row by row.
- By default the read after each NPSF or NBLSF write reads back **the
  label just written**. That keeps the published cost of 256·√n, but it
  misses active neighborhood faults (see *Reading back the base cells*).
  `READ_BASE_CELLS = 1` buys that coverage with 2.5 times the NPSF time and
  twice the NBLSF time.
- Own choices:
  - re-initialising before group B and before NBLSF
  - the order of the four tests
  - group A labelling for NBLSF and S/A recovery
  - the exact read sequence of S/A recovery case 2
  - the `READ_BASE_CELLS` option, and which neighbours it reads
  - the value check in the comparator
  - the access port
  - the contents of the error holder
  - the synchronous clock enable in place of a gated BIST clock
  - 256 × 256 as the default size
- Analog parts are out of scope: sense amplifiers, precharge, folded
  bit-lines.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
  tb/tb_bist_memory_top.sv --top-module tb_bist_memory_top -o sim
./obj_dir/sim
```

- `tb_bist_memory_top` uses an 8 × 8 array with six copies of the design:
  one fault-free and one per defect kind. It tests:
  - normal access, and that a normal RAS-before-CAS cycle does not start
    the test
  - two complete runs, each checked against the cycle formula
  - that every defect is detected, each in the step named above
  - the full array contents after a run
  - that every mechanism occurred: test entry and exit, both tilings,
    transition and non-transition writes, NBLSF, both S/A recovery cases,
    both marches, error detection, and the read-all NPSF reads
  - two more copies with `READ_BASE_CELLS = 1`: the fault-free one must run
    1194R + 6C + 8 cycles with no error, and the coupling defect must be
    caught by an NPSF read of its own word-line
- `tb_bist_memory_full` runs one complete self-test at the default
  256 × 256 size (143,368 cycles, a few seconds) and reads back all 65,536
  cells. It also checks the cycles of each test against the algorithm's
  length at that size: NPSF 65,536, NBLSF 65,536, S/A recovery 6,152, and
  1,536 for each decoder march.
- Each block has its own `tb_<module>.sv`. `tb_bist_ctrl` checks every
  write and compare of a run against a model of the array kept in the
  testbench, in both `READ_BASE_CELLS` modes.
- Verilator starts undriven state at random values, so the testbenches
  apply reset with a falling edge.
