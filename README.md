# A cellular-automaton engine for parallel logic and fault simulation

Gate-level simulation is normally done by a processor that visits the gates
one after another. The machine described here does it differently. It takes
a combinational netlist that has been cut into levels and lays it out on a
two-dimensional array of small identical cells. Each cell talks only to its
four neighbours. Signals then flow through the array from left to right, one
level per pair of columns.

Three kinds of parallelism add up:

- **Inside a level.** All gates of a level are evaluated at the same time.
- **Across levels.** Every column pair works on a different input pattern,
  so a new pattern can enter long before the previous one has left.
- **Inside a word.** Every cell carries an 8-bit word, which is 8 patterns
  side by side. In fault simulation the word holds 4 patterns for the good
  circuit and the same 4 patterns for the circuit with one stuck-at fault.

The method is the one of Y.-L. Li and C.-W. Wu, *Cellular Automata for
Efficient Parallel Logic and Fault Simulation* (IEEE Trans. CAD). The RTL
here is an independent implementation. Where the method leaves details
open, this design makes its own choices, and they are marked as such below
and in each file's header.

## How a circuit sits in the array

The host prepares the netlist before anything is loaded. This preparation
is software and is not part of the RTL:

1. **Levelling.** Primary inputs are level 0. Every gate gets the level one
   above its latest input.
2. **Layered network.** An edge that skips levels gets a chain of buffer
   nodes, so every edge joins level L to level L+1. Every primary output is
   carried forward in the same way to the last level.
3. **Placement.** Level L uses two columns:
   - column 2L is the **fanin column**, with one cell per input edge of the
     level;
   - column 2L+1 is the **fanout column**, with one cell per output edge.

   The cells of one node are contiguous. In the fanin column they are
   numbered 1..n from the bottom up, and the top fanin cell sits directly
   left of the node's top fanout cell.

An edge therefore starts at a fanout cell in column 2L+1. The fanin cell
directly to its right, in column 2L+2, receives the signal. The target,
though, is the fanin cell of the destination gate, which usually sits in
another row. The receiving cell's **OffReg** holds its own row minus the
target's row. A positive offset travels down and a negative one travels up.

Column 0 is a column of one-input buffer cells, one per primary input. The
pattern port acts as the column to its left. The primary-output cells sit in
the last column.

Example: the ISCAS-85 circuit c17 has 5 inputs, 6 NAND gates and 2 outputs.
It becomes 4 levels with 3 inserted buffers. It needs 8 columns and at most
6 rows (`tb/tb_c17.sv` builds it by hand).

## The cell

A cell is in one of eight states. The state says both what the cell is and
what it is doing.

| state | column | behaviour |
|---|---|---|
| BotFanin | fanin | bottom cell of a gate: holds its input for the cell above |
| Fanin | fanin | combines its input with the partial result from below; the top one inverts (if configured) and raises `done` |
| FanoutRecv | fanout | top fanout cell of a gate: on `done` from the left, distributes the result to the gate's FanoutNo fanout cells |
| Fanout | fanout | waits for its copy of a gate result |
| NewPipe / NewPipeRecv | fanout | holds a just-arrived signal for exactly one clock, so the fanin cell on the right can take it; then back to Fanout / FanoutRecv |
| Detecting / Detected | last | primary output: captures the result; in fault mode it compares the good and faulty halves and moves to Detected on a difference |

**Vertical data paths.** Each column has two shift paths, one moving up and
one moving down, so signals in opposite directions never block each other.
Each path register holds an entry with these fields:

- a valid bit;
- the direction;
- the offset still to travel;
- a count of targets still to serve;
- the 8-bit word.

An entry moves one row per clock. It is delivered at the cell where its
offset reaches 0 while its count is not 0. The count then drops by one, and
the entry moves on until the count is 0. A fanin-column signal has count 1.
A distribution from FanoutRecv has count FanoutNo, so one entry drops a copy
at each cell of the gate's fanout block.

**Free-path rule.** A signal that passes through a cell always has priority.
A cell that wants to inject its own signal keeps it in a pending register
until the path register it needs is free.

**Distributed gate evaluation.** A gate with n inputs is spread over its n
fanin cells. Cell 1 (BotFanin) passes its input up. Each higher cell applies
the base operation (AND, OR or XOR) to its own input and the partial result
from below. The top cell also applies the optional inversion, which gives
NAND, NOR, XNOR, BUF and NOT. The partial result climbs one cell per clock.
Lower cells clear once the cell above has taken their result. The top cell
clears when it raises `done`.

**FanoutRecv offsets.** For FanoutRecv, OffReg gives where the fanout block
sits:

| OffReg | meaning |
|---|---|
| 0 | the cell is the top of its own block and is its own first target |
| > 0 | the block's top is OffReg rows below |
| < 0 | the block's top is −OffReg rows above |

In the < 0 case the entry is aimed at the bottom of the block and climbs
through it. A block may not straddle the FanoutRecv cell.

## Timing and pipelining

All timing depends only on the configuration, never on the data:

| step | clocks |
|---|---|
| capture from the left | 1 |
| travel on a data path | 1 per row, plus any wait for a free path |
| each chained fanin cell | 1 |
| `done` | 1 |
| NewPipe hand-over to the next column | 1 |

Patterns enter every **t_d** clocks. t_d is the largest difference between
the end of work in column i+1 and the start of work in column i. With that
spacing, no column ever holds two patterns. The host measures t_d once per
loaded circuit: it sends one pattern alone and watches `col_busy`. The
testbenches do exactly that. After the first result, one result leaves
every t_d clocks.

| circuit | array | latency | t_d |
|---|---|---|---|
| c17 | 8 × 8 | 38 clocks | 15 clocks |
| random, 16 levels, 22 rows used | 32 × 32 | 307 clocks | 55 clocks |

**Column synchronisation** (`col_sync = 1`) trades latency for period:

- every cell that takes part in a column's work marks itself finished;
- a per-column `ca_colsync` raises a one-clock release once all of them are
  finished;
- only then do the top fanin cells raise `done`, and the fanout targets all
  enter NewPipe in the same clock.

The next column thus receives all its signals at once, and the spread of
arrival times no longer adds up from column to column. In the 16-level test
above it lowered t_d from 55 to 32 clocks and raised latency from 307 to
389. On small arrays the gain is smaller and sometimes absent.

## Fault simulation

Set `fault_mode = 1` and put the same 4 patterns in both halves of each
input word. The low half is the good machine and the high half the faulty
one.

A fault is injected with one write (`inj_we`, `inj_col`, `inj_row`,
`inj_val`). The write does three things:

- it marks one fanin cell as faulty and clears the mark everywhere else;
- it sets the stuck-at value;
- it returns every output cell to Detecting.

Only fanin cells can be fault sites, i.e. the input lines of gates,
including the primary-input buffers of column 0. Every word delivered to the
faulty cell has its high half replaced by the stuck-at value.

Output cells compare the halves of each result. Detected is sticky until the
next injection. `m_detected` on a result says whether the fault has been
seen by then, and the host decides when to move on to the next fault.
Inject with `inj_en = 0` to remove all faults.

## Programming sequence

1. Reset (`rst_n` low, synchronous).
2. Write every cell: `cfg_we`, `cfg_col`, `cfg_row`, and `cfg_data` of type
   `ca_pkg::cell_cfg_t`, one cell per clock. The fields are:
   - `state`: the role;
   - `off`: OffReg;
   - `fanout_no`: kept by the top fanin cell of each gate;
   - `op`, `inv`: the gate function, in fanin cells;
   - `top`: marks a gate's top fanin cell;
   - `part`: the cell counts for column synchronisation.

   Unused fanin-column cells should be one-cell BotFanin gates with `top`
   set. Unused fanout-column cells should be Fanout. Reset leaves every cell
   an inert Fanout cell.
3. Set `po_mask` (rows of the last column that hold outputs), `fault_mode`,
   `col_sync`, and optionally inject a fault.
4. Time one pattern to get t_d (see above), then write `t_d`.
5. Stream patterns on `s_valid`/`s_ready`/`s_word` (word r goes to row r of
   column 0). Read results on `m_valid`/`m_word`/`m_detected`.
   `m_valid` is a one-clock pulse with no back-pressure.

`tb/tb_ln_pkg.sv` does steps 2–5 for arbitrary layered networks. `place()`
is a complete placement routine, and `eval()` is a reference model.

## Modules

| file | contents |
|---|---|
| `rtl/ca_pkg.sv` | word width (8), register width (8), state and gate enums, configuration and path-entry structs |
| `rtl/ca_cell.sv` | the cell |
| `rtl/ca_colsync.sv` | column completion (release) for column synchronisation |
| `rtl/ca_array.sv` | `ROWS × COLS` mesh, configuration and fault decode, edges |
| `rtl/ca_ctrl.sv` | pattern spacing by t_d, output gathering, counters |
| `rtl/ca_top.sv` | `ca_ctrl` + `ca_array`; top level |

Parameters: `ROWS = 32` and `COLS = 32`, i.e. 1024 cells and 16 levels.
Offsets are 8-bit signed, so `ROWS` may be at most 128. The word width is
`ca_pkg::WORD_W`.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Build with Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ca_top rtl/ca_pkg.sv tb/tb_ln_pkg.sv tb/tb_ca_top.sv
./obj_dir/Vtb_ca_top
```

| testbench | what it covers |
|---|---|
| `tb_ca_cell` | every state and rule of one cell with hand-driven neighbours: offsets up/down, pass-through, free-path wait, fanin chain, both distribution directions, NewPipe, fault forcing, detection, column synchronisation |
| `tb_ca_colsync` | release logic against a row-by-row reference |
| `tb_ca_array` | 16 × 8 array, 12 random networks, one pattern at a time, logic and fault mode, against the reference model |
| `tb_ca_ctrl` | pattern spacing, hand-off, output gathering |
| `tb_ca_top` | 16 × 12 end to end, 6 random networks, pipelined streams with and without column synchronisation, 6 faults per network; checks every result, exact result spacing t_d, and that each mechanism occurred (up/down/local delivery, path wait, chaining, NewPipe/NewPipeRecv, fault forcing, patterns overlapping, detection, column release) |
| `tb_ca_top_full` | the same flow with the top at its default 32 × 32 size (about 2.5 minutes to build, seconds to run) |
| `tb_c17` | ISCAS-85 c17: all 32 input combinations against the circuit equations, and all 40 fanin-line stuck-at faults (all detected) |

## Where this design departs from or adds to the original scheme

- **Primary inputs.** The original puts primary-input fanout cells in the
  first column. Here a column of buffer cells comes first, fed by the
  pattern port, so primary-input lines can be fault sites like any other.
  This costs one column.
- **Primary outputs** must be carried to the last level, because only the
  last column is read out. `any_detected` covers output cells anywhere.
- **Path entries** carry a valid bit and a remaining-target count beyond the
  registers the original names (UpSigReg/UpOffReg, DnSigReg/DnOffReg,
  FanoutNo, OffReg).
- **The target rule** is restated as "offset 0 and count non-zero". For an
  upward distribution the entry is aimed at the bottom of the block rather
  than the top.
- **Handshake timing.** `done` and NewPipe each last one clock.
- **Configuration and fault injection** are addressed single-clock writes.
  The original's fault injection travels through the array in time
  proportional to the number of columns; that path is not modelled.
- **Column completion** is an AND over per-cell finished flags rather than
  a counter compared with a preloaded cell count. The condition is the same.
- **Gate set** is AND/OR/XOR with optional inversion.
- **The host link** (stream in, result pulse out) and `col_busy` are this
  design's own.
- **Layout.** The placement in the test package gives each gate a band of
  max(fanin, fanout) rows. It does not do the original's node ordering,
  which shortens offsets and therefore t_d. As a result, latencies here are
  not those of an optimised layout. For c17 the original reports 19 clocks
  per pattern; this layout takes 38 clocks of latency.
- **Not built:**
  - the extension to sequential circuits (feedback row or feedback layer of
    cells standing in for flip-flops), sketched in the original only as
    future work;
  - the board-to-board bus for arrays larger than one board;
  - the alternative fault mode in which the host keeps good-machine results
    and all 8 bits simulate faulty machines.

## Capacity

The default array holds circuits with up to 16 levels, counting inserted
buffers, and up to 32 cells per column. Of the ISCAS-85 set, only c17 fits.
c432 already needs about 90 cells in its fullest column and about 1700
cells in total. Larger circuits need larger `ROWS`/`COLS` (offsets limit
`ROWS` to 128 unless `REG_W` grows). They could also be split by level and
loaded in stages, at the cost of host traffic.
