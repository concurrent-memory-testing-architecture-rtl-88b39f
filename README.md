# CMAT: a RAM matrix that tests itself while it is in use

Memory faults that nobody reads stay hidden for a long time. Error-correcting
codes only see a fault when the bad word is read, and scrubbing the whole
memory costs bandwidth that grows with memory size. This design takes another
approach: each memory matrix has its own built-in tester (BIT). The tester runs
all the time, in the cycles the normal user leaves free. It tests both the
peripheral circuits (row decoder, column decoder, sense amplifiers) and every
memory cell, and it never loses or corrupts user data.

Cell testing is destructive, because test patterns overwrite cells. So the
tester works on one small test neighborhood (TND) at a time. It copies the
TND's data into a 4 x 4 buffer, tests the TND, and writes the data back. A
normal request to a cell whose data currently sit in the buffer is served by
the buffer. The user therefore always sees the current data, and a request
never waits for the tester.

The RTL models one N x N bit matrix. The default is N = 256, a 64 Kbit
matrix. A memory chip would use one instance per matrix.

## Block structure

```
 ext port ──► cmat_access_mux ──► cmat_decoder (row) ──► cmat_matrix
   ▲              ▲   │          cmat_decoder (col) ──►   N x N cells
   │              │   └─ data I/O register               + RN row, CN column
   │              │                                       + corner cell
   │           cmat_bit ◄───────── rdata / cn_rdata ───────┘
   │            ├─ cmat_periph_tester   (decoder + sense-amp patterns, latch)
   │            ├─ cmat_cell_tester     (ASND walk, load/save)
   │            │   ├─ cmat_asnd_pg     (pattern for one 3x3 neighborhood)
   │            │   ├─ cmat_amm         (load counters, "ASND requested")
   │            │   ├─ cmat_array4x4    (TND buffer)
   │            │   └─ cmat_array4x4    (ASND mirror)
   └─ detour ───┴─ cmat_two_rail_cmp    (fault detection)
```

`cmat_pkg` holds the shared types: `arr_op_t` (one array cycle: decoder
enables, neighborhood enable lines, addresses, write flag and data), plus the
phase and state enums.

## The matrix and its two test neighborhoods

`cmat_matrix` is driven by decoded lines, not by an address. A word line
`wl[i]` together with a column select `cs[j]` selects cell (i, j). Each
decoder (`cmat_decoder`) can be switched off as a whole. The array has two
additional structures:

* **Row neighborhood (RN).** This is an extra row of N cells with its own
  enable line `rn_en` in place of a word line. It is read through the normal
  sense amplifiers and column MUX, so it can exercise the column decoder
  while the row decoder is off.
* **Column neighborhood (CN).** This is an extra column of N cells with its
  own enable line `cn_en` in place of a column select. It has its own sense
  amplifier (`cn_rdata`), so it can exercise the row decoder while the
  column decoder is off.

The CN cell in the RN row is the *corner cell*, selected by
`rn_en & cn_en`. The sense-amplifier test uses it as its reference.

If several cells are selected at once, as a faulty decoder would do, a write
writes all of them and a read returns their OR. This gives decoder faults a
defined effect in simulation. The sense amplifiers are modelled by their
digital function only.

## Peripheral-circuit test (`cmat_periph_tester`)

**Decoders.** The two decoders cannot be tested at the same time. Each
operation of the pattern on position i therefore takes two cycles:

| cycle | row decoder | column decoder | RN | CN | effect |
|---|---|---|---|---|---|
| 1 | on, address i | off | off | on | CN cell i written, or read into a latch |
| 2 | off | on, address i | on | off | RN cell i written, or read and compared with the latch |

The comparison is CN cell i against RN cell i. A fault in either decoder
makes one neighborhood differ from the other. The pattern is the march
`up(w0); up(r,w1); down(r,w0); up(r)`: 6 operations per position, 12N
cycles.

**Sense amplifiers.** For each column i, the row decoder is off and
column i, RN and CN are all on. RN cell i (through sense amplifier i) and the
corner cell (through the CN sense amplifier) get the same pattern:

    w0^k  w1  r  w1^k  w0  r          (2k + 4 cycles, k = 10 by default)

On each read the two amplifier outputs are compared. A slow-recovering
amplifier fails the read that follows a long run of the opposite value. All N
amplifiers take N(2k + 4) cycles.

## Memory-cell test: walking the ASND (`cmat_cell_tester`)

The cells are tested one **augmented single-cell test neighborhood (ASND)**
at a time. An ASND is the 3 x 3 block around a centre (i, j). The centres run
over 1..N-2 in both directions, so edge cells are covered only as neighbours.
The walk is a serpentine: odd rows go left to right, even rows right to left.

**Buffer addressing.** The buffer and the ASND mirror are 4 x 4 arrays. Cell
(r, c) is always stored at position (r mod 4, c mod 4). Three consecutive rows
or columns never collide in this mapping. Sliding the ASND by one therefore
never moves data inside the buffer: only one column (or row) enters and one
leaves.

**One pass of the cell test:**

1. Save the first ASND into the buffer (9 cycles).
2. Apply the ASND pattern (`cmat_asnd_pg`, K = 1552 operations, see
   below). Every operation goes both to the ASND in the matrix and to the
   same position in the mirror. Each read is compared with the mirror, so no
   expected values are needed.
3. To move along a row, load the trailing column back from the buffer
   (3 cycles), then save the leading column (3 cycles). To change row, load
   the ASND's top row back and save the row below it (3 + 3 cycles). Then go
   to step 2.
4. After the last ASND, load its 9 cells back.

An undisturbed pass therefore takes 18 + K(N-2)^2 + 6((N-2)^2 - 1) cycles.
At N = 256 the whole test, peripheral part included, is 100.5 million
cycles, or 20 s at a 200 ns memory cycle.

**The ASND pattern.** The target is the single-cell pattern-sensitive
fault (SPSF): a cell that cannot be written, or that flips, only while its eight
neighbours hold one particular pattern. Each interior cell is the centre of
exactly one ASND, so the pattern concentrates on the centre cell:

1. Clear all nine cells.
2. Step the eight neighbours through all 256 values in Gray-code order. Each
   step changes a single neighbour, which is written and read back.
3. Under every neighbour pattern, write the centre cell to 1, read it, write
   it to 0 and read it.
4. Read all nine cells.

That is 9 + 255*2 + 256*4 + 9 = 1552 operations.

**Address mapping (`cmat_amm`).** During a load the buffer row (or column)
index comes from a 2-bit up/down *load counter*. The counter follows the
ASND as it slides. Assertions in `cmat_cell_tester` check that it always
points at the row or column being loaded.

**"ASND requested".** The AMM keeps one occupancy bit per buffer position and
the corner of the 4 x 4 window that the buffered cells lie in. An external
address *hits* when it lies inside the window and its position is occupied.
This is exact even in the middle of a move, when the buffer holds parts of
two neighborhoods.

## Sharing the matrix with normal traffic

Normal access always has priority:

* A request that does not hit uses the matrix.
* A request that hits is served by the buffer (`ext_detour`). A write updates
  the buffer, so the value later loaded back is the current one.
* In both cases the tester is frozen for that cycle. Every tester counter
  and pattern step waits, so no test operation is lost or repeated.

Every request completes in its own cycle. Read data (`ext_rvalid`,
`ext_rdata`) appear one cycle later. Each request lengthens the test pass by
exactly one cycle.

## Fault reporting (`cmat_bit`, `cmat_two_rail_cmp`)

One two-rail comparator checks every test read. It compares the matrix read
data with one of three references: the latch (decoder test), the CN sense
amplifier (sense-amplifier test) or the mirror (cell test). The pair
(a, ~b) is a two-rail code word, and the comparator's output pair is a valid
code only when the two values are equal. An invalid output:

* pulses `fault`;
* sets the sticky `fault_detected`;
* increments `fault_count`;
* records the phase in `fault_phase`.

`pass_done` and `pass_count` mark complete passes. `tnd_row`/`tnd_col` show
the ASND under test.

The tester starts a pass only while `test_en` is high, and it always finishes
a pass it has begun. The top-level ports are documented at the head of
`rtl/cmat_top.sv`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `B` | 8 | row/column address width |
| `N` | 2**B = 256 | matrix side; the matrix holds N^2 bits |
| `K_SA` | 10 | sense-amplifier time constant k, in cycles |

`B` must be at least 2.

## Where this design departs from the scheme it implements

* **Patterns are this design's own.** The scheme calls for a published SPSF
  pattern of K = 2720 operations per ASND, and a published decoder pattern of
  N(2N^2 + 3N + 4) cycles per decoder. Neither pattern is given. This design
  uses its own patterns instead: the 1552-operation neighbourhood pattern
  above, and a 12N-cycle march for the decoders.
* **Passes are shorter.** For N = 256 a pass takes about 100.5 million
  cycles (20 s at 200 ns), not about 246 million (about 50 s).
* **Load/save cost.** Saving the first ASND and restoring the last one whole
  costs 18 cycles more than the scheme's 6(N^2 - 4N + 4) count.
* **Extra cells.** RN, CN, corner cell, buffer and mirror add 2N + 33 cells
  (545 at N = 256, 0.83%). The scheme counts 2N + 64, sizing four
  ASND-sized arrays.
* **Only the detour strategy is built.** The alternative, suspending the test
  and loading the buffer back on a hit (with a longer access cycle), is not.
  The *parallel* cell-testing variant is not built either.
* **Tester order and access protocol are this design's choices.** The order
  (peripheral test, then cell test), `test_en`, the one-cycle request
  protocol and the status outputs are not part of the scheme.
* **Faults that cannot be modelled.** Slow sense-amplifier recovery is
  analogue, and a fault-free RTL matrix never shows it. The sense-amplifier
  pattern is generated and checked, but it can only fail on a model with an
  injected fault.

## Testbenches

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

* **`tb_cmat_top`** is the end-to-end test (N = 8, k = 3):
  * it fills the matrix, runs several passes under random traffic aimed
    largely at the ASND under test, and checks every read against a
    reference copy;
  * it checks the exact pass lengths;
  * it injects a stuck RN cell and a stuck regular cell, which must be found
    in the peripheral and cell phase respectively;
  * it requires every mechanism to occur: detoured reads and writes, tester
    stalls, moves in both directions, row changes, both phases.
* **`tb_cmat_top_full`** runs one complete pass at the default size
  (N = 256) under random traffic. It checks the pass length to the cycle and
  reads back all 65536 cells. It takes about 5 minutes with Verilator.
* **Unit testbenches** compare each block with an independently built
  reference: `tb_cmat_decoder`, `tb_cmat_matrix`, `tb_cmat_two_rail_cmp`,
  `tb_cmat_array4x4`, `tb_cmat_amm`, `tb_cmat_asnd_pg`,
  `tb_cmat_periph_tester`, `tb_cmat_cell_tester`, `tb_cmat_bit`,
  `tb_cmat_access_mux`.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/cmat_pkg.sv tb/tb_cmat_top.sv --top-module tb_cmat_top -o sim
    ./obj_dir/sim

The fault-injection tests use `force` on signals inside `cmat_matrix`.
