# CT-EXT irreducible-testor engine

Given a binary *basic matrix* (BM) of m rows and n attribute columns, a **testor**
is a set of columns that has at least one 1 in every row. An **irreducible testor**
is a testor from which no column can be removed. Finding all irreducible testors is
feature selection in testor theory: the matrix rows record which attributes tell
apart pairs of objects from different classes. The number of column subsets grows as
2^n, so the work is dominated by checking candidate subsets against every row.

This RTL implements the hardware half of the hardware/software platform described in
"A fast hardware software platform for computing irreducible testors"
(Rodríguez-Diez et al.). It walks the subsets in the order of the CT-EXT algorithm
and prunes every branch whose newest column does not help. It evaluates one
candidate per clock cycle: the testor test, the irreducibility test and the pruning
test over all m rows happen in one combinational pass. Irreducible testors leave as
a byte stream.

The matrix is not loaded at run time. It is a constant parameter, and the design is
elaborated once per matrix, as the original platform generates and synthesises HDL
for each matrix. Synthesis then folds every row into its gates.

## The search order and why it prunes

Column j of the matrix is bit j of every candidate vector. "Right of" a column means
a higher index. Before elaboration the matrix must be **sorted**:

* row 0 is a row with the fewest ones;
* the columns where row 0 has a 1 are moved to the far left.

Every testor must cover row 0, so its leftmost column is one of these first columns.
The search can therefore stop at the first one-column candidate that misses row 0.

From a subset T whose newest column is x_j, the next candidate is one of these:

| situation of T (newest column x_j)               | next candidate                         | submodule |
|--------------------------------------------------|----------------------------------------|-----------|
| x_j is the last column                           | drop x_j and the column x_k before it, add x_(k+1) | E2A |
| x_j did not reduce the zero rows, or T is a testor | drop x_j, add x_(j+1)                | E1A       |
| x_j reduced the zero rows and T is not a testor  | keep T, add x_(j+1)                    | A         |

The rules apply in the order listed. The second rule is the pruning: a column that
covers no new row cannot belong to any irreducible testor containing T, so none of
its extensions is tried. A testor is never extended either, because a superset of a
testor cannot be irreducible.

A 3-row, 5-column example (columns already sorted; the original names are
x0 x3 x4 x1 x2, bits 0..4):

```
row 0: 1 1 1 0 0
row 1: 0 0 1 1 1
row 2: 1 0 1 1 0
```

The engine evaluates {x0} {x0,x3} {x0,x4} {x0,x1}\* {x0,x2}\* {x3} {x3,x4} {x3,x1}\*
{x3,x2} {x4}\*. That is ten candidates in ten clock cycles; \* marks the four
irreducible testors. It then stops at {x1}, which misses row 0. The testbenches check
this sequence cycle by cycle.

## Evaluation array (`bm_module`, `bm_row`, `nn_decoder`)

Each of the M `bm_row` instances holds one constant row and sees two vectors:

* the current candidate (`Curr_cand`);
* the previous candidate (`Prev_cand`), which is the current one without its newest
  column.

Each row produces three results:

* **testor**: `|(ROW & curr)`, meaning the row is covered;
* **contributes**: covered by `curr` but not by `prev`;
* **decoder**: `ROW & curr` passed through an N-to-N decoder. The decoder repeats
  its input when exactly one bit is set and gives zero otherwise.

`bm_module` combines the rows:

* `testor_o` is the AND of all row testor bits;
* `contrib_o` is the OR of all contributes bits;
* `irreducible_o` is `testor_o && (OR of all decoder outputs == curr)`.

The irreducibility test works like this. A column is indispensable exactly when some
row is covered by that column alone. The OR of the one-hot rows collects every
indispensable column. The testor is irreducible when that collection is the whole
candidate.

The cost is O(n·m) gates and a log-depth reduction over m rows. Longer matrices
lower the clock frequency; they do not add cycles.

## Candidate generator (`cand_gen`, `cand_sel`, `add_attr`, `rem_1`, `e1a`, `e2a`)

Three registers hold the generator state:

* `Curr_cand`;
* `Prev_cand`;
* `J`, the index of the newest column.

Four combinational submodules propose the next state:

* **`add_attr` (A)** sets bit J+1.
* **`rem_1`** is a priority encoder. It clears the highest set bit and reports its
  index.
* **`e1a`** is `rem_1` followed by A.
* **`e2a`** is two `rem_1` stages followed by A. When only one column was left, E2A
  produces the empty candidate, which ends the search.

`cand_sel` applies the three priority rules of the table above. With A, `Prev_cand`
takes the old `Curr_cand`. With E1A or E2A, `Prev_cand` takes the candidate left
after the removals.

`done_o` is `(Curr_cand & ROW0) == 0`. After reset the state is `Curr_cand = {x0}`,
`Prev_cand = {}` and `J = 0`. The search starts on the first clock after `rst_n`
rises and moves one candidate per clock. After done the registers hold.

## Output path (`ctext_core`, `testor_fifo`, `byte_splitter`, `ctext_platform`)

`ctext_core` joins the array and the generator. It offers an irreducible testor on
`testor_o`/`testor_valid_o` in the cycle the testor is evaluated. When
`testor_ready_i` is low the whole search freezes until the testor is taken, so no
result is lost. In normal operation testors are far rarer than one per clock, and
the freeze only happens when the output side is stalled for a long time.

`ctext_platform` is the top module:

```
ctext_core --(N-bit tuples)--> testor_fifo (16) --> byte_splitter --> byte_o / byte_valid_o / byte_ready_i
```

Each testor leaves as ceil(N/8) bytes, lowest columns first: bit k of byte b is
column 8b+k, and the last byte is zero-padded. At N = 44 that is 6 bytes per testor.
`done_o` rises when the search is over and both the FIFO and the splitter are empty.
At that point the host has every result.

Three parts of the full platform are not in this RTL:

* **The dual-clock FIFO.** In the full platform, the byte stream enters a dual-clock
  FIFO that feeds a 48 MHz synchronous parallel USB interface on the FPGA board.
  That FIFO is a vendor core, and the USB interface is part of the board.
  `byte_o`/`byte_valid_o`/`byte_ready_i` is the write side of that FIFO.
* **Sorting.** The host sorts the matrix before elaboration.
* **Column remapping.** The testors come out in sorted column order, and the host
  maps them back to the original columns.

## Parameters and the matrix

| parameter     | default | meaning |
|---------------|---------|---------|
| `N`           | 44      | attributes (columns) |
| `M`           | 400     | rows |
| `BM`          | `ctext_pkg::default_bm(M, N)` | the sorted matrix, `logic [M-1:0][N-1:0]`, row r = `BM[r]`, column j = bit j |
| `FIFO_DEPTH`  | 16      | tuple FIFO entries (top only) |

The 400 × 44 default is the largest very-low-density (about 8 % ones) size of the
published evaluation. That evaluation used randomly generated matrices that are not
reproduced here. The default contents are therefore generated by `ctext_pkg`:

* row 0 holds columns 0–2;
* every other row holds 3 or 4 columns picked by a xorshift32 sequence seeded from
  the row number.

That gives about 8 % ones in sorted form. The rows are not reduced to basic rows.
Redundant rows cost area but do not change the answer.

`ctext_pkg::gen_bm(m, n, lo, hi)` builds matrices of other densities the same way,
with lo to hi ones per row.

To run your own matrix, sort it as described above, then set `N`, `M` and `BM`
together. A matrix with fewer columns or rows also fits a larger build, with two
kinds of padding:

* all-zero columns on the right, which never contribute and cost one cycle each time the search reaches them;
* duplicate rows.

Published sizes compared with the default build:

| matrix (density)                    | fits the 44 × 400 default? |
|-------------------------------------|----------------------------|
| 400 × 40, 400 × 42, 400 × 44 (8 %)  | yes (zero-column padding for 40 and 42) |
| 225 × 50, 225 × 55 (33 %)           | no: elaborate with N = 50 / 55, M = 225 |
| 68 and 70 columns (45 %)            | no: elaborate with N = 68 / 70 |

The package generator covers up to 128 columns and 512 rows.

The run time is one clock per evaluated candidate. The published 400 × 44 run took
about 2000 s at 50 MHz, which is about 10^11 candidates. No simulator gets through
that.

## Design choices not fixed by the original description

* Reset values of the generator: `{x0}`, `{}`, `J = 0`. They follow the first step
  of the algorithm. All registers use an asynchronous, active-low reset.
* The selector table's third rule prints as "contributes = 1 or testor = 0". It is
  implemented as the complement of the second rule, "contributes and not a testor",
  which is what the algorithm does.
* E2A on a single column yields the empty candidate, which ends the search.
  `rem_1` has an added `found_o` flag for this case.
* The search freezes under output back-pressure.
* The tuple FIFO has 16 entries and uses valid/ready handshakes. The byte order,
  the padding and the `done_o` drain condition are also choices of this design.
* The matrix is a packed-array parameter rather than generated HDL text.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. The reference model is `tb/ctext_ref_pkg.sv`,
a plain software version of the search written from the definitions. It does not
use the decoder trick or the generator structure, and it is independent of the RTL.

| testbench | what it covers |
|-----------|----------------|
| `nn_decoder_tb`, `bm_row_tb`, `rem_1_tb`, `add_attr_tb`, `e1a_tb`, `e2a_tb`, `cand_sel_tb` | combinational units against bit-level references |
| `bm_module_tb` | all 3 × 5 example cases exhaustively, and random candidates on the 400 × 44 default |
| `cand_gen_tb` | the ten-candidate example sequence, holds, done |
| `testor_fifo_tb`, `byte_splitter_tb` | random traffic with full and back-pressure cases |
| `ctext_core_tb` | complete searches on 3 × 5, 20 × 12 and 40 × 16 matrices. It checks every testor and its cycle, the total cycle count, and random output stalls |
| `ctext_platform_tb` | end to end through the byte stream, with a small FIFO and a slow sink. It counts each mechanism (A, pruning E1A, testor E1A, E2A, testor found, FIFO-full stall, byte stall, done) and fails if any never occurs |
| `ctext_workloads_tb` | the published sizes and densities: 400 × 40 and 400 × 42 (8 %), 225 × 50 and 225 × 55 (33 %), 100 × 70 (45 %). It runs each until its first testors, or for 2.9 million candidates at 225 × 50, checking every testor |
| `ctext_platform_full_tb` | the top at its default parameters. It follows the search for about 4.3 million cycles, until 12 irreducible testors have been emitted, and checks each one and its cycle |

Each testbench has also been run against a deliberately broken copy of its module,
and each one then reports failures.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ctext_pkg.sv tb/ctext_ref_pkg.sv tb/ctext_platform_tb.sv \
  --top-module ctext_platform_tb
./obj_dir/Vctext_platform_tb
```

Replace the testbench name to run any other. The full-size test takes about half a
minute, and the workload test about two and a half minutes.

Two things are not covered:

* Timing closure. The original reports 170–180 MHz on a Spartan-6 for 400 × 40–44
  matrices, and it was run at 50 MHz. This RTL has not been synthesised to an FPGA.
* A complete search at the published sizes, which is too long to simulate.

## Files

* `rtl/ctext_pkg.sv`: shared constants, the `sel_t` enum and the default-matrix
  generator.
* `rtl/ctext_platform.sv`: the top module.
* `rtl/ctext_core.sv`, `bm_module.sv`, `bm_row.sv`, `nn_decoder.sv`: search core
  and evaluation array.
* `rtl/cand_gen.sv`, `cand_sel.sv`, `add_attr.sv`, `rem_1.sv`, `e1a.sv`, `e2a.sv`:
  candidate generator.
* `rtl/testor_fifo.sv`, `byte_splitter.sv`: output path.
* `tb/`: the testbenches listed above, plus the harnesses `ctext_core_chk.sv` and
  `ctext_platform_chk.sv` and the reference package.
