# Smith-Waterman systolic array

Smith-Waterman local alignment scores two sequences by filling a matrix

    H(i,j) = max{ 0,  H(i-1,j-1) + S(i,j),  H(i-1,j) - d,  H(i,j-1) - d }

with `H(0,j) = H(i,0) = 0`. `S(i,j)` is a match score when the two characters
are equal and a mismatch score otherwise. `d` is the gap penalty. Each entry
depends only on its left, upper and upper-left neighbours. So all entries on one
anti-diagonal are independent and can be computed at the same time.

This RTL maps the matrix directly onto hardware: **one processing cell per
matrix entry**. A `ROWS x COLS` grid of cells (4 x 4 by default) is wired like the
matrix. Each cell has one combinational datapath, built from seven small units,
and one output register. A max-finder network watches all cell registers and
reports the largest score, which is where a trace back would start. The
sequences do not move through the array. They are broadcast and held constant
while the scores spread from the top-left corner, one anti-diagonal per clock.

## The cell (`sw_cell`)

```
 seq1 ─┐
       Comp1: S = (seq1 == seq2) ? MATCH : MISMATCH
 seq2 ─┘        │
 H_diag ──────► Add1 = H_diag + S ──► Comp2 = max(Add1, 0) ───────┐
 H_left ──────► Add2 = H_left - d ─┐                              ├─► Comp4 = max ─► R(i,j) ─► h_o
 H_up   ──────► Add3 = H_up   - d ─┴► Comp3 = max(Add2, Add3) ────┘
```

* Every "comparator" that keeps the greater value (Comp2, Comp3, Comp4) is an
  instance of `sw_max_finder`. That unit is a `>=` comparator driving the select
  of a 2:1 multiplexer. On a tie it passes its first input.
* `MATCH` and `MISMATCH` are parameters, because they are constants of the cell.
  The defaults are 2 and -1. `d` is an input, shared along a row.
* Register `R(i,j)` has an asynchronous active-low reset, a synchronous clear
  (`clr_i`, which has priority) and a load enable (`en_i`).
* With `ASYNC = 1` the register is removed and `h_o` is the combinational
  result. A whole array of such cells is one combinational network. It settles
  to the final matrix without a clock, so its delay is the delay of the whole
  fill. It gives no useful intermediate values. The default, synchronous cell
  is the one that gives the matrix anti-diagonal by anti-diagonal.

## The array and its timing (`sw_array`)

Cell `(r,c)` (0-based) holds `H(r+1,c+1)`:

* Character `c` of Sequence 1 goes to every cell of column `c`.
* Character `r` of Sequence 2 and `d` go to every cell of row `r`.
* `h_o` of each cell goes to its right neighbour (`h_left_i`), the cell below
  (`h_up_i`) and the cell below-right (`h_diag_i`).
* Inputs at the top and left edges are tied to 0. This is the initialisation
  row and column, which is never stored.

**Why the fill takes `ROWS+COLS-1` clocks.** A value moves only one cell per
clock. After `k` enabled clock edges, every cell on anti-diagonals `1..k`
(`r+c+1 <= k`) therefore holds its final value, whatever the registers held
before. The proof is by induction on `k`: a cell's neighbours sit on earlier
anti-diagonals. The last cell is final after `ROWS+COLS-1` edges, which is 7 for
4 x 4. Some inputs finish sooner. For example, a diagonal run of matches reaches
the corner in `min(ROWS,COLS)` clocks. The worst case needs all of them: a
single match in the corner that reaches the opposite corner only through gap
steps. The array testbench includes that case.

The cost of this structure is one full datapath per matrix entry. The
sequences are limited to `COLS` and `ROWS` characters, and there is no
streaming or partitioning of longer sequences.

## Max finder network (`sw_max_tree`)

A balanced binary tree of `N-1` `sw_max_finder` units over all `ROWS*COLS`
register outputs. It is combinational and has `clog2(N)` levels. Inputs beyond
`N` are padded with the most negative score. It follows the registers, so
`max_o` is final when the matrix is.

## Fill sequencer (`sw_fill_ctrl`) and top (`sw_top`)

`sw_top` adds the following to the array and the max tree:

* input registers for both sequences and `d`;
* a three-state sequencer, `IDLE -> FILL -> DONE`.

Interface and timing of `sw_top`:

| signal | meaning |
|---|---|
| `start_i` | While not busy, one clock: the inputs are registered and all cells are cleared at this edge. Ignored while `busy_o`. |
| `seq1_i[COLS]`, `seq2_i[ROWS]`, `d_i` | Sequence 1 (columns), Sequence 2 (rows), gap penalty. Sampled only on an accepted start. |
| `busy_o`, `cycle_o` | Fill in progress. `cycle_o` = fill edges so far = anti-diagonals that are already final. |
| `done_o` | High from `ROWS+COLS-1` clocks after the start edge until the next start. |
| `h_o[ROWS][COLS]` | `H(1..ROWS, 1..COLS)`. Shows the wavefront while busy and is final and held when done. |
| `max_o` | Largest H value. |

Characters use a 2-bit code (`sw_pkg::base_e`: A=0, C=1, G=2, T=3). Scores
are 16-bit two's complement. Both widths are set in `sw_pkg`. The cell only
tests characters for equality, so a 5-bit code for protein sequences works
unchanged. For `d >= 0`, H never exceeds `MATCH * min(ROWS,COLS)`.

## What is not in the hardware

* **Trace back.** The design provides every H value and their maximum. It has
  no unit that walks back from the maximum to recover the alignment, and no
  storage of which term won in each cell. A host has to do that from `h_o`.
* **Affine gaps, substitution matrices.** There is one linear gap penalty and
  a single match/mismatch pair, as in the recurrence above.

## Choices made here, and how far to trust them

These choices follow the architecture: the cell's unit structure, the grid and
its broadcast and neighbour wiring, the max finder unit (`>=` comparator plus
multiplexer), the idea of a max-finder network over the cells, the 4 x 4 size,
and the one-anti-diagonal-per-clock fill.

These are choices of this design:

* **Scores and widths.** The mismatch score of -1, the 16-bit scores and the
  2-bit characters. The match score of 2 is the value that reproduces the
  worked 4 x 4 example below.
* **Control and reset.** The reset, clear and enable of the cell register, the
  input registers, and the start/done sequencer.
* **Shape of the max-finder network.** The balanced-tree arrangement is chosen
  here. The 2 x 2 arrangement that the design extends groups the cells
  differently, but it yields the same maximum.
* **Port naming.** The left/upper neighbour ports are named by their position
  in the grid. Both paths subtract the same `d`, so which of them is
  "H(i-1,j)" does not change the result.

Verification status. Each module has a self-checking testbench. The
testbenches compare against values computed independently: printed example
matrices or a software model of the recurrence. They also check the cycle
counts. The results are simulation only. Nothing here has been timed or placed
on an FPGA.

## Reference results used by the testbenches

* **4 x 4 example.** Sequence 1 = `A G T A`, Sequence 2 = `G G T C`, `d = 0`,
  match 2. The result, with rows for Sequence 2, is
  `0 2 2 2 / 0 2 2 2 / 0 2 4 4 / 0 2 4 4`. The maximum is 4, and the fill takes
  7 clocks.
* **5 x 5 example.** `G A T T A` (columns) against `G A C T C` (rows), match 1,
  mismatch -1, `d = 2`. The result is
  `1 0 0 0 0 / 0 2 0 0 1 / 0 0 1 0 0 / 0 0 1 2 0 / 0 0 0 0 1`, and the fill
  takes 9 clocks.

## Files

| file | contents |
|---|---|
| `rtl/sw_pkg.sv` | widths, `char_t`, `score_t`, base codes |
| `rtl/sw_max_finder.sv` | comparator + multiplexer maximum |
| `rtl/sw_cell.sv` | processing cell (parameters `MATCH`, `MISMATCH`, `ASYNC`) |
| `rtl/sw_array.sv` | `ROWS x COLS` grid of cells |
| `rtl/sw_max_tree.sv` | max-finder network over `N` values |
| `rtl/sw_fill_ctrl.sv` | start / fill / done sequencer |
| `rtl/sw_top.sv` | top: input registers, sequencer, array, max tree |
| `tb/tb_sw_ref_pkg.sv` | software reference of the recurrence (testbench only) |
| `tb/tb_sw_max_finder.sv` | corner cases and random pairs |
| `tb/tb_sw_cell.sv` | random neighbours and characters; hold, clear; `ASYNC` cell |
| `tb/tb_sw_max_tree.sv` | 16- and 5-input trees, every maximum position |
| `tb/tb_sw_fill_ctrl.sv` | handshake, 7-clock fill, ignored and repeated starts |
| `tb/tb_sw_array.sv` | 4x4 example, worst-case chain, random 4x4 and 5x3, wavefront, `ASYNC` array |
| `tb/tb_sw_top.sv` | end to end at the default size. It covers the example and 200 random fills, and counts each mechanism: match, mismatch, gap win, zero clamp, ignored start, restart, and an interior maximum. |
| `tb/tb_sw_example5x5.sv` | 5 x 5 example on a 5 x 5 `sw_top` |
| `tb/tb_sw_large.sv` | 42 x 42 (1764 cells) `sw_top`, 12 random fills of 83 clocks |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sw_pkg.sv tb/tb_sw_ref_pkg.sv tb/tb_sw_top.sv --top-module tb_sw_top
./obj_dir/Vtb_sw_top
```

For other testbenches, replace `tb_sw_top`. `-Irtl -Itb` lets Verilator find
each module in the file of the same name. To lint a module, run
`verilator --lint-only -Wall -Irtl rtl/sw_pkg.sv rtl/sw_top.sv`.

To change the size, override `ROWS`/`COLS` on `sw_top`. To change the scores,
override `MATCH`/`MISMATCH`. `tb_sw_ref_pkg` handles matrices up to 64 x 64
(`MAXN`).
