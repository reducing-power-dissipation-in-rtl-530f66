# Low-power March testing of an SRAM by restricting bit-line pre-charge

In normal operation an SRAM cannot know which column it will be asked for next, so
every bit-line pair is kept pre-charged to VDD all the time. Only the accessed column
switches its pre-charge off, and only for the first half of the cycle. All other cells
on the open word line fight their pre-charged bit lines for the whole cycle. This is a
read-equivalent stress, and the pre-charge circuits are the main power consumers of the
array.

A March test has no such uncertainty. Its address order may be chosen freely, as long as
every address occurs once and descending elements use the exact reverse order. If the
order is "word line after word line" (row 0 from column 0 upwards, then row 1, and so on),
the next column is always the right-hand neighbour of the current one. In this
**low-power test mode** only two kinds of column are pre-charged in a cycle:

- the selected column, with its usual timing: off in the operation half, on in the
  restoration half;
- the column right after it, on for the whole cycle, because it is accessed next.

Every other column's pre-charge is switched off. Those bit lines float, and within a few
cycles the cells on the open row discharge them, after which those cells are no longer
stressed.

One hazard remains. When the word line moves to the next row, the floating bit lines
still hold the values of the previous row's cells. Their capacitance is far larger than a
cell's, so they would overwrite any cell on the new row that stores the opposite value
(a *faulty swap*). To prevent this, the **last operation on the last cell of every row
runs in functional mode**. That one cycle pre-charges every column, so the next row opens
onto bit lines at VDD.

The whole scheme costs one small control element per column plus a mode signal,
`lptest`. This repository holds RTL for that control, for the March BIST that drives it,
and for the surrounding column decoding. It also has a behavioural model of the cell array
and bit lines, detailed enough to show both the saving and the faulty-swap hazard.

## The per-column control element

`precharge_ctrl_elem` sits between a column's original pre-charge command `Pr_j` and its
pre-charge circuit. It has a 2:1 multiplexer whose select comes from a NAND of `lptest`
and the column's active-low select `CSn_j`:

```
sel    = ~(lptest & CSn_j)
NPr_j  = sel ? Pr_j : CSn_(j-1)        (all signals active low: 0 = pre-charge on)
```

| mode | column j | NPr_j | effect |
|---|---|---|---|
| functional (`lptest=0`) | any | `Pr_j` | unchanged memory |
| low-power | selected | `Pr_j` | normal operation/restoration timing |
| low-power | not selected | `CSn_(j-1)` | on only if column j-1 is the one being accessed |

`precharge_ctrl` chains one element per column. Column 0 has no left neighbour, and its
input is tied inactive; the restoring cycle at each row end already pre-charges it. In
silicon each element is two transmission gates, an inverter and a NAND (ten transistors).
Here it is two gates of combinational logic.

### Half-cycles in the RTL

The original pre-charge command changes at mid-cycle. The RTL stays single-clock and
cycle-based by carrying each half-cycle's commands as a separate vector:

- `precharge_timing` produces `pr_n_op`, which is off on the selected columns, and
  `pr_n_rest`, which is on everywhere.
- `lp_sram_top` instantiates `precharge_ctrl` twice, once per half-cycle.

In hardware this is one circuit whose `Pr_j` input changes at mid-cycle.

## Address order and the March BIST

`march_addr_gen` uses two counters:

- **Counter A** is the word (column) address within a row. It advances once per cell,
  after all operations of the current March element have been applied to that cell.
- **Counter B** is the row address. It advances when counter A reaches its terminal count.

The counters count down for a descending element, which gives the exact reverse order.
Counter A's terminal count acts as a synchronous enable for counter B, not as its clock.

`march_bist` runs one of five built-in algorithms, one operation per clock cycle. Reads
are checked against the expected value on every data bit.

| `alg` | algorithm | elements | operations |
|---|---|---|---|
| 0 | March C- | 6 | 10 |
| 1 | March SS | 6 | 22 |
| 2 | MATS+ | 3 | 5 |
| 3 | March SR | 6 | 14 |
| 4 | March G (no delay steps) | 7 | 23 |

A run over `ROWS x WPR` addresses takes exactly `operations x ROWS x WPR` cycles, where
`WPR` is the number of words per row. With `lp_en` set, the controller raises `lptest` on
every operation of an ascending element except the last operation on the last cell of
each row.

**Descending elements run in functional mode** (`lptest` low). This is this design's own
choice. The control element chains column j to column j+1, so it pre-charges the correct
"next" column only when columns are visited in ascending order. Running a descending
element in low-power mode would access columns whose bit lines are floating. Elements
with a free direction run ascending. Because of this, algorithms with many descending
operations save less than an all-ascending accounting would predict.

## Word-oriented arrays

The array has `COLS` columns in `BLOCKS` contiguous blocks, each with its own column
multiplexer and sense amplifier / write driver. An access opens one word line and selects
the same column position in every block. In low-power mode each block therefore
pre-charges its selected column and the one after it, which leaves fewer columns switched
off than in a bit-oriented array.

`BLOCKS = 1` is the bit-oriented memory and is the default.

A shorter word length `WORD_BITS` adds one more multiplexer level, `word_mux`:

- The `BLOCKS` blocks of an access form `BLOCKS/WORD_BITS` groups of `WORD_BITS` blocks.
- A write enables only the addressed group's write drivers. The other blocks sense their
  cell, as in a read.
- A read returns the addressed group's slice.

The group index is the low part of the word address. The BIST therefore visits every
group at one column position before moving to the next column, so the column pre-charged
in advance is always the next one used. A row holds `WPR = (COLS/BLOCKS) x
(BLOCKS/WORD_BITS)` words, and there is one restoring cycle per `WPR` words.

## The array model

`sram_array_model` is a behavioural model, not hardware. It stands for the cells, bit
lines, pre-charge circuits, column multiplexers, sense amplifiers and write drivers. Each
column's bit-line pair is in one of three states: pre-charged, holding 0, or holding 1.
For each cycle the model works as follows.

**Operation half:**

- **Selected column:** the cell is read or written, and the lines take the cell's value.
  If the lines were not pre-charged, the access is counted as *unprepared*. If they also
  held the opposite value, a read returns that value and flips the cell.
- **Unselected column with pre-charge on:** read-equivalent stress. Nothing changes.
- **Unselected column with pre-charge off:** lines that were pre-charged take the cell's
  value. Lines that hold the opposite value flip the cell. This is a faulty swap, and it
  is counted.

**Restoration half:** every column whose pre-charge is on returns to VDD.

In silicon the discharge of a floating line takes several cycles. The model does it in
one cycle, so it flags a hazard at the earliest moment one could occur. The model does not
compute power. `pre_on_count` counts pre-charge circuits that are on, summed over
half-cycles, as an activity figure.

## Top level

`lp_sram_top` connects the blocks:

```
march_bist ─┐
user port ──┴─ port mux ─ word address split ─┬─ col_decoder ─ precharge_timing ─ precharge_ctrl x2 ─┐
                                              └─ word_mux ─────────────────────────────────────────────┴─ sram_array_model
```

| parameter | default | meaning |
|---|---|---|
| `ROWS` | 512 | word lines |
| `COLS` | 512 | bit-line columns |
| `BLOCKS` | 1 | column blocks (1 = bit-oriented); e.g. 128 or 64 |
| `WORD_BITS` | `BLOCKS` | word length; must divide `BLOCKS`; e.g. 16 or 8 |

**Ports:**

- **User port**, used when `test_mode = 0`: `f_acc`, `f_we`, `f_row` and `f_word` (the
  word address within the row), `f_wdata`.
- **BIST**, used when `test_mode = 1`: `bist_start`, `bist_alg`, `bist_lp_en`, with
  status outputs `bist_busy`, `bist_done`, `bist_fail` and `bist_err_count`.
- **Observation outputs** (from the model, for simulation only): `lptest` as applied,
  `swap_count`, `unprep_count`, `pre_on_count`.

**Timing:**

- One access per clock cycle.
- `rdata` is valid in the cycle after a read.
- `start` is sampled while the BIST is idle or done. The first operation follows in the
  next cycle.
- `lptest` is forced low whenever the user port owns the array.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/lp_sram_pkg.sv tb/tb_lp_sram_top.sv \
          --top-module tb_lp_sram_top -Mdir obj_top && obj_top/Vtb_lp_sram_top
```

| testbench | what it covers | run time |
|---|---|---|
| `tb_precharge_ctrl_elem`, `tb_precharge_ctrl`, `tb_col_decoder`, `tb_precharge_timing`, `tb_march_addr_gen`, `tb_word_mux` | block-level truth tables and sequences | < 1 s |
| `tb_sram_array_model` | functional access, restored low-power pass, a forced faulty swap (exactly 4 cells), an unprepared read returning wrong data | < 1 s |
| `tb_march_bist` | cycle, read/write, `lptest` and restoring-cycle counts of all five algorithms; address order; detection of a stuck-at cell | < 1 s |
| `tb_lp_sram_top` | end to end on 8 x 16 bit-oriented, 4 x 16 with 4 blocks and 4-bit words, and with 2-bit words: user traffic, all algorithms in both modes with exact pre-charge accounting, mode switches, a cell upset caught by the BIST | seconds |
| `tb_lp_sram_workloads` | the same on 512-column arrays: bit-oriented, and 128/64 blocks with 16/8-bit words | ~45 s |
| `tb_lp_sram_full` | default 512 x 512 build, full March C- in low-power mode (2,621,440 cycles) | ~30 s |

## What the counts show

The table below gives the cut in pre-charge half-cycles, low-power against functional
mode, over 512-column arrays. These are activity counts, not power: they leave out
read/write power. They also count a restoring cycle like any functional cycle, although
recharging bit lines that have been discharged costs more. The
saving from the low-power runs is largest for algorithms with mostly ascending elements.

| organisation | March C- | March SS | MATS+ | March SR | March G |
|---|---|---|---|---|---|
| bit-oriented | 60 % | 55 % | 60 % | 50 % | 70 % |
| 128 blocks, 16-bit words | 34 % | 31 % | 34 % | 29 % | 40 % |
| 64 blocks, 16-bit words | 47 % | 44 % | 47 % | 40 % | 56 % |
| 128 blocks, 8-bit words | 34 % | 32 % | 34 % | 29 % | 40 % |
| 64 blocks, 8-bit words | 48 % | 44 % | 48 % | 40 % | 56 % |

Fewer blocks means more columns that can be switched off, and therefore a larger saving.
No run in low-power mode produced a faulty swap or an unprepared access.

## Departures and limits

These points differ from the published method, or are not specified by it:

- **Descending elements** run in functional mode (see above).
- **Algorithms:** only the element and operation counts are given. The operation lists
  are the standard forms of these algorithms, and March G's data-retention delays are
  omitted.
- **Counter B** takes counter A's terminal count as an enable, not as a clock.
- **User port, handshake, reset and read latency** are this design's own.
- **Word-group placement** (contiguous blocks) and the low-order word-group address bits
  are this design's own.
- **Bit lines** are an abstracted three-state model. Discharge takes one cycle instead of
  several. Crosstalk between floating lines is not modelled.
- **Not modelled at all:** transistor-level behaviour, the 0.13 µm / 1.6 V / 3 ns
  operating point, and the Spice-based power reduction ratios.
