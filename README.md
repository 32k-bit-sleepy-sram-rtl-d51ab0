# 32K-bit sleepy SRAM: logic-level RTL

In a static RAM most of the standby power is sub-threshold leakage through the
cells, which sit idle almost all the time. This design lowers that leakage by
giving some cells a pair of high-threshold "sleep" transistors, one in series
with the pull-up network and one with the pull-down network. They cut leakage
by more than an order of magnitude, but they make the cell slower.

The main idea is where the slow cells go. Read delay grows with the distance a
cell's signal travels along its bit line to the column circuitry. The cells
near the output have slack, and only those are built as sleepy cells. The
farthest cells, which set the worst-case access time, stay ordinary. The
memory gets most of the leakage saving and its worst-case delay does not grow.
Its best-case delay does.

The memory holds 4096 words of 8 bits, 32,768 cells in 128 rows and 256
columns. In the default configuration the 64 rows nearest the output are
sleepy, which is half of the array.

Everything in this repository is SystemVerilog at the logic level. Leakage,
delay, transistor sizing and wire RC do not exist at this level. The sleepy
partition appears only as a label on each cell (see "What the sleepy partition
means here").

## Pins and organisation

| Pin          | Dir | Meaning                                                  |
|--------------|-----|----------------------------------------------------------|
| `A[11:0]`    | in  | word address: `A[6:0]` = row, `A[11:7]` = column address |
| `D_IN[7:0]`  | in  | write data                                               |
| `D_OUT[7:0]` | out | read data; holds the last word read                      |
| `WRITE`      | in  | 1 = write access, 0 = read access                        |
| `PHI_b`      | in  | bit-line precharge command: 0 = precharge, 1 = evaluate  |

There is no clock and no reset. The 256 columns form eight groups of 32
columns, one group per data bit. Bit `b` of the word at row `r` and column
address `c` is stored in row `r`, column `b*32 + c`. A single row therefore
holds 32 words, one from each column address.

```
            A[6:0]                          A[11:7]
              |                                |
        row_decoder (7->128)          column_select
              | wl_sel                  col_decoder (5->32)
              v                         8 x mux32 (read)
   control --> sram_array  <--------->  write steering
   logic       256 x sram_column              |
   (WRITE,       128 x sram_cell              v
    PHI_b)     rows 0..63 sleepy          data_io --> D_OUT
                                           ^
                                          D_IN
```

## The access cycle

Each access is one precharge phase followed by one evaluate phase.

1. **Precharge, `PHI_b` = 0.** The pMOS precharge devices pull every bit-line
   pair (BL, BL_b) high. All word lines are held low. Set up `A`, `WRITE`
   and `D_IN` during this phase.
2. **Evaluate, `PHI_b` = 1.** The word line of row `A[6:0]` rises.
   - **Read (`WRITE` = 0).** Every cell on the row discharges one line of its
     pair: BL if it stores 0, BL_b if it stores 1. The eight 32-to-1
     multiplexers pass BL of column `A[11:7]` of each group to `D_OUT`.
     `D_OUT` is a transparent latch during this phase.
   - **Write (`WRITE` = 1).** In each group, only the column selected by
     `A[11:7]` has its write driver on. The driver pulls BL low to write 0 or
     BL_b low to write 1, which overpowers the cell on the active word line.
     The other 248 cells of the row are only read, as in a real array.
3. Driving `PHI_b` low again ends the access and starts the next precharge.
   `D_OUT` keeps the word it read.

Keep `A`, `WRITE` and `D_IN` stable while `PHI_b` is high. If they change
during a write's evaluate phase, other cells are written.

### Bit lines are dynamic nodes

`sram_column` models each bit line as a set/reset latch. Any discharge path
(a cell on an active word line, or the write driver) forces the line to 0.
Only precharge brings it back to 1. Discharge wins over precharge, because the
precharge devices are meant to be weak so that writes stay fast. A line with
neither condition active keeps its level, like the real capacitive node.

As a result, an access that is not preceded by a precharge phase sees stale
levels. Suppose `PHI_b` stays high and the address changes from row `r1` to
row `r2`. Every line that `r1` discharged stays low, so the read returns the
bitwise AND of the two words that share the column address. The end-to-end
testbench checks this behaviour explicitly. Always precharge between
accesses.

## What the sleepy partition means here

`SLEEPY_ROWS` (top-level parameter, default 64) sets how many rows are built
from sleepy cells. Rows `0 .. SLEEPY_ROWS-1` are taken to be the rows nearest
the column circuitry. Each `sram_cell` instance has its `SLEEPY` parameter set
to match its row. These settings give the five configurations that were
evaluated for this memory:

| `SLEEPY_ROWS` | sleepy cells | ordinary cells | share                 |
|---------------|--------------|----------------|-----------------------|
| 128           | 32768        | 0              | 100 %                 |
| 96            | 24576        | 8192           | 75 %                  |
| 64            | 16384        | 16384          | 50 % (default)        |
| 32            | 8192         | 24576          | 25 %                  |
| 0             | 0            | 32768          | none                  |

The 50 % configuration is the one chosen for the memory. At that setting the
reported leakage falls by about 47 % and the worst-case access time does not
change. Only sleepy cells pay the delay penalty of roughly 34 %, and they sit
where the bit-line delay is shortest. 75 % and 100 % save more leakage, but
then sleepy cells also sit on the critical path. 25 % saves too little.

There is no sleep-control pin, and sleepy cells keep their data. As logic, a
sleepy cell is therefore identical to an ordinary one. The `SLEEPY` parameter
changes no behaviour. It records where the high-threshold devices belong, for
anyone who maps this RTL onto a custom cell library. Lint tools report it as
an unused parameter.

## Modules

All modules are in `rtl/`, one per file. Sizes come from `rtl/sram_pkg.sv`.

| Module          | Role                                                              |
|-----------------|-------------------------------------------------------------------|
| `sram_pkg`      | sizes: 128 rows, 256 columns, 8-bit words, 7 + 5 address bits, default 64 sleepy rows |
| `sleepy_sram`   | top level: pins and wiring                                        |
| `control_logic` | `PHI_b`, `WRITE` -> precharge, word-line enable, write enable, read enable |
| `row_decoder`   | 7-to-128 one-hot decoder, no enable                               |
| `sram_array`    | 256 columns. Gates the row decode with the evaluate phase, so no word line is high during precharge |
| `sram_column`   | precharge pair, write driver (`WRITE`, `DATA_IN`, and an inverter on the BL side), 128 cells, bit-line latches |
| `sram_cell`     | one stored bit (a latch) and its two bit-line pull-downs            |
| `column_select` | 5-to-32 column decoder, eight `mux32`, per-column write enable and data |
| `col_decoder`   | 5-to-32 one-hot decoder                                           |
| `mux32`         | 32-to-1 multiplexer with one-hot select (AND-OR)                  |
| `data_io`       | `D_IN` buffer and `D_OUT` latch                                   |

Storage is made of latches: 32768 cell latches, 512 bit-line latches and 8
output latches. Lint and synthesis tools report all of them. They are
intended, and every file that holds one says so in its header.

Two assertions are active in simulation. `sram_array` checks that at most
one word line is high. `sleepy_sram` flags `A`, `D_IN` or `WRITE` changing
while a write is being evaluated (`PHI_b` and `WRITE` both high).

## Where this RTL makes its own choices

The overall organisation, the address split, the pins, the precharge polarity
and the column structure are given by the original design. The following
points were left open there and were settled as described:

- **Column interleaving.** Bits are grouped side by side (column
  `b*32 + c`), not interleaved.
- **Write steering.** A column's write driver needs both `WRITE` and its column
  select. With `WRITE` alone, all 32 columns of a group would be written.
- **Word-line gating.** Word lines stay low during precharge. The decoder has
  no enable of its own; the gating happens in `sram_array`.
- **Output.** `D_OUT` holds the last word read, where the original shows a
  high-impedance output outside the data window.
- **Sleepy rows.** The rows nearest the output are taken to be rows 0 and up.
- **Single-ended read.** `D_OUT` comes from BL alone, with no sense amplifier,
  as in the original.

Not represented at all: the sleep transistors' sizing, leakage and delay,
transistor sizes, the 3-segment pi wire model of the word and bit lines, and
all analog timing. The memory's maximum latency is about 0.96 ns. The RTL is
untimed, so no cycle count applies.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench            | Covers                                                                |
|----------------------|-----------------------------------------------------------------------|
| `tb_sleepy_sram`     | full-size memory through its pins: fill and read back all 4096 words, 3000 random accesses, reads without precharge, `D_OUT` hold; counts each mechanism |
| `tb_partition_modes` | five columns at 128/96/64/32/0 sleepy rows: cell labels match the partition table and function is unchanged |
| `tb_sram_array`      | 16 x 32 array: writes, reads, precharge, word-line gating             |
| `tb_sram_column`     | one 128-cell column: reads, writes, stale read, driver against precharge |
| `tb_sram_cell`       | read 0/1, write 0/1, hold, both cell variants                         |
| `tb_row_decoder`, `tb_col_decoder`, `tb_mux32` | all 128 / 32 / 32 cases                     |
| `tb_control_logic`, `tb_column_select`, `tb_data_io` | truth table, column mapping, output latch |

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_sleepy_sram -y rtl -y tb +libext+.sv \
    rtl/sram_pkg.sv tb/tb_sleepy_sram.sv
./obj_dir/Vtb_sleepy_sram
```

The full-size top-level test takes about a minute to compile and about 25
seconds to run. To lint a module, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/sram_pkg.sv rtl/<module>.sv`.

To resize the memory, edit `sram_pkg`. The row and column counts must be
powers of two, and `COLS` must be a multiple of `WORD_BITS`. To choose a
different partition, set the `SLEEPY_ROWS` parameter of `sleepy_sram`.
