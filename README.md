# 10-bit current-steering DAC with data-dependent row clock gating

A current-steering DAC spends much of its digital power on the clock. Every
current cell holds its switch state in a small clocked storage element, and in
a conventional design every cell is clocked every sample, even though most of
them keep the same value from one sample to the next. This design clocks a row
of the unary cell array only when the cells in that row may change. Seven
flip-flops remember the previous row data, and a small per-row circuit compares
it with the new row data.

The RTL implements the published architecture of B.-D. Yang and B.-S. Seo, "10-Bit
200-MS/s Current-Steering DAC Using Data-Dependant Current-Cell Clock-Gating".
It has a 6+2+2 segmented code, an array of 255 unary cells and 2 binary cells,
and a row decoder with clock gating. The current sources themselves are analog.
Here they are a behavioural model that turns the cell states into output
currents.

## Code segmentation and the cell array

The 10-bit input code is split as follows:

| field | bits      | drives                                    | cells               |
|-------|-----------|-------------------------------------------|---------------------|
| UMSB  | `din[9:7]`| row decoder, row<1:8>                     | —                   |
| LMSB  | `din[6:4]`| column decoder, col<1:8>                  | —                   |
| ULSB  | `din[3:2]`| ULSB decoder, 3 thermometer lines         | 3 unary, 4 LSB each |
| LLSB  | `din[1:0]`| no decoding                               | 2 binary, 1 and 2 LSB |

The six MSBs form a code `c` from 0 to 63. It selects the first `c` cells of an
8x8 subcell array in row-major order. Rows are numbered 1 to 8 and columns 1 to
8. `row<k>` is 1 when row k is completely on (UMSB ≥ k). `col<j>` is 1 when
LMSB ≥ j. Each cell decodes its own state locally:

    cell(i, j) on  =  row<i-1> & (row<i> | col<j>)        with row<0> = 1

So a row is either **full**, **empty** or the single **partial** row. The
partial row is the one just above the last full row, and its cells follow the
column lines. `row<8>` and `col<8>` are always 0, so position (8,8) of a subcell
array is never used by the MSB code.

There are four subcell arrays, and they receive the same row lines, column
lines and row clocks. One MSB step of 16 LSB therefore switches one 4-LSB cell
in each of the four arrays. In silicon the four arrays are mirrored about the
array centre. That mirroring is placement only and does not show up in the
logic. 4 × 63 MSB cells plus the 3 ULSB cells give 255 unary cells, all of
weight 4 LSB. The three ULSB cells fill the free (8,8) positions of three
subcell arrays. The two binary cells sit in a separate small array.

## When does a row need a clock edge?

The row clock-gating circuit holds the main idea of the design. In every cycle,
row generator *i* looks at four bits: `row<i-1>`, `row<i>` and the previous
values `row_pre<i-1>` and `row_pre<i>`. It raises `clock_enable<i>` when any of
these is true:

1. **The row changed between full and not full:** `row<i> != row_pre<i>`.
2. **The row is the partial row now:** `row<i-1> & !row<i>`. Its cells follow
   the column lines, which may have changed.
3. **The row was the partial row before:** `row_pre<i-1> & !row_pre<i>`. Its
   cells held a column pattern that must now be replaced by all-on or all-off.

A row that is full (or empty) in both cycles gets no clock edge, and its cells
keep their state. The column lines are not compared. A partial row is clocked
even when its column value has not changed, which keeps the generator down to
four inputs.

At the ends of the array the missing neighbours are tied off: `row<0>` and
`row_pre<0>` to 1 (row 1 can never be empty), and `row<8>` and `row_pre<8>` to 0.
Because row 1 can never be empty, the tie-off on generator 1 never changes its
enable. The tie-off on generator 8 does matter.

Worked example. The MSB code goes from 28 (rows 1–3 full, row 4 holds 4 cells)
to 44 (rows 1–5 full, row 6 holds 4 cells). Row 4 goes from partial to full
(rules 1 and 3). Row 5 goes from empty to full (rule 1). Row 6 becomes the
partial row (rule 2). So `clock_enable<1:8>` = 0,0,0,1,1,1,0,0, and 3 of the 8
rows are clocked. For a slowly varying signal usually only the partial row is
clocked, so about one row in eight.

The rule never skips a row whose cells would change. The end-to-end testbench
checks every cell, every cycle, against the pattern the code should produce,
which is what an array clocked every cycle would hold, and finds no
difference.

## Gated-clock timing

| when                   | what happens |
|------------------------|--------------|
| rising edge *n*        | input register <- `din` (code *n*); `row_pre` <- row data of code *n-1* |
| clock high, cycle *n*  | row decoder and enable logic settle on code *n* vs. code *n-1* |
| falling edge, cycle *n*| each row's enable is sampled into `en_q` |
| rising edge *n+1*      | rows with `en_q` = 1 see a rising `row_clk<i>` and load code *n*; ULSB/LLSB cells load code *n* |


- The input registers and `row_pre` flip-flops use the ungated sampling clock.
  After rising edge *n*, the input register holds code *n* and `row_pre` holds
  the row data of code *n-1*. That is exactly what the cells hold.
- `clock_enable` settles during the clock-high phase. It is sampled by a flip-flop
  on the falling edge. `row_clk<i> = clk & en_q`, so the gated clock cannot
  glitch: `en_q` only changes while `clk` is low.
- On rising edge *n+1* the enabled rows load code *n*. The ULSB and LLSB cells
  are clocked every cycle. **Latency is two clock cycles** from `din` to the
  cell states and output currents.
- The enable must settle within half a clock period: 2.5 ns at 200 MS/s.

The falling-edge sampling of the enable is this implementation's choice. The
published gating circuit combines the enable with the inverted clock, but it
does not describe how glitches are avoided.

## How much clock activity is saved

`cs_dac_sine_workload_tb` drives sampled sine waves at 200 MS/s and measures
the average number of rows clocked per cycle. It checks each average against the
published simulation results (tolerance 0.15 rows):

| signal (200 MS/s)            | this RTL | published |
|------------------------------|----------|-----------|
| full scale, 20 MHz           | 2.40     | 2.4       |
| full scale, 10 MHz           | 1.70     | 1.8       |
| full scale, 5 MHz            | 1.35     | 1.4       |
| full scale, 2.5 MHz          | 1.175    | 1.2       |
| full scale, 1.25 MHz         | 1.09     | 1.1       |
| 1/4 scale, 20 / 10 / 5 MHz   | 1.20 / 1.10 / 1.05 | 1.2 / 1.2 / 1.1 |
| 1/4 scale, 2.5 / 1.25 MHz    | 1.025 / 1.01 | 1.05 / 1.025 |
| 20 MHz at 1/2, 1/4, 1/16 scale | 1.6 / 1.2 / 1.2 | 1.6 / 1.2 / 1.2 |
| 2.5 MHz at 1/2, 1/4, 1/16 scale | 1.075 / 1.025 / 1.025 | 1.1 / 1.05 / 1.025 |

Compared with clocking all 8 rows, the row clocks toggle 13–30 % as often. The
published power figures say the clock power drops to 31–36 % of a conventional
DAC. That figure also includes the clock buffer and the ungated clocks of the
input registers and LSB cells, and RTL simulation cannot give it.

## Modules

```
cs_dac_top
├── input_register              10-bit input register, splits the code (dac_code_t)
├── clock_gating_row_decoder    row decoder with per-row clock gating
│   ├── row_thermal_decoder     UMSB -> row<1:8>, row<8> = 0
│   ├── row_pre_register        7 DFFs, row_pre<1:7>
│   └── row_clock_gating_circuit
│       └── row_clock_generator ×8   enable rule + glitch-free clock gate
├── column_decoder              LMSB -> col<1:8>
├── ulsb_decoder                ULSB -> 3 thermometer lines
├── msb_cell_array              4 × subcell_array + 3 ULSB cells
│   └── subcell_array ×4        63 × current_cell, one gated clock per row
├── lsb_cell_array              2 binary cells
└── dac_current_output_model    behavioural: cell states -> I_OUT, I_OUTB (real, mA)
```

`dac_pkg` holds the field widths and the `dac_code_t` struct. `current_cell` is
the digital part of a cell: the local decode and a rising-edge register with
outputs `q`/`qb`. `q` = 1 steers the cell current to `I_OUT`.

Top-level ports of `cs_dac_top`:

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | sampling clock (200 MHz nominal) |
| `rst_n`      | in  | 1     | asynchronous active-low reset, all cells off |
| `din`        | in  | 10    | input code, sampled on the rising edge |
| `row_clk_en` | out | 8     | row clock enables for the coming edge (bit i-1 = row i) |
| `msb_q`      | out | 4×63  | switch states of the MSB cells, per subcell array, row-major |
| `ulsb_q`     | out | 3     | switch states of the ULSB cells |
| `lsb_q`      | out | 2     | switch states of the binary cells |
| `iout_ma`, `ioutb_ma` | out | real | modelled output currents, mA |

## What is modelled, and where it departs from the published design

- **Analog parts.** The current sources, differential switches and output node are
  in `dac_current_output_model`. It uses ideal, matched sources, a full scale of
  3.33 mA (I_LSB = 3.33 mA / 1023) and settles instantly. It models no
  mismatch, INL/DNL, output impedance or SFDR. The clock buffer and the bias
  current reference are not modelled. In the RTL the clock buffer is the `clk`
  net.
- **Cell storage.** The published cell stores its data in a clocked latch made
  of cross-coupled inverters. Here it is an edge-triggered register with one
  update per cycle.
- **Enable sampling.** The falling-edge enable flip-flop in
  `row_clock_generator` is this implementation's way of making the gated clock
  glitch-free (see above).
- **Reset, latency and field order.** Reset and the two-cycle latency are this
  implementation's choices. So is the packing of the fields into `dac_code_t`,
  MSB first. The published design does not describe any of these.
- **ULSB cell placement.** The three ULSB cells sit in the free (8,8)
  positions, near the array centre. Only the published floorplan suggests this,
  and it does not affect behaviour.
- Synthesis keeps `col<8>` and `row<8>` as constant-0 outputs of the decoders.
  This is intended.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5, from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/dac_pkg.sv tb/dac_tb_pkg.sv tb/cs_dac_top_tb.sv --top-module cs_dac_top_tb
./obj_dir/Vcs_dac_top_tb
```

Replace the testbench name to run another one. The main ones are:

- `cs_dac_top_tb`: the full design with its default sizes, 6000 cycles. The
  stimulus is random codes, ramps, alternating 0/1023, small steps around a row
  boundary, a full-scale sine and a reset in mid-run. It checks the latency,
  every cell, the output current and the row enables every cycle. It fails if
  any mechanism never occurred: rows left unclocked, only the partial row
  clocked, three or more rows clocked, rows filling and emptying, the extreme
  codes, and reset.
- `cs_dac_sine_workload_tb`: the sine workloads in the table above.
- `<module>_tb`: one per module. `dac_tb_pkg` holds the reference functions
  they share. Those functions work from the code value and the cell rule, not
  from the RTL decoders.

## Changing it

The field widths live in `dac_pkg`. The decoders and arrays are written as
loops over the row and column counts, but the 6+2+2 split and the 4-LSB unary
weight are tied together: one MSB step equals `N_SUB` cells of
`UNARY_WEIGHT`. Change the split in the package as a whole. To compare against
a conventional DAC, tie `row_clk` of `msb_cell_array` to `{8{clk}}`. The cell
states must not change, and the testbenches' reference checks show whether
they do.
