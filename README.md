# Digital test logic for infrared focal plane arrays

An infrared focal plane array (FPA) is a large two-dimensional array of
photodetectors bump-bonded onto a CMOS readout chip. Large arrays with small
pixels have more defects, and flip-chip bonding makes them hard to probe. Two
test problems come up, and this RTL addresses both:

1. **Measuring each detector's dark current before bonding, and removing the
   switch leakage from it.** A *test socket chip* touches every detector of
   the array at once through matching bump pads. It is addressed like a RAM: a
   row and a column address connect one detector to an I/O pad, where an
   instrument measures the current. With 128 rows and 128 columns, the many
   OFF switches on that path leak about as much current as the detector draws.
   Measuring the pad current in four selection cases lets that leakage be
   cancelled exactly.
2. **Testing an M x N readout array in M + N measurements instead of M x N.**
   Each readout cell has a built-in current source. Cells are selected by a
   row shift register and a column shift register. A *crosscheck test* turns
   on a whole row, or a whole column, at once and measures the sum. A faulty
   cell shows up in its row sum and its column sum. Crossing the two locates
   it.

The two parts are separate chips in practice. In `ir_fpa_test_top` they stand
side by side with their own ports (`sock_*` and `ro_*`).

## Leakage calibration on the socket chip

The address decoders of the socket chip have two extra control pins,
`row_disable` and `col_disable`. When a pin is high, the decoder's output is
off even though an address is applied. For each pixel, four currents are
measured:

| case | row_disable | col_disable | switches ON | measured |
|------|-------------|-------------|-------------|----------|
| 1 | 1 | 1 | none | I1 |
| 2 | 1 | 0 | the addressed column switch only | I2 |
| 3 | 0 | 1 | the switches of the addressed row | I3 |
| 4 | 0 | 0 | addressed row and column (normal selection) | I4 |

Three kinds of OFF-switch leakage make up these currents:
- I_ROFF: a row switch on the selected column;
- I_COFF: a column switch while a row is ON;
- I_CROFF: a column switch while no row is ON.

With R rows and C columns they add up to:

    I4 = I_D + (R-1) I_ROFF + (C-1) I_COFF
    I3 = C I_COFF
    I2 = R I_ROFF + (C-1) I_CROFF
    I1 = C I_CROFF

Eliminating the leakage terms gives the dark current:

    I_D = I4 - k1 I3 - k2 I2 + k1 k2 I1,   k1 = (C-1)/C,  k2 = (R-1)/R

`leakage_calibrator` avoids fractions. It multiplies through by R·C:

    R·C·I_D = R·C·I4 - R(C-1)·I3 - C(R-1)·I2 + (R-1)(C-1)·I1

It then divides by R·C. For 128 x 128, R·C = 16384, so the division is an
arithmetic right shift by 14, which rounds toward minus infinity. For other
sizes it is an integer division, which rounds toward zero. When the currents
follow the model above, the result is exact.

The unit also outputs the large-array shortcut I4 - I3 - I2 + I1, which
takes k1 = k2 = 1. That shortcut is off by I_CROFF - I_ROFF - I_COFF, and
the testbenches check this. Use `i_dark`. The approximation is there for
comparison.

`calib_sequencer` automates the measurement:
- It visits every pixel row by row. With `single` high at `start`, it
  calibrates only the pixel at `pix_row`/`pix_col`, using the socket's
  random access.
- For each pixel it sets the address and steps the disable pins through cases
  1, 2, 3 and 4.
- In each case it waits `SETTLE` cycles and then asks the instrument for one
  measurement.
- After the fourth measurement it hands I1..I4, tagged with the pixel
  address, to the calibrator.

`socket_select` holds the row decoder and the column select (`addr_decoder`
twice). It turns the address and the disable pins into the 128 + 128 select
lines of the analog switch array.

## Crosscheck test of the readout array

`select_shift_register` is one row or column selection register. It takes
five commands (`fpa_test_pkg::sr_op_t`): hold, shift, clear, preset (every
line ON) and load (parallel pattern). In normal readout, a single ON stage is
shifted along. The crosscheck test needs the preset and load commands.

`crosscheck_controller` issues the register commands in two modes.

Crosscheck mode (`MODE_CROSSCHECK`) runs M + N tests:
- **Row j:** the row register holds a token on row j and the column register
  is preset. The measurement is the sum of the M cells of row j.
- **Column i:** the row register is preset and the column register holds a
  token on column i. The measurement is the sum of the N cells of column i.

All rows are tested first, then all columns. A token is placed with a load
(pattern 1, line 0) and moved with a shift.

Normal mode (`MODE_NORMAL`) runs M x N tests. Each test selects one cell, row
by row. The column token walks along the row. Then the row token steps and
the column token is reloaded.

`crosscheck_analyzer` compares each result with the fault-free value:
- `unit_current` for a single cell;
- M·`unit_current` for a row;
- N·`unit_current` for a column.

A result below that value by more than `tolerance` marks the line **low**.
An open bump removes a cell's current, so it makes its lines low. A result
above it by more than `tolerance` marks the line **high**. A leaky detector,
or a short to a neighbour, adds current and makes its lines high.

A cell is located as open where a low row crosses a low column, and as
large-current where a high row crosses a high column. A single-cell result
of normal mode marks its cell directly. `fault_detected` is set by any flag.

### Fault masking

Faults of opposite kinds in one line cancel out in that line's sum. Some
examples:
- An open cell and a double-current cell in the same row leave the row
  normal. The two columns still flag, so the faults are detected but not
  located.
- Four faults that cancel in both their rows and their columns are not
  detected at all.
- A short between two cells of the same row moves current between them, so
  the row sum is unchanged. Only the columns see it.

The analyzer does not try to resolve these cases; it reports the flags.
The map marks every crossing of two flagged lines of the same kind. One
faulty cell is therefore located exactly. Two open cells in different rows
and columns mark four candidate cells: the two faulty ones and the two other
crossings. Normal mode, or single-cell tests of the candidates, settles such
cases.

The testbenches replay four measured 4 x 4 cases, in units of 10 nA, with
`unit_current` = 95 and `tolerance` = 30:

| case | outcome |
|------|---------|
| good array | no flag |
| open cell (row 3, col 2) | row 3 and column 2 low, cell located |
| short (4,3)-(4,4) | columns 3 and 4 high, row 4 masked |
| open (3,2) + short (2,1)-(3,1) | row 2 high, column 2 low, row 3 masked |

Cells are named (row, column), counting from 1. In the RTL, indices count
from 0 and maps are indexed `[row][column]`.

## Interfaces and timing

- **Clocking and reset.** Everything uses a single clock `clk` and an
  asynchronous active-low reset `rst_n`. Reset clears every select register,
  so nothing is selected.
- **Currents** are `fpa_test_pkg::current_t`, a 32-bit signed code in the
  unit of the measuring instrument. The logic never needs to know that unit.
- **Instrument handshake** (`sock_meas_*`, `ro_meas_*`):
  - the logic raises `meas_req` once the selection is stable;
  - it holds `meas_req` until the instrument returns a one-cycle `meas_ack`
    with the current code;
  - the instrument may take any number of cycles.

  An assertion checks that `meas_ack` never comes without a request.
- **Socket scan timing.**
  - Each case takes `SETTLE + 1` cycles plus the instrument's answer time.
  - `sock_cal_valid` comes one cycle after the fourth measurement of a pixel.
  - `sock_done` comes with the last pixel.
  - `sock_busy` drops one cycle before `sock_done`.
- **Readout test timing.**
  - Each test takes one command cycle plus the instrument's answer time.
  - `ro_result_valid` is the cycle of `meas_ack`, and the analyzer flags
    update one cycle later.
  - `ro_start` clears the flags. `ro_done` pulses after the last test.
- **Selection assertions.** While a readout measurement is requested, the
  select lines must match the test: one row and one column, one row and all
  columns, or all rows and one column. Socket select lines are always one-hot
  or all zero.
- **Default sizes.** The defaults are the sizes of the fabricated chips: a
  128 x 128 socket (`SOCK_ROWS`, `SOCK_COLS`) and a 4 x 4 readout
  (`RO_M` columns, `RO_N` rows). All of these are parameters.

## What is outside the RTL

The analog parts are not RTL:
- the socket's switch array (three NMOS switches, a test diode and a bump pad
  per cell);
- the readout cells (current source, readout amplifier, row-select switch);
- the instrument that measures currents (a parameter analyzer in a PC-driven
  set-up).

The top brings out their select lines, and the current comes back through
the handshake.

The testbenches use behavioural models of these parts:
- `tb/socket_array_model.sv` produces the pad current from the leakage sums
  above.
- `tb/readout_array_model.sv` sums the currents of the selected cells, with
  open, large-current and short faults. A shorted cell carries its partner's
  current when its partner is not connected. This reproduces the measured row
  and column sums. It does not reproduce the single-cell readings taken on
  shorted cells, which were normal.
- `tb/meter_model.sv` answers each request after a random delay.

## Design choices not fixed by the method

These choices are this design's own:
- the polarity of the disable pins;
- the scan order and case order;
- the settle time;
- the handshake;
- the register command encoding and shift direction;
- testing rows before columns;
- the absolute tolerance, and the split into low and high flags;
- the integer form and rounding of the calibration.

The calibration arithmetic and the failure-map logic would usually run on
the test computer. Here they are hardware, so the whole test runs without
software.

## Files

| file | contents |
|------|----------|
| `rtl/fpa_test_pkg.sv` | current type, register commands, test modes, result kinds, calibration cases |
| `rtl/addr_decoder.sv` | binary decoder with disable pin |
| `rtl/socket_select.sv` | socket row decoder + column select |
| `rtl/calib_sequencer.sv` | four-case measurement scan |
| `rtl/leakage_calibrator.sv` | dark-current calculation |
| `rtl/select_shift_register.sv` | readout row/column selection register |
| `rtl/crosscheck_controller.sv` | crosscheck / normal test sequencing |
| `rtl/crosscheck_analyzer.sv` | line flags and failure map |
| `rtl/ir_fpa_test_top.sv` | both set-ups side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/fpa_tb_pkg.sv` | detector dark-current pattern and the four measured 4 x 4 cases |

## Simulating

Every testbench is self-checking. Each one ends with the line
`TB_RESULT checks=N failures=F`, and it has a watchdog. For example, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -Itb -y rtl -y tb rtl/fpa_test_pkg.sv tb/fpa_tb_pkg.sv \
        tb/tb_ir_fpa_test_top.sv --top-module tb_ir_fpa_test_top -o sim
    ./obj_dir/sim

To run another testbench, replace `tb_ir_fpa_test_top` with its name.

`tb_ir_fpa_test_top` runs the top with its default parameters. It calibrates
all 16384 socket pixels against the detector currents, then recalibrates a
few single pixels by random access. At the same time it
runs the measured readout cases, a large-current cell and the masking
pattern in crosscheck mode, and two cases in normal mode. It counts each
mechanism (the four selection cases, leakage removal, single-pixel access, row,
column and cell
tests, mode switches, open and large-current location, masking) and fails if
one never happened. It takes a few seconds.

The block testbenches use smaller or non-square sizes where that catches
more, for example a 4 x 3 socket scan or a 4-column x 3-row readout, so that
rows and columns cannot be swapped unnoticed.
