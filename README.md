# Conway's Game of Life on a 64-bit register

This is the RTL of a small single-chip Game of Life. The user enters an 8 x 8
starting board, one row at a time, from eight switches and an enter button. After
that, every press of enter replaces the board by its next generation. The board is
shown on an 8 x 8 LED matrix, one row at a time.

The central idea is that the whole board lives in one 64-bit register array.
The array has a single row-wide port, used for both reading and writing. There is no
second copy of the board and no per-cell logic. A single Life rule evaluator walks
over the board one cell at a time. For each cell it reads the row above, the row
itself and the row below, cuts a three-cell window out of each, and collects the
3 x 3 neighbourhood in a small shift register. The new cell values are buffered
until the old row is no longer needed, and are then written back into the same
array.

The design follows a chip built for a 40-pin 1.5 x 1.5 mm TinyChip in a 0.6 µm
process. That chip used two-phase latch clocking and a custom 12-transistor SRAM
array. Here the logic is ordinary single-clock RTL, and the array is a synthesizable
model of the same structure. Where this RTL differs from the original, the section
"Departures from the original chip" lists it.

## Using the chip

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | the only clock |
| `rst`       | in  | 1     | synchronous, active high: starts a new game |
| `enter`     | in  | 1     | enter button, 1 while pressed |
| `switches`  | in  | N     | one board row; bit N-1 is the left-most cell, 1 = live |
| `ledpower`  | out | N     | one-hot row drive of the LED matrix; bit N-1 is the top row |
| `ledcolumn` | out | N     | cells of the powered row; bit N-1 is the left-most column |

`N` is 8 by default. These are the pins of the chip, apart from clock and power.

A game works like this:

1. Assert `rst`. The controller writes zeros into every row of the register. It
   then starts scanning the (empty) board onto the LEDs.
2. Each of the first N presses of `enter` writes `switches` into the next row,
   starting with the top row. The display shows the rows entered so far.
3. Each later press computes one generation. Cells outside the board count as
   dead: the board has a dead border, it does not wrap around.

The chip samples `enter` on every clock edge and remembers a press until it is served.
It serves presses only at the end of a display scan, so a press is acted on up to
8 x 16 = 128 cycles after it is seen. A press must not be held across the moment it
is served, or it counts twice. There is no debouncing.

## How a generation is computed

This is the part of the design that takes the most care. Rows are numbered 0 (top)
to N-1 (bottom), and columns from the left. For every row r, and for every column c
in that row, the controller spends three cycles in `S_CALC`:

| cycle | register row read | `zerorow` |
|-------|-------------------|-----------|
| 1     | r-1 (above)       | 1 when r = 0 |
| 2     | r                 | 0 |
| 3     | r+1 (below)       | 1 when r = N-1 |

All positions use one-hot pointers: the row pointer, the column pointer (`column`)
and the three-cycle phase (`100`, `010`, `001`). The row read from the register goes
through these blocks:

* **bitselector** (combinational) takes the row and the one-hot `column`. It
  returns the window {left, centre, right}. A neighbour past the left or right edge
  is 0, and the whole window is 0 when `zerorow` says the row lies outside the board.
* **holdmem** is a chain of three 3-bit registers that shifts on every
  calculation cycle. After the third read it holds the row above (oldest stage), the
  cell's own row (middle stage) and the row below (newest stage). The middle bit of
  the middle stage is the cell. The other eight bits are its neighbours.
* **outputlogic** adds up the eight neighbours. The new value is 1 when the sum is
  3, or when the sum is 2 and the cell is live.
* **tempmem** is a 2N-bit shift register. One cycle after each third read, the
  registered strobe `newbiten` shifts the new value in. After a row, the lower N bits
  hold that row's new values and the upper N bits hold the previous row's. The first
  cell computed (the left-most) ends up in the top bit of its half.

**Write-back.** New values cannot be written back straight away. The new values of
row r may only replace the old ones after row r+1 has been computed, because row r+1
still reads the old row r. So the controller writes back one row late:

* After row 0 nothing is written. The calculation goes straight on to row 1.
* After each row r from 1 to N-1, there is one extra `S_CALC` cycle, in which the
  last new value enters tempmem. Then one `S_STORE` cycle writes the upper half of
  tempmem (row r-1) into row r-1.
* After row N-1, a second `S_STORE` cycle writes the lower half of tempmem (the
  bottom row itself) into row N-1. The registered `finalrow` flag selects that half.

Each row needs 3N reads. For N = 8 a generation therefore takes 24 cycles for row 0,
26 for each of rows 1 to 6, and 27 for row 7: 207 cycles in total. The display scan
then resumes. While the generation is computed the LED registers are not loaded, so
the row that was lit last stays lit.

## The controller

`controller` holds the only state machine. Its states are in `gol_pkg`. They use the
original one-hot encoding, with an all-zero reset state:

| state       | what happens | next |
|-------------|--------------|------|
| `S_RESET`   | reset the row and phase pointers | `S_CLEAR` |
| `S_CLEAR`   | write 0 to one row per cycle, top to bottom | `S_DISPLAY` after the last row |
| `S_DISPLAY` | display scan (below) | `S_INPUT` or `S_CALC` when a press is pending at the end of a scan |
| `S_INPUT`   | write `switches` into the current input row; move to the next row | `S_DISPLAY` |
| `S_CALC`    | one read of the 3 x 3 walk above | `S_STORE` when a row's write-back is due |
| `S_STORE`   | write back one new row | `S_STORE`, `S_CALC` or `S_DISPLAY` |

**Display scan.** Each row is read for 15 cycles. In each of them, the row is loaded
into the `ledcolumn` register and its one-hot select into the `ledpower` register.
The 16th cycle moves the scan to the next row. A full scan takes 128 cycles, so with
a clock of a few MHz every row is lit tens of thousands of times per second.
`DWELL_BITS` (default 4) sets the 16-cycle row period.

**Enter.** A pending flag loads from `enter` whenever it is clear. Once set, it holds
until the request is served: by `S_INPUT`, or during the first row of `S_CALC`. It
then reloads from the button. A flag `input_done`, set when the N-th row is written,
decides between input and calculation. Only `rst` clears it.

## The board register

`gol_register` is built the way the original custom array is:

* **wordline_cond** gates each row: two-input NANDs of `wordline[i]` with `readen`
  and with `writeen` give active-low strobes, and inverters give the active-high
  ones.
* **sram_row** is one row of N **sram12t_cell** bits. On the chip each bit is a
  twelve-transistor cell: a transmission gate writes the bitline into a
  cross-coupled pair, and a tristate driver puts the stored value back on the same
  bitline.
* **bitline_cond** drives the shared bitline from `bitline_write` while `writeen` is
  set, and buffers the bitline out as `bitline_read`.

In RTL, a cell is a flip-flop with an enable, and its tristate read driver is an AND
gate. The shared tristate bitline becomes a multiplexer between the write data and
the OR of the cells. Reads are combinational: `bitline_read` follows `wordline` and
`readen` in the same cycle. A write takes effect at the clock edge. The array has no
reset, because the controller clears it. Assertions check three things: at most one
wordline is active, read and write never happen together, and each strobe and its
complement stay complementary.

Wordline bit i is board row N-1-i, so bit N-1 is the top row. Bitline bit j is column
N-1-j, so bit N-1 is the left-most column. The same bit order holds on the LED
outputs.

## Departures from the original chip

* **One clock.** The original has two non-overlapping clock phases, `ph1` and `ph2`.
  Its flip-flops are a `ph2` master latch followed by a `ph1` slave latch. Here every
  such flip-flop is one rising-edge flip-flop on `clk`, with the same cycle-by-cycle
  behaviour. The original ANDs the register's write enable with `ph2`, to keep
  glitches away from the latch-based cells. That gating is not needed here: writes
  happen at the clock edge.
* **Reset.** The reset is synchronous and active high, as in the original. Here `rst`
  also resets the row and phase pointers directly. In the original they are reset
  only by the FSM's reset state. The LED registers reset to zero.
* **Storage cells.** They are flip-flops with an AND-gate read, not transistor-level
  cells. The complementary strobes `read_b` and `write_b` are still generated, but
  only checked, not used.
* **Naming.** The switch input is called `switches`, because `switch` is a
  SystemVerilog keyword.
* **Left out.** One write-back branch of the original controller can never act,
  because the row pointer is already at the top row at that point. It is left out.
* **Not modelled.** The I/O pads, the power pins and the pin assignment of the
  40-pin package are not modelled.

## Files

| file | contents |
|------|----------|
| `rtl/gol_pkg.sv` | `BOARD_N` and the controller state type |
| `rtl/core.sv` | top: `gameoflife` + `gol_register` |
| `rtl/gameoflife.sv` | controller, datapath and LED output registers |
| `rtl/controller.sv` | the state machine |
| `rtl/bitselector.sv`, `rtl/holdmem.sv`, `rtl/outputlogic.sv`, `rtl/tempmem.sv` | datapath |
| `rtl/gol_register.sv`, `rtl/wordline_cond.sv`, `rtl/bitline_cond.sv`, `rtl/sram_row.sv`, `rtl/sram12t_cell.sv` | board register |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks its results on its own. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and it has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_core \
    rtl/gol_pkg.sv tb/tb_core.sv
./obj_dir/Vtb_core
```

Replace `tb_core` with any other testbench name. Verilator finds the modules a
testbench uses in `rtl/` by their file names.

* `tb_core` runs the whole chip at its default size, acting as the user. It enters
  five fixed boards and runs three generations of each: all dead, alternating full
  and empty rows, all live, and two irregular boards. It compares the third
  generation with known results. It then runs random boards for four generations, a
  reset in the middle of a calculation, and a glider for eight generations. It reads
  the board back only through `ledpower`/`ledcolumn`, and compares every generation
  with its own Life model. It checks the 207-cycle generation time. It also counts
  each controller mechanism and fails if any never happened: memory clear, display
  scan, row input, end of input, generation, write-back, final-row write-back,
  out-of-board row, LED hold, and reset during a calculation.
* `tb_gameoflife` runs the same kind of test on the logic block alone, with a
  behavioural register model that also checks the access rules.
* `tb_controller` checks the controller's exact access sequence: the clear writes,
  the display loads, the input writes, the order of all 3N² reads of a generation
  with their `column` and `zerorow`, the `newbiten` timing, and the write-back rows,
  data and `finalrow`.
* The leaf testbenches test their modules exhaustively (outputlogic,
  wordline_cond) or with random stimulus against a model in the testbench.

The whole of `tb_core` simulates in well under a second.

## Changing the design

The board size is the parameter `N` of `core` (default `gol_pkg::BOARD_N = 8`). Every
module is written for a general N. The register, the pointers and the temp memory all
scale with it. A generation takes 3N cycles for row 0, 3N+2 for each middle row and
3N+3 for the last row: 3N² + 2N - 1 cycles in all, which is 207 for N = 8. The core has also
been simulated at N = 5 and N = 12, with random boards checked against a Life model.
The testbenches in `tb/` assume N = 8; to run them at another size, change their
sizes, the fixed boards and the 207-cycle figure. The display
period is set by `DWELL_BITS` in `controller`.
