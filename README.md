# Frame change data driving for ferroelectric LC panels

A ferroelectric liquid-crystal (FLC) pixel is bistable. A short pulse of one
polarity switches it on, a pulse of the other polarity switches it off, and a
small voltage of either sign leaves it alone. Its net DC voltage must also
average to zero, or the liquid crystal degrades. A matrix panel therefore needs
bipolar pixel voltages of ±Vs. The usual way to get them is to give the drivers
a split supply that swings the full 2·Vs.

The frame change data driving scheme (FCDDS) gets ±Vcc across the pixel from
drivers that only output the four positive levels of an ordinary STN
(supertwisted nematic) driver. Those levels are 0, Vcc/3, 2Vcc/3 and Vcc. The
trick is to split the work between two frames:

* In the **'0' frame** (F = 0), every row is scanned once and pixels whose data
  is 0 are switched **off**.
* In the **'1' frame** (F = 1), every level on every row and column is mirrored
  about Vcc/2 (level → Vcc − level). Pixels whose data is 1 are switched **on**.

Each scan line lasts two switching times τ. S = 0 marks the first τ and S = 1
the second.

This repository holds synthesizable SystemVerilog for:

* the modified 80-output row/column driver chip that produces these waveforms;
* a 640 × 400 panel drive system built from 13 of these chips.

## The waveforms

Levels are written as multiples of Vcc/3: V0 = 0, V1 = Vcc/3, V2 = 2Vcc/3,
V3 = Vcc. The pixel sees the row level minus the column level.

| F | S | selected row | other rows | column, data 0 | column, data 1 |
|---|---|---|---|---|---|
| 0 | 0 | V1 | V1 | V2 | V0 |
| 0 | 1 | V3 | V1 | V0 | V2 |
| 1 | 0 | V2 | V2 | V3 | V1 |
| 1 | 1 | V0 | V2 | V1 | V3 |

The resulting pixel voltages:

* **Selected row, '0' frame.** A data-0 pixel sees −1, then **+3**, so it
  switches off. A data-1 pixel sees +1, +1 and keeps its state.
* **Selected row, '1' frame.** A data-1 pixel sees +1, then **−3**, so it
  switches on. A data-0 pixel sees −1, −1 and keeps its state.
* **Any other row.** Every pixel sees −1/+1 or +1/−1. This never switches
  anything and has no DC.

The selected-row pulses do carry DC within one frame: +2 in the '0' frame and
−2 in the '1' frame. Over a '0'+'1' frame pair, every pixel's net DC is zero.
No pixel ever sees ±2. The smallest non-switching voltage is Vcc/3 and the
switching voltage is Vcc.

Sign convention: here +Vcc switches a pixel off and −Vcc switches it on. If a
cell is built the other way round, swap the meaning of the data bit.

## Driver chip (`flcd_driver`)

One chip has 80 outputs Y1..Y80. The `ch1` pin sets its role:

* **Column driver (`ch1 = 1`).**
  * Latch circuit 1 (`fcdds_latch1`, 20 × 4 bits) collects one line of data
    from D0–D3, one nibble per CL2 strobe.
  * Strobes count only while the chip is enabled (`e_n` low).
  * The controller (`fcdds_controller`) counts the nibbles. The selector
    (`fcdds_selector`) turns the count into the write enable of one nibble
    slot.
  * After 20 nibbles the chip is full: it ignores further strobes and drives
    `car_n` low. That enables the next chip of the cascade.
  * A CL1 strobe copies the line into latch circuit 2 (`fcdds_latch2`) and
    clears the count.
* **Row driver (`ch1 = 0`).**
  * Latch circuit 2 is a shift register.
  * Each CL1 strobe moves the scan bit one line on. The bit enters on `e_n`
    and leaves on `car_n`; both are active high in this mode.
  * `shl` picks the direction: 1 = Y1 towards Y80.

Each output takes its latch-2 bit (R for a row, C for a column), F and S to
two more stages:

1. The **data encoder** (`fcdds_encoder`) forms the select pair (M, D):
   * row: M = F, D = S·R
   * column: M = S xnor C, D = F xor S xor C
2. The **drive circuits** (`flcd_drive`) pick the level from (M, D) using the
   STN driver's own tables:

   | M D | 00 | 01 | 10 | 11 |
   |---|---|---|---|---|
   | row | V1 | V3 | V2 | V0 |
   | column | V1 | V0 | V2 | V3 |

So the output stage of a stock STN driver is left as it is. Only the encoder
is new.

### Why the encoder equations look the way they do

The only equations that produce the waveform table through those two STN
tables are:

* row: D = S·R (selected row only during the second slot), M = F;
* column: D = F xor S xor C, M = S xnor C.

A form of the encoder in which the column M depends only on F and S (one
signal per chip, as in a stock STN driver) cannot produce the column
waveforms through the column table above. For example, at F = 0, S = 0 a
data-0 column needs (M, D) = (1, 0) but a data-1 column needs (0, 1).
Therefore **M is formed per output in column mode**. This is the one
structural point where the RTL departs from an "M per chip" picture. The
waveforms themselves are exactly those of the table above.

### Chip timing

* The chip runs on one clock `clk`. CL1 and CL2 are one-cycle strobes sampled
  on it (the real part uses them as clock edges).
* `y_level` follows latch 2 one clock after CL1, and follows F and S
  combinationally. Change F and S on the CL1 clock edge.
* `car_n` (column mode) goes low the clock after the 20th nibble, so the next
  chip takes the very next CL2 strobe.
* `rst_n` is asynchronous and active low. It clears both latches and the
  count.
* Levels come out as `fcdds_pkg::level_e` codes 0..3. The analog switches to
  the four supply levels are not modelled.

## Panel system (`fcdds_panel`, the top)

The default is ROWS = 400, COLS = 640 and NCH = 80. The system has two chains
of chips:

* **5 row chips.** Chained `car_n` → `e_n`; the first chip's `e_n` is FLM.
* **8 column chips.** Chained `car_n` → `e_n`; the first chip's `e_n` is tied
  low.

All chips share CL1, CL2, D0–D3, F, S and SHL.

The controller driving the top must repeat the following for every line:

1. At the start of the line, strobe `cl1`. Hold `flm` high on that strobe for
   the first line of a frame.
2. Set `f` for the frame. Set `s` low for the first τ and high for the second.
3. During the line, send the **next** line's 160 nibbles with `cl2`. Nibble n
   carries columns 4n..4n+3, with D0 on the lowest column.

Line k's data therefore travels during line k−1. One priming line is needed
before the first frame.

To show an image, send it once with F = 0 and then once more with F = 1.

Timing budget at a 60 Hz frame rate with τ ≈ 20 µs:

* 400 lines × 2τ = 16 ms, which fits in the 16.7 ms frame.
* 160 CL2 strobes per 40 µs line need a clock of at least 4 MHz.

`row_level[r]` and `col_level[c]` are the levels of scan line r+1 and data
line c+1 (for `shl = 1`). With `shl = 0` each chip serves its 80 lines in
reverse order. Change SHL only when no scan bit is in the row chain; one
idle line with FLM low is enough. The last chip of each chain has no successor, so its
carry is left open; lint reports that carry link as unused.

Not included:

* the display controller that produces FLM, CL1, CL2, D, F and S;
* the resistor ladder that makes the four levels;
* the F-switched level generator used when stock STN drivers are fitted
  instead of this chip.

The controller is a commercial part; the other two are analog circuits.

## Files

| file | content |
|---|---|
| `rtl/fcdds_pkg.sv` | level type and chip sizes |
| `rtl/fcdds_encoder.sv` | data encoder (F, S, R/C → M, D) |
| `rtl/flcd_drive.sv` | level selection from (M, D) |
| `rtl/fcdds_controller.sv` | nibble counter, chip full / carry |
| `rtl/fcdds_selector.sv` | nibble-slot decoder |
| `rtl/fcdds_latch1.sv` | 20 × 4-bit line latch |
| `rtl/fcdds_latch2.sv` | 80-bit latch / bidirectional shift register |
| `rtl/flcd_driver.sv` | one driver chip |
| `rtl/fcdds_panel.sv` | 13-chip 640 × 400 panel drive (top) |
| `tb/tb_fcdds_ref_pkg.sv` | waveform tables used as the reference |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`:

* **`tb_fcdds_encoder`, `tb_flcd_drive`:** exhaustive checks against the
  waveform table and the (M, D) tables.
* **`tb_fcdds_latch1`, `tb_fcdds_latch2`, `tb_fcdds_selector`,
  `tb_fcdds_controller`:** random stimulus against cycle models.
* **`tb_flcd_driver`:** a full 80-output chip.
  * Column mode in both SHL directions, including ignored nibbles before
    enable and after full.
  * Row mode: a scan bit walked through all 80 outputs and out on the carry.
* **`tb_fcdds_panel`:** the full 640 × 400 system at default parameters.
  * The stimulus is three random images, each as a '0' + '1' frame pair, with
    τ = 100 clocks. The third is shown with `shl = 0`, so each chip serves its
    lines in reverse order.
  * A pixel model switches pixels on −Vcc and off on +Vcc, starting from
    random states.
  * It checks every row and column level at every τ slot.
  * It checks that no pixel ever sees ±2Vcc/3 and that both ±Vcc occur.
  * After each frame pair it checks that the panel equals the image and that
    every pixel's net DC is zero.
  * It also requires each of these events to have happened: pixels switched
    off and on, a frame-slot change, the scan bit crossing row chips, and the
    column enable passing between chips, and lines scanned with `shl = 0`.
  * It runs in about 50 s.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fcdds_pkg.sv \
    tb/tb_fcdds_ref_pkg.sv tb/tb_fcdds_panel.sv --top-module tb_fcdds_panel
./obj_dir/Vtb_fcdds_panel
```

The other testbenches are built the same way with their own top module.

## Design choices not fixed by the scheme

* **Clocking.** CL1 and CL2 are strobes on a chip clock, not clocks of their
  own. Reset is asynchronous and active low.
* **Row mode E/CAR.** `e_n`/`car_n` carry the scan bit unchanged, active
  high.
* **Nibble order.** D0 drives the lowest-numbered output of its nibble. For
  `shl = 0` a column line is loaded mirrored, so the first data lands on Y80.
* **Strobe collision.** CL1 wins over CL2 in the same clock.
* **Column M.** It is formed per output, as explained above.
* **Outputs.** Outputs are level codes, not analog voltages.
