# Gray shades on a passive matrix LCD by amplitude modulation

A passive matrix LCD has no switch at each pixel. Each pixel sits where a row line crosses a
column line. It responds to the RMS of the voltage between them, taken over a whole frame.
With line-by-line (Alt-Pleshko) addressing, one row at a time gets a select voltage ±Vr while
the columns carry the data. Every pixel in a column therefore sees that column's voltage for
the whole frame, not just during its own row. Changing a column's amplitude to make one pixel
gray would also change every other pixel in that column.

This design avoids that by splitting each row-select time into two slots. For a gray fraction
k (−1 = fully on, +1 = fully off), the column gets

    Vc1, Vc2 = (k ± sqrt(1 − k²)) · Vc

in the two slots. The sum Vc1² + Vc2² = 2Vc² does not depend on k, so pixels in unselected
rows always see the same RMS voltage. The selected pixel receives, over a frame of N rows, the
mean square

    Vpix² = (Vr² − 2·k·Vr·Vc + N·Vc²) / N,     with Vr = sqrt(N)·Vc

This varies smoothly with k. Eight gray shades need only two frames per cycle (a normal frame
and a polarity-reversed one). Frame modulation would need many frames and pulse-width
modulation many narrow pulses, so this approach causes no flicker.

The RTL here is the digital half of such a drive system for a **16 × 16 panel with eight
shades (3-bit codes)**:

- a scan controller;
- the image memory;
- the gates that complement the data in alternate frames;
- the logic of the column and row driver chips;
- the analog multiplexer network that picks the column voltages, modelled on signed level
  codes.

## The voltage scheme, and why sixteen levels and two multiplexer stages suffice

Gray code g (3 bits) maps to k = (2g − 7)/7, so 000 → k = −1 (darkest, fully on) and
111 → k = +1 (fully off). Codes 000–011 use one sign arrangement of the correction term and
codes 100–111 the other. In both, the row is +Vr in slot 1 and −Vr in slot 2. Column
voltages in frame 1, in units of Vc:

| code | k    | slot 1  | slot 2  |
|------|------|---------|---------|
| 000  | −1   | −1      | +1      |
| 001  | −5/7 | −0.0144 | +1.4141 |
| 010  | −3/7 | +0.4750 | +1.3320 |
| 011  | −1/7 | +0.8470 | +1.1326 |
| 100  | +1/7 | −0.8470 | −1.1326 |
| 101  | +3/7 | −0.4750 | −1.3320 |
| 110  | +5/7 | +0.0144 | −1.4141 |
| 111  | +1   | +1      | −1      |

Frame 2 uses the negated voltages and the negated row polarity.

Two properties of this table shape the hardware:

1. **Fifteen distinct values, eight per slot.** A resistive ladder supplies levels V0…V14,
   falling from +1.4141 Vc (V0) to −1.4141 Vc (V14); V7 and V15 are unused. Eight 2:1
   multiplexers (`slot_mux_array`) produce X0…X7. Xg is the slot-1 or slot-2 voltage of code
   g, switched by the controller's `slot` signal:

   | X | X0 | X1 | X2 | X3 | X4 | X5 | X6 | X7 |
   |---|----|----|----|----|----|----|----|----|
   | slot 1 | V11 | V8 | V5 | V4 | V10 | V9 | V6 | V3 |
   | slot 2 | V3 | V0 | V1 | V2 | V12 | V13 | V14 | V11 |

   Each column then has an 8:1 multiplexer (`column_mux_bank`) that passes X[code]. All
   columns share X0…X7.
2. **Complementing the code negates the voltages.** The frame-1 voltages of code 7 − g are
   exactly the negatives of those of g. The polarity-reversed frame therefore needs no extra
   levels: the code from memory is XORed with `EXR` (`data_complement`), and the row polarity
   is inverted. Over the two frames every pixel's voltage averages to exactly zero.

The level values and the slot assignment of the multiplexer inputs are in `am_lcd_pkg`
(`LEVEL_CODE`, `SLOT1_SEL`, `SLOT2_SEL`). Analog voltages are carried as `volt_t`, a signed
16-bit code in units of Vc/10000, so the whole path can be simulated and checked.

## Scan timing

`clk` is the data shift clock (XSCL). In the intended system it runs at 25.6 kHz.

```
shift clock  : one pixel per cycle; the column driver shifts on the falling edge
row time     : 16 cycles   (columns c = 0..15 of the row being shifted in)
STR          : high in cycle c = 15; its fall (the rising clk edge that starts c = 0)
               latches the row into the column driver and clocks the row driver
displayed row: the row latched at the last STR fall (one row time behind the shifting)
slot         : 0 for c = 0..7, 1 for c = 8..15 (of the row time being displayed)
RINZ         : row-driver serial input; high across the one STR fall per frame that
               begins the display of row 0
EXR          : complement control for the codes being shifted in; toggles every frame
ROWINV       : row driver FR = (frame parity of the displayed row) XOR slot
frame        : 16 row times = 256 cycles;  two-frame cycle = 512 cycles
```

At 25.6 kHz this gives a 1.6 kHz strobe and 50 complete two-frame cycles per second. The
row driver selects a row with level V1 when ROWINV = 0 and VSSH when ROWINV = 1. The
system's supply wiring must make V1 = +Vr, VSSH = −Vr and the unselected levels 0 V.

## Controller modes

`am_lcd_controller` is a general line-by-line controller with three modes:

| opt | mode | size | addresses |
|-----|------|------|-----------|
| 0 | – | `mrow` × `mcol` (0 means 256) | linear 0 … rows·cols−1 each frame. `frame_pulse` marks the last cycle of every frame for external address logic. |
| 1 | 0 | 16 × 16 | {0000, `preset`, row, col}: shows the 256-byte image chosen by `preset` |
| 1 | 1 | 16 × 16 | {0000, image, row, col}: image starts at 0 and steps after every two-frame cycle, through 16 images |

The row time in variable mode is `mcol` cycles, and the slot split is at `mcol`/2. A size
needs at least two columns.

## Files

| file | contents |
|------|----------|
| `rtl/am_lcd_pkg.sv` | `volt_t`, level table, multiplexer input table, driver level enums |
| `rtl/am_lcd_system.sv` | top: everything below, wired as one display system |
| `rtl/am_lcd_controller.sv` | scan controller: counters, address modes, STR, RINZ, EXR, ROWINV, slot |
| `rtl/image_eprom.sv` | 8k × 8 image memory, asynchronous read, optional `INIT_FILE` |
| `rtl/data_complement.sv` | code XOR EXR |
| `rtl/sed1180_column_driver.sv` | column driver logic: 16 × 4-bit shift register, 64-bit latch, output level table |
| `rtl/sed1190_row_driver.sv` | row driver logic: DI latch, 64-bit shift register, output level table |
| `rtl/slot_mux_array.sv` | eight 2:1 level multiplexers |
| `rtl/column_mux_bank.sv` | one 8:1 level multiplexer per column |

Top-level interface of `am_lcd_system` (parameters `N_ROWS = 16`, `N_COLS = 16`,
`INIT_FILE = ""`):

- inputs: `clk`, `rst_n`, the mode inputs, and `level[16]`, the generator voltages as
  `volt_t`;
- outputs: `col_v[16]`, the column electrode voltages; `row_level[16]`, the supply level
  chosen for each row electrode; and the controller signals, for observation.

Without `INIT_FILE` the memory holds a test picture. Byte {image, row, col} holds
(row + col + image) mod 8, a diagonal ramp through all eight shades. To show your own
pictures, give a hex file: one byte per line, the code in bits 2:0, 256 bytes per 16 × 16
image, row-major.

## Outside the RTL

These parts are analog and are represented only by the top-level ports:

- **Level generator.** A resistive divider with buffers, smoothing capacitors and a contrast
  potentiometer supplies V0…V15 and the row levels. The design needs the ratios in the
  package table. Their absolute scale sets the contrast.
- **Shift clock oscillator.** An RC astable multivibrator at 25.6 kHz drives `clk`.
- **Power-on reset.** An RC network and a buffer hold `rst_n` low at power-up.
- **The panel.** The testbench computes pixel RMS voltages in its place.

The chip models omit analog behaviour. The column driver model also leaves out the
daisy-chain enable output and its clock, which a single-driver system does not use.

## Where the RTL makes its own choices

These points are interpretations or additions. Check them before relying on the design:

- **One strobe per row; both slots inside that row time.** The row data is latched once per
  row. The two slots come from the `slot` switch of the 2:1 multiplexers and the mid-row
  flip of ROWINV. The alternative is to shift every row twice, once per slot. That would
  double the strobe rate and conflict with the row shift clock running at the latch-pulse
  rate. The "16 × 16 × 2 code sets per frame at 50 frames/s" budget is read as counting the
  two frames of one cycle.
- **Signals for which only the function is specified:** the slot output, the split point at
  half the row time, and ROWINV = parity XOR slot. The exact edges of STR and RINZ, and the
  timing of `frame_pulse`, are this design's choices too.
- **Derived from the voltage tables:** which multiplexer input belongs to which slot, and
  the level values V0…V14. D0 is taken as the least significant select bit of each column
  multiplexer.
- **Address layout and interface choices:**
  - the 16-bit address width;
  - 0 meaning 256 for the size inputs;
  - the separate `preset` input;
  - stepping images once per two-frame cycle;
  - an asynchronous, active-low reset.
- **Driver chip details:** the nibble order in the column driver (first nibble to segments
  0–3) and the direction of the row shift (toward COM63).
- **Row driver level table.** The output-level table (inh_n, fr, data → VDD/V1/V4/VSSH) is
  implemented as specified. How the four supply pins map to +Vr, 0 and −Vr depends on the
  board wiring.
- **The driver models have no reset,** like the chips. Their outputs are undefined until one
  row has been latched and one frame marker has passed through. Re-asserting `rst_n`
  restarts the controller, but a scan token already in the row driver keeps moving until it
  leaves the panel's rows, so for one frame two rows can be selected.
- **Not implemented:** the controller's "flexible phase control" (for example, reversing
  polarity every few rows instead of every frame). Only the per-frame reversal is built.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/am_lcd_pkg.sv tb/tb_am_lcd_system.sv --top-module tb_am_lcd_system
./obj_dir/Vtb_am_lcd_system
```

Replace the testbench name to run another.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_am_lcd_system` | Whole system at default size, through all modes. The testbench acts as the level generator and the panel, and sums each pixel's voltage and its square over a two-frame cycle. Checks per pixel: DC sum zero; mean square equal to (Vr² − 2kVr + N)/N within 0.2 %; RMS ratio between shades matching the theoretical RMS table for a 10 V supply within 0.2 %. Also checks: exactly the right row selected with the right polarity in every cycle; 16-cycle strobe spacing; 512-cycle two-frame cycle; preset and stepped images; variable mode with its frame pulse. Counts slot switches, polarity reversals, frame markers, image steps and mode changes, and fails if any never happened. |
| `tb_am_lcd_controller` | Every output, every cycle, against a reference computed from the cycle number. Covers each mode and the sizes 16×16, 5×7, 3×4, 2×256 and 16×16 variable, plus the 16- and 512-cycle periods. |
| `tb_slot_mux_array` | Multiplexer routing against the input pairs above, and resulting voltages against the table. |
| `tb_column_mux_bank` | Random levels and segment data. |
| `tb_sed1180_column_driver` | Shift, latch, hold while shifting, EI gating, level table. |
| `tb_sed1190_row_driver` | Token walk, DO, DI latch hold, level table. |
| `tb_data_complement` | Exhaustive. |
| `tb_image_eprom` | Every address of the built-in picture, plus loading `tb/test_image.hex` through `INIT_FILE`. |

The full system testbench simulates about 6,000 shift clocks and finishes in well under a
second.
