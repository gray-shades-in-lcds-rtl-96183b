# Amplitude-modulation gray-shade drive for passive-matrix LCDs

A passive-matrix LCD pixel responds to the rms voltage across it over a
frame. Amplitude modulation shows gray shades with line-by-line addressing.
Each row select time is split into two equal slots. During the two slots, the
column of a pixel with normalised gray shade g (−1 = ON, +1 = OFF) is driven to

    (g + √(1−g²))·Vc   and   (g − √(1−g²))·Vc

while its row is at Vr. The rms voltage across the pixel then becomes

    Vrms² = (Vr² − 2·g·Vr·Vc + N·Vc²) / N

which is linear in g. The best selection ratio comes with Vr = √N·Vc. Two
slots are enough for any number of shades. The cost is in the analog part.
With polarity reversal for DC-free drive, g symmetric shades need 2g−2
distinct column voltages, and a plain column driver would need a (2g−2):1
analog switch on every output.

This design's main idea is that only g of those voltages are in use at any
moment. Which g they are depends on two signals that are the same for all
columns: the time slot **QS** and the polarity **Q1**. A *common selection
block*, built once per driver, puts those g voltages on a bus. Every column
then needs only a g:1 switch, which saves g−2 switches per column. With a
suitable ordering of the two slot voltages, a polarity reversal of shade g
uses the same voltage as shade −g. Symmetric shades have complementary codes,
so the polarity reversal becomes a bit inversion of the pixel data. The
common block then shrinks to g 2:1 multiplexers switched by QS alone.

This repository holds the digital part of such a display system: the scan
controller, image memory, data complementer, common selection block (all three
variants), and cascadable row and column driver chips. Analog nets are
represented by numbers (see below). The defaults match the eight-shade system
the design was developed for, with panels of up to 256 × 256 pixels.

## Voltages and how the RTL names them

The g shades are g_k = (2k − (g−1))/(g−1), where k = 0 … g−1 is the 3-bit data
code (000 = −1 = ON, 111 = +1 = OFF). Let a_k = g_k + √(1−g_k²). Then
g_k − √(1−g_k²) = −a_(g−1−k). Every column voltage of every scheme is +a_k or
−a_k. Since a_0 = −1 and a_(g−1) = +1, there are 2g−2 different levels.

The analog voltage-level generator is not part of the RTL. Its outputs are
numbered, and an analog net is represented by the number of the generator
line it carries (`am_pkg`):

| line | voltage (×Vc), g = 8 | line | voltage (×Vc), g = 8 |
|------|----------------------|------|----------------------|
| 0 = +a0 | −1.0000 | 7 = +a7 | +1.0000 |
| 1 = +a1 | −0.0144 | 8 = −a1 | +0.0144 |
| 2 = +a2 | +0.4749 | 9 = −a2 | −0.4749 |
| 3 = +a3 | +0.8469 | 10 = −a3 | −0.8469 |
| 4 = +a4 | +1.1326 | 11 = −a4 | −1.1326 |
| 5 = +a5 | +1.3321 | 12 = −a5 | −1.3321 |
| 6 = +a6 | +1.4141 | 13 = −a6 | −1.4141 |

So `col_vlg[j]` is "which generator line column j is switched to". Row
electrodes are `row_level_t` values: `ROW_ZERO`, `ROW_POS` (+Vr) and
`ROW_NEG` (−Vr). The row levels come from three supplies. The generator
voltages themselves, the analog switches and the panel are outside this RTL.

## Addressing schemes

`am_pkg::column_level()` gives the generator line for any scheme, data code,
slot and polarity. In the table, *r* stands for √(1−g²), and Q1 = 1 negates
every entry.

| scheme | row, slot 1 / slot 2 | column, slot 1 | column, slot 2 |
|--------|----------------------|----------------|----------------|
| I      | +Vr / +Vr | g + r | g − r |
| II     | +Vr / −Vr | g + r | −g + r |
| III    | +Vr / −Vr | g − r | −g − r |
| II/III | +Vr / −Vr | II for g < 0, III for g > 0 | |

In schemes II and III the row waveform is DC-free within each row time. The
row sign is carried by Q2, which is 0 in scheme I and equal to QS otherwise.
The row driver uses P = Q1 xor Q2 (P = 0 selects +Vr).

### Why the 2:1 common block works

The 2:1 block (`common_select_2to1`) needs a scheme in which the voltage for
shade g at reversed polarity equals the voltage for shade −g at normal
polarity. This must hold in the same slot.

* **Scheme I, reordered.** In scheme I the row voltage is the same in both
  slots, so the slot order of the two column voltages does not matter. For
  the positive shades the design applies g − r first and g + r second. After
  that swap, the requirement holds.
* **Combined II/III.** Scheme II for the negative shades and scheme III for
  the positive ones satisfy it without any change.

Bus line k then carries, in each slot, the positive-polarity voltage of code
k. The controlled inverter (`controlled_inverter`) complements codes
loaded for reversed-polarity rows. A complemented code picks the mirrored
line, which carries exactly the reversed voltage.

Schemes II or III on their own lack this symmetry. With this block they
would need new column data in every slot. The default configuration
therefore runs the combined scheme II/III whenever II or III is requested.

### The Q1-switched 2:1 variant (schemes II or III alone)

Schemes II and III have a different symmetry. The sign of the √(1−g²) term
is the same in both slots. So the voltage that shade g needs in the second
slot is the one shade −g needs in the first.

In this variant the roles of the two control signals are swapped:

* Q1 switches the same 2:1 block. Line k carries code k's first-slot voltage
  at the present polarity.
* The column drivers complement their latched codes while QS = 1, through
  the `cpl` input of `column_driver`.

Data are loaded once per row, and no inverter is used before the shift
register. Select it with `COMMON_BLOCK = CB_2TO1_Q1`. A request for scheme I
or II/III then runs scheme II.

### The 4:1 variant

`common_select_4to1` has one 4:1 multiplexer per bus line, selected by
{Q1, QS}. Its inputs carry the two slot voltages at both polarities, so data
are never complemented. This variant supports schemes I (plain order), II,
III and II/III. Set `COMMON_BLOCK = CB_4TO1` on the top to use it.

## Block structure

```
            img port                              generator lines (2g-2)
               |                                          |
   +-----------v----+  codes  +------------+   +----------v-----------+
   | image_memory   |-------->| controlled |   | common_select_2to1   |
   | 2^16 x 3 bit   |         | inverter   |   | (or _4to1)           |
   +-----^----------+         +-----+------+   +----------+-----------+
         | {row,col}      q1_load   |                     | g-line bus
   +-----+----------+               v                     v
   | am_controller  |--shift/latch--> column_driver x4 (64 outputs each,
   |                |                 cascaded) ---------> col_vlg[255:0]
   |                |--shift/latch/Q1/Q2--> row_driver x4 (64 outputs each,
   +----------------+                 cascaded) ---------> row_level[255:0]
```

| module | role |
|--------|------|
| `am_pkg` | types (`row_level_t`, `scheme_t`, `pol_mode_t`), generator-line numbering, `column_level()` wiring function |
| `am_controller` | scan timing: memory addresses, shift enables, latch pulse, first-row token, Q1, QS, Q2 |
| `image_memory` | frame store of 3-bit codes, addressed {row, column}, 1-cycle read latency, with a write port for loading |
| `controlled_inverter` | XORs each code with the polarity of the row being loaded |
| `common_select_2to1` | g 2:1 multiplexers switched by QS (or by Q1 in the variant for schemes II/III alone) |
| `common_select_4to1` | g 4:1 multiplexers switched by Q1 and QS |
| `column_driver` | one chip: 3-bit wide shift register, latch, optional complement of the latched codes, g:1 output selects, cascade output |
| `row_driver` | one chip: 1-bit shift register, latch, ±Vr select bus switched by P = Q1⊕Q2, 2:1 output selects, cascade output; optionally a chain of `row_driver_stage` |
| `row_driver_stage` | one row stage with its own XOR and 3:1 switch decoder (+Vr, 0, −Vr) |
| `am_display_system` | top: everything above, with four cascaded chips of each driver |

Each driver chip has 64 outputs, which is typical of the driver ICs such a
system is built from. Four of each are cascaded to reach 256 × 256.

## Scan timing

All logic runs on one clock. The shift clocks and the latch pulse are
single-cycle enables. A row select time lasts L = 2·slot_eff cycles; QS is 0
in the first slot_eff cycles and 1 in the rest. While row n is displayed,
row n+1 is loaded:

| cycle t of the period | action |
|-----------------------|--------|
| 0 | row-driver shift; data bit = 1 only if the row being loaded is row 0 |
| 0 … M−1 | memory read of column M−1−t of the next row |
| 1 … M | column-driver shift of the (possibly complemented) code |
| L−1 | latch pulse in all chips; `cur_row` and Q1 advance |

* **Column order.** Columns are read last-first, so column j lands in driver
  output j.
* **Minimum slot.** `slot_len` is raised to ⌊(M+3)/2⌋ if it is too short for
  the M shifts; `slot_clamped` reports this.
* **Refresh rate.** A 256 × 256 panel at the minimum slot needs
  256 × 258 cycles per frame, so about 3.3 MHz gives a 50 Hz refresh.
* **Polarity.** Q1 is inverted after every frame (`POL_FRAME`) or after
  every `pol_rows_m1+1` rows (`POL_ROWS`). The row counter runs across
  frames. The controller keeps two polarity signals. `q1_load` is the
  polarity of the row being shifted in and feeds the inverter. `q1` is the
  polarity of the row on display and feeds the row drivers and the 4:1
  block.
* **Start-up.** Lowering `enable` restarts the scan at row 0 with positive
  polarity. `disp_valid` goes high after the first latch. Configuration
  inputs should change only while `enable` is low.
* **Stale row tokens.** When the panel has fewer rows than the driver chain,
  earlier tokens keep shifting through the unused outputs. Only the first
  `rows_m1+1` row outputs are meaningful. `rst_n` clears all driver
  registers.

## Top-level interface (`am_display_system`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `img_we`, `img_row`, `img_col`, `img_code` | in | write one pixel code into the frame store |
| `enable` | in | run the scan |
| `rows_m1`, `cols_m1` | in | panel size minus one (up to 256 × 256) |
| `slot_len` | in | slot length in cycles |
| `scheme` | in | `SCHEME_I`, `SCHEME_II`, `SCHEME_III`, `SCHEME_II_III` |
| `pol_mode`, `pol_rows_m1` | in | polarity reversal rule |
| `row_level[255:0]` | out | level of every row electrode |
| `col_vlg[255:0]` | out | generator line of every column electrode |
| `q1`, `qs`, `q2`, `latch`, `cur_row`, `disp_valid`, `frame_start`, `slot_clamped` | out | control and status |
| `row_cascade_out`, `col_cascade_out` | out | cascade outputs of the last chips, for extending the chains |

Parameters: `G` (shades, 8; must be even), `RB`/`CB` (address bits, 8),
`ROW_CHIPS`/`ROW_STAGES` (4 × 64), `COL_CHIPS`/`COL_STAGES` (4 × 64),
`COMMON_BLOCK` (`CB_2TO1_QS`; also `CB_4TO1`, `CB_2TO1_Q1`),
`ROW_STAGE_MUX3` (0: common-bus row drivers; 1: chains of 3:1 stages). The code width is ⌈log2 G⌉ and the generator-line width is
⌈log2(2G−2)⌉.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/am_ref_pkg.sv` holds the reference model.
It computes the column voltages straight from g ± √(1−g²) and models the
voltage-level generator as real numbers. It does not reuse the RTL's
numbering.

* `tb_am_display_system`: the top at its default size. It runs a 16 × 8 panel
  in scheme I, an 80 × 100 panel in scheme II/III with polarity reversal every
  3 rows, and one full 256 × 256 frame. In every cycle it checks every row
  and column electrode, the line period, QS, Q1 and `cur_row`. It also
  integrates the squared voltage across each pixel over a frame. It compares
  the rms with the equation above (Vr = √N·Vc) to 1e-9, and checks the 16-row
  selection ratio √(5/3) ≈ 1.291. It also counts that each mechanism occurred:
  frame and row-count reversal, complemented loads, Q2 toggling, slot clamp,
  scheme substitution, row and column cascade across chips, and every code in
  both slots. This is about 36 million checks and takes roughly 15 s.
* `tb_am_display_4to1`: the same checks for the 4:1 variant, covering schemes
  I, II, III and II/III.
* `tb_am_display_q1sel`: the same checks for the Q1-switched variant, covering
  schemes II and III and the substitution of scheme I. Its row drivers are
  built from 3:1 stages.
* `tb_am_power`: drive energy per row select time. Pixels are equal
  capacitors, and each voltage step dV costs C·dV²/2 in the driver
  resistance. From the system's outputs (4:1 block, schemes I and II) it sums
  that energy over a column, for every pair of consecutive gray shades
  g(i−1), g(i). The sums must match the closed forms (C = Vc = 1,
  Vr = √N). Let b = g(i−1) − √(1−g(i−1)²), c = g(i) + √(1−g(i)²) and
  d = g(i) − √(1−g(i)²). Then

      scheme I : N + N/2·(b² + 2c² + d² − 2bc − 2cd)
      scheme II: 3N − 2√N·(b + 2c + d) + N/2·(b² + 2c² + d² + 2bc + 2cd)

  Scheme I is cheaper for 37 of the 64 pairs, so neither scheme wins overall.
* Block testbenches for the controller (four configurations), row and column
  driver chips, inverter, both common blocks (also against the printed
  eight-shade voltage tables to 4 decimals) and memory.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/am_pkg.sv tb/am_ref_pkg.sv tb/tb_am_display_system.sv \
    --top-module tb_am_display_system -o sim
obj_dir/sim
```

Substitute the testbench name for the others.

## Where this RTL goes beyond, or departs from, the original system

* **Analog parts.** The voltage generator, the analog switches, the panel
  and the clock source are not modelled in RTL. Analog nets are line numbers.
  The original drove CMOS 8:1 analog multiplexers from a standard driver IC's
  latches.
* **Driver chips.** The original column driver IC shifts 4 bits, of which 3
  are used. Here the chips shift exactly ⌈log2 G⌉ bits. Chip size (64) and
  cascade depth are choices of this design.
* **Controller.** The cycle schedule, the slot clamp, the configuration
  encoding and the {row, column} address layout are this design's own. The
  original controller was a CPLD design of 91 logic cells. This one is not
  tuned to that size.
* **Image memory.** An EPROM or data buffer held the image. Here it is a RAM
  with a write port.
* **Reloading data every slot.** Schemes II or III alone with the QS-switched
  2:1 block would need a data reload every slot. That is not implemented.
  Those schemes run in the Q1-switched or 4:1 configurations instead.
* **Register model.** Latches are edge-loaded registers. Reset clears all
  driver registers. P = 0 selecting +Vr is an arbitrary but consistent
  choice.
* **Row drivers.** The row drivers default to the common-bus organisation
  of standard row-driver ICs. Stages with their own 3:1 switch give the same
  outputs (`ROW_STAGE_MUX3 = 1`).
