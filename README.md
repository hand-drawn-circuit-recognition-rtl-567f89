# Hand-drawn circuit recognizer

This design turns a circuit drawn by hand on grid paper into a SPICE netlist. It is written
in SystemVerilog for an FPGA. The sheet is scanned as a 512x512, 1-bit bitmap. The paper
carries an 8x8 grid of 64-pixel squares, and each square holds exactly one thing: a component
(resistor, capacitor, voltage source, NPN transistor, ground, supply), a wire, a wire junction,
or nothing. Components have their value written by hand in the lower right corner of their
square: one digit and one multiplier letter (F P N U m K M).

The hardware does three jobs:

1. It **recognizes** every square: its component type, value digit and multiplier.
2. It **analyses** the grid to find the electrical nodes and number them.
3. It **shows** the result on an 800x600 VGA screen in one of three modes, and **sends** the
   netlist as text over a serial line.

Because everything is on a fixed grid, recognition works one square at a time with a few
cheap pixel tests, and node finding is a graph search over 64 cells. There is no general
image processing anywhere.

## Top level

`hdcr_top` holds the whole system on one clock. That clock is the 50 MHz pixel clock.

| port | use |
|---|---|
| `img_load_we/addr/data` | writes the 4096 x 64-bit image ROM (hold `rst` while loading) |
| `rst` | synchronous reset; recognition starts by itself when it is released |
| `recog_done` | high once all 64 squares are recognized |
| `mode[1:0]` | 0 = raw scan, 1 = redrawn circuit, 2 = SPICE text, 3 = blank |
| `send` | a pulse, once the SPICE text exists, sends it on `uart_tx` (9600 baud, 8N1) |
| `vga_*` | 24-bit RGB, `blank_n` and composite sync for a video DAC, plus hsync/vsync |

Parameter: `CLKS_PER_BIT` (default 5208, which is 50 MHz / 9600).

Memories, all built as arrays:

- image ROM: 64 x 4096 bits;
- row RAM and column RAM: 64 x 64 bits each;
- results RAM: 20 x 64 bits;
- node value RAM: 7 x 112 bits;
- stack RAM: 7 x 64 bits;
- spice text RAM: 8 x 2048 bits;
- video RAM: 8 x 60000 bits.

The shared RAMs are single-port. `video_major` multiplexes them, so the design has no
tristate buses.

## Image layout

ROM word `a` holds pixels `(a mod 8)*64 .. +63` of image row `a/8`. Bit 63 is the leftmost
pixel, and 1 = ink.

Grid lines must fall on the last row and column of every square (pixel 63 of the square). The
text reader uses this to align itself.

`tb/tb_img_pkg.sv` draws test sheets and shows every symbol in the form the recognizer
expects.

## Recognition (`recog_fsm` and its minor FSMs)

`recog_fsm` walks the squares 0..63 and runs three minor FSMs on each one in turn (memory, chooser, text). After the
last square it reads the results back once and holds `recog_done`. The whole sheet takes
about 545,000 cycles (11 ms).

### `mem_fsm`: fill the row and column RAMs

It copies the square's 64 rows from the image ROM into the row RAM. It then builds the
columns with a single 64-bit shift register: one pass over the row RAM per column, shifting
in that column's bit of each row, and writes the register to the column RAM. This trades
time for area. After this, every test can read any row or any column in one cycle. The copy
takes 8,385 cycles per square.

### `choose_fsm`: the edge check

It reads rows 3/4 and 58/59 and columns 3/4 and 58/59, looking for ink at the centre
(pixels 31–32). Ink there means a wire leaves the square on that side. This gives 4 bits
{top, bottom, left, right}.

Most patterns name the square directly:

- a connector or corner;
- a tee or cross;
- a stub;
- the positive supply;
- blank.

Five patterns need a closer look, and for those it starts `shape_fsm`:

| edges | test | result |
|---|---|---|
| left+right | horizontal two-terminal | capacitor, source, resistor or wire |
| top+bottom | vertical two-terminal | same |
| top only | one-terminal | ground or negative supply |
| top+bottom+left | three-terminal | NPN (base left) or tee |
| top+bottom+right | three-terminal | NPN (base right) or tee |

### `shape_fsm`: the shape tests

These read the square line by line across the component axis. Only pixels 4..59 are used,
and the corner where the value is written (lines and pixels ≥ 38) is ignored.

For two-terminal components the tests are applied in this order:

1. **Discontinuity**: some line across the axis has no ink. The result is a capacitor; for a
   one-terminal square, ground.
2. **Gap**: a run of at least `GAP_MIN` = 12 lines with no ink on the centre line, but ink
   around it. The result is a source (the diamond).
3. **Thick**: some line has at least `THICK_MIN` = 8 inked pixels. The result is a resistor.
4. Otherwise the result is a wire.

For three-terminal components, a vertical line with at least `TEE_MIN` = 50 inked pixels is
the through-line of a tee. A shorter one is the base bar of a transistor.

The three thresholds are this design's. They are parameters of `shape_fsm`.

### `text_fsm`: the value

1. **Align.** If column 63 is not fully inked but column 62 is, the square was scanned one
   pixel to the left, and the boxes are read one pixel over. Rows 63/62 are handled the same
   way. This corrects a one-pixel shift.
2. **Read the boxes.** The digit box is at rows 38–47 and the letter box at rows 48–57; both
   are 10 rows x 8 columns at columns 46–53. The 80 pixels of a box fill an 80-bit register.
3. **Match.** Each character is modelled as a set of up to nine strokes: the seven-segment
   bars plus two centre stems (`hdcr_pkg::digit_segs`, `mult_segs`).
   - Each stroke has a "pad", a mask of pixels where that stroke is drawn (`pad_mask`).
   - A candidate matches when every pad of its strokes is touched and every pad of its
     missing strokes is clear.
   - The box is accepted when exactly one candidate matches.
   - Otherwise the digit is F (empty) and the multiplier is 7 (none).

### Result word

Each square's result is one 20-bit word, `result_t`:

    [19:15] component type (hdcr_pkg::comp_t, 0 = blank)
    [14:3]  three 4-bit digit slots, F = empty
    [2:0]   multiplier: 0 F, 1 P, 2 N, 3 U, 4 m, 5 K, 6 M, 7 none

## Node analysis (`analysis` with `stack`)

This is the least obvious part of the design.

**Node slots.** Every interior boundary between two squares is a possible node: 56
horizontal boundaries plus 56 vertical ones make 112 slots in the node value RAM
(`hdcr_pkg::edge_slot`):

- the boundary below square (r,c) is slot `r*8+c`;
- the boundary to its right is slot `56 + r*7 + c`.

**Labels.** Label 0 is ground, 113 means "no label yet", and new labels count up from 1.

**The search.** It is depth-first, with a 64-bit "already queued" register:

1. Clear all slots to 113.
2. Push the first non-blank square onto the stack.
3. Pop a square. Read its type and the slots on its terminal edges. Border edges have no
   slot. Then apply the rules:
   - **Wire or junction**: all its terminals are one node. They take the lowest label already
     present, or a new label if none has one. Any other label found on them is then
     replaced everywhere by that lowest label, with one 112-slot pass of the RAM per label
     (224 cycles). This is how two parts of a net that were labelled separately get merged.
   - **Ground**: its terminal gets 0. An old label there is replaced by 0 everywhere.
   - **Component**: terminals without a label get new labels; labelled ones are kept.
4. Push each neighbour across a terminal edge that has not been queued yet. Repeat from 3
   until the stack returns its start-of-stack symbol (127).

The result is one label per electrical node:

- merging always keeps the lowest label;
- ground always wins;
- labels can have gaps, because merged labels are not reused.

**The stack** is a 7 x 64 RAM with a stack pointer. Reset writes the start-of-stack symbol at
address 0. Commands are 2 = push and 3 = pop, each held for three cycles, and a pop returns
the data with `pop_valid`. The bidirectional data bus a stack like this would normally use is
split into `push_data` and `pop_data`.

Only the squares connected to the first non-blank square are visited. A sheet is expected
to hold one connected circuit.

## Video

**Read side.** `sync_gen` produces 800x600 at 72 Hz from the 50 MHz clock:

- horizontal: 800 active, front porch 56, sync 120, back porch 64 (1040 clocks per line);
- vertical: 600 active, front porch 37, sync 6, back porch 23 (666 lines);
- both syncs are active high.

`display_manager` reads byte `row*100 + col/8` of the video RAM. It delays the syncs to
match the RAM latency, and forms the composite sync as XNOR(hsync, vsync). A 1 in the frame
buffer is white.

**Write side.** `video_major` gives the frame buffer to one writer, chosen by `mode`. It
passes through an idle state on every change, so the old writer sees its `active` fall and
returns to idle. The redrawn-circuit and SPICE writers wait for `recog_done`.

Each writer clears the screen, draws, and then waits with `done` high:

- **`raw_display`** copies the scan, inverted so ink is black, centred at byte 18 and line 44.
  Each write takes 3 cycles, about 290,000 cycles in all.
- **`ideal_display`** first starts the analysis. Then, for each square, it draws:
  - the 64x64 sprite from `comp_rom`;
  - the value digits at (40,48), (48,48) and (56,48) within the square;
  - the multiplier at (56,56);
  - two-digit node labels beside each labelled terminal of a component: above it, left of
    it, right of it and below it.

  Left and top labels reach into the neighbouring square. Sprites and characters are
  computed, not stored: `comp_rom` builds each sprite from the type, and `char_rom` builds a
  5x7 stroke font from the same stroke codes the text reader uses.
- **`spice_display`** first starts the analysis. Then it writes the netlist into the spice
  text RAM, ends it with EOT (0x04), and draws it with `char_rom`, 21 characters per line,
  starting at byte 39.

Example netlist lines, one per resistor, capacitor, source or transistor; supplies, grounds
and wires produce none:

    V1   3  0    DC   47
    R1  12 --          3K
    Q1   7  8  0 NPN
    C1   0 10          1U

The columns are:

- label, made of the letter and a per-letter count;
- the node labels, with "--" for a terminal that has no label, in the order left/right or
  top/bottom (collector, base, emitter for a transistor);
- the type field, "DC" for a source and "NPN" for a transistor;
- the value digits and the multiplier.

Every line is padded to 21 characters and ends in LF.

**`serial_export`** sends the text RAM up to the EOT byte as 8N1 frames once `send` is pulsed
and the text is complete.

## Where this differs from the original design, and how far to trust it

- **Text reading is simplified.** Only one value digit per component is read; the result
  word has room for three, and the other two slots stay F. The pads come from this design's
  stroke model rather than hand-tuned pixel sets, and the box positions inside the corner
  are this design's choice. Expect it to need tuning for real handwriting; the testbenches
  use characters drawn exactly on the stroke model.
- **Shape thresholds** (`GAP_MIN`, `THICK_MIN`, `TEE_MIN`) were chosen for the test drawings
  in `tb_img_pkg`, not measured on scans.
- **One clock.** The design runs on one clock, and the clock generator an FPGA would use
  (a DCM) is not included. The video DAC is external; its signals are top-level ports.
- **Memories and buses.** Memories are single-port arrays behind a multiplexer, with no
  tristate buses. The image ROM has a load port instead of being fixed at build time.
- **Sprites and font** are generated by logic, and only approximate conventional symbols.
- **Own choices.** The serial format (9600 baud 8N1, EOT as end of file), the netlist column
  layout, and the fact that supplies and grounds get no netlist line are this design's
  choices.

## Simulating

Each module `rtl/<name>.sv` has a self-checking testbench `tb/tb_<name>.sv`. Each testbench:

- prints `TB_RESULT checks=N failures=M`;
- stops itself with a watchdog.

Shared test code:

- `tb/tb_img_pkg.sv` draws test sheets (grid, every component symbol, characters);
- `tb/tb_common.svh` holds the check macros.

To run one testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
      rtl/hdcr_pkg.sv tb/tb_img_pkg.sv rtl/*.sv tb/tb_hdcr_top.sv --top-module tb_hdcr_top
    obj_dir/Vtb_hdcr_top

`tb_hdcr_top` runs the whole design at its default parameters (under a minute of
wall-clock time with Verilator). It draws a two-loop circuit (a source, three resistors, two capacitors, two
grounds, a cross, tees, corners and wires) and then:

1. loads the drawing;
2. checks all 64 result words;
3. checks the raw frame buffer byte for byte;
4. checks the ground and net labels after the redraw;
5. checks the SPICE text;
6. decodes the 9600-baud serial output and compares it with the text;
7. checks the VGA line and frame periods throughout.

Block-level testbenches of note:

- **`tb_recog_fsm`** recognizes all 25 symbol types on one sheet.
- **`tb_analysis`** compares node labels against a union-find model.
- **`tb_text_fsm`** reads all ten digits and seven multipliers, both aligned and shifted by
  one pixel.
