# VT100-style terminal: text-mode VGA controller and shared video RAM

A serial terminal that understands ANSI (ECMA-48) escape sequences needs
three things: a serial port to the host, a keyboard, and a screen of
coloured characters. In this design a small soft processor does all the
protocol work in software: it parses escape sequences and decodes keyboard
scancodes. The hardware that is specific to the terminal is the video side,
and that is what this RTL implements: an 80-column character display at
640x480, 60 Hz, drawn from a text buffer that the processor writes into a
dual-port block RAM.

The main idea is **row buffering**. The processor may rewrite the video RAM at
any moment, and a display that read the RAM directly while scanning would
show half-updated rows. A second full frame buffer would double the memory.
Instead, the controller copies one text row (80 cells) into a small row
buffer during the horizontal blanking just before that row's first pixel
line. It then draws all 16 pixel lines of the row from that copy. A row is
therefore always self-consistent, at the cost of one 128 x 16 buffer.

```
          processor port (32-bit, byte enables)
                    |
              +-----------+  port B   +------------------- vga_controller ------------------+
              | video_ram |---------->| copy_logic --> row_buffer --> pixel_gen --> R G B  |
              | 1024 x 32 |  (read)   |     ^                 font_rom --^      ^    Hsync |
              +-----------+           |     +------ vga_timing (Hsync, Vsync, active)  Vsync|
                                      +------------------------------------------------------+
```

## The screen in memory

The video RAM holds 1024 words of 32 bits. The video hardware sees it as
2048 16-bit words: the low half of a 32-bit word comes first.

| 16-bit word | contents |
|---|---|
| 0-1 (32-bit word 0) | control registers: byte 0 start row, byte 1 cursor row, byte 2 cursor column, byte 3 unused |
| 2 ... 2001 | text buffer: 25 rows of 80 cells, row *b* at word 2 + 80*b |
| 2002 ... 2047 | unused |

Each cell is 16 bits:

| bits | field |
|---|---|
| 15 | reverse: swap foreground and background |
| 14:8 | character code (7-bit, indexes the font) |
| 7:4 | foreground colour |
| 3:0 | background colour |

A colour is `{high intensity, blue, green, red}`, from bit 3 down to bit 0. This
is the ANSI colour-index order, so SGR colour *n* maps straight to bits 2:0.

**Scrolling.** The text buffer is circular. The start-row register names the
buffer row shown on screen row 0. Screen row *r* shows buffer row
(start + *r*) mod 25. To scroll up by one line, the software clears the
oldest row and increments the start row. No text is moved. A start row of 25
or more is treated as 0.

**Cursor.** The cursor row is a *screen* row, 0-24, and the cursor column is
0-79. The cursor cell is drawn inverted: it is a steady block, with no
blinking. To hide the cursor, set either value outside the screen, for
example a row of 255.

The registers are read once per frame, at Vsync. Register changes therefore
take effect at the next frame and never in the middle of a picture. Cell
changes take effect from the next copy of their row.

Only 25 rows fit. With 8x16 cells, 640x480 has room for 30 rows, but 30 x 80
cells do not fit in the 2048-word memory next to the registers. Pixel lines
400-479 are drawn black.

## Row buffering (`copy_logic`)

The copy engine has two counters. The **main counter** is an 11-bit address
of 16-bit words: bits 10:1 address the 32-bit RAM, and bit 0, delayed by the
RAM's one-cycle latency, selects the half that goes to the row buffer. The
**row-buffer counter** is a 7-bit write address. A state machine drives both
counters from three inputs: Hsync, Vsync and the active-video signal.

1. **Vsync falling edge.** Load the main counter with 0 (REG_ADDR) and read the
   register word. Latch the cursor bytes. Multiply the start row by 80 and
   keep the product in a register.
2. **Load the top of the screen.** The main counter becomes
   2 (VGA_MEM_START) + start*80.
3. **Wait for Hsync.** On the Hsync falling edge of the last pixel line
   before a new text row, copy 80 cells, one per clock. If the main counter
   reaches the end of the text buffer (word 2002), it reloads
   VGA_MEM_START. This is the wrap of the circular buffer.
4. **Wait for active video.** After a copy, the machine waits until it sees
   active video, then returns to idle. At the top of the frame, several Hsync
   pulses arrive before any visible line; this wait keeps those blanking lines
   from triggering further copies.

Visible lines are counted on the falling edge of active video. A new copy
happens after every 16 visible lines. No copy happens after row 24.

**Timing.** The copy runs at the full clock rate (50 MHz). The pixel rate is
half of that. A copy finishes 82 clocks after the Hsync edge. Between the
Hsync edge and the next line's first visible pixel there are 144 pixel times,
which is 288 clocks. The row buffer is therefore never written while it is
being read, and an assertion in `copy_logic` enforces this.

## Pixel pipeline (`pixel_gen`)

The position from the sync generator is split at the cell size:

- column bits 9:3 select the character cell; they address the row buffer,
  which is read combinationally.
- column bits 2:0 select the pixel inside the glyph.
- row bits 9:4 give the text row, and row bits 3:0 the glyph row.

Each pixel passes through two stages:

1. **Stage 1.** The cell's character and the glyph row address the font ROM,
   which has a synchronous read. The column bits, the cell's colours and
   reverse flag, and the cursor match are registered alongside the ROM read.
2. **Stage 2.** The glyph bit for the registered column is computed as
   `glyph XOR reverse XOR cursor`. When it is set, the stage picks the
   foreground colour, otherwise the background. It then converts the 4-bit
   colour to the board's 8 output bits and registers the result together with
   the syncs.

RGB, Hsync and Vsync leave the controller two pixel clocks after the sync
generator's position, aligned with each other. Outside the visible area and
below text row 24 the output is black.

**Colour conversion** (`colour_conv`). The board has 3 red, 3 green and
2 blue bits:

| output bit | source |
|---|---|
| red 2, red 1, red 0 | red & hi, red, 0 |
| green 2, green 1, green 0 | green & hi, green, 0 |
| blue 1, blue 0 | blue & hi, blue |

The lowest red and green bits are never driven. A plain colour is mid-level.
High intensity adds the top bit.

## Font (`font_rom`)

The font ROM holds 128 glyphs of 8x16 pixels, one byte per pixel row, with
bit 7 as the leftmost pixel. Its address is `{glyph row[3:0], character[6:0]}`.
The rows for one pixel line of all characters therefore lie together.

- **Loading a real font.** Set the `FONT_FILE` parameter, which passes through
  `vga_controller`, to a `$readmemh` file of 2048 bytes in that address order.
  To convert an 8x16 console font (PSF, 16 bytes per glyph), put font byte
  `16*c + r` at ROM address `128*r + c`, for c < 128.
- **Built-in font.** Without a font file, the ROM computes a built-in font in
  which every glyph shows its own character code as two small hex digits.
  Codes 0x00 and 0x20 are blank. This makes the design usable and testable
  on its own, but it is not a text font.

## Sync timing (`vga_timing`)

The sync generator uses standard 640x480 at 60 Hz timing from a 25 MHz pixel
enable:

- **Horizontal:** 800 pixels per line (640 visible, 16 front porch, 96 sync,
  48 back porch).
- **Vertical:** 525 lines per frame (480 visible, 10 front porch, 2 sync,
  33 back porch).

Both syncs are active low. The porch and sync widths are parameters.

## What is not in this RTL

The rest of the terminal is built from standard cores and software. None of
it is included here:

- the soft processor with its local memory buses and the peripheral bus;
- a 16550-compatible UART for the host link, with FIFOs (the board does not
  wire the handshake lines);
- a PS/2 keyboard core that buffers one scancode and raises an interrupt per
  byte;
- GPIO for the baud-rate switches;
- an interrupt controller.

The escape-sequence parser, the keyboard decoding and the baud-rate selection
are C code. `vt100_top` therefore brings the processor's port of the video
RAM out as plain ports (`cpu_en`, `cpu_we`, `cpu_addr`, `cpu_wdata`,
`cpu_rdata`: one-cycle read latency, byte write enables). To build the full
terminal, connect that port to a memory-bus controller of your processor. The
VGA resistor network is off-chip.

## How far to trust it, and where it departs from the original

**Taken from the original design:**

- 640x480 at 60 Hz with 8x16 cells and 80 columns.
- 16-bit cells with a 7-bit character and two colour nibbles (foreground in
  bits 7:4, background in bits 3:0).
- A 32-bit video RAM with a 10-bit address.
- Registers at address 0 and text from 16-bit word 2.
- A start row multiplied by 80.
- The Vsync / Hsync / wait-for-output copy sequence.
- The half-word multiplexer and the two copy counters.
- The font ROM address split and the one-register column delay.
- Reverse, then cursor, inverting the foreground/background choice.
- The colour table above.

**Choices made here, where the original is silent or unclear:**

- **Rows and registers.** 25 rows. The order of register bytes 1 and 2. The
  reverse flag in bit 15. The order of the colour bits.
- **Copying and wrapping.** How the circular buffer wraps: the original's
  block diagram compares the counter with the start-row product, which does
  not by itself explain a wrap. The rule that a copy happens only before a new
  text row.
- **Clock.** A 50 MHz clock with a pixel enable (`CLK_DIV` = 2).
- **Pixel pipeline.** The colours are delayed together with the column bits,
  so each colour covers exactly its own eight pixels. There is an added output
  register.
- **Edge cases.** A background with its own intensity bit. The black band
  below the text. The handling of an out-of-range start row.
- **Font.** The bit order of the font (bit 7 leftmost) and the built-in
  placeholder glyphs.

Everything listed in the module headers has been simulated. The design has
not been run on an FPGA or mapped to one, so its size and clock rate on a
real part are unchecked.

## Files

| file | contents |
|---|---|
| `rtl/vt100_pkg.sv` | geometry, memory map, cell / colour / register types |
| `rtl/vt100_top.sv` | video RAM + VGA controller |
| `rtl/video_ram.sv` | 1024 x 32 dual-port RAM, byte enables on the processor port |
| `rtl/vga_controller.sv` | pixel enable, timing, copy logic, row buffer, font, pixel pipeline |
| `rtl/vga_timing.sv` | sync generator |
| `rtl/copy_logic.sv` | row-buffering state machine |
| `rtl/row_buffer.sv` | 128 x 16 row buffer |
| `rtl/font_rom.sv` | 2048 x 8 font ROM |
| `rtl/pixel_gen.sv` | pixel pipeline |
| `rtl/colour_conv.sv` | 4-bit to 8-bit colour |
| `tb/tb_*.sv` | one self-checking testbench per module, plus shared helpers |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. From the
repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/vt100_pkg.sv tb/tb_vt100_ref_pkg.sv tb/tb_vt100_top.sv \
    --top-module tb_vt100_top -o sim
./obj_dir/sim
```

Replace `tb_vt100_top` with any other testbench. `tb_font_rom_file` reads
`tb/font_sample.hex`, so run it from the repository root.

What the testbenches check:

- **`tb_vt100_top`** (also `tb_vga_controller`). Runs the design at its
  default parameters. It fills all 2000 cells through the processor port and
  compares every output pixel of five frames, blanking included, with a
  picture computed from the memory contents. The pixel position is recovered
  from the output syncs alone, so sync/colour alignment is checked as well.
  The five frames cover:
  - a start row of 0;
  - two scrolled frames whose rows wrap round the buffer end;
  - a rewrite of the row on screen, which must not show until the next frame,
    while the row below it must;
  - an out-of-range start row with a hidden cursor;
  - a start row of 24.

  Each mechanism is counted and must occur. This takes about 6 s.
- **`tb_copy_logic`** checks every copied row against the expected buffer
  row. It also checks:
  - 25 copies per frame;
  - that each copy lands on the last line before its text row;
  - that each copy takes at most 82 clocks;
  - the register values.
- **`tb_pixel_gen`** compares a whole frame of random cells, with reverse
  flags and a cursor, against the reference picture.
- **`tb_vga_timing`** measures the line and frame periods and the pulse
  positions, widths and visible area over two frames.
- **`tb_font_rom`** checks all 2048 bytes of the built-in font against glyph
  pictures.
- **`tb_font_rom_file`** checks loading a font file.
- **`tb_row_buffer`**, **`tb_video_ram`** and **`tb_colour_conv`** run random
  or exhaustive checks against reference arrays and the colour table.
