// vt100_pkg -- shared geometry, memory map and types of the VT100 text-mode
// video subsystem.
//
// Screen: 640x480 pixels split into 8x16 pixel character cells, 80 columns.
// The shared video RAM is 1024 words of 32 bits, seen by the video hardware
// as 2048 16-bit words (the low half of a 32-bit word is the even 16-bit
// word).  16-bit word 0 and 1 (32-bit word 0) hold four 8-bit control
// registers; the text buffer starts at 16-bit word VGA_MEM_START.  The text
// buffer is a circular buffer of TEXT_ROWS rows of COLS cells; the start-row
// register names the buffer row shown at the top of the screen, so the
// software scrolls by changing one register instead of moving text.
//
// From the source design: 80 columns, 8x16 cells, 16-bit cells holding a
// colour part and a 7-bit character, the register word at address 0, the
// text start at 0x2, and the 4-bit colour with high intensity.  Own choices:
// 25 text rows (all that fit in 2048 words), the reverse flag in bit 15, the
// order of the colour bits and of the register bytes.
package vt100_pkg;

  // Character cell geometry (pixels).
  localparam int unsigned CHAR_W = 8;
  localparam int unsigned CHAR_H = 16;
  // Text geometry.
  localparam int unsigned COLS      = 80;
  localparam int unsigned TEXT_ROWS = 25;

  // Video RAM geometry: 32-bit words and the 16-bit cell address space.
  localparam int unsigned VRAM_AW = 10;                // 32-bit word address
  localparam int unsigned CELL_AW = VRAM_AW + 1;       // 16-bit word address

  // Memory map, in 16-bit words.
  localparam logic [CELL_AW-1:0] REG_ADDR      = 11'h000;
  localparam logic [CELL_AW-1:0] VGA_MEM_START = 11'h002;

  // 4-bit colour: bit 0 red, bit 1 green, bit 2 blue, bit 3 high intensity.
  typedef struct packed {
    logic hi;
    logic blue;
    logic green;
    logic red;
  } colour_t;

  // One 16-bit character cell as stored in video RAM and in the row buffer.
  typedef struct packed {
    logic       reverse;   // [15]   swap foreground and background
    logic [6:0] char_code; // [14:8] character, font ROM index
    colour_t    fg;        // [7:4]  colour of set glyph pixels
    colour_t    bg;        // [3:0]  colour of clear glyph pixels
  } cell_t;

  // Control register word (32-bit word 0 of the video RAM).
  typedef struct packed {
    logic [7:0] reserved;   // [31:24]
    logic [7:0] cursor_col; // [23:16]
    logic [7:0] cursor_row; // [15:8]  screen row of the cursor
    logic [7:0] start_row;  // [7:0]   buffer row shown as screen row 0
  } regs_t;

  // 8-bit colour as driven to the board's VGA resistor network.
  typedef struct packed {
    logic [2:0] red;
    logic [2:0] green;
    logic [1:0] blue;
  } rgb8_t;

endpackage
