// pixel_gen -- character pixel pipeline of the VGA controller.
//
// The pixel position from the sync generator is split at the cell size:
// column[9:3] is the character column and addresses the row buffer,
// column[2:0] is the pixel inside the glyph; row[3:0] is the glyph row and
// row[9:4] the text row.  Per pixel (pix_en):
//   stage 1  the cell read from the row buffer gives the character, which
//            with row[3:0] addresses the font ROM (synchronous, so its byte
//            appears here); column[2:0], the cell's colours and reverse flag,
//            the cursor match and the syncs are registered alongside it.
//   stage 2  the glyph bit for the delayed column selects foreground (set)
//            or background (clear); the reverse flag inverts that choice and
//            the cursor position inverts it once more (a block cursor); the
//            4-bit colour is converted to 8-bit RGB and registered together
//            with the syncs.
// Latency: RGB, hsync_o and vsync_o are two pixel clocks behind the
// position, syncs and colours stay aligned.  Outside the visible area and
// below the last text row the output is black.  A cursor row or column
// outside the screen hides the cursor.
//
// From the source design: the address split, the font ROM addressing, the
// delayed column bits, foreground/background selection, reverse, cursor
// inversion and the Table-1 colour conversion.  Own choices: the colours
// and reverse flag are delayed with the column bits (so a cell's colour
// covers exactly its eight pixels), the output register, and the black band
// below the text.
module pixel_gen
  import vt100_pkg::cell_t, vt100_pkg::colour_t, vt100_pkg::rgb8_t;
#(
  parameter int unsigned TEXT_ROWS = vt100_pkg::TEXT_ROWS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_en,
  // from the sync generator
  input  logic [9:0]  column,
  input  logic [9:0]  row,
  input  logic        active,
  input  logic        hsync_n,
  input  logic        vsync_n,
  // row buffer read port
  output logic [6:0]  rb_raddr,
  input  logic [15:0] rb_rdata,
  // font ROM
  output logic        font_en,
  output logic [10:0] font_addr,
  input  logic [7:0]  font_data,
  // cursor registers
  input  logic [7:0]  cursor_row,
  input  logic [7:0]  cursor_col,
  // VGA output
  output logic [2:0]  red,
  output logic [2:0]  green,
  output logic [1:0]  blue,
  output logic        hsync_o,
  output logic        vsync_o
);

  cell_t       cur_cell;
  logic        in_text;
  logic        at_cursor;

  // stage 1 registers
  logic [2:0]  px_d;
  colour_t     fg_d, bg_d;
  logic        rev_d, cur_d, text_d, hs_d, vs_d;

  // stage 2 combinational
  logic        glyph_bit, use_fg;
  colour_t     colour;
  rgb8_t       rgb;

  assign rb_raddr  = column[9:3];
  assign cur_cell  = cell_t'(rb_rdata);
  assign font_en   = pix_en;
  assign font_addr = {row[3:0], cur_cell.char_code};
  assign in_text   = active && (row[9:4] < 6'(TEXT_ROWS));
  assign at_cursor = ({2'b00, row[9:4]} == cursor_row) && ({1'b0, column[9:3]} == cursor_col);

  always_ff @(posedge clk) begin
    if (rst) begin
      px_d   <= '0;
      fg_d   <= '0;
      bg_d   <= '0;
      rev_d  <= 1'b0;
      cur_d  <= 1'b0;
      text_d <= 1'b0;
      hs_d   <= 1'b1;
      vs_d   <= 1'b1;
    end else if (pix_en) begin
      px_d   <= column[2:0];
      fg_d   <= cur_cell.fg;
      bg_d   <= cur_cell.bg;
      rev_d  <= cur_cell.reverse;
      cur_d  <= at_cursor;
      text_d <= in_text;
      hs_d   <= hsync_n;
      vs_d   <= vsync_n;
    end
  end

  always_comb begin
    glyph_bit = font_data[3'd7 - px_d];
    use_fg    = glyph_bit ^ rev_d ^ cur_d;
    colour    = text_d ? (use_fg ? fg_d : bg_d) : colour_t'(4'b0000);
  end

  colour_conv u_conv (
    .colour (colour),
    .red    (rgb.red),
    .green  (rgb.green),
    .blue   (rgb.blue)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      red     <= '0;
      green   <= '0;
      blue    <= '0;
      hsync_o <= 1'b1;
      vsync_o <= 1'b1;
    end else if (pix_en) begin
      red     <= rgb.red;
      green   <= rgb.green;
      blue    <= rgb.blue;
      hsync_o <= hs_d;
      vsync_o <= vs_d;
    end
  end

endmodule
