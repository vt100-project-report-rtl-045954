// vga_controller -- text-mode VGA controller of the terminal.
//
// Draws an 80-column screen of 8x16 character cells at 640x480, 60 Hz, from
// a text buffer kept in a video RAM shared with the processor.  Instead of a
// second full frame buffer it keeps one row buffer: copy_logic moves each
// text row from the video RAM into row_buffer during the horizontal
// blanking before the row's first pixel line, and pixel_gen draws the
// row's 16 pixel lines from the row buffer through font_rom.  vga_timing
// makes the sync pulses and the pixel position.  The register word at the
// start of the video RAM (start row, cursor row and column) is read once per
// frame, at Vsync.
//
// Clocks: one clock, clk; the pixel rate is clk / CLK_DIV (50 MHz / 2 =
// 25 MHz for 640x480).  The copy logic runs at the full clock rate.
// Interface: mem_addr / mem_rdata is a read port of the video RAM with one
// clock of latency; the VGA outputs are registered, two pixel clocks behind
// the sync generator, with syncs aligned to the colour.
//
// The composition follows the original design; the single clock with a
// pixel enable is this design's choice.
module vga_controller
  import vt100_pkg::VRAM_AW, vt100_pkg::COLS;
#(
  parameter int unsigned CLK_DIV   = 2,
  parameter int unsigned TEXT_ROWS = vt100_pkg::TEXT_ROWS,
  parameter string       FONT_FILE = ""
) (
  input  logic               clk,
  input  logic               rst,
  output logic [VRAM_AW-1:0] mem_addr,
  input  logic [31:0]        mem_rdata,
  output logic [2:0]         vga_red,
  output logic [2:0]         vga_green,
  output logic [1:0]         vga_blue,
  output logic               vga_hsync_n,
  output logic               vga_vsync_n
);

  logic [$clog2(CLK_DIV+1)-1:0] div_cnt;
  logic        pix_en;
  logic [9:0]  column, row;
  logic        active, hsync_n, vsync_n;
  logic        rb_we;
  logic [6:0]  rb_waddr, rb_raddr;
  logic [15:0] rb_wdata, rb_rdata;
  logic        font_en;
  logic [10:0] font_addr;
  logic [7:0]  font_data;
  logic [7:0]  start_row, cursor_row, cursor_col;

  // pixel clock enable
  always_ff @(posedge clk) begin
    if (rst || div_cnt == ($bits(div_cnt))'(CLK_DIV - 1)) div_cnt <= '0;
    else                                                  div_cnt <= div_cnt + 1'b1;
  end
  assign pix_en = (div_cnt == ($bits(div_cnt))'(CLK_DIV - 1));

  vga_timing u_timing (
    .clk     (clk),
    .rst     (rst),
    .pix_en  (pix_en),
    .column  (column),
    .row     (row),
    .active  (active),
    .hsync_n (hsync_n),
    .vsync_n (vsync_n)
  );

  copy_logic #(.COLS(COLS), .TEXT_ROWS(TEXT_ROWS)) u_copy (
    .clk        (clk),
    .rst        (rst),
    .hsync_n    (hsync_n),
    .vsync_n    (vsync_n),
    .oe         (active),
    .mem_addr   (mem_addr),
    .mem_rdata  (mem_rdata),
    .rb_we      (rb_we),
    .rb_addr    (rb_waddr),
    .rb_wdata   (rb_wdata),
    .start_row  (start_row),
    .cursor_row (cursor_row),
    .cursor_col (cursor_col)
  );

  row_buffer #(.AW(7), .DW(16)) u_row_buffer (
    .clk   (clk),
    .we    (rb_we),
    .waddr (rb_waddr),
    .wdata (rb_wdata),
    .raddr (rb_raddr),
    .rdata (rb_rdata)
  );

  font_rom #(.FONT_FILE(FONT_FILE)) u_font (
    .clk  (clk),
    .en   (font_en),
    .addr (font_addr),
    .data (font_data)
  );

  pixel_gen #(.TEXT_ROWS(TEXT_ROWS)) u_pixel (
    .clk        (clk),
    .rst        (rst),
    .pix_en     (pix_en),
    .column     (column),
    .row        (row),
    .active     (active),
    .hsync_n    (hsync_n),
    .vsync_n    (vsync_n),
    .rb_raddr   (rb_raddr),
    .rb_rdata   (rb_rdata),
    .font_en    (font_en),
    .font_addr  (font_addr),
    .font_data  (font_data),
    .cursor_row (cursor_row),
    .cursor_col (cursor_col),
    .red        (vga_red),
    .green      (vga_green),
    .blue       (vga_blue),
    .hsync_o    (vga_hsync_n),
    .vsync_o    (vga_vsync_n)
  );

endmodule
