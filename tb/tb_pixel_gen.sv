// tb_pixel_gen -- drives the pixel pipeline from the real sync generator,
// row buffer and built-in font, with random cells (characters, colours,
// reverse flags) and a cursor, and compares every output pixel of a frame,
// blanking included, with the reference picture.  Position comes from the
// output syncs only, so the check also proves that colour and syncs are
// aligned.  The row buffer is refilled with new cells at the start of each
// text row, as the copy logic does.  Counts reverse, cursor, high-intensity
// and blank-band pixels.
module tb_pixel_gen;
  import tb_vt100_ref_pkg::*;

  logic clk = 0, rst = 1, pix_en;
  logic [9:0] column, row;
  logic active, hsync_n, vsync_n;
  logic [6:0] rb_raddr;
  logic [15:0] rb_rdata;
  logic rb_we = 0;
  logic [6:0] rb_waddr = 0;
  logic [15:0] rb_wdata = 0;
  logic font_en;
  logic [10:0] font_addr;
  logic [7:0] font_data;
  logic [7:0] cursor_row = 8'd5, cursor_col = 8'd10;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic hsync_o, vsync_o;
  int checks = 0, failures = 0;
  int n_reverse = 0, n_cursor = 0, n_hi = 0, n_band = 0, n_fg = 0, n_bg = 0;

  always #5 clk = ~clk;
  logic div = 0;
  always @(posedge clk) div <= ~div;
  assign pix_en = div;

  vga_timing u_t (.clk, .rst, .pix_en, .column, .row, .active, .hsync_n, .vsync_n);
  row_buffer u_rb (.clk, .we(rb_we), .waddr(rb_waddr), .wdata(rb_wdata), .raddr(rb_raddr), .rdata(rb_rdata));
  font_rom u_f (.clk, .en(font_en), .addr(font_addr), .data(font_data));
  pixel_gen dut (.*);

  int x, y, hsw;
  bit valid;
  tb_vga_position #(.CLK_DIV(2)) u_pos (.clk, .hsync_n(hsync_o), .vsync_n(vsync_o), .x, .y, .valid, .hsync_width(hsw));

  // cells of every text row of the frame, generated from the row number
  function automatic logic [15:0] cell_of(input int trow, input int col);
    logic [31:0] h;
    h = 32'(trow * 1103 + col * 7919) * 32'h9E37_79B9;
    // keep foreground and background apart so that every inversion shows
    if (h[23:20] == h[19:16]) h[19:16] = ~h[19:16];
    return h[31:16];
  endfunction

  // refill the row buffer during the Hsync before each text row
  always @(negedge hsync_n) begin
    if (row % 16 == 15 || row >= 480) begin
      automatic int next = (row >= 480) ? 0 : (row + 1) / 16;
      for (int c = 0; c < 128; c++) begin
        @(negedge clk);
        rb_we = 1; rb_waddr = 7'(c); rb_wdata = cell_of(next, c);
      end
      @(negedge clk);
      rb_we = 0;
    end
  end

  int frames = 0;
  always @(negedge clk) begin
    #1;
    if (valid && !rst) begin
      automatic logic [7:0] exp_v = 8'h00;
      automatic logic [7:0] got = {red, green, blue};
      if (x >= 0 && x < 640 && y < 480) begin
        if (y < 400) begin
          automatic logic [15:0] w = cell_of(y / 16, x / 8);
          automatic bit cur = (y / 16 == 5 && x / 8 == 10);
          automatic bit on = glyph_pixel(int'(w[14:8]), y % 16, x % 8) ^ w[15] ^ cur;
          exp_v = cell_pixel(w, cur, y % 16, x % 8);
          if (w[15]) n_reverse++;
          if (cur) n_cursor++;
          if (on && w[7]) n_hi++;
          if (on) n_fg++; else n_bg++;
        end else n_band++;
      end
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL pixel x=%0d y=%0d got %h expected %h", x, y, got, exp_v);
      end
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    @(posedge vsync_o);
    @(posedge vsync_o);
    checks++;
    if (hsw != 192) begin
      failures++;
      $display("FAIL hsync width %0d clocks", hsw);
    end
    $display("pixels: fg %0d bg %0d reverse %0d cursor %0d hi %0d band %0d", n_fg, n_bg, n_reverse, n_cursor, n_hi, n_band);
    if (n_reverse == 0 || n_cursor == 0 || n_hi == 0 || n_band == 0 || n_fg == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
