// tb_vga_controller -- the VGA controller on its own, reading a video RAM
// instance that the testbench fills through the RAM's other port; every pixel
// of five frames on the VGA output is compared with a picture computed from
// the memory contents.  The reference takes a snapshot of each text row at
// the start of its first pixel line, which is what row buffering promises.
// Scenarios, one per frame:
//   0  start row 0, cursor at (3, 7)
//   1  start row 17 (the circular buffer wraps), cursor at (24, 79)
//   2  same, and while text row 10 is on screen the processor rewrites
//      rows 10 and 11: row 10 must stay as it was, row 11 must change
//   3  start row 255 (out of range, shown as 0), cursor hidden (row 200)
//   4  start row 24, cursor at (0, 0)
// Counted mechanisms: row copies, wrapped rows, cursor, reverse and
// high-intensity pixels, the black band below the text, held writes, an
// out-of-range start row and a hidden cursor; each must occur.
module tb_vga_controller;
  import tb_vt100_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic cpu_en = 0;
  logic [3:0] cpu_we = 0;
  logic [9:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic vga_hsync_n, vga_vsync_n;
  int checks = 0, failures = 0;

  logic [9:0]  vid_addr;
  logic [31:0] vid_rdata;

  video_ram u_ram (.clk, .a_en(cpu_en), .a_we(cpu_we), .a_addr(cpu_addr), .a_wdata(cpu_wdata),
                   .a_rdata(cpu_rdata), .b_addr(vid_addr), .b_rdata(vid_rdata));
  vga_controller dut (.clk, .rst, .mem_addr(vid_addr), .mem_rdata(vid_rdata), .vga_red, .vga_green,
                      .vga_blue, .vga_hsync_n, .vga_vsync_n);

  always #10 clk = ~clk;   // 50 MHz

  int x, y, hsw;
  bit valid;
  tb_vga_position #(.CLK_DIV(2)) u_pos (.clk, .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n),
                                        .x, .y, .valid, .hsync_width(hsw));

  logic [31:0] ref_mem [1024];
  logic [15:0] snap [25][80];     // text rows as they must appear
  int  f_start = 0, f_crow = 0, f_ccol = 0;   // registers for this frame
  bit  f_known = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic cpu_write(input int a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    cpu_en = 1; cpu_we = be; cpu_addr = 10'(a); cpu_wdata = d;
    for (int i = 0; i < 4; i++) if (be[i]) ref_mem[a][8*i +: 8] = d[8*i +: 8];
    @(negedge clk);
    cpu_en = 0; cpu_we = 0;
  endtask

  task automatic cpu_read_check(input int a);
    @(negedge clk);
    cpu_en = 1; cpu_we = 0; cpu_addr = 10'(a);
    @(negedge clk);
    cpu_en = 0;
    check(cpu_rdata == ref_mem[a], $sformatf("processor read of word %0d", a));
  endtask

  function automatic logic [15:0] mem_cell(input int a);
    return a[0] ? ref_mem[a >> 1][31:16] : ref_mem[a >> 1][15:0];
  endfunction

  // mechanism counters
  int n_copies = 0, n_wrapped = 0, n_cursor = 0, n_reverse = 0, n_hi = 0, n_band = 0;
  int n_held = 0, n_oor = 0, n_hidden = 0, frames_checked = 0;
  bit held_phase = 0;
  logic [15:0] new_row10 [80];

  always @(posedge clk) if (dut.rb_we && dut.rb_waddr == 7'd79) n_copies++;

  // register snapshot at each frame's Vsync, row snapshots at each row start
  int last_y = -1;
  always @(negedge vga_vsync_n) begin
    automatic logic [31:0] r = ref_mem[0];
    f_start = (r[7:0] < 25) ? int'(r[7:0]) : 0;
    if (r[7:0] >= 25) n_oor++;
    f_crow = r[15:8];
    f_ccol = r[23:16];
    if (f_crow >= 25) n_hidden++;
    f_known = 1;
  end

  always @(negedge clk) begin
    if (valid && y != last_y) begin
      last_y = y;
      if (y < 400 && y % 16 == 0) begin
        automatic int r = y / 16;
        automatic int b = (f_start + r) % 25;
        if (f_start + r >= 25) n_wrapped++;
        for (int c = 0; c < 80; c++) snap[r][c] = mem_cell(2 + b * 80 + c);
      end
    end
  end

  // pixel comparison
  always @(negedge clk) begin
    #1;
    if (valid && f_known && !rst) begin
      automatic logic [7:0] exp_v = 8'h00;
      automatic logic [7:0] got = {vga_red, vga_green, vga_blue};
      if (x >= 0 && x < 640 && y < 480) begin
        if (y < 400) begin
          automatic logic [15:0] w = snap[y / 16][x / 8];
          automatic bit cur = (y / 16 == f_crow && x / 8 == f_ccol);
          automatic bit on = glyph_pixel(int'(w[14:8]), y % 16, x % 8) ^ w[15] ^ cur;
          exp_v = cell_pixel(w, cur, y % 16, x % 8);
          if (cur) n_cursor++;
          if (w[15]) n_reverse++;
          if (on && w[7]) n_hi++;
          if (held_phase && y / 16 == 10 && x % 8 == 0) begin
            // the new content would look different here: the old one is held
            if (new_row10[x / 8] != w) n_held++;
          end
        end else begin
          n_band++;
        end
      end
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 20) $display("FAIL pixel x=%0d y=%0d got %h expected %h", x, y, got, exp_v);
      end
    end
  end

  task automatic set_regs(input int start, input int crow, input int ccol);
    cpu_write(0, {8'h00, 8'(ccol), 8'(crow), 8'(start)}, 4'b0111);
  endtask

  task automatic wait_line(input int line);
    wait (valid && y == line && x == 200);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    ref_mem[0] = 0;
    set_regs(0, 3, 7);
    cpu_write(0, 32'hA5000000, 4'b1000);   // byte 3 is unused; byte enables leave 0-2 alone
    for (int i = 1; i < 1024; i++) cpu_write(i, $urandom);
    for (int i = 0; i < 4; i++) cpu_read_check(i * 97);
    // scenario 0 runs in the first complete frame
    @(negedge vga_vsync_n);
    wait_line(200);
    set_regs(17, 24, 79);                  // scenario 1
    @(negedge vga_vsync_n);
    frames_checked++;
    wait_line(200);
    @(negedge vga_vsync_n);                // scenario 2: same registers
    frames_checked++;
    wait_line(165);                        // text row 10 on screen
    begin
      automatic int b10 = (17 + 10) % 25, b11 = (17 + 11) % 25;
      for (int c = 0; c < 80; c += 2) begin
        automatic logic [31:0] v = $urandom;
        cpu_write((2 + b10 * 80 + c) >> 1, v);
        new_row10[c] = v[15:0];
        new_row10[c + 1] = v[31:16];
      end
      for (int c = 0; c < 80; c += 2) cpu_write((2 + b11 * 80 + c) >> 1, $urandom);
      held_phase = 1;
    end
    wait_line(200);
    held_phase = 0;
    set_regs(255, 200, 3);                 // scenario 3
    @(negedge vga_vsync_n);
    frames_checked++;
    wait_line(200);
    set_regs(24, 0, 0);                    // scenario 4
    @(negedge vga_vsync_n);
    frames_checked++;
    wait_line(479);
    wait (y == 480);
    frames_checked++;

    check(hsw == 192, $sformatf("hsync width %0d clocks", hsw));
    check(n_copies >= 5 * 25, $sformatf("%0d row copies", n_copies));
    $display("copies %0d wrapped %0d cursor %0d reverse %0d hi %0d band %0d held %0d oor %0d hidden %0d",
             n_copies, n_wrapped, n_cursor, n_reverse, n_hi, n_band, n_held, n_oor, n_hidden);
    check(n_wrapped > 0, "wrap-round of the text buffer");
    check(n_cursor > 0, "cursor shown");
    check(n_reverse > 0, "reverse cells");
    check(n_hi > 0, "high-intensity pixels");
    check(n_band > 0, "blank band below the text");
    check(n_held > 0, "write held back by the row buffer");
    check(n_oor > 0, "out-of-range start row");
    check(n_hidden > 0, "hidden cursor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
