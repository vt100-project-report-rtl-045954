// tb_copy_logic -- runs the row-buffering state machine against the real
// sync generator and a video RAM filled with random cells, over frames with
// different start rows (no scroll, scrolled with wrap-round, out-of-range).
// For every copy it records the 80 cells written to the row buffer and
// compares them with the buffer row the screen row must show; it checks the
// number of copies per frame, the register values, that every copy ends
// within COLS + 2 clocks of its Hsync edge and before active video.
module tb_copy_logic;
  import vt100_pkg::*;
  localparam int ROWS = 25;

  logic clk = 0, rst = 1;
  logic pix_en;
  logic [9:0] column, row;
  logic active, hsync_n, vsync_n;
  logic [9:0] mem_addr;
  logic [31:0] mem_rdata;
  logic rb_we;
  logic [6:0] rb_addr;
  logic [15:0] rb_wdata;
  logic [7:0] start_row, cursor_row, cursor_col;
  logic cpu_en = 0;
  logic [3:0] cpu_we = 0;
  logic [9:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic div = 0;
  always @(posedge clk) div <= ~div;
  assign pix_en = div;

  vga_timing u_t (.clk, .rst, .pix_en, .column, .row, .active, .hsync_n, .vsync_n);
  video_ram u_m (.clk, .a_en(cpu_en), .a_we(cpu_we), .a_addr(cpu_addr), .a_wdata(cpu_wdata),
                 .a_rdata(cpu_rdata), .b_addr(mem_addr), .b_rdata(mem_rdata));
  copy_logic dut (.clk, .rst, .hsync_n, .vsync_n, .oe(active), .mem_addr, .mem_rdata,
                  .rb_we, .rb_addr, .rb_wdata, .start_row, .cursor_row, .cursor_col);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] ref_cell(input int a);
    return a[0] ? ref_mem[a >> 1][31:16] : ref_mem[a >> 1][15:0];
  endfunction

  task automatic cpu_write(input int a, input logic [31:0] d);
    @(negedge clk);
    cpu_en = 1; cpu_we = 4'hF; cpu_addr = 10'(a); cpu_wdata = d;
    ref_mem[a] = d;
    @(negedge clk);
    cpu_en = 0; cpu_we = 0;
  endtask

  // copy monitor
  logic [15:0] got_row [80];
  int n_written = 0, copies_in_frame = 0, clocks_since_hs = 0, wraps = 0;
  logic hs_q = 1, vs_q = 1;
  int frame_start = 0;         // start row in effect for this frame
  int copy_len_max = 0;

  always @(posedge clk) begin
    if (!rst) begin
      hs_q <= hsync_n;
      vs_q <= vsync_n;
      if (vs_q && !vsync_n) begin
        copies_in_frame = 0;
        n_written = 0;
      end
      if (hs_q && !hsync_n) clocks_since_hs <= 0;
      else clocks_since_hs <= clocks_since_hs + 1;
      if (rb_we) begin
        check(rb_addr == 7'(n_written), $sformatf("row buffer address %0d expected %0d", rb_addr, n_written));
        got_row[n_written] = rb_wdata;
        n_written++;
        if (n_written == 80) begin
          automatic int screen_row = copies_in_frame;
          automatic int buf_row = (frame_start + screen_row) % ROWS;
          if (frame_start + screen_row >= ROWS) wraps++;
          for (int c = 0; c < 80; c++)
            check(got_row[c] == ref_cell(2 + buf_row * 80 + c),
                  $sformatf("screen row %0d col %0d got %h expected %h", screen_row, c,
                            got_row[c], ref_cell(2 + buf_row * 80 + c)));
          // a copy is done COLS + 2 clocks after the Hsync edge at the latest
          check(clocks_since_hs <= 82, $sformatf("copy took %0d clocks", clocks_since_hs));
          // and it falls in the line before text row screen_row
          check(row == 10'(16 * screen_row - 1) || (screen_row == 0 && row >= 480),
                $sformatf("copy of screen row %0d on line %0d", screen_row, row));
          if (clocks_since_hs > copy_len_max) copy_len_max = clocks_since_hs;
          copies_in_frame++;
          n_written = 0;
        end
      end
    end
  end

  int frame_starts [4] = '{0, 20, 24, 200};
  int cur_rows [4] = '{3, 24, 0, 255};
  int cur_cols [4] = '{7, 79, 0, 255};

  initial begin
    // zero the register word, random cells elsewhere
    repeat (4) @(negedge clk);
    rst = 0;
    cpu_write(0, 32'h0);
    for (int i = 1; i < 1024; i++) cpu_write(i, $urandom);
    // discard whatever frame is in progress: wait for the first vsync
    @(negedge vsync_n);
    for (int f = 0; f < 4; f++) begin
      // program the registers in the visible area of the frame before
      wait (row == 200);
      cpu_write(0, {8'h00, 8'(cur_cols[f]), 8'(cur_rows[f]), 8'(frame_starts[f])});
      @(negedge vsync_n);
      frame_start = frame_starts[f] < ROWS ? frame_starts[f] : 0;
      repeat (20) @(posedge clk);
      check(start_row == 8'(frame_starts[f]), "start row register");
      check(cursor_row == 8'(cur_rows[f]), "cursor row register");
      check(cursor_col == 8'(cur_cols[f]), "cursor column register");
      wait (row == 479);
      wait (row == 481);
      check(copies_in_frame == ROWS, $sformatf("frame %0d: %0d row copies", f, copies_in_frame));
    end
    check(wraps > 0, "circular buffer wrapped");
    $display("longest copy %0d clocks, %0d wrapped rows", copy_len_max, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
