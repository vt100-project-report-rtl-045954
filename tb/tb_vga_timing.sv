// tb_vga_timing -- measures the 640x480 at 60 Hz timing over two frames:
// line and frame length, sync pulse positions and widths, visible area,
// and that the counters hold when pix_en is low (pixel enable every other
// clock, as with a 50 MHz clock and 25 MHz pixels).
module tb_vga_timing;
  logic clk = 0, rst = 1, pix_en = 0;
  logic [9:0] column, row;
  logic active, hsync_n, vsync_n;
  int checks = 0, failures = 0;

  vga_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int pix = 0;           // pixel ticks since the first frame start
  int hs_fall_at [$], hs_rise_at [$], vs_fall_at [$], vs_rise_at [$];
  int active_count = 0, first_frame_active = 0;
  logic hs_q = 1, vs_q = 1;

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // 2 frames + a bit, pix_en every other clock
    repeat (2 * (800 * 525 * 2) + 100) begin
      @(negedge clk);
      pix_en = ~pix_en;
    end
    // line: 800 pixels, hsync low for 96 starting after 640 + 16
    check(hs_fall_at.size() >= 1000, "enough hsync pulses");
    for (int i = 1; i < hs_fall_at.size(); i++)
      check(hs_fall_at[i] - hs_fall_at[i-1] == 800, $sformatf("line period at %0d", i));
    for (int i = 0; i < hs_rise_at.size(); i++)
      check(hs_rise_at[i] - hs_fall_at[i] == 96, $sformatf("hsync width at %0d", i));
    check(hs_fall_at[0] == 656, $sformatf("first hsync at %0d", hs_fall_at[0]));
    // frame: 525 lines, vsync 2 lines starting after 480 + 10 lines
    check(vs_fall_at.size() == 2, "two vsync pulses");
    check(vs_fall_at[0] == 490 * 800, $sformatf("vsync start %0d", vs_fall_at[0]));
    check(vs_rise_at[0] - vs_fall_at[0] == 2 * 800, "vsync width 2 lines");
    check(vs_fall_at[1] - vs_fall_at[0] == 525 * 800, "frame period 525 lines");
    check(first_frame_active == 640 * 480, $sformatf("visible pixels %0d", first_frame_active));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample the outputs once per pixel, before the counters advance
  always @(posedge clk) begin
    if (!rst && pix_en) begin
      if (hs_q && !hsync_n) hs_fall_at.push_back(pix);
      if (!hs_q && hsync_n) hs_rise_at.push_back(pix);
      if (vs_q && !vsync_n) vs_fall_at.push_back(pix);
      if (!vs_q && vsync_n) vs_rise_at.push_back(pix);
      hs_q <= hsync_n;
      vs_q <= vsync_n;
      if (active) begin
        if (pix < 800 * 525) first_frame_active++;
        // visible area is exactly column < 640, row < 480
        checks++;
        if (column >= 640 || row >= 480) failures++;
      end
      pix++;
    end
    // counters must not move without pix_en
    if (!rst && !pix_en) begin
      automatic logic [9:0] c0 = column;
      #1;
      if (column != c0) begin
        failures++;
        $display("FAIL counter moved without pix_en");
      end
    end
  end

  initial begin
    #30_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
