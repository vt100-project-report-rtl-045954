// tb_vga_position -- recovers the pixel position of a VGA output stream
// from its sync pulses alone, for testbenches that check a picture.
//
// A line segment starts at each Hsync rising edge; the 48-pixel back porch
// follows, then pixel x = 0.  The Vsync rising edge happens in the segment
// of line V_ACTIVE + V_FRONT + V_SYNC (492), which sets the line number.
// x and y are valid from the first Vsync pulse on.  Sample on the clock
// edge opposite to the one the outputs change on.  Also measures the width
// of the last Hsync pulse in clocks.
module tb_vga_position #(
  parameter int CLK_DIV = 2
) (
  input  logic clk,
  input  logic hsync_n,
  input  logic vsync_n,
  output int   x,
  output int   y,
  output bit   valid,
  output int   hsync_width
);
  int clk_in_seg = 0, hs_low = 0;
  logic hs_q = 1, vs_q = 1;

  initial begin
    valid = 0;
    y = 0;
    hsync_width = 0;
  end

  always @(negedge clk) begin
    hs_q <= hsync_n;
    vs_q <= vsync_n;
    if (!hsync_n) hs_low++;
    if (!hs_q && hsync_n) begin
      clk_in_seg = 0;
      hsync_width = hs_low;
      hs_low = 0;
      if (valid) y = (y + 1) % 525;
    end else begin
      clk_in_seg++;
    end
    if (!vs_q && vsync_n) begin
      y = 492;
      valid = 1;
    end
    x = clk_in_seg / CLK_DIV - 48;
  end
endmodule
