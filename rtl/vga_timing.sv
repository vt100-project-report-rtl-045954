// vga_timing -- sync generator for 640x480 at 60 Hz.
//
// Two counters step once per pixel (pix_en): column counts 0..H_TOTAL-1 and
// row advances at the end of each line, 0..V_TOTAL-1.  The visible area is
// column < H_ACTIVE and row < V_ACTIVE; after it follow the front porch, the
// sync pulse and the back porch, horizontally and vertically.  Both syncs are
// active low.  Outputs are decoded from the counter registers, so they change
// on the clock edge on which pix_en is high.
//
// The source design took this block ready-made; the visible size is its
// 640x480, the porch and pulse widths are the standard VESA values (25 MHz
// pixel rate gives 31.5 kHz lines and 60 Hz frames).
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33
) (
  input  logic       clk,
  input  logic       rst,      // synchronous, active high
  input  logic       pix_en,   // one pulse per pixel
  output logic [9:0] column,
  output logic [9:0] row,
  output logic       active,   // pixel is in the visible area
  output logic       hsync_n,
  output logic       vsync_n
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;

  always_ff @(posedge clk) begin
    if (rst) begin
      column <= '0;
      row    <= '0;
    end else if (pix_en) begin
      if (column == 10'(H_TOTAL - 1)) begin
        column <= '0;
        row    <= (row == 10'(V_TOTAL - 1)) ? '0 : row + 10'd1;
      end else begin
        column <= column + 10'd1;
      end
    end
  end

  always_comb begin
    active  = (column < 10'(H_ACTIVE)) && (row < 10'(V_ACTIVE));
    hsync_n = !((column >= 10'(H_ACTIVE + H_FRONT)) &&
                (column <  10'(H_ACTIVE + H_FRONT + H_SYNC)));
    vsync_n = !((row >= 10'(V_ACTIVE + V_FRONT)) &&
                (row <  10'(V_ACTIVE + V_FRONT + V_SYNC)));
  end

endmodule
