// vt100_top -- video subsystem of the VT100-style serial terminal.
//
// The terminal is a processor (which parses the host's ECMA-48 escape
// sequences and the keyboard's scancodes in software) plus a text-mode VGA
// controller.  The two meet in a dual-port video RAM: the processor writes
// characters, colours and the control registers through port A, the VGA
// controller reads port B.  This top holds the video RAM and the VGA
// controller; the processor, its buses, the UART and the PS/2 interface are
// off-the-shelf cores and are represented here by the processor's port A
// signals, brought out as ports.
//
// Memory map of port A (32-bit words, byte enables): word 0 holds the
// control registers (byte 0 start row, byte 1 cursor row, byte 2 cursor
// column); text cell n is in word 1 + n/2, in the low half for even n and
// the high half for odd n: 25 rows of 80 cells, a circular buffer whose
// first displayed row is the start row.  Each cell: bit 15 reverse,
// 14:8 character, 7:4 foreground, 3:0 background (colour bits: 3 high
// intensity, 2 blue, 1 green, 0 red).
//
// Timing: one clock (50 MHz); port A returns read data one clock after the
// address; the VGA outputs are registered.
//
// The split between processor, shared video RAM and VGA controller follows
// the original design; the port list of the processor side is this
// design's choice.
module vt100_top
  import vt100_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic               clk,
  input  logic               rst,
  // processor port of the video RAM
  input  logic               cpu_en,
  input  logic [3:0]         cpu_we,
  input  logic [VRAM_AW-1:0] cpu_addr,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  // VGA connector
  output logic [2:0]         vga_red,
  output logic [2:0]         vga_green,
  output logic [1:0]         vga_blue,
  output logic               vga_hsync_n,
  output logic               vga_vsync_n
);

  logic [VRAM_AW-1:0] vid_addr;
  logic [31:0]        vid_rdata;

  video_ram #(.AW(VRAM_AW), .DW(32)) u_video_ram (
    .clk     (clk),
    .a_en    (cpu_en),
    .a_we    (cpu_we),
    .a_addr  (cpu_addr),
    .a_wdata (cpu_wdata),
    .a_rdata (cpu_rdata),
    .b_addr  (vid_addr),
    .b_rdata (vid_rdata)
  );

  vga_controller #(.CLK_DIV(CLK_DIV)) u_vga (
    .clk         (clk),
    .rst         (rst),
    .mem_addr    (vid_addr),
    .mem_rdata   (vid_rdata),
    .vga_red     (vga_red),
    .vga_green   (vga_green),
    .vga_blue    (vga_blue),
    .vga_hsync_n (vga_hsync_n),
    .vga_vsync_n (vga_vsync_n)
  );

endmodule
