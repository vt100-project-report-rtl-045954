// video_ram -- shared video memory, dual-port block RAM.
//
// 2^AW words of DW bits (1024 x 32).  Port A belongs to the processor: it
// reads and writes with per-byte write enables, read data one cycle after the
// address (read-first when writing).  Port B belongs to the VGA controller
// and only reads, also with one cycle latency.  Both ports share one clock.
// The memory is not reset; the software clears it.
//
// The 1024 x 32 organisation and the two ports (processor and video
// controller) follow the original design; the byte enables, read-first
// behaviour and one-cycle latency are this design's block-RAM choices.
module video_ram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 32
) (
  input  logic            clk,
  // port A: processor
  input  logic            a_en,
  input  logic [DW/8-1:0] a_we,
  input  logic [AW-1:0]   a_addr,
  input  logic [DW-1:0]   a_wdata,
  output logic [DW-1:0]   a_rdata,
  // port B: video controller, read only
  input  logic [AW-1:0]   b_addr,
  output logic [DW-1:0]   b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < DW/8; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
