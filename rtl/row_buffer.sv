// row_buffer -- one text row of character cells between the video RAM and
// the pixel pipeline.
//
// A 2^AW x DW memory (128 x 16 bits; 80 entries are used).  The copy logic
// writes it synchronously one cell per clock during horizontal blanking; the
// pixel pipeline reads it combinationally with the character column, so the
// cell is available in the same cycle as its address, as in a LUT RAM.
// Holding a whole row here is what keeps a row from tearing when the
// processor rewrites video RAM while the row is on screen.
//
// The size (7-bit address, 16-bit cells) and the role follow the original
// design; the asynchronous read port is this design's choice, matching the
// single register of column delay in the original pixel pipeline.
module row_buffer #(
  parameter int unsigned AW = 7,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
