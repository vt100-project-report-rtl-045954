// copy_logic -- row buffering: copies one text row from the shared video RAM
// into the row buffer just before the row is drawn.
//
// Two counters drive the copy: a main counter of 16-bit cell addresses into
// the video RAM (bit 0 selects the low or high half of the 32-bit RAM word,
// bits 10:1 address the RAM) and a row-buffer counter.  A small state machine
// sequences them:
//   * Vsync starts a frame: the main counter is loaded with REG_ADDR (0) and
//     the register word is read.  Byte 0, the start row, is multiplied by
//     COLS and registered; bytes 1 and 2 become the cursor row and column.
//   * The main counter is then loaded with the top of the screen,
//     VGA_MEM_START + start_row*COLS.
//   * On an Hsync falling edge, when the next pixel line is the first line
//     of a text row, COLS cells are copied at one per clock.  When the main
//     counter reaches the end of the circular text buffer it is reloaded with
//     VGA_MEM_START, so rows after the last buffer row come from row 0.
//   * After a copy the machine blocks until it sees active video, then
//     returns to idle.  Visible lines (falling edges of oe) are counted so
//     the next copy happens after CHAR_H lines; no copy is made after the
//     last text row.
// Timing: the video RAM has one cycle of read latency, so each cell is
// written to the row buffer one clock after its address.  A copy takes
// COLS + 2 clocks from the Hsync edge and must end before the next line's
// active video: with 80 columns and two clocks per pixel it uses 41 of the
// 144 pixel times between Hsync and active video.
//
// From the source design: the counter structure, the half-word multiplexer,
// the registers at address 0, the x80 start-row multiplier, the VGA_MEM_START
// and REG_ADDR load values, the Vsync / Hsync / output sequence.  Own choices:
// the wrap is detected by comparing the counter with the end of the text
// buffer, a start row beyond the buffer is treated as 0, and the copy is
// triggered only on the Hsync before a new text row.
module copy_logic
  import vt100_pkg::VRAM_AW, vt100_pkg::CELL_AW, vt100_pkg::REG_ADDR,
         vt100_pkg::VGA_MEM_START, vt100_pkg::regs_t;
#(
  parameter int unsigned COLS      = vt100_pkg::COLS,
  parameter int unsigned TEXT_ROWS = vt100_pkg::TEXT_ROWS
) (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic        hsync_n,
  input  logic        vsync_n,
  input  logic        oe,           // active video
  // video RAM port (read only, one cycle latency)
  output logic [VRAM_AW-1:0] mem_addr,
  input  logic [31:0]        mem_rdata,
  // row buffer write port
  output logic        rb_we,
  output logic [6:0]  rb_addr,
  output logic [15:0] rb_wdata,
  // registers read at the start of the frame
  output logic [7:0]  start_row,
  output logic [7:0]  cursor_row,
  output logic [7:0]  cursor_col
);

  localparam logic [CELL_AW-1:0] BUF_END = VGA_MEM_START + CELL_AW'(COLS * TEXT_ROWS);

  typedef enum logic [2:0] {
    S_IDLE,         // wait for Hsync (copy) or Vsync (new frame)
    S_REG_ADDR,     // main counter holds REG_ADDR, RAM is reading it
    S_REG_READ,     // register word on mem_rdata
    S_TO_TOP,       // load main counter with the top of the screen
    S_COPY,         // one cell address per clock
    S_DRAIN,        // last cell written
    S_WAIT_OUTPUT   // block until active video
  } state_t;

  state_t             state;
  logic [CELL_AW-1:0] cnt;          // main counter, 16-bit cell address
  logic [CELL_AW-1:0] cnt_inc;
  logic [CELL_AW-1:0] top_q;        // start_row * COLS
  logic [6:0]         issued;       // cells addressed in this copy
  logic               rd_valid;     // a cell is on mem_rdata this cycle
  logic               rd_half;      // which half of mem_rdata it is
  logic [4:0]         text_row;     // next text row to copy
  logic [3:0]         sub_line;     // visible lines drawn of the current row
  logic               hs_q, vs_q, oe_q;
  logic               hs_fall, vs_fall, oe_fall;
  regs_t              regs;

  assign hs_fall = hs_q && !hsync_n;
  assign vs_fall = vs_q && !vsync_n;
  assign oe_fall = oe_q && !oe;
  assign regs    = regs_t'(mem_rdata);
  assign cnt_inc = cnt + CELL_AW'(1);
  assign mem_addr = cnt[CELL_AW-1:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_q <= 1'b1;
      vs_q <= 1'b1;
      oe_q <= 1'b0;
    end else begin
      hs_q <= hsync_n;
      vs_q <= vsync_n;
      oe_q <= oe;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= REG_ADDR;
      top_q      <= '0;
      issued     <= '0;
      rd_valid   <= 1'b0;
      rd_half    <= 1'b0;
      text_row   <= 5'(TEXT_ROWS);   // nothing to copy before the first Vsync
      sub_line   <= '0;
      start_row  <= '0;
      cursor_row <= '0;
      cursor_col <= '0;
    end else begin
      rd_valid <= 1'b0;
      rd_half  <= cnt[0];
      if (oe_fall) sub_line <= sub_line + 4'd1;

      unique case (state)
        S_IDLE: begin
          if (hs_fall && sub_line == 4'd0 && text_row < 5'(TEXT_ROWS)) begin
            issued <= '0;
            state  <= S_COPY;
          end
        end
        S_REG_ADDR: state <= S_REG_READ;
        S_REG_READ: begin
          // read_registers: latch the register bytes and start_row * COLS
          start_row  <= regs.start_row;
          cursor_row <= regs.cursor_row;
          cursor_col <= regs.cursor_col;
          top_q      <= (regs.start_row < 8'(TEXT_ROWS))
                        ? CELL_AW'(regs.start_row) * CELL_AW'(COLS) : '0;
          state      <= S_TO_TOP;
        end
        S_TO_TOP: begin
          cnt      <= VGA_MEM_START + top_q;
          text_row <= '0;
          sub_line <= '0;
          state    <= S_IDLE;
        end
        S_COPY: begin
          rd_valid <= 1'b1;
          cnt      <= (cnt_inc == BUF_END) ? VGA_MEM_START : cnt_inc;
          issued   <= issued + 7'd1;
          if (issued == 7'(COLS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          text_row <= text_row + 5'd1;
          state    <= S_WAIT_OUTPUT;
        end
        S_WAIT_OUTPUT: if (oe) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      // A new frame restarts the sequence from any state.
      if (vs_fall) begin
        cnt   <= REG_ADDR;
        state <= S_REG_ADDR;
      end
    end
  end

  // Row buffer side: write the cell read in the previous cycle.
  always_ff @(posedge clk) begin
    if (rst || state == S_IDLE) rb_addr <= '0;
    else if (rb_we)             rb_addr <= rb_addr + 7'd1;
  end

  assign rb_we    = rd_valid;
  assign rb_wdata = rd_half ? mem_rdata[31:16] : mem_rdata[15:0];

  // The copy must never overlap a line that is being drawn.
  a_no_copy_during_output: assert property (@(posedge clk) disable iff (rst) rb_we |-> !oe)
    else $error("copy_logic: row buffer written during active video");

  // Elaboration checks on the geometry.
  if (int'(VGA_MEM_START) + COLS * TEXT_ROWS > 2 ** CELL_AW) begin : g_check_fit
    $error("copy_logic: text buffer does not fit in the video RAM");
  end
  if (COLS > 128) begin : g_check_cols
    $error("copy_logic: row buffer holds at most 128 cells");
  end

endmodule
