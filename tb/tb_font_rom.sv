// tb_font_rom -- reads all 2048 bytes of the built-in font through the
// {row, character} address and compares each pixel with the glyph
// pictures of the reference model; checks the one-clock read latency and
// that the output holds while en is low.
module tb_font_rom;
  import tb_vt100_ref_pkg::*;
  logic clk = 0, en = 0;
  logic [10:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  font_rom dut (.clk(clk), .en(en), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 128; c++) begin
        logic [7:0] exp_v;
        for (int x = 0; x < 8; x++) exp_v[7 - x] = glyph_pixel(c, r, x);
        @(negedge clk);
        addr = {4'(r), 7'(c)};
        en = 1;
        @(posedge clk); #1;
        checks++;
        if (data !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL char %h row %0d: got %b expected %b", c, r, data, exp_v);
        end
      end
    end
    // hold while disabled
    @(negedge clk);
    addr = {4'd5, 7'h41};
    en = 1;
    @(negedge clk);
    en = 0;
    addr = {4'd0, 7'h20};
    @(negedge clk);
    checks++;
    if (data == 8'h00) begin
      failures++;
      $display("FAIL output changed while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
