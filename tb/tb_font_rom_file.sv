// tb_font_rom_file -- loads the font ROM from a file instead of the
// built-in glyphs: the sample file holds one 8x16 glyph ('A') at the
// addresses {row, 7'h41}; the testbench reads it back row by row and
// compares it with the same glyph drawn as a picture.
module tb_font_rom_file;
  logic clk = 0, en = 0;
  logic [10:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  font_rom #(.FONT_FILE("tb/font_sample.hex")) dut (.clk, .en, .addr, .data);

  always #5 clk = ~clk;

  string pic [16] = '{
    "........", "........", "...#....", "..###...", ".##.##..", "##...##.", "##...##.", "#######.",
    "##...##.", "##...##.", "##...##.", "##...##.", "........", "........", "........", "........"
  };

  initial begin
    for (int r = 0; r < 16; r++) begin
      logic [7:0] exp_v;
      for (int x = 0; x < 8; x++) exp_v[7 - x] = (pic[r][x] == "#");
      @(negedge clk);
      en = 1;
      addr = {4'(r), 7'h41};
      @(posedge clk); #1;
      checks++;
      if (data !== exp_v) begin
        failures++;
        $display("FAIL row %0d: got %b expected %b", r, data, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
