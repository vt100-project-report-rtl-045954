// font_rom -- character generator ROM: 128 glyphs of 8x16 pixels.
//
// Each glyph is 16 bytes, one per pixel row; bit 7 of a byte is the leftmost
// pixel.  The address is {glyph row[3:0], character[6:0]}, so the rows of all
// characters for one pixel row lie together.  Read is synchronous: data
// appears on the clock edge after addr when en is high (one pixel clock of
// latency, which the pixel pipeline matches by delaying the column bits).
//
// Contents: when FONT_FILE names a $readmemh file of 2048 bytes in the
// address order above (for example converted from an 8x16 PSF console font:
// file byte addr = font byte char*16 + row, placed at {row, char}), that font
// is loaded.  Otherwise a built-in font is computed: each glyph shows its own
// character code as two 3x5 hex digits, the high digit in rows 3-7, columns
// 1-3, the low digit in rows 9-13, columns 4-6; codes 0x00 and 0x20 are
// blank.  The built-in font only makes the ROM usable without a font file.
//
// The 8x16 glyphs, 16 bytes per character and the 11-bit {row, character}
// address follow the original design; the bit order and the built-in
// glyphs are this design's choices.
module font_rom #(
  parameter string FONT_FILE = ""
) (
  input  logic        clk,
  input  logic        en,
  input  logic [10:0] addr,
  output logic [7:0]  data
);

  logic [7:0] rom [2048];

  // 3x5 hex digit: 15 bits, top row in [14:12], leftmost pixel the MSB.
  function automatic logic [14:0] hex_digit(input logic [3:0] d);
    case (d)
      4'h0: return 15'b111_101_101_101_111;
      4'h1: return 15'b010_110_010_010_111;
      4'h2: return 15'b111_001_111_100_111;
      4'h3: return 15'b111_001_111_001_111;
      4'h4: return 15'b101_101_111_001_001;
      4'h5: return 15'b111_100_111_001_111;
      4'h6: return 15'b111_100_111_101_111;
      4'h7: return 15'b111_001_001_001_001;
      4'h8: return 15'b111_101_111_101_111;
      4'h9: return 15'b111_101_111_001_111;
      4'hA: return 15'b010_101_111_101_101;
      4'hB: return 15'b110_101_110_101_110;
      4'hC: return 15'b011_100_100_100_011;
      4'hD: return 15'b110_101_101_101_110;
      4'hE: return 15'b111_100_111_100_111;
      default: return 15'b111_100_111_100_100;
    endcase
  endfunction

  function automatic logic [7:0] glyph_row(input logic [6:0] code, input int r);
    logic [14:0] hi_d, lo_d;
    logic [7:0]  b;
    hi_d = hex_digit({1'b0, code[6:4]});
    lo_d = hex_digit(code[3:0]);
    b = '0;
    if (code != 7'h00 && code != 7'h20) begin
      if (r >= 3 && r <= 7)  b = {1'b0, hi_d[14 - 3*(r-3) -: 3], 4'b0};
      if (r >= 9 && r <= 13) b = {4'b0, lo_d[14 - 3*(r-9) -: 3], 1'b0};
    end
    return b;
  endfunction

  initial begin
    if (FONT_FILE != "") begin
      $readmemh(FONT_FILE, rom);
    end else begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 128; c++)
          rom[r*128 + c] = glyph_row(7'(c), r);
    end
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end

endmodule
