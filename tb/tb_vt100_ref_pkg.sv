// tb_vt100_ref_pkg -- reference model shared by the video testbenches.
//
// Written from the specification of the design, not from its RTL: the
// built-in glyphs are described as pictures ('#' = pixel set), the colour
// conversion as the output table, and the screen layout as arithmetic on
// cell addresses.
package tb_vt100_ref_pkg;

  // One row (0..4) of a hex digit as a 3-character picture.
  function automatic string digit_row(input int d, input int r);
    string rows [16][5] = '{
      '{"###", "#.#", "#.#", "#.#", "###"},   // 0
      '{".#.", "##.", ".#.", ".#.", "###"},   // 1
      '{"###", "..#", "###", "#..", "###"},   // 2
      '{"###", "..#", "###", "..#", "###"},   // 3
      '{"#.#", "#.#", "###", "..#", "..#"},   // 4
      '{"###", "#..", "###", "..#", "###"},   // 5
      '{"###", "#..", "###", "#.#", "###"},   // 6
      '{"###", "..#", "..#", "..#", "..#"},   // 7
      '{"###", "#.#", "###", "#.#", "###"},   // 8
      '{"###", "#.#", "###", "..#", "###"},   // 9
      '{".#.", "#.#", "###", "#.#", "#.#"},   // A
      '{"##.", "#.#", "##.", "#.#", "##."},   // B
      '{".##", "#..", "#..", "#..", ".##"},   // C
      '{"##.", "#.#", "#.#", "#.#", "##."},   // D
      '{"###", "#..", "###", "#..", "###"},   // E
      '{"###", "#..", "###", "#..", "#.."}    // F
    };
    return rows[d][r];
  endfunction

  // Is pixel (x, y) of the built-in glyph for 'code' set?  x = 0 is the left.
  function automatic bit glyph_pixel(input int code, input int y, input int x);
    string s;
    if (code == 0 || code == 32) return 1'b0;
    // high digit: rows 3..7, columns 1..3
    if (y >= 3 && y <= 7 && x >= 1 && x <= 3) begin
      s = digit_row(code / 16, y - 3);
      return s[x - 1] == "#";
    end
    // low digit: rows 9..13, columns 4..6
    if (y >= 9 && y <= 13 && x >= 4 && x <= 6) begin
      s = digit_row(code % 16, y - 9);
      return s[x - 4] == "#";
    end
    return 1'b0;
  endfunction

  // 4-bit colour {hi, b, g, r} to {red[2:0], green[2:0], blue[1:0]}.
  function automatic logic [7:0] rgb_of(input logic [3:0] c);
    int r, g, b;
    bit hi;
    hi = c[3];
    r = c[0] ? (hi ? 3'b110 : 3'b010) : 0;
    g = c[1] ? (hi ? 3'b110 : 3'b010) : 0;
    b = c[2] ? (hi ? 2'b11  : 2'b01)  : 0;
    return {r[2:0], g[2:0], b[1:0]};
  endfunction

  // Expected 8-bit colour of pixel (px, py) of a cell, given the cell word,
  // whether the cursor is on it, and whether it lies in the text area.
  function automatic logic [7:0] cell_pixel(input logic [15:0] w, input bit cursor,
                                            input int py, input int px);
    bit on;
    on = glyph_pixel(int'(w[14:8]), py, px) ^ w[15] ^ cursor;
    return rgb_of(on ? w[7:4] : w[3:0]);
  endfunction

endpackage
