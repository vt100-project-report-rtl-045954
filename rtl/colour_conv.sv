// colour_conv -- 4-bit terminal colour to the 8-bit RGB of the VGA output.
//
// The terminal needs the eight basic colours plus a high-intensity variant,
// so a colour is stored as one bit each of red, green and blue and one
// high-intensity bit.  The board drives VGA through 3 red, 3 green and 2 blue
// bits.  The mapping below is the one of the source design: a plain colour
// drives the middle bit of red and green and the low bit of blue; high
// intensity adds the top bit of each.  The lowest red and green bits are
// never driven.  Purely combinational.
module colour_conv
  import vt100_pkg::*;
(
  input  colour_t    colour,
  output logic [2:0] red,
  output logic [2:0] green,
  output logic [1:0] blue
);

  always_comb begin
    red   = {colour.red   & colour.hi, colour.red,   1'b0};
    green = {colour.green & colour.hi, colour.green, 1'b0};
    blue  = {colour.blue  & colour.hi, colour.blue};
  end

endmodule
