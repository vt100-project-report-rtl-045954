// tb_colour_conv -- exhaustive check of the 4-bit to 8-bit colour mapping
// against the output table, bit by bit.
module tb_colour_conv;
  import vt100_pkg::*;

  colour_t    colour;
  logic [2:0] red, green;
  logic [1:0] blue;
  int checks = 0, failures = 0;

  colour_conv dut (.colour(colour), .red(red), .green(green), .blue(blue));

  initial begin
    for (int i = 0; i < 16; i++) begin
      bit r, g, b, hi;
      logic [7:0] exp_v;
      {hi, b, g, r} = 4'(i);
      colour = colour_t'(4'(i));
      #1;
      // Red0 = 0, Red1 = red, Red2 = red & hi, same for green;
      // Blue0 = blue, Blue1 = blue & hi.
      exp_v = {r & hi, r, 1'b0, g & hi, g, 1'b0, b & hi, b};
      checks++;
      if ({red, green, blue} !== exp_v) begin
        failures++;
        $display("FAIL colour %h: got %b expected %b", i, {red, green, blue}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
