// tb_video_ram -- random traffic on both ports of the video RAM: byte-wise
// writes and reads on port A, reads on port B, compared with a reference
// array; read data is checked one clock after the address.
module tb_video_ram;
  logic clk = 0;
  logic a_en = 0;
  logic [3:0] a_we = '0;
  logic [9:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata, b_rdata;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0;

  video_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 10'(i); a_wdata = $urandom;
      ref_mem[i] = a_wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] exp_a, exp_b;
      bit was_en;
      @(negedge clk);
      a_en = ($urandom % 4) != 0;
      a_we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      a_addr = 10'($urandom % 16);      // small range so reads hit fresh writes
      a_wdata = $urandom;
      b_addr = 10'($urandom % 16);
      was_en = a_en;
      exp_a = ref_mem[a_addr];          // read-first
      exp_b = ref_mem[b_addr];
      @(posedge clk);
      if (a_en) for (int i = 0; i < 4; i++) if (a_we[i]) ref_mem[a_addr][8*i +: 8] = a_wdata[8*i +: 8];
      #1;
      checks++;
      if (b_rdata !== exp_b) begin
        failures++;
        if (failures < 10) $display("FAIL port B addr %0d got %h expected %h", b_addr, b_rdata, exp_b);
      end
      if (was_en) begin
        checks++;
        if (a_rdata !== exp_a) begin
          failures++;
          if (failures < 10) $display("FAIL port A addr %0d got %h expected %h", a_addr, a_rdata, exp_a);
        end
      end
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
