// tb_row_buffer -- writes random cells to random addresses and checks the
// combinational read port against a reference array.
module tb_row_buffer;
  logic clk = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [128];
  int checks = 0, failures = 0;

  row_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = 16'($urandom);
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 7'($urandom);
      wdata = 16'($urandom);
      raddr = 7'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
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
