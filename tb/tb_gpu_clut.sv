// tb_gpu_clut: fills all 256 entries and reads them back in random order,
// checking the one-cycle read latency.
module tb_gpu_clut;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] r [256];
  int checks = 0, failures = 0;

  gpu_clut dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 16'($urandom); r[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); raddr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== r[raddr]) begin failures++; $display("FAIL %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
