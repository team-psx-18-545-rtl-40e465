// tb_row_buffer: writes both banks, then reads them back; rdata must follow
// only clock edges with the read enable high.
module tb_row_buffer;
  logic clk = 0, we = 0, re = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] r [2048];
  int checks = 0, failures = 0;

  row_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); we = 1; waddr = 11'(i); wdata = 16'($urandom); r[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      logic [10:0] a;
      a = 11'($urandom);
      @(negedge clk); re = 1; raddr = a;
      @(negedge clk); re = 0; raddr = 11'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== r[a]) begin failures++; $display("FAIL %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
