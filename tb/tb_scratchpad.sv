// tb_scratchpad: random byte-enabled writes and reads against a reference
// array; every word is written in full first so nothing random is read.
module tb_scratchpad;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] be = 0;
  logic [31:0] ref_mem [256];
  int checks = 0, failures = 0;

  scratchpad dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; be = 4'hF; addr = 8'(i); wdata = $urandom;
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = 1; we = 1'($urandom); addr = 8'($urandom); be = 4'($urandom); wdata = $urandom;
      if (!we) begin
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, ref_mem[addr]);
        end
      end else
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[addr][b*8 +: 8] = wdata[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
