// tb_sync_fifo: fills the FIFO past full, drains it past empty and checks the
// order, the flags and the count against a queue kept by the testbench; also
// checks the synchronous flush.
module tb_sync_fifo;
  logic clk = 0, rst_n = 1, clr = 0, wr = 0, rd = 0;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [31:0] wdata = 0, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  sync_fifo #(.W(32), .D(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      wr = 1; wdata = $urandom;
      if (q.size() < 16) q.push_back(wdata);
      @(posedge clk); #1;
      wr = 0;
      chk(count == 5'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
    end
    chk(full, "full after 16 pushes");
    while (q.size() > 0) begin
      @(negedge clk);
      chk(rdata == q[0], $sformatf("head %h vs %h", rdata, q[0]));
      rd = 1;
      void'(q.pop_front());
      @(posedge clk); #1;
      rd = 0;
    end
    chk(empty && count == 0, "empty after drain");
    // simultaneous push and pop keeps the count
    @(negedge clk); wr = 1; wdata = 32'hA5A5_0001;
    @(posedge clk); #1;
    @(negedge clk); wr = 1; rd = 1; wdata = 32'hA5A5_0002;
    chk(rdata == 32'hA5A5_0001, "fall-through head");
    @(posedge clk); #1; wr = 0; rd = 0;
    chk(count == 1 && rdata == 32'hA5A5_0002, "push+pop");
    @(negedge clk); clr = 1; @(posedge clk); #1; clr = 0;
    chk(empty, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
