// tb_irq_latch: rising edges on interrupt lines set I_STAT bits (a held level
// sets it only once), I_STAT writes AND, I_MASK writes replace, Cause IP2 is
// the OR of status AND mask, the CPU interrupt also needs Status bits 0 and
// 10, and Status bit 16 is passed out as isolate-cache.
module tb_irq_latch;
  logic clk = 0, rst_n = 1, stat_we = 0, mask_we = 0;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [9:0] irq_in = 0;
  logic [31:0] wdata = 0, i_stat, i_mask, cop0_sr = 0;
  logic cause_ip2, cpu_int, iso_cache;
  int checks = 0, failures = 0;
  logic [9:0] es = 0, em = 0;

  irq_latch dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [9:0] nl; int op;
      @(negedge clk);
      op = $urandom_range(0, 3);
      nl = 10'($urandom);
      stat_we = (op == 1); mask_we = (op == 2); wdata = $urandom;
      cop0_sr = $urandom;
      es = ((op == 1) ? (es & wdata[9:0]) : es) | (nl & ~irq_in);
      if (op == 2) em = wdata[9:0];
      irq_in = nl;
      @(posedge clk); #1;
      stat_we = 0; mask_we = 0;
      chk(i_stat == 32'(es), $sformatf("stat %h vs %h", i_stat, es));
      chk(i_mask == 32'(em), "mask");
      chk(cause_ip2 == |(es & em), "cause");
      chk(cpu_int == (|(es & em) && cop0_sr[0] && cop0_sr[10]), "cpu_int");
      chk(iso_cache == cop0_sr[16], "iso");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
