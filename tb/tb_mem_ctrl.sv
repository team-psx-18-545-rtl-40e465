// tb_mem_ctrl: three four-phase masters (instruction, data, DMA) share one
// responder that answers after a random delay with a value derived from the
// address. Checks: every master reads what it asked for, writes reach the
// responder intact, masters that all keep requesting are served in strict
// rotation, and data-bus accesses are answered at once with zero while the
// squash input is high.
module tb_mem_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [2:0] req = 0, we = 0, ack;
  logic [31:0] addr [3], wdata [3];
  logic [3:0] be [3];
  logic [31:0] rdata;
  logic d_squash = 0;
  logic ai_start, ai_we, ai_done;
  logic [31:0] ai_addr, ai_wdata, ai_rdata;
  logic [3:0] ai_be;
  int checks = 0, failures = 0;
  int order [$];
  int responder_accesses = 0;

  mem_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] f(input logic [31:0] a);
    return a ^ 32'hC3C3_1234;
  endfunction

  // responder: random latency, one access at a time
  logic [31:0] last_w_addr, last_w_data;
  initial begin
    ai_done = 0; ai_rdata = 0;
    forever begin
      @(posedge clk);
      if (ai_start) begin
        logic [31:0] a; logic w; logic [31:0] d;
        a = ai_addr; w = ai_we; d = ai_wdata;
        responder_accesses++;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        #1 ai_done = 1; ai_rdata = w ? 32'h0 : f(a);
        if (w) begin last_w_addr = a; last_w_data = d; end
        @(posedge clk); #1 ai_done = 0;
      end
    end
  end

  task automatic access(input int c, input logic w, input logic [31:0] a, input logic [31:0] d,
                        output logic [31:0] r);
    @(negedge clk);
    req[c] = 1; we[c] = w; addr[c] = a; wdata[c] = d; be[c] = 4'hF;
    while (!ack[c]) @(posedge clk);
    #1 r = rdata;
    order.push_back(c);
    @(negedge clk);
    req[c] = 0;
    while (ack[c]) @(posedge clk);
  endtask

  task automatic master(input int c, input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] a, r;
      a = {$urandom} & 32'h1FFF_FFFC;
      access(c, 0, a, 0, r);
      chk(r == f(a), $sformatf("ch%0d read %h got %h", c, a, r));
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin addr[i] = 0; wdata[i] = 0; be[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // all three request back to back: the service order must rotate
    fork master(0, 20); master(1, 20); master(2, 20); join
    begin
      int bad = 0;
      for (int i = 1; i < order.size(); i++)
        if (order[i] != (order[i-1] + 1) % 3) bad++;
      chk(order.size() == 60 && bad == 0, $sformatf("rotation broken %0d times", bad));
    end
    // write through each channel
    for (int c = 0; c < 3; c++) begin
      logic [31:0] r, a, d;
      a = 32'h0010_0000 + 32'(c * 4); d = $urandom;
      access(c, 1, a, d, r);
      chk(last_w_addr == a && last_w_data == d, $sformatf("write ch%0d", c));
    end
    // squash: data channel answered without reaching the responder
    begin
      logic [31:0] r; int n_before;
      n_before = responder_accesses;
      d_squash = 1;
      access(1, 1, 32'h0000_0100, 32'hDEAD_BEEF, r);
      access(1, 0, 32'h0000_0100, 0, r);
      chk(r == 0 && responder_accesses == n_before, "squashed data access");
      access(0, 0, 32'h0000_0200, 0, r);
      chk(r == f(32'h200) && responder_accesses == n_before + 1, "instruction not squashed");
      d_squash = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
