// tb_dma: the DMA controller against a memory model with a four-phase
// handshake and random latency, and device models with random readiness.
// Covers: ordering-table clear on channel 6 (backwards list ending in
// 0x00FFFFFF), block mode RAM -> device paced by the request line, linked
// list mode RAM -> device (only data words reach the device, an empty entry
// is skipped), burst device -> RAM with the manual trigger, the end-of-
// transfer state (CHCR busy clear, MADR advanced), DICR interrupt and flag
// clearing, and DPCR priority between two waiting channels.
module tb_dma;
  import psx_pkg::*;
  localparam int CH = 7;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic reg_we = 0;
  logic [6:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [3:0] reg_be = 4'hF;
  logic m_req, m_we, m_ack = 0;
  logic [31:0] m_addr, m_wdata, m_rdata = 0;
  logic [CH-1:0] dev_drq = 0, dev_wvalid, dev_wready = 0, dev_rvalid = 0, dev_rready, busy;
  logic [31:0] dev_wdata, dev_rdata [CH];
  logic irq;
  int checks = 0, failures = 0;

  dma dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // memory model
  logic [31:0] mem [logic [21:0]];
  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a[23:2]) ? mem[a[23:2]] : 32'h0;
  endfunction
  initial forever begin
    @(posedge clk);
    if (m_req && !m_ack) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      if (m_we) mem[m_addr[23:2]] = m_wdata;
      m_rdata = rd(m_addr);
      m_ack = 1;
      while (m_req) @(posedge clk);
      #1 m_ack = 0;
    end
  end
  // device sink: records words, random readiness
  logic [31:0] got [$];
  int got_ch [$];
  always @(posedge clk) begin
    dev_wready <= CH'($urandom) | CH'($urandom);
    for (int c = 0; c < CH; c++)
      if (dev_wvalid[c] && dev_wready[c]) begin got.push_back(dev_wdata); got_ch.push_back(c); end
  end
  // device source: counter words
  logic [31:0] src_cnt = 32'h5000_0000;
  always @(posedge clk) begin
    dev_rvalid <= CH'($urandom);
    for (int c = 0; c < CH; c++) if (dev_rvalid[c] && dev_rready[c]) src_cnt <= src_cnt + 1;
  end
  always_comb for (int c = 0; c < CH; c++) dev_rdata[c] = src_cnt;

  task automatic wr(input int ch, input int r, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 7'(ch * 16 + r * 4); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rdreg(input int ch, input int r, output logic [31:0] d);
    @(negedge clk); reg_addr = 7'(ch * 16 + r * 4); #1 d = reg_rdata;
  endtask
  task automatic wait_idle(input int ch);
    int n = 0;
    while (busy[ch] && n < 50000) begin @(posedge clk); n++; end
    chk(!busy[ch], $sformatf("channel %0d finished", ch));
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk); rst_n = 1;
    rdreg(7, 0, v); chk(v == 32'h0765_4321, "DPCR reset value");
    wr(7, 0, 32'h0F65_4B21 | 32'h0000_0800 | 32'h0800_0000);  // enable ch2, ch6 (bits 11, 27) and others

    // 1. OTC clear of 16 entries, with interrupt
    wr(7, 1, 32'h00C0_0000);          // master enable + ch6 enable
    wr(6, 0, 32'h0000_013C);
    wr(6, 1, 32'd16);
    wr(6, 2, 32'h1100_0002);
    wait_idle(6);
    begin
      int bad = 0;
      for (int i = 0; i < 16; i++) begin
        logic [31:0] a, e;
        a = 32'h100 + 32'(i * 4);
        e = (i == 0) ? 32'h00FF_FFFF : a - 4;
        if (rd(a) != e) bad++;
      end
      chk(bad == 0, $sformatf("OTC table (%0d bad)", bad));
    end
    rdreg(6, 2, v); chk(v[24] == 0 && v[28] == 0, "OTC CHCR start/trigger cleared");
    rdreg(6, 0, v); chk(v == 32'h0FC, "OTC MADR after transfer");
    @(posedge clk); #1 chk(irq, "DICR interrupt raised");
    rdreg(7, 1, v); chk(v[30] && v[31], "DICR ch6 flag");
    wr(7, 1, 32'h40C0_0000);           // acknowledge flag 30
    @(posedge clk); #1 chk(!irq, "DICR interrupt cleared");

    // 2. block mode: 3 blocks of 4 words, RAM -> channel 2 device
    for (int i = 0; i < 12; i++) mem[22'((32'h2000 >> 2) + i)] = 32'hB000_0000 + 32'(i);
    got.delete(); got_ch.delete();
    wr(2, 0, 32'h2000);
    wr(2, 1, {16'd3, 16'd4});
    wr(2, 2, 32'h0100_0201);
    repeat (50) @(posedge clk);
    chk(got.size() == 0, "block mode waits for the request line");
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); dev_drq[2] = 1;
      @(negedge clk); dev_drq[2] = 0;
      repeat (60) @(posedge clk);
      chk(got.size() == 4 * (b + 1), $sformatf("block %0d delivered (%0d words)", b, got.size()));
    end
    wait_idle(2);
    begin
      int bad = 0;
      foreach (got[i]) if (got[i] != 32'hB000_0000 + 32'(i) || got_ch[i] != 2) bad++;
      chk(got.size() == 12 && bad == 0, "block mode data");
    end
    rdreg(2, 0, v); chk(v == 32'h2030, "block mode MADR");

    // 3. linked list: 2 words, an empty entry, 3 words
    mem[22'(32'h3000 >> 2)] = 32'h0200_3100;
    mem[22'(32'h3004 >> 2)] = 32'hA1;
    mem[22'(32'h3008 >> 2)] = 32'hA2;
    mem[22'(32'h3100 >> 2)] = 32'h0000_3200;
    mem[22'(32'h3200 >> 2)] = 32'h03FF_FFFF;
    mem[22'(32'h3204 >> 2)] = 32'hA3;
    mem[22'(32'h3208 >> 2)] = 32'hA4;
    mem[22'(32'h320C >> 2)] = 32'hA5;
    got.delete();
    wr(2, 0, 32'h3000);
    wr(2, 2, 32'h0100_0401);
    wait_idle(2);
    chk(got.size() == 5 && got[0] == 32'hA1 && got[1] == 32'hA2 && got[2] == 32'hA3 &&
        got[4] == 32'hA5, $sformatf("linked list data (%0d words)", got.size()));

    // 4. burst device -> RAM on channel 3, needs the trigger bit
    wr(7, 0, 32'h0765_BB21);          // ch3 enabled (bit 15), priority 3
    wr(3, 0, 32'h4000);
    wr(3, 1, 32'd5);
    wr(3, 2, 32'h0100_0000);          // start without trigger
    repeat (40) @(posedge clk);
    chk(busy[3] && rd(32'h4000) == 0, "burst waits for the trigger");
    begin
      logic [31:0] first;
      first = src_cnt;
      wr(3, 2, 32'h1100_0000);
      wait_idle(3);
      chk(rd(32'h4000) == first && rd(32'h4010) == first + 4, "burst data");
    end

    // 5. priority: ch3 (priority 1) beats ch6 (priority 5); start both at once
    wr(7, 0, 32'h0000_0000);          // all disabled
    wr(6, 0, 32'h0000_051C); wr(6, 1, 32'd8); wr(6, 2, 32'h1100_0002);
    wr(3, 0, 32'h5000);      wr(3, 1, 32'd8); wr(3, 2, 32'h1100_0000);
    wr(7, 0, 32'h0D00_9000);          // ch6 en prio 5, ch3 en prio 1
    begin
      int n = 0;
      while (busy[3] && n < 10000) begin @(posedge clk); n++; end
      chk(busy[6], "higher priority channel served first");
    end
    wait_idle(6);
    // and swapped: ch6 (priority 0) beats ch3 (priority 6)
    wr(7, 0, 32'h0000_0000);
    wr(6, 0, 32'h0000_061C); wr(6, 1, 32'd8); wr(6, 2, 32'h1100_0002);
    wr(3, 0, 32'h5100);      wr(3, 1, 32'd8); wr(3, 2, 32'h1100_0000);
    wr(7, 0, 32'h0800_E000);
    begin
      int n = 0;
      while (busy[6] && n < 10000) begin @(posedge clk); n++; end
      chk(busy[3], "priority order follows DPCR");
    end
    wait_idle(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
