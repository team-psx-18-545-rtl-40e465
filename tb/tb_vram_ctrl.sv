// tb_vram_ctrl: the VRAM arbiter between a GPU model issuing random reads and
// writes and display row requests, over an SRAM model with one cycle of read
// latency. Checks GPU read data against a reference copy, that every row copy
// writes exactly row_len words holding the VRAM row into the requested bank,
// that the GPU is never granted while a row is pending, and that a row copy
// takes row_len + 2 cycles after its first read (row_len + 3 clock edges counted
// from the edge that starts that read).
module tb_vram_ctrl;
  localparam int ROW_W = 64;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic g_req = 0, g_we = 0, g_gnt, g_rvalid;
  logic [18:0] g_addr = 0;
  logic [15:0] g_wdata = 0, g_rdata;
  logic row_req = 0, row_bank = 0, row_done;
  logic [8:0] row_y = 0;
  logic [9:0] row_x0 = 0;
  logic [10:0] row_len = 0;
  logic rb_we;
  logic [$clog2(ROW_W):0] rb_waddr;
  logic [15:0] rb_wdata;
  logic sram_en, sram_we;
  logic [18:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata = 0;
  int checks = 0, failures = 0;

  vram_ctrl #(.ROW_W(ROW_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // SRAM model: 1024 x 512 words, read data one cycle after the enable
  logic [15:0] sram [524288];
  logic [15:0] refm [524288];
  initial for (int i = 0; i < 524288; i++) begin sram[i] = 16'(i * 7); refm[i] = 16'(i * 7); end
  always @(posedge clk) if (sram_en) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    else sram_rdata <= sram[sram_addr];
  end

  // row-buffer capture
  logic [15:0] rb [2*ROW_W];
  int rb_writes = 0;
  always @(posedge clk) if (rb_we) begin rb[rb_waddr] <= rb_wdata; rb_writes++; end
  // the GPU must not be granted while a row is requested
  int bad_gnt = 0;
  always @(posedge clk) if (g_gnt && row_req) bad_gnt++;

  // GPU model: random accesses, reads checked against the reference
  int gpu_ops = 0, gpu_reads = 0;
  logic [18:0] rd_q [$];
  bit gpu_run = 1;
  bit g_gnt_seen = 0;
  always @(posedge clk) if (g_rvalid) begin
    logic [18:0] a;
    a = rd_q.pop_front();
    checks++; gpu_reads++;
    if (g_rdata !== refm[a]) begin failures++; $display("FAIL GPU read %h", a); end
  end
  initial begin
    @(posedge rst_n);
    while (gpu_run) begin
      @(negedge clk);
      if (!g_req || g_gnt_seen) begin
        g_req = 1'($urandom);
        g_we = 1'($urandom);
        g_addr = {9'($urandom_range(0, 15)), 10'($urandom_range(0, 63))};
        g_wdata = 16'($urandom);
      end
    end
    g_req = 0;
  end
  always @(posedge clk) begin
    g_gnt_seen <= g_gnt;
    if (g_gnt) begin
      gpu_ops++;
      if (g_we) refm[g_addr] <= g_wdata; else rd_q.push_back(g_addr);
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int t0, t1, w0;
      repeat ($urandom_range(5, 40)) @(posedge clk);
      @(negedge clk);
      row_req = 1; row_y = 9'($urandom_range(0, 15)); row_x0 = 10'($urandom_range(0, 60));
      row_len = 11'($urandom_range(1, ROW_W)); row_bank = 1'($urandom);
      w0 = rb_writes;
      t0 = -1; t1 = 0;
      while (!row_done) begin
        @(posedge clk);
        if (t0 < 0 && sram_en && !g_gnt) t0 = 0;
        if (t0 >= 0) t1++;
      end
      #1 row_req = 0;
      @(posedge clk); #1;
      chk(rb_writes - w0 == int'(row_len), $sformatf("row %0d: %0d writes for %0d", n, rb_writes - w0, row_len));
      begin
        int bad = 0;
        for (int i = 0; i < int'(row_len); i++)
          if (rb[{row_bank, 6'(i)}] !== refm[{row_y, 10'(row_x0 + 10'(i))}]) bad++;
        chk(bad == 0, $sformatf("row %0d content (%0d bad)", n, bad));
      end
      chk(t1 == int'(row_len) + 3, $sformatf("row copy took %0d cycles for %0d", t1, row_len));
    end
    gpu_run = 0;
    repeat (5) @(posedge clk);
    chk(bad_gnt == 0, "no GPU grant during a row request");
    chk(gpu_reads > 50 && gpu_ops > 100, $sformatf("GPU traffic %0d ops", gpu_ops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
