// tb_io_controller: drives the register window the way the address
// interpreter does (request held until a one-cycle ack) and checks that each
// register reaches its unit: interrupt status and mask, the DMA block, the
// controller port, GP0/GP1 and GPUREAD/GPUSTAT, each with the right strobe
// exactly once and the right read data; that other offsets behave as plain
// byte-enabled registers; and that a GP0 write waits while the FIFO is full.
module tb_io_controller;
  import psx_pkg::*;
  logic clk = 0, rst_n = 1, io_req = 0, io_we = 0, io_ack;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [12:0] io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata;
  logic [3:0] io_be = 4'hF;
  logic irq_stat_we, irq_mask_we, dma_we, joy_we, joy_re, gp0_we, gp1_we, gpuread_re;
  logic [31:0] i_stat = 32'h0000_0011, i_mask = 32'h0000_0022, dma_rdata, joy_rdata;
  logic [31:0] gpuread = 32'h4444_4444, gpustat = 32'h1C00_0000, sub_wdata;
  logic [6:0] dma_addr;
  logic [1:0] joy_addr;
  logic [3:0] sub_be;
  logic gp0_ready = 1;
  int checks = 0, failures = 0;
  int n_stat = 0, n_mask = 0, n_dma = 0, n_joyw = 0, n_joyr = 0, n_gp0 = 0, n_gp1 = 0, n_gr = 0;
  logic [31:0] last_sub;

  io_controller dut (.*);
  assign dma_rdata = {25'h1AB_CDEF, dma_addr};
  assign joy_rdata = {30'h0ABC_DEF0, joy_addr};
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
  always @(posedge clk) begin
    n_stat += int'(irq_stat_we); n_mask += int'(irq_mask_we); n_dma += int'(dma_we);
    n_joyw += int'(joy_we); n_joyr += int'(joy_re); n_gp0 += int'(gp0_we);
    n_gp1 += int'(gp1_we); n_gr += int'(gpuread_re);
    if (irq_stat_we | irq_mask_we | dma_we | joy_we | gp0_we | gp1_we) last_sub <= sub_wdata;
  end

  task automatic acc(input logic w, input logic [12:0] a, input logic [31:0] d,
                     input logic [3:0] be, output logic [31:0] r, output int cycles);
    cycles = 0;
    @(negedge clk); io_req = 1; io_we = w; io_addr = a; io_wdata = d; io_be = be;
    do begin @(posedge clk); #1 cycles++; end while (!io_ack && cycles < 1000);
    r = io_rdata;
    @(negedge clk); io_req = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r; int cy;
    repeat (2) @(posedge clk); rst_n = 1;
    acc(1, 13'h070, 32'hFFFF_FFFE, 4'hF, r, cy);
    chk(n_stat == 1 && last_sub == 32'hFFFF_FFFE, "I_STAT write strobe");
    acc(0, 13'h070, 0, 4'hF, r, cy); chk(r == i_stat, "I_STAT read");
    acc(1, 13'h074, 32'h0000_0005, 4'hF, r, cy); chk(n_mask == 1, "I_MASK write strobe");
    acc(0, 13'h074, 0, 4'hF, r, cy); chk(r == i_mask, "I_MASK read");
    acc(1, 13'h0A8, 32'h0100_0401, 4'hF, r, cy);
    chk(n_dma == 1 && last_sub == 32'h0100_0401, "DMA write strobe");
    acc(0, 13'h0F4, 0, 4'hF, r, cy); chk(r == {25'h1AB_CDEF, 7'h74}, "DMA read offset");
    acc(1, 13'h04A, 32'h1003_0000, 4'hC, r, cy); chk(n_joyw == 1, "JOY write strobe");
    acc(0, 13'h044, 0, 4'hF, r, cy); chk(r == {30'h0ABC_DEF0, 2'd1} && n_joyr == 1, "JOY_STAT read");
    acc(1, 13'h814, 32'h0300_0000, 4'hF, r, cy); chk(n_gp1 == 1, "GP1 write strobe");
    acc(0, 13'h814, 0, 4'hF, r, cy); chk(r == gpustat, "GPUSTAT read");
    acc(0, 13'h810, 0, 4'hF, r, cy); chk(r == gpuread && n_gr == 1, "GPUREAD read");
    acc(1, 13'h810, 32'h0200_00FF, 4'hF, r, cy);
    chk(n_gp0 == 1 && last_sub == 32'h0200_00FF, "GP0 write strobe");
    chk(cy <= 3, $sformatf("register access takes %0d cycles", cy));
    // GP0 stall while the FIFO is full
    gp0_ready = 0;
    fork
      begin repeat (20) @(posedge clk); #1 gp0_ready = 1; end
      acc(1, 13'h810, 32'hE100_0000, 4'hF, r, cy);
    join
    chk(cy >= 20 && n_gp0 == 2, $sformatf("GP0 write held %0d cycles", cy));
    // plain registers (timers, SPU, CD-ROM space): storage with byte enables
    for (int i = 0; i < 20; i++) begin
      logic [12:0] a; logic [31:0] d, d2; logic [3:0] be;
      do a = 13'h100 + 13'($urandom_range(0, 1700) * 4); while (a[12:4] == 9'h004 || a[12:3] == 10'h102);
      d = $urandom; d2 = $urandom; be = 4'($urandom);
      acc(1, a, d, 4'hF, r, cy);
      acc(1, a, d2, be, r, cy);
      acc(0, a, 0, 4'hF, r, cy);
      for (int b = 0; b < 4; b++) if (be[b]) d[b*8 +: 8] = d2[b*8 +: 8];
      chk(r == d, $sformatf("plain register %h: %h vs %h", a, r, d));
    end
    chk(n_stat == 1 && n_mask == 1 && n_dma == 1 && n_gp1 == 1 && n_gp0 == 2, "no stray strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
