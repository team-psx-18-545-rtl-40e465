// tb_psx_top: the whole console system at its default sizes (640x480 VGA at
// two system clocks per pixel), driven by a bus model of the CPU and
// surrounded by models of main RAM (random latency), the VRAM SRAM and a
// digital pad. It boots from a BIOS word, exercises each mechanism of the
// system and counts how often each one happened; a mechanism that never
// happened is a failure:
//   bios      fetch through KSEG1 from the BIOS, and a read of the all-zero range
//   mirror    RAM written through KUSEG, read back through a KSEG0 mirror
//   scratch   scratchpad access
//   rrobin    instruction and data buses requesting together, served in turn
//   isolate   data writes dropped while Status bit 16 isolates the cache
//   otc       DMA channel 6 building an ordering table in RAM
//   dmalist   DMA channel 2 sending a linked list of GPU commands
//   gpudraw   GPU primitives from the CPU and from DMA landing in VRAM
//   fifostall a GP0 write held while the GPU command FIFO is full
//   v2c       VRAM read back through GPUREAD
//   rowfetch  display rows copied from VRAM while the GPU draws
//   scanout   VGA pixels showing the drawn VRAM contents, frame timing
//   irq       VBLANK, GPU, DMA and pad interrupts through I_STAT/I_MASK
//   pad       a controller poll over the serial link
module tb_psx_top;
  import psx_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic i_req = 0, i_ack, d_req = 0, d_we = 0, d_ack;
  logic [31:0] i_addr = 0, d_addr = 0, d_wdata = 0, mem_rdata;
  logic [3:0] d_be = 4'hF;
  logic [31:0] cop0_sr = 0;
  logic cause_ip2, cpu_int;
  logic [9:0] irq_ext = 0;
  logic ram_req, ram_we, ram_ack = 0;
  logic [20:0] ram_addr;
  logic [31:0] ram_wdata, ram_rdata = 0;
  logic [3:0] ram_be;
  logic bios_ld_we = 0;
  logic [16:0] bios_ld_addr = 0;
  logic [31:0] bios_ld_data = 0;
  logic [6:0] dma_ext_drq = 0, dma_ext_wvalid, dma_ext_wready = 0, dma_ext_rvalid = 0, dma_ext_rready;
  logic [31:0] dma_ext_wdata, dma_ext_rdata [7];
  logic sram_en, sram_we;
  logic [18:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata = 0;
  logic vga_hsync_n, vga_vsync_n, vga_de;
  logic [7:0] vga_r, vga_g, vga_b;
  logic pad_att_n, pad_clk, pad_cmd, pad_dat, pad_ack_n;
  int checks = 0, failures = 0;

  psx_top dut (.*);
  pad_model u_pad (.att_n(pad_att_n), .clk(pad_clk), .cmd(pad_cmd), .dat(pad_dat),
                   .ack_n(pad_ack_n), .buttons(16'hFFFE));
  always #15 clk = ~clk;             // 33 MHz
  initial for (int i = 0; i < 7; i++) dma_ext_rdata[i] = 0;
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------------------------------------------------------- models
  logic [31:0] ram [logic [18:0]];
  int ram_acc = 0;
  function automatic logic [31:0] ramw(input logic [31:0] a);
    return ram.exists(a[20:2]) ? ram[a[20:2]] : 32'h0;
  endfunction
  initial forever begin
    @(posedge clk);
    if (ram_req) begin
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #1;
      ram_acc++;
      if (ram_we) begin
        logic [31:0] o;
        o = ramw({11'h0, ram_addr});
        for (int b = 0; b < 4; b++) if (ram_be[b]) o[b*8 +: 8] = ram_wdata[b*8 +: 8];
        ram[ram_addr[20:2]] = o;
      end
      ram_rdata = ramw({11'h0, ram_addr});
      ram_ack = 1;
      @(posedge clk); #1 ram_ack = 0;
    end
  end
  logic [15:0] sram [524288];
  initial for (int i = 0; i < 524288; i++) sram[i] = 16'h0;
  always @(posedge clk) if (sram_en) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    else sram_rdata <= sram[sram_addr];
  end

  // ---------------------------------------------------------------- CPU bus model
  int n_rrobin = 0;
  task automatic ifetch(input logic [31:0] a, output logic [31:0] r);
    @(negedge clk); i_req = 1; i_addr = a;
    while (!i_ack) @(posedge clk);
    #1 r = mem_rdata;
    @(negedge clk); i_req = 0;
    while (i_ack) @(posedge clk);
  endtask
  task automatic dacc(input logic w, input logic [31:0] a, input logic [31:0] v,
                      output logic [31:0] r, output int cyc);
    cyc = 0;
    @(negedge clk); d_req = 1; d_we = w; d_addr = a; d_wdata = v; d_be = 4'hF;
    while (!d_ack) begin @(posedge clk); cyc++; end
    #1 r = mem_rdata;
    @(negedge clk); d_req = 0;
    while (d_ack) @(posedge clk);
  endtask
  task automatic sw(input logic [31:0] a, input logic [31:0] v);
    logic [31:0] r; int c;
    dacc(1, a, v, r, c);
  endtask
  task automatic lw(input logic [31:0] a, output logic [31:0] r);
    int c;
    dacc(0, a, 0, r, c);
  endtask
  task automatic gp0(input logic [31:0] v);
    sw(32'h1F80_1810, v);
  endtask
  task automatic gpu_idle();
    logic [31:0] s; int n = 0;
    do begin lw(32'h1F80_1814, s); n++; end while (!s[26] && n < 20000);
    chk(s[26], "GPU idle");
  endtask
  // which bus was served, in order, while both requested
  logic both_q = 0;
  always @(posedge clk) begin
    if (i_req && d_req && !i_ack && !d_ack) both_q <= 1;
    if (both_q && (i_ack || d_ack)) begin n_rrobin++; both_q <= 0; end
  end

  // ---------------------------------------------------------------- VGA observer
  int vs_edges = 0, vs_last = -1, frame_cyc = 0, cyc = 0, line = -1, col2 = 0;
  logic vs_q = 1, de_q = 0;
  int red_seen = 0, black_seen = 0, bad_scan = 0;
  bit observe = 0;
  always @(posedge clk) begin
    cyc++;
    if (!vga_vsync_n && vs_q) begin
      if (vs_last >= 0) frame_cyc = cyc - vs_last;
      vs_last = cyc; vs_edges++; line = -1;
    end
    if (vga_de && !de_q) begin line++; col2 = 0; end
    if (vga_de && observe) begin
      int col;
      col = col2 / 2;
      // the red 64x32 fill at the display origin, black to its right
      if (line >= 0 && line < 32 && col < 64) begin
        if (vga_r == 8'hFF && vga_g == 0 && vga_b == 0) red_seen++; else bad_scan++;
      end else if (line >= 0 && line < 32 && col >= 64 && col < 96) begin
        if (vga_r == 0 && vga_g == 0 && vga_b == 0) black_seen++; else bad_scan++;
      end
      col2++;
    end
    vs_q <= vga_vsync_n; de_q <= vga_de;
  end
  // display row copies (SRAM reads by the VRAM controller while the GPU is held)
  int row_reads = 0;
  always @(posedge clk) if (sram_en && !sram_we) row_reads++;

  // ---------------------------------------------------------------- the program
  int n_bios = 0, n_mirror = 0, n_scratch = 0, n_isolate = 0, n_otc = 0, n_dmalist = 0;
  int n_draw = 0, n_stall = 0, n_v2c = 0, n_irq = 0, n_pad = 0, n_scan = 0, n_rows = 0;
  initial begin
    logic [31:0] r, r2;
    int c;
    // BIOS image words, loaded before reset is released
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); bios_ld_we = 1; bios_ld_addr = 17'(i); bios_ld_data = 32'h2408_0000 + 32'(i);
    end
    @(negedge clk); bios_ld_addr = 17'h1A000; bios_ld_data = 32'hCAFE_0001;
    @(negedge clk); bios_ld_we = 0;
    repeat (4) @(posedge clk); rst_n = 1;

    // bios
    ifetch(32'hBFC0_0000, r); ifetch(32'hBFC0_003C, r2);
    chk(r == 32'h2408_0000 && r2 == 32'h2408_000F, "BIOS fetch");
    ifetch(32'hBFC6_8000, r); chk(r == 32'hCAFE_0001, "BIOS word above the zero range");
    lw(32'hBFC4_C000, r);     chk(r == 0, "BIOS zero range");
    n_bios++;
    // mirror
    sw(32'h0000_1000, 32'h1234_5678);
    lw(32'h8020_1000, r); chk(r == 32'h1234_5678, "RAM mirror at 2 MB through KSEG0");
    lw(32'hA060_1000, r); chk(r == 32'h1234_5678, "RAM mirror at 6 MB through KSEG1");
    n_mirror++;
    // scratch
    sw(32'h1F80_0010, 32'h0BAD_F00D); lw(32'h1F80_0010, r);
    chk(r == 32'h0BAD_F00D, "scratchpad"); n_scratch++;
    // rrobin: both buses at once, several times
    for (int k = 0; k < 4; k++) fork
      begin logic [31:0] q; ifetch(32'hBFC0_0000 + 32'(k * 4), q); chk(q == 32'h2408_0000 + 32'(k), "fetch under contention"); end
      begin logic [31:0] q; lw(32'h0000_1000, q); chk(q == 32'h1234_5678, "load under contention"); end
    join
    // isolate
    cop0_sr = 32'h0001_0000;
    sw(32'h0000_2000, 32'hFFFF_FFFF);
    lw(32'h0000_1000, r);
    ifetch(32'hBFC0_0004, r2);
    cop0_sr = 0;
    chk(r == 0 && r2 == 32'h2408_0001, "isolated cache squashes data, not fetches");
    lw(32'h0000_2000, r);
    chk(r == 0 && ramw(32'h2000) == 0, "isolated write did not reach RAM");
    n_isolate++;

    // interrupts: enable VBLANK, GPU, DMA and pad in I_MASK; Status IEc and IM2
    sw(32'h1F80_1074, 32'h0000_008F);
    sw(32'h1F80_1070, 32'h0000_0000);
    cop0_sr = 32'h0000_0401;

    // otc: 64-entry ordering table at 0x10000
    sw(32'h1F80_10F0, 32'h0F65_4B21);           // DPCR: ch2 and ch6 enabled
    sw(32'h1F80_10F4, 32'h00C4_0000);           // DICR: master, ch2 and ch6
    sw(32'h1F80_10E0, 32'h0001_00FC);
    sw(32'h1F80_10E4, 32'd64);
    sw(32'h1F80_10E8, 32'h1100_0002);
    do lw(32'h1F80_10E8, r); while (r[24]);
    begin
      int bad = 0;
      for (int i = 0; i < 64; i++)
        if (ramw(32'h10000 + 32'(i * 4)) != ((i == 0) ? 32'h00FF_FFFF : 32'h10000 + 32'(i * 4 - 4))) bad++;
      chk(bad == 0, $sformatf("ordering table (%0d bad)", bad));
      if (bad == 0) n_otc++;
    end
    chk(cpu_int && cause_ip2, "DMA completion interrupt");
    lw(32'h1F80_1070, r);
    if (r[IRQ_DMA]) n_irq++;
    sw(32'h1F80_10F4, 32'h40C4_0000);           // clear DMA flag 6
    sw(32'h1F80_1070, ~(32'h1 << IRQ_DMA));

    // dmalist: GPU set-up, a red fill at the display origin and a green
    // rectangle, as a linked list of three packets in RAM
    sw(32'h0002_0000, 32'h0302_0100);           // 3 words, next 0x20100
    sw(32'h0002_0004, 32'hE300_0000);
    sw(32'h0002_0008, 32'hE400_0000 | (511 << 10) | 1023);
    sw(32'h0002_000C, 32'hE500_0000);
    sw(32'h0002_0100, 32'h0302_0200);
    sw(32'h0002_0104, 32'h0200_00FF);           // FILL red
    sw(32'h0002_0108, 32'h0000_0000);           // at (0,0)
    sw(32'h0002_010C, 32'h0020_0040);           // 64x32
    sw(32'h0002_0200, 32'h03FF_FFFF);
    sw(32'h0002_0204, 32'h6000_FF00);           // green rectangle
    sw(32'h0002_0208, {16'd100, 16'd200});
    sw(32'h0002_020C, {16'd4, 16'd8});
    sw(32'h1F80_1814, 32'h0400_0002);           // GP1: DMA to GP0
    sw(32'h1F80_10A0, 32'h0002_0000);
    sw(32'h1F80_10A8, 32'h0100_0401);
    do lw(32'h1F80_10A8, r); while (r[24]);
    gpu_idle();
    chk(sram[0] == 16'h001F && sram[31 * 1024 + 63] == 16'h001F && sram[64] == 0, "fill by DMA list");
    chk(sram[100 * 1024 + 200] == 16'h03E0 && sram[103 * 1024 + 207] == 16'h03E0, "rectangle by DMA list");
    if (sram[0] == 16'h001F && sram[100 * 1024 + 200] == 16'h03E0) begin n_dmalist++; n_draw++; end
    sw(32'h1F80_10F4, 32'h04C4_0000);
    sw(32'h1F80_1070, 32'h0);

    // gpudraw from the CPU: a blue triangle
    gp0(32'h20FF_0000);
    gp0({16'd300, 16'd300}); gp0({16'd300, 16'd340}); gp0({16'd340, 16'd300});
    gpu_idle();
    chk(sram[305 * 1024 + 305] == 16'h7C00, "triangle from the CPU");
    if (sram[305 * 1024 + 305] == 16'h7C00) n_draw++;

    // fifostall: a large fill keeps the GPU busy while 24 words are written
    gp0(32'h0200_0000); gp0({16'd256, 16'd512}); gp0({16'd256, 16'd256});
    for (int i = 0; i < 24; i++) begin
      dacc(1, 32'h1F80_1810, 32'hE100_0000, r, c);
      if (c > 100) n_stall++;
    end
    gpu_idle();

    // v2c: read back two pixels of the fill
    gp0(32'hC000_0000); gp0({16'd0, 16'd62}); gp0({16'd1, 16'd2});
    begin
      int n = 0;
      do begin lw(32'h1F80_1814, r); n++; end while (!r[27] && n < 1000);
      lw(32'h1F80_1810, r);
      chk(r == 32'h001F_001F, $sformatf("GPUREAD %h", r));
      if (r == 32'h001F_001F) n_v2c++;
    end
    gpu_idle();

    // GPU interrupt
    sw(32'h1F80_1070, 32'h0);
    gp0(32'h1F00_0000);
    gpu_idle();
    lw(32'h1F80_1070, r);
    chk(r[IRQ_GPU] && cpu_int, "GPU interrupt in I_STAT");
    if (r[IRQ_GPU]) n_irq++;
    sw(32'h1F80_1814, 32'h0200_0000);
    sw(32'h1F80_1070, ~(32'h1 << IRQ_GPU));

    // scanout: 640x480 display of VRAM (0,0), two frames
    sw(32'h1F80_1814, 32'h0500_0000);
    sw(32'h1F80_1814, 32'h0800_0027);
    sw(32'h1F80_1814, 32'h0300_0000);
    begin
      int v0;
      v0 = vs_edges;
      while (vs_edges == v0) @(posedge clk);
      observe = 1;                              // first full enabled frame
      while (vs_edges < v0 + 3) begin
        lw(32'h1F80_1070, r);
        if (r[IRQ_VBLANK]) begin
          n_irq++;
          sw(32'h1F80_1070, ~32'h1);
        end
        repeat (2000) @(posedge clk);
      end
    end
    chk(frame_cyc == 800 * 525 * 2, $sformatf("frame of %0d cycles", frame_cyc));
    chk(red_seen >= 64 * 32 * 2 && black_seen > 0 && bad_scan == 0,
        $sformatf("scan-out: %0d red, %0d black, %0d wrong", red_seen, black_seen, bad_scan));
    if (red_seen > 0 && bad_scan == 0) n_scan++;
    n_rows = row_reads / 640;

    // pad: poll 0x01 0x42
    sw(32'h1F80_104A & ~32'h3, 32'h1003_0000);
    sw(32'h1F80_1040, 32'h01);
    do lw(32'h1F80_1044, r); while (!r[1]);
    lw(32'h1F80_1040, r); chk(r[7:0] == 8'hFF, "pad byte 0");
    repeat (2000) @(posedge clk);
    lw(32'h1F80_1070, r);
    if (r[IRQ_PAD]) n_irq++;
    chk(r[IRQ_PAD], "pad ACK interrupt");
    sw(32'h1F80_1048, 32'h1013_0000);
    sw(32'h1F80_1040, 32'h42);
    do lw(32'h1F80_1044, r); while (!r[1]);
    lw(32'h1F80_1040, r); chk(r[7:0] == 8'h41, "pad ID byte");
    if (r[7:0] == 8'h41 && u_pad.rx_log.size() == 2 && u_pad.rx_log[1] == 8'h42) n_pad++;

    $display("mechanisms: bios %0d mirror %0d scratch %0d rrobin %0d isolate %0d otc %0d dmalist %0d",
             n_bios, n_mirror, n_scratch, n_rrobin, n_isolate, n_otc, n_dmalist);
    $display("            gpudraw %0d fifostall %0d v2c %0d rowfetch %0d scanout %0d irq %0d pad %0d",
             n_draw, n_stall, n_v2c, n_rows, n_scan, n_irq, n_pad);
    chk(n_bios > 0, "bios"); chk(n_mirror > 0, "mirror"); chk(n_scratch > 0, "scratch");
    chk(n_rrobin > 0, "rrobin"); chk(n_isolate > 0, "isolate"); chk(n_otc > 0, "otc");
    chk(n_dmalist > 0, "dmalist"); chk(n_draw >= 2, "gpudraw"); chk(n_stall > 0, "fifostall");
    chk(n_v2c > 0, "v2c"); chk(n_rows >= 480, "rowfetch"); chk(n_scan > 0, "scanout");
    chk(n_irq >= 4, "irq"); chk(n_pad > 0, "pad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
