// psx_top: the PlayStation system around an external CPU.
//
// Wires the memory system, the hardware registers, DMA, the controller port
// and the video path into one design:
//   CPU instruction bus, CPU data bus, DMA --> mem_ctrl (round robin)
//     --> addr_interp --> main RAM port | bios_rom | scratchpad | io_controller
//   io_controller --> irq_latch (I_STAT/I_MASK), dma registers, joypad
//     registers, GPU GP0/GP1/GPUREAD/GPUSTAT, plain registers for the rest
//   dma channel 2 --> GPU GP0 FIFO; channel 6 builds ordering tables in RAM;
//     channels 0, 1, 3, 4, 5 have their device ports brought out
//   GPU --> vram_ctrl <-- display (row requests) ; vram_ctrl --> row_buffer
//     --> display --> VGA pins
// The CPU (with Cop0 and the GTE), the SDRAM that holds main memory and the
// SRAM that holds VRAM are outside: their buses are ports of this module.
// The CPU's buses use the request/acknowledge handshake described in
// mem_ctrl; main RAM answers a held request with a one-cycle ack; the VRAM
// SRAM returns read data the cycle after an access. Interrupt lines into
// I_STAT: 0 vertical blank (display), 1 GPU, 3 DMA, 7 controller; the others
// come from irq_ext. The whole design runs on one clock.
module psx_top import psx_pkg::*; #(
  parameter string BIOS_INIT = "",   // optional BIOS image for $readmemh
  parameter int    CLK_DIV   = 2     // system clocks per VGA pixel
) (
  input  logic        clk,           // system clock
  input  logic        rst_n,         // asynchronous reset, active low
  // CPU instruction bus
  input  logic        i_req,         // instruction fetch request
  input  logic [31:0] i_addr,        // fetch address
  output logic        i_ack,         // fetch acknowledge
  // CPU data bus
  input  logic        d_req,         // data request
  input  logic        d_we,          // data write
  input  logic [31:0] d_addr,        // data address
  input  logic [31:0] d_wdata,       // data write value
  input  logic [3:0]  d_be,          // data byte enables
  output logic        d_ack,         // data acknowledge
  output logic [31:0] mem_rdata,     // read data for the acknowledged bus
  // CPU Cop0 interface
  input  logic [31:0] cop0_sr,       // Cop0 Status register
  output logic        cause_ip2,     // Cop0 Cause bit 10
  output logic        cpu_int,       // interrupt taken
  input  logic [9:0]  irq_ext,       // interrupt lines of external devices
  // main RAM (SDRAM controller)
  output logic        ram_req,       // request, held until ram_ack
  output logic        ram_we,        // write
  output logic [20:0] ram_addr,      // byte address
  output logic [31:0] ram_wdata,     // write data
  output logic [3:0]  ram_be,        // byte enables
  input  logic        ram_ack,       // done (one-cycle pulse)
  input  logic [31:0] ram_rdata,     // read data
  // BIOS load port
  input  logic        bios_ld_we,    // write a BIOS word
  input  logic [16:0] bios_ld_addr,  // BIOS word address
  input  logic [31:0] bios_ld_data,  // BIOS word
  // DMA device ports of channels without a device here (0,1,3,4,5; 2 and 6 unused)
  input  logic [6:0]  dma_ext_drq,     // block requests
  output logic [6:0]  dma_ext_wvalid,  // word to the device
  input  logic [6:0]  dma_ext_wready,  // device takes the word
  output logic [31:0] dma_ext_wdata,   // word to the device
  input  logic [6:0]  dma_ext_rvalid,  // device has a word
  output logic [6:0]  dma_ext_rready,  // DMA takes it
  input  logic [31:0] dma_ext_rdata [7], // device words
  // VRAM SRAM
  output logic        sram_en,       // access
  output logic        sram_we,       // write
  output logic [18:0] sram_addr,     // pixel address
  output logic [15:0] sram_wdata,    // write data
  input  logic [15:0] sram_rdata,    // read data, one cycle after sram_en
  // VGA
  output logic        vga_hsync_n,   // horizontal sync
  output logic        vga_vsync_n,   // vertical sync
  output logic        vga_de,        // active video
  output logic [7:0]  vga_r,         // red
  output logic [7:0]  vga_g,         // green
  output logic [7:0]  vga_b,         // blue
  // controller port
  output logic        pad_att_n,     // ATT
  output logic        pad_clk,       // CLK
  output logic        pad_cmd,       // COMMAND
  input  logic        pad_dat,       // DATA
  input  logic        pad_ack_n      // ACK
);
  // ------------------------------------------------------------ memory path
  logic [2:0]  mc_req, mc_we, mc_ack;
  logic [31:0] mc_addr [3], mc_wdata [3];
  logic [3:0]  mc_be [3];
  logic        dm_req, dm_we;  logic [31:0] dm_addr, dm_wdata;
  logic        iso;

  assign mc_req = {dm_req, d_req, i_req};
  assign mc_we  = {dm_we, d_we, 1'b0};
  assign mc_addr[0] = i_addr;  assign mc_wdata[0] = '0;       assign mc_be[0] = 4'hF;
  assign mc_addr[1] = d_addr;  assign mc_wdata[1] = d_wdata;  assign mc_be[1] = d_be;
  assign mc_addr[2] = dm_addr; assign mc_wdata[2] = dm_wdata; assign mc_be[2] = 4'hF;
  assign i_ack = mc_ack[0];
  assign d_ack = mc_ack[1];

  logic        ai_start, ai_we, ai_done;
  logic [31:0] ai_addr, ai_wdata, ai_rdata;
  logic [3:0]  ai_be;

  mem_ctrl u_mc (
    .clk, .rst_n, .req(mc_req), .we(mc_we), .addr(mc_addr), .wdata(mc_wdata), .be(mc_be),
    .ack(mc_ack), .rdata(mem_rdata), .d_squash(iso),
    .ai_start, .ai_we, .ai_addr, .ai_wdata, .ai_be, .ai_done, .ai_rdata);

  logic        rom_en;  logic [16:0] rom_addr;  logic [31:0] rom_rdata;
  logic        sp_en, sp_we;  logic [7:0] sp_addr;  logic [31:0] sp_wdata, sp_rdata;  logic [3:0] sp_be;
  logic        io_req, io_we, io_ack;  logic [12:0] io_addr;  logic [31:0] io_wdata, io_rdata;
  logic [3:0]  io_be;

  addr_interp u_ai (
    .clk, .rst_n, .start(ai_start), .we(ai_we), .addr(ai_addr), .wdata(ai_wdata), .be(ai_be),
    .done(ai_done), .rdata(ai_rdata),
    .ram_req, .ram_we, .ram_addr, .ram_wdata, .ram_be, .ram_ack, .ram_rdata,
    .rom_en, .rom_addr, .rom_rdata,
    .sp_en, .sp_we, .sp_addr, .sp_wdata, .sp_be, .sp_rdata,
    .io_req, .io_we, .io_addr, .io_wdata, .io_be, .io_ack, .io_rdata);

  bios_rom #(.INIT_FILE(BIOS_INIT)) u_bios (
    .clk, .en(rom_en), .addr(rom_addr), .rdata(rom_rdata),
    .ld_we(bios_ld_we), .ld_addr(bios_ld_addr), .ld_data(bios_ld_data));

  scratchpad u_sp (
    .clk, .en(sp_en), .we(sp_we), .addr(sp_addr), .wdata(sp_wdata), .be(sp_be), .rdata(sp_rdata));

  // ------------------------------------------------------------ hardware registers
  logic        st_we, mk_we;  logic [31:0] i_stat, i_mask;
  logic        dma_we;  logic [6:0] dma_addr;  logic [31:0] dma_rdata;
  logic        joy_we, joy_re;  logic [1:0] joy_addr;  logic [31:0] joy_rdata;
  logic        gp0_we, gp1_we, gp0_ready, gpuread_re;  logic [31:0] gpuread, gpustat;
  logic [31:0] sub_wdata;  logic [3:0] sub_be;

  io_controller u_io (
    .clk, .rst_n, .io_req, .io_we, .io_addr, .io_wdata, .io_be, .io_ack, .io_rdata,
    .irq_stat_we(st_we), .irq_mask_we(mk_we), .i_stat, .i_mask,
    .dma_we, .dma_addr, .dma_rdata, .joy_we, .joy_re, .joy_addr, .joy_rdata,
    .gp0_we, .gp1_we, .gp0_ready, .gpuread_re, .gpuread, .gpustat, .sub_wdata, .sub_be);

  logic [9:0] irq_lines;
  logic       vblank, gpu_irq, dma_irq, pad_irq;
  always_comb begin
    irq_lines = irq_ext;
    irq_lines[IRQ_VBLANK] = irq_ext[IRQ_VBLANK] | vblank;
    irq_lines[IRQ_GPU]    = irq_ext[IRQ_GPU]    | gpu_irq;
    irq_lines[IRQ_DMA]    = irq_ext[IRQ_DMA]    | dma_irq;
    irq_lines[IRQ_PAD]    = irq_ext[IRQ_PAD]    | pad_irq;
  end

  irq_latch u_irq (
    .clk, .rst_n, .irq_in(irq_lines), .stat_we(st_we), .mask_we(mk_we), .wdata(sub_wdata),
    .i_stat, .i_mask, .cop0_sr, .cause_ip2, .cpu_int, .iso_cache(iso));

  // ------------------------------------------------------------ DMA
  logic [6:0]  dv_drq, dv_wvalid, dv_wready, dv_rvalid, dv_rready, dma_busy;
  logic [31:0] dv_wdata, dv_rdata [7];
  logic        gpu_dma_wready, gpu_drq;

  always_comb begin
    dv_drq    = dma_ext_drq;
    dv_wready = dma_ext_wready;
    dv_rvalid = dma_ext_rvalid;
    for (int c = 0; c < 7; c++) dv_rdata[c] = dma_ext_rdata[c];
    dv_drq[DMA_GPU]    = gpu_drq;
    dv_wready[DMA_GPU] = gpu_dma_wready;
    dv_rvalid[DMA_GPU] = 1'b0;
    dv_drq[DMA_OTC]    = 1'b1;
    dv_wready[DMA_OTC] = 1'b0;
    dv_rvalid[DMA_OTC] = 1'b0;
  end
  always_comb begin
    dma_ext_wvalid = dv_wvalid;
    dma_ext_rready = dv_rready;
    dma_ext_wvalid[DMA_GPU] = 1'b0;
    dma_ext_wvalid[DMA_OTC] = 1'b0;
    dma_ext_rready[DMA_GPU] = 1'b0;
    dma_ext_rready[DMA_OTC] = 1'b0;
  end
  assign dma_ext_wdata = dv_wdata;

  dma u_dma (
    .clk, .rst_n, .reg_we(dma_we), .reg_addr(dma_addr), .reg_wdata(sub_wdata), .reg_be(sub_be),
    .reg_rdata(dma_rdata), .m_req(dm_req), .m_we(dm_we), .m_addr(dm_addr), .m_wdata(dm_wdata),
    .m_ack(mc_ack[2]), .m_rdata(mem_rdata), .dev_drq(dv_drq), .dev_wvalid(dv_wvalid),
    .dev_wready(dv_wready), .dev_wdata(dv_wdata), .dev_rvalid(dv_rvalid), .dev_rready(dv_rready),
    .dev_rdata(dv_rdata), .irq(dma_irq), .busy(dma_busy));

  // ------------------------------------------------------------ controller port
  joypad u_pad (
    .clk, .rst_n, .reg_we(joy_we), .reg_re(joy_re), .reg_addr(joy_addr), .reg_wdata(sub_wdata),
    .reg_be(sub_be), .reg_rdata(joy_rdata), .irq(pad_irq),
    .pad_att_n, .pad_clk, .pad_cmd, .pad_dat, .pad_ack_n);

  // ------------------------------------------------------------ video
  logic        g_req, g_we, g_gnt, g_rvalid;  logic [18:0] g_addr;  logic [15:0] g_wdata, g_rdata;
  logic [9:0]  disp_x;  logic [8:0] disp_y;  logic [2:0] disp_hres;  logic disp_vres, disp_en;

  gpu u_gpu (
    .clk, .rst_n, .gp0_we, .gp0_wdata(sub_wdata), .gp0_ready, .gp1_we, .gp1_wdata(sub_wdata),
    .dma_wvalid(dv_wvalid[DMA_GPU]), .dma_wdata(dv_wdata), .dma_wready(gpu_dma_wready),
    .dma_drq(gpu_drq), .gpuread_re, .gpuread, .gpustat, .irq(gpu_irq),
    .vram_req(g_req), .vram_we(g_we), .vram_addr(g_addr), .vram_wdata(g_wdata),
    .vram_gnt(g_gnt), .vram_rvalid(g_rvalid), .vram_rdata(g_rdata),
    .disp_x, .disp_y, .disp_hres, .disp_vres, .disp_en);

  logic        row_req, row_bank, row_done, rb_we, rb_re;
  logic [8:0]  row_y;  logic [9:0] row_x0;  logic [10:0] row_len;
  logic [10:0] rb_waddr, rb_raddr;  logic [15:0] rb_wdata, rb_rdata;

  vram_ctrl u_vc (
    .clk, .rst_n, .g_req, .g_we, .g_addr, .g_wdata, .g_gnt, .g_rvalid, .g_rdata,
    .row_req, .row_y, .row_x0, .row_len, .row_bank, .row_done,
    .rb_we, .rb_waddr, .rb_wdata, .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);

  row_buffer u_rb (
    .clk, .we(rb_we), .waddr(rb_waddr), .wdata(rb_wdata), .re(rb_re), .raddr(rb_raddr), .rdata(rb_rdata));

  display #(.CLK_DIV(CLK_DIV)) u_disp (
    .clk, .rst_n, .disp_x, .disp_y, .disp_hres, .disp_vres, .disp_en,
    .row_req, .row_y, .row_x0, .row_len, .row_bank, .row_done,
    .rb_re, .rb_raddr, .rb_rdata,
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .de(vga_de), .r(vga_r), .g(vga_g), .b(vga_b),
    .vblank);
endmodule
