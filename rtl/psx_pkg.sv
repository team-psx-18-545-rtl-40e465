// psx_pkg: types and constants shared by the PlayStation system blocks.
//
// Holds the physical memory map (main RAM, scratchpad, hardware registers,
// BIOS), the hardware-register addresses that are decoded by dedicated
// submodules (joypad, interrupt control, DMA, GPU), the region enumeration the
// address interpreter produces, and the GPU VRAM geometry. The addresses follow
// the memory map and register list of the original console; the region
// encoding and the interrupt line numbering are this design's own.
package psx_pkg;

  // Physical memory regions, after the mirror bits are stripped.
  typedef enum logic [2:0] {
    REG_RAM     = 3'd0,   // 2 MB main memory (mirrored across 8 MB)
    REG_BIOS    = 3'd1,   // 512 KB BIOS ROM
    REG_SCRATCH = 3'd2,   // 1 KB scratchpad
    REG_IO      = 3'd3,   // 8 KB hardware registers
    REG_NONE    = 3'd4    // unmapped: reads return 0, writes are dropped
  } region_e;

  localparam logic [28:0] RAM_LIMIT     = 29'h0080_0000;  // 2 MB mirrored 4x
  localparam logic [28:0] SCRATCH_BASE  = 29'h1F80_0000;
  localparam logic [28:0] SCRATCH_LIMIT = 29'h1F80_0400;
  localparam logic [28:0] IO_BASE       = 29'h1F80_1000;
  localparam logic [28:0] IO_LIMIT      = 29'h1F80_3000;
  localparam logic [28:0] BIOS_BASE     = 29'h1FC0_0000;
  localparam logic [28:0] BIOS_LIMIT    = 29'h1FC8_0000;

  // Hardware-register offsets inside the 8 KB I/O window (byte address bits 12:0).
  localparam logic [12:0] IO_JOY_DATA = 13'h040;
  localparam logic [12:0] IO_JOY_STAT = 13'h044;
  localparam logic [12:0] IO_JOY_MODE = 13'h048;  // JOY_MODE (low half), JOY_CTRL (high half)
  localparam logic [12:0] IO_JOY_BAUD = 13'h04C;  // JOY_BAUD in the high half
  localparam logic [12:0] IO_I_STAT   = 13'h070;
  localparam logic [12:0] IO_I_MASK   = 13'h074;
  localparam logic [12:0] IO_DMA_LO   = 13'h080;  // 0x080..0x0FF: DMA channels, DPCR, DICR
  localparam logic [12:0] IO_GPU_GP0  = 13'h810;
  localparam logic [12:0] IO_GPU_GP1  = 13'h814;

  // Interrupt lines into I_STAT (bit positions).
  localparam int IRQ_VBLANK = 0;
  localparam int IRQ_GPU    = 1;
  localparam int IRQ_CDROM  = 2;
  localparam int IRQ_DMA    = 3;
  localparam int IRQ_PAD    = 7;
  localparam int IRQ_LINES  = 10;

  // DMA channel numbers.
  localparam int DMA_MDECIN  = 0;
  localparam int DMA_MDECOUT = 1;
  localparam int DMA_GPU     = 2;
  localparam int DMA_CDROM   = 3;
  localparam int DMA_SPU     = 4;
  localparam int DMA_PIO     = 5;
  localparam int DMA_OTC     = 6;
  localparam int DMA_CHANNELS = 7;

  // VRAM geometry: 1024 x 512 pixels of 16 bits.
  localparam int VRAM_W  = 1024;
  localparam int VRAM_H  = 512;
  localparam int VRAM_AW = 19;

  // GP0 end-of-polyline marker (matched on the upper half-word pattern).
  localparam logic [31:0] POLYLINE_END = 32'h5555_5555;

  // Region lookup on a physical (mirror-stripped) address.
  function automatic region_e region_of(input logic [28:0] pa);
    if (pa < RAM_LIMIT)                              return REG_RAM;
    if (pa >= SCRATCH_BASE && pa < SCRATCH_LIMIT)    return REG_SCRATCH;
    if (pa >= IO_BASE && pa < IO_LIMIT)              return REG_IO;
    if (pa >= BIOS_BASE && pa < BIOS_LIMIT)          return REG_BIOS;
    return REG_NONE;
  endfunction

  // Blend two RGB555 pixels: b = background, f = foreground, mode = status bits 6:5.
  function automatic logic [14:0] blend555(input logic [14:0] b, input logic [14:0] f,
                                           input logic [1:0] mode);
    logic [14:0] r;
    for (int c = 0; c < 3; c++) begin
      logic signed [7:0] bc, fc, s;
      bc = {3'b0, b[c*5 +: 5]};
      fc = {3'b0, f[c*5 +: 5]};
      unique case (mode)
        2'd0: s = (bc + fc) >>> 1;
        2'd1: s = bc + fc;
        2'd2: s = bc - fc;
        default: s = bc + (fc >>> 2);
      endcase
      if (s < 0) s = 0;
      if (s > 31) s = 31;
      r[c*5 +: 5] = s[4:0];
    end
    return r;
  endfunction

endpackage
