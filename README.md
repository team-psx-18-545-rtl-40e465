# A PlayStation system around a MIPS core, in SystemVerilog

This is the part of a Sony PlayStation that sits around the CPU. It is
written as synthesizable SystemVerilog for an FPGA board with one SRAM, one
SDRAM, block RAM and a VGA DAC (the Terasic DE2-115 class of board). It
contains:

- the memory system that the CPU's two buses and the DMA share;
- the BIOS ROM, stored compactly in block RAM;
- the scratchpad;
- the hardware-register block with its interrupt, DMA and controller-port devices;
- the 2D GPU with its VRAM arbiter;
- a VGA scan-out path.

The design follows an FPGA reimplementation of the console that was built as a
university capstone project. Its structure, the way its units work, and the
numbers it names are kept as described. Examples of those numbers are the
16-deep GP0 FIFO, the 32x32 drawing blocks, the BIOS zero range and the
controller baud reload value. Where that description is silent, the console's
own behaviour was used, or the simplest logic that does the job. The sections
below and each file's opening comment say which is which.

The CPU itself is not included. Neither are the geometry engine (GTE), the
MDEC, the SPU or the CD-ROM interface. The CPU's instruction bus, data bus and
Cop0 signals are ports of the top module `psx_top`, so any MIPS I core with a
request/acknowledge bus can be attached. The SDRAM that holds main memory and
the SRAM that holds VRAM are external chips, reached through simple ports.

## Block diagram

```
 CPU I-bus ──┐
 CPU D-bus ──┼─► mem_ctrl ─► addr_interp ─┬─► main RAM port (2 MB, SDRAM)
 DMA ────────┘  (round robin)             ├─► bios_rom   (512 KB in 416 KB)
                                          ├─► scratchpad (1 KB)
                                          └─► io_controller ─┬─ irq_latch ──► Cop0 Cause IP2
                                                             ├─ dma (7 channels)
                                                             ├─ joypad ──► controller port
                                                             ├─ gpu GP0/GP1/GPUREAD/GPUSTAT
                                                             └─ plain registers (timers, SPU, CD, ...)
 dma ch2 ──► gpu ──► vram_ctrl ◄── display (row requests)
                        │  └──► VRAM SRAM port (1024 x 512 x 16)
                        └──► row_buffer ──► display ──► VGA
```

Everything runs on one clock, `clk`. The reset `rst_n` is asynchronous and
active low.

## Memory path

### The handshake

Every bus master (CPU instruction bus, CPU data bus, DMA) uses a four-phase
request/acknowledge handshake:

1. The master raises `req` with the address, and the write data if it writes.
2. `mem_ctrl` raises `ack` when the access is done. Read data is valid on
   `mem_rdata` in the same cycle.
3. The master drops `req`.
4. `mem_ctrl` drops `ack`.

Only then can that master start a new access.

### Arbitration (`mem_ctrl`)

`mem_ctrl` serves one access at a time. It picks the next requester by
rotating priority. After a channel is served, it goes to the back of the
order, so no channel is served twice while another one waits.

While the Cop0 *isolate cache* bit (Status bit 16) is set, the data bus does
not reach memory. The BIOS sets this bit while it clears the cache. In that
state, data reads return 0 and writes are dropped, and both are acknowledged
at once. The original's handling of this case is not known; this is this
design's choice.

### Address decoding (`addr_interp`)

`addr_interp` first drops address bits 31:29. This removes the KUSEG, KSEG0
and KSEG1 mirrors. It then decodes the 29-bit physical address:

| Physical range            | Target                                   | Latency after start |
|---------------------------|------------------------------------------|---------------------|
| 0x0000_0000 – 0x007F_FFFF | main RAM: 2 MB, seen four times          | until `ram_ack`     |
| 0x1F80_0000 – 0x1F80_03FF | scratchpad                               | 2 cycles            |
| 0x1F80_1000 – 0x1F80_2FFF | hardware registers (offset from 0x1F801000) | about 3 cycles   |
| 0x1FC0_0000 – 0x1FC7_FFFF | BIOS                                     | 2 cycles            |
| anything else             | reads 0, writes ignored                  | 1 cycle             |

### BIOS storage (`bios_rom`)

The 512 KB BIOS has a long run of zero words, from word address 0x13000 to
0x18FFF. Those 0x6000 words (96 KB) are not stored. A read inside the run
returns 0. Words above the run are stored 0x6000 words lower. That leaves
0x1A000 words (416 KB), which fits in the 432 KB of block RAM together with
the 1 KB scratchpad.

The image is loaded in one of two ways:

- at run time, through the `bios_ld_*` port;
- from a `$readmemh` file, named by the parameter `BIOS_INIT`.

No BIOS is included here.

## Hardware registers and interrupts

`io_controller` decodes the register offset. It sends each access to:

- `irq_latch` for I_STAT at 0x070 and I_MASK at 0x074;
- `dma` for 0x080–0x0FF;
- `joypad` for 0x040–0x04F;
- the GPU for GP0/GPUREAD at 0x810 and GP1/GPUSTAT at 0x814.

Every other offset is a plain byte-writable 32-bit register that reads back
what was written. That covers the timers, SPU, CD-ROM and memory-control
registers. None of those devices are built here.

A GP0 write is not acknowledged while the GPU's command FIFO is full. The CPU
therefore stalls instead of losing a word.

### Interrupt latch (`irq_latch`)

`irq_latch` keeps I_STAT and I_MASK:

- Each interrupt line sets its I_STAT bit on a rising edge.
- The CPU clears bits by writing 0s. A write ANDs its value into I_STAT.
- `cause_ip2` goes to Cop0 Cause bit 10. It is high while any bit is set in
  both I_STAT and I_MASK.
- `cpu_int` is `cause_ip2` gated by Status bit 0 (interrupt enable) and
  Status bit 10 (the IM bit that pairs with Cause bit 10).

The original's text names Status bits 0 and 12 instead. The mask bit position
is the parameter `SR_IM_BIT`.

The interrupt lines are:

| Line | Source               |
|------|----------------------|
| 0    | vertical blank       |
| 1    | GPU                  |
| 3    | DMA                  |
| 7    | controller port      |
| others | `irq_ext` port     |

## DMA (`dma`)

Seven channels, each with MADR, BCR and CHCR registers. The shared registers
are DPCR (priority and enable) and DICR (interrupts). Channel 2 connects to
the GPU. Channel 6 builds ordering tables. The device handshakes of channels
0, 1, 3, 4 and 5 are brought out of the top.

The three transfer modes:

- **Mode 0 (burst):** all BCR words in one go. The transfer starts on the
  CHCR start/trigger bit.
- **Mode 1 (block):** BCR gives a block size and a block count. Each block
  waits for the device's request line. The GPU raises that line while its
  FIFO is empty.
- **Mode 2 (linked list):** the channel reads a header word. Its top byte is
  the number of words that follow; its low 24 bits are the next address. It
  then sends those words to the GPU. The list ends at a header whose next
  address has bit 23 set, such as the usual 0x00FF_FFFF.

Channel 6 writes an ordering table backwards from MADR. Each word points to
the word below it, and the last word is the 0x00FF_FFFF end marker.

When several channels are ready, the channel with the smallest DPCR priority
value goes first. A tie goes to the higher channel number. A channel runs to
completion before another one starts. It uses the shared bus port of
`mem_ctrl` for every word.

On completion, the channel's DICR flag (bit 24+c) is set if its enable
(bit 16+c) is set. The DMA interrupt is raised when the master enable
(bit 23) is set and any enabled flag is set. Writing 1 to a flag clears it.

## Controller port (`joypad`)

The controller port is a byte-wide serial link to the pad. Its registers are
JOY_DATA, JOY_STAT, JOY_MODE, JOY_CTRL and JOY_BAUD.

To send, the CPU writes a byte to JOY_DATA while TXEN is set. The block then
does the following:

1. It pulls ATT low.
2. It shifts the byte out LSB first on COMMAND, changing the bit on the
   falling CLK edge.
3. It samples DATA on the rising edge.
4. It pushes the received byte into an 8-entry receive FIFO. JOY_STAT shows
   whether that FIFO holds data.

The half-period counter reloads with JOY_BAUD/2. The default JOY_BAUD of 0x88
gives 136 cycles per bit, about 250 kHz at 33.87 MHz, the rate the original
names. The original's text also describes a full JOY_BAUD reload on each half
period, which would give half that rate.

A falling ACK from the pad raises the controller interrupt if JOY_CTRL bit 12
is set.

A normal digital pad poll is five bytes:

| Byte | Sent  | Received        |
|------|-------|-----------------|
| 1    | 0x01  | 0xFF            |
| 2    | 0x42  | 0x41 (pad ID)   |
| 3    | 0x00  | 0x5A            |
| 4    | 0x00  | buttons, low    |
| 5    | 0x00  | buttons, high   |

`tb/pad_model.sv` is a behavioural pad that answers this poll.

## GPU (`gpu` and its helpers)

This is the largest block. It accepts the console's GP0 and GP1 command
streams and draws into a 1024x512, 16-bit VRAM.

### Command flow

GP0 words come from the CPU or from DMA channel 2. They enter a 32-bit,
16-deep FIFO (`sync_fifo`). The decode FSM reads the opcode byte:

- Drawing-state commands (E1 to E6) update the GPU's registers at once. These
  set the texture page, texture window, drawing area, offset and mask bits.
- Drawing and transfer commands first gather all their parameter words into a
  command register. Vertices have the drawing offset added on the way in.

GP1 commands bypass the FIFO. They are reset, FIFO reset, interrupt
acknowledge, display enable, DMA direction, display area and mode, and GPU
info.

### How a primitive is drawn

1. **Set-up.** Work out the bounding box and clip it to the drawing area.
   Work out, for each triangle edge, which side the third vertex lies on.
   `gpu_line_finder` gives the side from the sign of a 2x2 determinant; three
   such finders are used here.
2. **Plane solving.** For Gouraud-shaded or textured primitives, five
   `gpu_interp` instances solve `c_x·x + c_y·y + c_s = n` by Cramer's rule.
   There is one each for R, G, B, U and V. The coefficients are signed fixed
   point with 16 fraction bits. The three divisions run on sequential
   dividers (`seq_div`), so solving takes 59 cycles. Flat-shaded primitives
   skip this step.
3. **Palette load.** For 4-bit and 8-bit textures, the palette row is copied
   from VRAM into `gpu_clut`.
4. **Pixel walk.** `gpu_xy_gen` walks the 32x32 screen blocks that overlap the
   bounding box, row by row, and gives every pixel of each such block to the
   pipeline.
5. **Pipeline**, one pixel at a time:
   - *Draw:* is the pixel inside the primitive?
     - For a triangle, three more line finders must agree with the reference
       sides.
     - For a line, the pixel must be within half a pixel of the segment in
       the Chebyshev sense.
     - For a rectangle, the bounding box is enough.
   - *Colour:* fetch the texel at the interpolated (u,v), after the texture
     window (E2) has replaced the masked coordinate bits, in 8-texel steps,
     with its offset. For 4-bit and 8-bit textures, look the texel up in the
     palette. A texel of 0 is transparent.
   - *Shade:* use the flat or interpolated colour. Multiply it by the texel
     (texel·colour/128, saturated) unless the command asks for raw texture.
     With dithering on (E1 bit 9), shaded and texture-modulated polygons add
     a 4x4 ordered offset of −4 to +3 to each 8-bit channel before cutting it
     to 5 bits.
   - *Writeback:* if the mask-check bit is set, or the primitive is
     semi-transparent, read the destination pixel first. A pixel whose mask
     bit is set is not overwritten. Semi-transparent pixels are blended with
     one of the four console modes: (B+F)/2, B+F, B−F or B+F/4. Each channel
     saturates.

A four-vertex polygon is drawn as two triangles: v0 v1 v2, then v1 v2 v3. A
line gets a helper third point at right angles. This lets the same plane
solver interpolate colour along the line.

### Rectangle commands

A textured rectangle maps texels one to one, without scaling. The E1 flip
bits mirror the texture in x or y.

- FILL_VRAM writes a rectangle with a single colour.
- CPU-to-VRAM unpacks two pixels per FIFO word.
- VRAM-to-CPU packs two pixels per word into GPUREAD. The next word is read
  only after the CPU has taken the last one.
- VRAM-to-VRAM copies pixel by pixel.

### Timing

Every pipeline stage waits for its VRAM access. A pixel therefore takes
between one and about four cycles. The cost depends on the texture fetch,
palette read and destination read.

### GPUSTAT

GPUSTAT follows the console's bit map, with one exception. Bit 23 reads 1
when the display is **enabled**; on the console, 1 means disabled. Bit 15
reads 1 when textures are enabled.

### Not modelled

The 24-bit display mode (GP1(08h) bit 4) is stored and reported in GPUSTAT,
but the display always shows 15-bit pixels. VRAM transfers move 24-bit image
data as raw 16-bit words, as they do for any other data.

## Video path (`vram_ctrl`, `row_buffer`, `display`)

VRAM is a single-ported SRAM, shared by the GPU and the screen.

`display` produces standard 640x480 VGA timing: 800x525 total, with
parameterised porches. It advances one pixel every `CLK_DIV` system clocks,
which is 2 by default. That suits a 50 MHz system clock; a 25.2 MHz clock
with `CLK_DIV=1` also works.

At the start of each line, `display` works out which VRAM row the *next*
screen line needs:

- It adds the display-area start from GP1(05h).
- It halves the line number in 240-line mode.

If that row differs from the one already fetched, it asks `vram_ctrl` for it.
`vram_ctrl` then blocks the GPU's VRAM port and copies the 1024 pixels of the
row, starting at the display-area x, into the idle bank of the two-bank
`row_buffer`. A copy takes `row_len + 3` cycles. At the end of the line the
banks swap. Narrow modes (320 and 256 pixels) show each pixel twice.

The 15-bit colour is widened to 8 bits per channel for the DAC. Line 0 of
vertical blank raises the VBLANK interrupt.

The original ran the display on a 50 MHz clock and the memory side at
33 MHz. Here there is a single clock. This removes the clock crossing at the
row buffer. The cost is that the system clock and the pixel clock are tied
through `CLK_DIV`.

## Parameters that matter

| Module       | Parameter            | Default          | Meaning |
|--------------|----------------------|------------------|---------|
| `psx_top`    | `CLK_DIV`            | 2                | system clocks per VGA pixel |
| `psx_top`    | `BIOS_INIT`          | ""               | optional `$readmemh` BIOS image |
| `bios_rom`   | `ZERO_LO`, `ZERO_HI` | 0x13000, 0x19000 | word range that reads as zero and is not stored |
| `gpu`        | `FIFO_DEPTH`         | 16               | GP0 FIFO entries |
| `gpu`        | `BLK`                | 32               | X-Y generator block edge |
| `gpu`        | `FRAC`               | 16               | interpolator fraction bits |
| `irq_latch`  | `SR_IM_BIT`          | 10               | Status bit that masks Cause IP2 |
| `display`    | `H_*`, `V_*`         | 640x480 VGA      | video timing |

The address map, register offsets, interrupt numbers and DMA channel numbers
are in the package `psx_pkg`.

## Simulating

Every testbench in `tb/` checks itself. It prints one line of the form
`TB_RESULT checks=N failures=M` and finishes. A watchdog ends it with a
failure if it hangs.

With plain Verilator 5:

```
verilator --binary --timing -j 4 -Wno-fatal --top-module tb_psx_top \
    rtl/psx_pkg.sv $(ls rtl/*.sv | grep -v psx_pkg) tb/pad_model.sv tb/tb_psx_top.sv
./obj_dir/Vtb_psx_top
```

The same works for any other `tb_<block>`; the package must be listed first.

### End-to-end test

`tb_psx_top` runs the top at its default parameters. It models:

- the CPU, as a bus master that runs a script;
- main RAM, as an SDRAM with a random acknowledge delay;
- the VRAM SRAM;
- a pad.

It then:

1. reads the BIOS and its zero hole through mirrored addresses;
2. uses the scratchpad, with both buses competing;
3. writes with the cache isolated;
4. builds an ordering table with DMA channel 6;
5. sends a linked list of GPU commands over DMA channel 2;
6. draws a rectangle, a flat triangle and a fill. Shaded and textured
   primitives are checked in the GPU's own test;
7. overflows the GP0 FIFO so the CPU stalls;
8. reads VRAM back through GPUREAD;
9. polls the pad;
10. shows whole frames and checks that each visible pixel has the colour drawn
    at that place in VRAM.

It counts each of these mechanisms and fails if any never happened. It runs
in a few seconds.

### Block tests

The block tests compare against independent reference models. Examples:

- Cramer's rule in real arithmetic for `gpu_interp`;
- a scoreboard for `mem_ctrl`'s rotation;
- a pixel-by-pixel model of the triangle and line rules for `gpu`;
- bit timing measured on the pad pins for `joypad`.

Some block tests override parameters to keep the run short. Examples are the
VGA timing in `tb_display` and the clock divider.

## Files

| File                     | Contents |
|--------------------------|----------|
| `rtl/psx_pkg.sv`         | address map, register offsets, interrupt and DMA numbers, GPU opcodes, blend function |
| `rtl/psx_top.sv`         | the system |
| `rtl/mem_ctrl.sv`        | round-robin bus arbiter |
| `rtl/addr_interp.sv`     | address decoder and region sequencer |
| `rtl/bios_rom.sv`        | BIOS with the zero run removed |
| `rtl/scratchpad.sv`      | 1 KB RAM |
| `rtl/io_controller.sv`   | register decode |
| `rtl/irq_latch.sv`       | I_STAT / I_MASK |
| `rtl/dma.sv`             | seven-channel DMA |
| `rtl/joypad.sv`          | controller serial port |
| `rtl/sync_fifo.sv`       | FIFO for GP0 and the pad receiver |
| `rtl/gpu.sv`             | GPU control and pipeline |
| `rtl/gpu_line_finder.sv` | side-of-line test |
| `rtl/gpu_interp.sv`      | plane-equation solver |
| `rtl/seq_div.sv`         | sequential divider |
| `rtl/gpu_xy_gen.sv`      | 32x32 block walker |
| `rtl/gpu_clut.sv`        | palette buffer |
| `rtl/vram_ctrl.sv`       | VRAM arbiter and row copier |
| `rtl/row_buffer.sv`      | two-bank line buffer |
| `rtl/display.sv`         | VGA timing and row requests |
| `tb/tb_*.sv`             | testbenches |
| `tb/pad_model.sv`        | behavioural digital pad |

## Where this design departs from the original

- **One clock** instead of a 50 MHz display clock and a 33 MHz memory clock.
  `CLK_DIV` sets the ratio between the system clock and the pixel clock.
- **Interrupt mask bit:** Status bit 10, not 12 (`SR_IM_BIT`).
- **Controller baud timer:** reloads with JOY_BAUD/2 on each half period, so
  that 0x88 gives the stated 250 kHz.
- **Two-bank row buffer** so the next row loads while the current one is
  shown. The original names a single dual-ported buffer.
- **GPUSTAT bit 23** means "display enabled", as in the original's own bit
  list, not the console's inverted sense.
- **GPU features not built:** 24-bit display. The pipeline
  handles one pixel at a time, waiting on VRAM.
- **Not included:** the CPU, GTE, MDEC, SPU, CD-ROM link and timers. The
  timers, SPU and CD-ROM registers exist only as storage. DMA channels 0, 1,
  3, 4 and 5 are ports.
