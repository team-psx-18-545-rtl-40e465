// bios_rom: 512 KB BIOS ROM held in 416 KB of block RAM.
//
// The BIOS image has a long run of zero words. To fit the ROM into the block
// RAM that is left on the board, the word range ZERO_LO .. ZERO_HI-1 is not
// stored: reads from it return zero, and every word above it is stored
// (ZERO_HI - ZERO_LO) words lower. With the defaults, words 0x00000-0x12FFF
// map one to one, 0x13000-0x18FFF read as zero, and 0x19000-0x1FFFF live at
// 0x13000-0x19FFF of a 0x1A000-word array. The split points are those of the
// original block-RAM arrangement; which BIOS dump fills the ROM is up to the
// user.
//
// Reads are synchronous: rdata is valid the cycle after en. The contents come
// from INIT_FILE (hex, one 32-bit word per line, physical order) when it is
// given, and can also be written through the load port, which stands for the
// FPGA configuration step and takes logical word addresses.
module bios_rom #(
  parameter int    ZERO_LO   = 'h13000,  // first word of the zero run (not stored)
  parameter int    ZERO_HI   = 'h19000,  // first word after the zero run
  parameter string INIT_FILE = ""        // optional $readmemh image
) (
  input  logic        clk,       // clock
  input  logic        en,        // read enable
  input  logic [16:0] addr,      // logical word address (512 KB / 4)
  output logic [31:0] rdata,     // word read, one cycle after en
  input  logic        ld_we,     // load-port write
  input  logic [16:0] ld_addr,   // load-port logical word address
  input  logic [31:0] ld_data    // load-port data
);
  localparam int DEPTH = (1 << 17) - (ZERO_HI - ZERO_LO);
  localparam int PAW   = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  // Logical-to-physical word mapping; hole = address inside the zero run.
  function automatic logic [PAW:0] phys(input logic [16:0] a);
    if (int'(a) < ZERO_LO)       return {1'b0, PAW'(a)};
    else if (int'(a) < ZERO_HI)  return {1'b1, PAW'(0)};
    else                         return {1'b0, PAW'(int'(a) - (ZERO_HI - ZERO_LO))};
  endfunction

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  logic [PAW:0] rp, wp;
  assign rp = phys(addr);
  assign wp = phys(ld_addr);

  always_ff @(posedge clk) begin
    if (ld_we && !wp[PAW]) mem[wp[PAW-1:0]] <= ld_data;
    if (en) rdata <= rp[PAW] ? 32'h0 : mem[rp[PAW-1:0]];
  end
endmodule
