// scratchpad: the 1 KB data scratchpad ("fast RAM").
//
// In the console this memory takes the place of the MIPS data cache at the
// fixed address 0x1F800000. It is a single-port synchronous block RAM of
// WORDS 32-bit words with a write enable and four byte enables; a read returns
// its word on the cycle after en. A write also returns the word as it was
// before the write (read-before-write).
module scratchpad #(
  parameter int WORDS = 256    // 1 KB
) (
  input  logic                     clk,    // clock
  input  logic                     en,     // access enable
  input  logic                     we,     // write
  input  logic [$clog2(WORDS)-1:0] addr,   // word address
  input  logic [31:0]              wdata,  // write data
  input  logic [3:0]               be,     // byte enables
  output logic [31:0]              rdata   // read data, one cycle after en
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we)
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
    end
  end
endmodule
