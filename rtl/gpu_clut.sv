// gpu_clut: colour look-up-table buffer of the GPU.
//
// Holds one palette of up to 256 16-bit VRAM colours, the one used by the
// primitive being drawn. The CLUT loader fills it from VRAM before a 4-bit or
// 8-bit textured primitive is drawn (16 or 256 entries); the colour stage
// then reads it with the texel's index. One write port and one synchronous
// read port: rdata is the entry addressed in the previous cycle.
module gpu_clut #(
  parameter int ENTRIES = 256   // palette entries
) (
  input  logic                       clk,    // clock
  input  logic                       we,     // write an entry
  input  logic [$clog2(ENTRIES)-1:0] waddr,  // entry written
  input  logic [15:0]                wdata,  // VRAM colour written
  input  logic [$clog2(ENTRIES)-1:0] raddr,  // entry read
  output logic [15:0]                rdata   // entry read, one cycle later
);
  logic [15:0] mem [ENTRIES];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
