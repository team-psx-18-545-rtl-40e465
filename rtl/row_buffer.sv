// row_buffer: dual-ported display row buffer.
//
// The VRAM controller copies a row of the display area out of VRAM into this
// buffer through the write port while the display reads pixels out of it
// through the read port, so the display does not touch VRAM while it scans.
// The buffer has two banks of ROW_W pixels (the address's top bit picks the
// bank): one is shown while the next row is written into the other. The
// read port is synchronous with an enable: rdata changes only on a clock
// edge with re high, to the pixel then addressed.
module row_buffer #(
  parameter int ROW_W = 1024   // pixels per bank (one VRAM row)
) (
  input  logic                       clk,    // clock
  input  logic                       we,     // write a pixel
  input  logic [$clog2(ROW_W):0]     waddr,  // {bank, column}
  input  logic [15:0]                wdata,  // VRAM pixel
  input  logic                       re,     // read enable
  input  logic [$clog2(ROW_W):0]     raddr,  // {bank, column}
  output logic [15:0]                rdata   // pixel, after the enabled edge
);
  logic [15:0] mem [2*ROW_W];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
