// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the GPU's GP0 command FIFO (32 bits wide, 16 entries deep, as in the
// original GPU) and as the joypad receive FIFO. Storage is a register array
// indexed by a write and a read pointer with one extra wrap bit each, so full
// and empty are told apart without a separate counter. A write when full and a
// read when empty are ignored. The head entry is visible on rdata
// combinationally (first-word fall-through); clr empties the FIFO in one cycle.
module sync_fifo #(
  parameter int W = 32,   // entry width
  parameter int D = 16    // depth, a power of two
) (
  input  logic         clk,      // clock
  input  logic         rst_n,    // asynchronous reset, active low
  input  logic         clr,      // synchronous flush
  input  logic         wr,       // push wdata
  input  logic [W-1:0] wdata,    // data pushed
  input  logic         rd,       // pop the head entry
  output logic [W-1:0] rdata,    // head entry
  output logic         empty,    // no entries
  output logic         full,     // D entries
  output logic [$clog2(D):0] count  // entries held
);
  localparam int AW = $clog2(D);
  logic [W-1:0] mem [D];
  logic [AW:0]  wp, rp;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(D));
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr && !full)  wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full && !clr) mem[wp[AW-1:0]] <= wdata;
  end
endmodule
