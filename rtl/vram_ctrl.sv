// vram_ctrl: arbiter for the single-ported VRAM SRAM.
//
// VRAM lives in an external single-ported SRAM shared by the GPU and the
// display. The GPU normally owns it: a GPU request is granted in the cycle it
// is made (vram_gnt) and a read returns one cycle later (g_rvalid). When the
// display asks for a new row (row_req), the controller stops granting the
// GPU, streams the row's row_len pixels starting at (row_x0, row_y) into the
// given bank of the row buffer, one pixel per cycle (columns wrap at 1024),
// pulses row_done and hands VRAM back to the GPU. The display request has
// priority over a waiting GPU request.
//
// SRAM port: sram_en/sram_we/sram_addr/sram_wdata are driven in the cycle of
// the access and read data (sram_rdata) is expected on the following cycle.
module vram_ctrl #(
  parameter int ROW_W = 1024    // pixels per row-buffer bank
) (
  input  logic        clk,         // clock
  input  logic        rst_n,       // asynchronous reset, active low
  input  logic        g_req,       // GPU request
  input  logic        g_we,        // GPU write
  input  logic [18:0] g_addr,      // GPU pixel address {y, x}
  input  logic [15:0] g_wdata,     // GPU write data
  output logic        g_gnt,       // GPU request taken this cycle
  output logic        g_rvalid,    // GPU read data valid
  output logic [15:0] g_rdata,     // GPU read data
  input  logic        row_req,     // display wants a row (held until row_done)
  input  logic [8:0]  row_y,       // VRAM row
  input  logic [9:0]  row_x0,      // first VRAM column
  input  logic [10:0] row_len,     // pixels to copy
  input  logic        row_bank,    // row-buffer bank to fill
  output logic        row_done,    // row copied (one-cycle pulse)
  output logic        rb_we,       // row-buffer write
  output logic [$clog2(ROW_W):0] rb_waddr,  // row-buffer {bank, column}
  output logic [15:0] rb_wdata,    // row-buffer data
  output logic        sram_en,     // SRAM access
  output logic        sram_we,     // SRAM write
  output logic [18:0] sram_addr,   // SRAM word address
  output logic [15:0] sram_wdata,  // SRAM write data
  input  logic [15:0] sram_rdata   // SRAM read data (one cycle after sram_en)
);
  localparam int RW = $clog2(ROW_W);
  typedef enum logic [1:0] {S_GPU, S_ROW, S_ROW_END} state_e;
  state_e      state;
  logic [10:0] idx;          // next pixel to request
  logic        pend;         // a row read is in flight
  logic [RW-1:0] pend_col;   // its row-buffer column

  assign g_gnt    = (state == S_GPU) && !row_req && g_req;
  assign g_rdata  = sram_rdata;
  assign rb_wdata = sram_rdata;

  always_comb begin
    sram_en = 1'b0; sram_we = 1'b0; sram_addr = g_addr; sram_wdata = g_wdata;
    if (g_gnt) begin
      sram_en = 1'b1; sram_we = g_we;
    end else if (state == S_ROW && idx < row_len) begin
      sram_en   = 1'b1;
      sram_addr = {row_y, row_x0 + idx[9:0]};
    end
  end

  assign rb_we    = pend;
  assign rb_waddr = {row_bank, pend_col};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_GPU; idx <= '0; pend <= 1'b0; pend_col <= '0;
      g_rvalid <= 1'b0; row_done <= 1'b0;
    end else begin
      g_rvalid <= g_gnt && !g_we;
      row_done <= 1'b0;
      pend     <= 1'b0;
      unique case (state)
        S_GPU: if (row_req && !row_done) begin
          idx   <= '0;
          state <= S_ROW;
        end
        S_ROW: begin
          if (idx < row_len) begin
            pend     <= 1'b1;
            pend_col <= RW'(idx);
            idx      <= idx + 1'b1;
          end else state <= S_ROW_END;
        end
        S_ROW_END: begin            // the last read has been written
          row_done <= 1'b1;
          state    <= S_GPU;
        end
        default: state <= S_GPU;
      endcase
    end
  end
endmodule
