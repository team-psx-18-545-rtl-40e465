// dma: seven-channel DMA controller.
//
// Each channel c has three registers at 0x1F801080 + 16*c: MADR (start
// address), BCR (block control) and CHCR (channel control); DPCR (0x1F8010F0)
// enables channels and sets their priority, DICR (0x1F8010F4) holds the
// completion interrupt enables and flags. A channel runs when CHCR bit 24
// (start/busy) and its DPCR enable bit (4c+3) are set; sync mode 0 also needs
// the manual trigger, CHCR bit 28. Among runnable channels the one with the
// smallest DPCR priority value wins (ties go to the higher channel number)
// and is served to completion before another is considered.
//
// Modes (CHCR bits 10:9):
//   0  burst of BCR[15:0] words (0 means 65536). On channel 6 (OTC) no device
//      is read: every word is written with the address of the next entry, and
//      the last one with the end marker 0x00FFFFFF, which builds an empty
//      ordering table (a linked list).
//   1  BCR[31:16] blocks of BCR[15:0] words; each block waits for the
//      device's request line (dev_drq).
//   2  linked list, to a device: the header word 0xAABBBBBB at the current
//      address gives AA data words that follow it and the next header
//      address BBBBBB; the list ends when that address has bit 23 set (the
//      end marker 0xFFFFFF). Only the data words reach the device.
// CHCR bit 0 sets the direction (1 = from RAM to the device), bit 1 steps the
// address backwards. At the end CHCR bits 24 and 28 clear, MADR holds the
// address after the last word, and DICR flag 24+c is set if enabled (bit
// 16+c); irq is DICR bit 31 = force (bit 15) or master enable (bit 23) with any
// enabled flag. Writing 1 to a flag clears it.
//
// Memory is reached through the request/acknowledge handshake of the memory
// controller. Devices take data with dev_wvalid/dev_wready and give data
// with dev_rvalid/dev_rready; the data buses are shared by all channels.
// Register bit positions beyond those the channel description names follow
// the console; the device handshakes are this design's own.
module dma import psx_pkg::*; #(
  parameter int CH = DMA_CHANNELS   // number of channels
) (
  input  logic          clk,         // clock
  input  logic          rst_n,       // asynchronous reset, active low
  input  logic          reg_we,      // register write
  input  logic [6:0]    reg_addr,    // register offset from 0x1F801080
  input  logic [31:0]   reg_wdata,   // register write data
  input  logic [3:0]    reg_be,      // register byte enables
  output logic [31:0]   reg_rdata,   // register read data (combinational)
  output logic          m_req,       // memory request (held until m_ack, then dropped)
  output logic          m_we,        // memory write
  output logic [31:0]   m_addr,      // memory byte address
  output logic [31:0]   m_wdata,     // memory write data
  input  logic          m_ack,       // memory acknowledge
  input  logic [31:0]   m_rdata,     // memory read data, valid while m_ack
  input  logic [CH-1:0] dev_drq,     // device request per channel (mode 1 block start)
  output logic [CH-1:0] dev_wvalid,  // word for the device of the channel
  input  logic [CH-1:0] dev_wready,  // device takes the word
  output logic [31:0]   dev_wdata,   // word to the device
  input  logic [CH-1:0] dev_rvalid,  // device has a word
  output logic [CH-1:0] dev_rready,  // DMA takes the device's word
  input  logic [31:0]   dev_rdata [CH], // word from the device per channel
  output logic          irq,         // DICR master flag (bit 31)
  output logic [CH-1:0] busy         // CHCR bit 24 per channel
);
  typedef enum logic [3:0] {
    S_IDLE, S_START, S_HDR, S_HDR_W, S_MREAD, S_MREAD_W, S_DEVW,
    S_DEVR, S_MWRITE, S_MWRITE_W, S_NEXT, S_BLKWAIT, S_FINISH
  } state_e;

  logic [23:0] madr [CH];
  logic [31:0] bcr  [CH];
  logic [31:0] chcr [CH];
  logic [31:0] dpcr, dicr;

  state_e      state;
  logic [2:0]  cur;
  logic [23:0] addr;
  logic [16:0] words;     // words left in this block / list entry / burst
  logic [15:0] blocks;    // blocks left (mode 1)
  logic [23:0] next_hdr;  // mode 2 next header address
  logic [31:0] data;

  // ---------------------------------------------------------------- registers
  logic [2:0] rch;
  assign rch = reg_addr[6:4];
  always_comb begin
    reg_rdata = '0;
    if (rch == 3'd7) begin
      if (reg_addr[3:2] == 2'd0) reg_rdata = dpcr;
      else if (reg_addr[3:2] == 2'd1) reg_rdata = dicr;
    end else if (int'(rch) < CH) begin
      unique case (reg_addr[3:2])
        2'd0: reg_rdata = {8'h00, madr[rch]};
        2'd1: reg_rdata = bcr[rch];
        2'd2: reg_rdata = chcr[rch];
        default: reg_rdata = '0;
      endcase
    end
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = be[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  // ---------------------------------------------------------------- arbitration
  logic [CH-1:0] runnable;
  logic [2:0]    win;
  logic          any;
  always_comb begin
    logic [2:0] best;
    best = 3'd7;
    win  = '0;
    any  = 1'b0;
    for (int c = 0; c < CH; c++) begin
      runnable[c] = chcr[c][24] && dpcr[4*c+3] &&
                    (chcr[c][10:9] != 2'd0 || chcr[c][28]);
      if (runnable[c] && dpcr[4*c +: 3] <= best) begin
        best = dpcr[4*c +: 3];
        win  = 3'(c);
        any  = 1'b1;
      end
    end
  end

  logic [1:0]  mode;
  logic        from_ram;
  logic [23:0] step_addr;
  assign mode      = chcr[cur][10:9];
  assign from_ram  = chcr[cur][0];
  assign step_addr = (chcr[cur][1] && mode != 2'd2) ? addr - 24'd4 : addr + 24'd4;

  assign dev_wdata = data;
  always_comb begin
    dev_wvalid = '0;
    dev_rready = '0;
    if (state == S_DEVW) dev_wvalid[cur] = 1'b1;
    if (state == S_DEVR) dev_rready[cur] = 1'b1;
  end

  assign irq = dicr[31];
  always_comb for (int c = 0; c < CH; c++) busy[c] = chcr[c][24];

  logic [31:0] m_addr_w;
  assign m_addr_w = {8'h00, addr[23:2], 2'b00};

  // DICR after a CPU write, before the write-1-to-clear flags are applied
  logic [31:0] dicr_nw;
  assign dicr_nw = merge(dicr, reg_wdata, reg_be);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CH; c++) begin
        madr[c] <= '0; bcr[c] <= '0; chcr[c] <= '0;
      end
      dpcr <= 32'h0765_4321;
      dicr <= '0;
      state <= S_IDLE; cur <= '0; addr <= '0; words <= '0; blocks <= '0;
      next_hdr <= '0; data <= '0;
      m_req <= 1'b0; m_we <= 1'b0; m_addr <= '0; m_wdata <= '0;
    end else begin
      // CPU register writes
      if (reg_we) begin
        if (rch == 3'd7) begin
          if (reg_addr[3:2] == 2'd0) dpcr <= merge(dpcr, reg_wdata, reg_be);
          else if (reg_addr[3:2] == 2'd1) begin
            dicr[23:0]  <= dicr_nw[23:0];
            dicr[30:24] <= dicr[30:24] & ~(reg_be[3] ? reg_wdata[30:24] : 7'h0);
          end
        end else if (int'(rch) < CH) begin
          unique case (reg_addr[3:2])
            2'd0: madr[rch] <= 24'(merge({8'h0, madr[rch]}, reg_wdata, reg_be));
            2'd1: bcr[rch]  <= merge(bcr[rch], reg_wdata, reg_be);
            2'd2: chcr[rch] <= merge(chcr[rch], reg_wdata, reg_be);
            default: ;
          endcase
        end
      end

      unique case (state)
        S_IDLE: if (any) begin
          cur   <= win;
          state <= S_START;
        end
        S_START: begin
          addr <= madr[cur];
          unique case (mode)
            2'd0: begin
              words <= (bcr[cur][15:0] == 16'h0) ? 17'h10000 : {1'b0, bcr[cur][15:0]};
              state <= from_ram ? S_MREAD : S_DEVR;
            end
            2'd1: begin
              words  <= {1'b0, bcr[cur][15:0]};
              blocks <= bcr[cur][31:16];
              state  <= S_BLKWAIT;
            end
            default: state <= S_HDR;
          endcase
        end
        S_BLKWAIT: if (blocks == 16'h0) state <= S_FINISH;
          else if (dev_drq[cur]) begin
            words <= {1'b0, bcr[cur][15:0]};
            state <= from_ram ? S_MREAD : S_DEVR;
          end
        // mode 2: read the header word
        S_HDR: begin
          m_req <= 1'b1; m_we <= 1'b0; m_addr <= m_addr_w;
          state <= S_HDR_W;
        end
        S_HDR_W: if (m_ack && m_req) begin
          m_req    <= 1'b0;
          words    <= {9'h0, m_rdata[31:24]};
          next_hdr <= m_rdata[23:0];
          addr     <= addr + 24'd4;
          state    <= S_NEXT;
        end
        // one word RAM -> device
        S_MREAD: begin
          m_req <= 1'b1; m_we <= 1'b0; m_addr <= m_addr_w;
          state <= S_MREAD_W;
        end
        S_MREAD_W: if (m_ack && m_req) begin
          m_req <= 1'b0;
          data  <= m_rdata;
          state <= S_DEVW;
        end
        S_DEVW: if (dev_wready[cur]) begin
          addr  <= step_addr;
          words <= words - 17'd1;
          state <= S_NEXT;
        end
        // one word device -> RAM (OTC generates its own words)
        S_DEVR: if (int'(cur) == DMA_OTC) begin
          data  <= (words == 17'd1) ? 32'h00FF_FFFF : {8'h00, step_addr};
          state <= S_MWRITE;
        end else if (dev_rvalid[cur]) begin
          data  <= dev_rdata[cur];
          state <= S_MWRITE;
        end
        S_MWRITE: begin
          m_req <= 1'b1; m_we <= 1'b1; m_addr <= m_addr_w; m_wdata <= data;
          state <= S_MWRITE_W;
        end
        S_MWRITE_W: if (m_ack && m_req) begin
          m_req <= 1'b0;
          addr  <= step_addr;
          words <= words - 17'd1;
          state <= S_NEXT;
        end
        // decide what follows a word; wait for the previous handshake to close
        S_NEXT: if (!m_ack) begin
          if (words != 17'd0) state <= from_ram ? S_MREAD : S_DEVR;
          else unique case (mode)
            2'd1: begin
              blocks <= blocks - 16'd1;
              state  <= (blocks == 16'd1) ? S_FINISH : S_BLKWAIT;
            end
            2'd2: if (next_hdr[23]) state <= S_FINISH;
              else begin
                addr  <= next_hdr;
                state <= S_HDR;
              end
            default: state <= S_FINISH;
          endcase
        end
        S_FINISH: begin
          chcr[cur][24] <= 1'b0;
          chcr[cur][28] <= 1'b0;
          madr[cur]     <= addr;
          if (dicr[16 + int'(cur)]) dicr[24 + int'(cur)] <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      dicr[31] <= dicr[15] || (dicr[23] && |(dicr[30:24] & dicr[22:16]));
    end
  end
endmodule
