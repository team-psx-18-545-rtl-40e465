// io_controller: the hardware-register block (0x1F801000 .. 0x1F802FFF).
//
// All hardware registers sit behind one read/write/acknowledge port from the
// address interpreter. Registers with side effects are handed to their
// submodules through one-cycle strobes: the interrupt status and mask (AND on
// write to I_STAT), the DMA channel and control registers, the joypad serial
// port (reading JOY_DATA pops the receive FIFO) and the GPU ports (GP0, GP1,
// GPUREAD, GPUSTAT). Every other address in the window is an ordinary
// read/write register, which is how the registers of the absent sound unit,
// MDEC, CD-ROM and timers behave here: reads return what was last written.
//
// Timing: the request is taken in the cycle after io_req rises, the access
// happens in the next cycle (where a GP0 write waits while gp0_ready is low),
// and io_ack pulses in the cycle after that with the read data.
module io_controller import psx_pkg::*; (
  input  logic        clk,          // clock
  input  logic        rst_n,        // asynchronous reset, active low
  input  logic        io_req,       // request from the address interpreter
  input  logic        io_we,        // write
  input  logic [12:0] io_addr,      // byte offset in the register window
  input  logic [31:0] io_wdata,     // write data
  input  logic [3:0]  io_be,        // byte enables
  output logic        io_ack,       // access done (one-cycle pulse)
  output logic [31:0] io_rdata,     // read data, valid with io_ack
  output logic        irq_stat_we,  // write to I_STAT
  output logic        irq_mask_we,  // write to I_MASK
  input  logic [31:0] i_stat,       // I_STAT value
  input  logic [31:0] i_mask,       // I_MASK value
  output logic        dma_we,       // write to a DMA register
  output logic [6:0]  dma_addr,     // DMA register offset from 0x1F801080
  input  logic [31:0] dma_rdata,    // DMA register read data
  output logic        joy_we,       // write to a joypad register
  output logic        joy_re,       // read of a joypad register
  output logic [1:0]  joy_addr,     // joypad word (0 DATA, 1 STAT, 2 MODE/CTRL, 3 BAUD)
  input  logic [31:0] joy_rdata,    // joypad register read data
  output logic        gp0_we,       // write to GP0
  output logic        gp1_we,       // write to GP1
  input  logic        gp0_ready,    // GP0 FIFO can take a word
  output logic        gpuread_re,   // read of GPUREAD
  input  logic [31:0] gpuread,      // GPUREAD value
  input  logic [31:0] gpustat,      // GPUSTAT value
  output logic [31:0] sub_wdata,    // write data for the submodules
  output logic [3:0]  sub_be        // byte enables for the submodules
);
  typedef enum logic [1:0] {S_IDLE, S_ACC, S_DONE} state_e;
  typedef enum logic [2:0] {T_PLAIN, T_ISTAT, T_IMASK, T_DMA, T_JOY, T_GP0, T_GP1} target_e;

  state_e      state;
  target_e     tgt;
  logic [31:0] regs [2048];
  logic [10:0] widx;
  logic        acc;

  assign widx = io_addr[12:2];
  assign acc  = (state == S_ACC);

  always_comb begin
    if      (io_addr[12:2] == IO_I_STAT[12:2])                 tgt = T_ISTAT;
    else if (io_addr[12:2] == IO_I_MASK[12:2])                 tgt = T_IMASK;
    else if (io_addr[12:7] == IO_DMA_LO[12:7])                 tgt = T_DMA;
    else if (io_addr[12:4] == IO_JOY_DATA[12:4])               tgt = T_JOY;
    else if (io_addr[12:2] == IO_GPU_GP0[12:2])                tgt = T_GP0;
    else if (io_addr[12:2] == IO_GPU_GP1[12:2])                tgt = T_GP1;
    else                                                       tgt = T_PLAIN;
  end

  assign sub_wdata   = io_wdata;
  assign sub_be      = io_be;
  assign dma_addr    = io_addr[6:0];
  assign joy_addr    = io_addr[3:2];
  assign irq_stat_we = acc && io_we && tgt == T_ISTAT;
  assign irq_mask_we = acc && io_we && tgt == T_IMASK;
  assign dma_we      = acc && io_we && tgt == T_DMA;
  assign joy_we      = acc && io_we && tgt == T_JOY;
  assign joy_re      = acc && !io_we && tgt == T_JOY;
  assign gp0_we      = acc && io_we && tgt == T_GP0 && gp0_ready;
  assign gp1_we      = acc && io_we && tgt == T_GP1;
  assign gpuread_re  = acc && !io_we && tgt == T_GP0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      io_ack   <= 1'b0;
      io_rdata <= '0;
    end else begin
      io_ack <= 1'b0;
      unique case (state)
        S_IDLE: if (io_req) state <= S_ACC;
        S_ACC: if (!(io_we && tgt == T_GP0 && !gp0_ready)) begin
          unique case (tgt)
            T_ISTAT: io_rdata <= i_stat;
            T_IMASK: io_rdata <= i_mask;
            T_DMA:   io_rdata <= dma_rdata;
            T_JOY:   io_rdata <= joy_rdata;
            T_GP0:   io_rdata <= gpuread;
            T_GP1:   io_rdata <= gpustat;
            default: io_rdata <= regs[widx];
          endcase
          io_ack <= 1'b1;
          state  <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Plain registers: byte-enabled write storage.
  always_ff @(posedge clk) begin
    if (acc && io_we && tgt == T_PLAIN)
      for (int b = 0; b < 4; b++)
        if (io_be[b]) regs[widx][b*8 +: 8] <= io_wdata[b*8 +: 8];
  end
endmodule
