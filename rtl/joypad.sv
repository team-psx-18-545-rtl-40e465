// joypad: serial interface to a PlayStation controller.
//
// The console is the master of a synchronous serial link with five signals:
// ATT (select, active low, from the console), CLK (from the console, idle
// high), COMMAND (console to controller), DATA (controller to console) and
// ACK (controller to console, active low). Bytes go least significant bit
// first; COMMAND changes while CLK is low and DATA is sampled on the rising
// CLK edge, so one byte goes each way at the same time.
//
// Registers (word offsets from 0x1F801040):
//   0 JOY_DATA   write: byte to send; read: pops the receive FIFO (bits 7:0)
//   1 JOY_STAT   bit0 TX ready, bit1 RX FIFO not empty, bit2 TX finished,
//                bit7 ACK input asserted, bit9 interrupt, bits 31:11 baud timer
//   2 JOY_MODE (bits 15:0) / JOY_CTRL (bits 31:16): CTRL bit0 TX enable,
//                bit1 ATT asserted, bit4 interrupt acknowledge, bit6 reset,
//                bit12 interrupt on ACK
//   3 JOY_BAUD (bits 31:16): timer reload value
// The baud timer counts down at the system clock and reloads when it reaches
// zero; it expires twice per serial clock period (low half, high half). With
// the usual JOY_BAUD of 0x88 and a 33 MHz clock the serial clock is about
// 250 kHz, so each half-period is JOY_BAUD/2 cycles. A transfer starts when a
// byte has been written and TX enable is set; after the eighth rising edge
// the received byte enters the receive FIFO. If the controller pulls ACK low
// afterwards and CTRL bit 12 is set, the interrupt (irq) is raised until
// acknowledged. Register bits other than TXEN, the baud reload and the ACK
// status, and the receive FIFO depth, follow the console rather than the
// text this design was built from.
module joypad #(
  parameter int RX_DEPTH = 8    // receive FIFO entries
) (
  input  logic        clk,       // system clock
  input  logic        rst_n,     // asynchronous reset, active low
  input  logic        reg_we,    // register write
  input  logic        reg_re,    // register read (pops RX on JOY_DATA)
  input  logic [1:0]  reg_addr,  // register word
  input  logic [31:0] reg_wdata, // write data
  input  logic [3:0]  reg_be,    // byte enables
  output logic [31:0] reg_rdata, // read data (combinational)
  output logic        irq,       // controller interrupt
  output logic        pad_att_n, // ATT, active low
  output logic        pad_clk,   // serial clock, idle high
  output logic        pad_cmd,   // COMMAND line
  input  logic        pad_dat,   // DATA line
  input  logic        pad_ack_n  // ACK line, active low
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;
  state_e      state;
  logic [15:0] mode, ctrl, baud;
  logic [20:0] timer;
  logic        tick;
  logic [7:0]  tx, shift, rx;
  logic        tx_pend, tx_done, irq_r;
  logic [2:0]  bitn;
  logic        ack_prev;

  logic        f_wr, f_rd, f_empty, f_full;
  logic [7:0]  f_rdata;
  logic [$clog2(RX_DEPTH):0] f_cnt;
  logic        soft_rst;

  assign soft_rst = reg_we && reg_addr == 2'd2 && reg_be[2] && reg_wdata[22];

  sync_fifo #(.W(8), .D(RX_DEPTH)) u_rx (
    .clk, .rst_n, .clr(soft_rst), .wr(f_wr), .wdata(rx), .rd(f_rd),
    .rdata(f_rdata), .empty(f_empty), .full(f_full), .count(f_cnt));

  assign f_rd = reg_re && reg_addr == 2'd0;
  assign tick = (timer == 21'd0);
  logic [20:0] half;
  assign half = (baud[15:1] == 15'd0) ? 21'd1 : 21'(baud[15:1]);

  always_comb begin
    unique case (reg_addr)
      2'd0: reg_rdata = {24'h0, f_empty ? 8'hFF : f_rdata};
      2'd1: reg_rdata = {timer, 1'b0, irq_r, 1'b0, ~pad_ack_n, 4'b0,
                         tx_done, ~f_empty, ~tx_pend};
      2'd2: reg_rdata = {ctrl, mode};
      default: reg_rdata = {baud, 16'h0};
    endcase
  end

  assign irq       = irq_r;
  assign pad_att_n = ~ctrl[1];
  assign pad_clk   = (state != S_LOW);
  assign pad_cmd   = (state == S_IDLE) ? 1'b1 : shift[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; mode <= '0; ctrl <= '0; baud <= 16'h0088;
      timer <= '0; tx <= '0; shift <= '0; rx <= '0;
      tx_pend <= 1'b0; tx_done <= 1'b0; irq_r <= 1'b0; bitn <= '0;
      ack_prev <= 1'b1; f_wr <= 1'b0;
    end else begin
      f_wr     <= 1'b0;
      ack_prev <= pad_ack_n;
      // baud timer: reload with half the JOY_BAUD value when it expires
      timer <= tick ? half - 21'd1 : timer - 21'd1;
      // TX finished rises with the received byte entering the FIFO
      if (f_wr) tx_done <= 1'b1;

      if (reg_we) unique case (reg_addr)
        2'd0: if (reg_be[0]) begin tx <= reg_wdata[7:0]; tx_pend <= 1'b1; tx_done <= 1'b0; end
        2'd2: begin
          if (reg_be[0]) mode[7:0]  <= reg_wdata[7:0];
          if (reg_be[1]) mode[15:8] <= reg_wdata[15:8];
          if (reg_be[2]) ctrl[7:0]  <= {reg_wdata[23], 1'b0, reg_wdata[21], 1'b0, reg_wdata[19:16]};
          if (reg_be[3]) ctrl[15:8] <= reg_wdata[31:24];
          if (reg_be[2] && reg_wdata[20]) irq_r <= 1'b0;     // acknowledge
        end
        2'd3: begin
          if (reg_be[2]) baud[7:0]  <= reg_wdata[23:16];
          if (reg_be[3]) baud[15:8] <= reg_wdata[31:24];
        end
        default: ;
      endcase

      // ACK falling edge raises the interrupt when enabled
      if (ack_prev && !pad_ack_n && ctrl[12]) irq_r <= 1'b1;

      if (soft_rst) begin
        state <= S_IDLE; tx_pend <= 1'b0; tx_done <= 1'b0; irq_r <= 1'b0;
        mode <= '0; ctrl <= '0;
      end else unique case (state)
        S_IDLE: if (tx_pend && ctrl[0] && tick) begin
          shift   <= tx;
          tx_pend <= 1'b0;
          bitn    <= '0;
          state   <= S_LOW;
        end
        S_LOW: if (tick) begin
          rx    <= {pad_dat, rx[7:1]};    // sample on the rising edge
          state <= S_HIGH;
        end
        S_HIGH: if (tick) begin
          shift <= {1'b1, shift[7:1]};
          bitn  <= bitn + 3'd1;
          if (bitn == 3'd7) begin
            f_wr    <= 1'b1;
            state   <= S_IDLE;
          end else state <= S_LOW;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
