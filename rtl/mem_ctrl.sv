// mem_ctrl: memory controller front end with three requesters.
//
// The instruction bus, the data bus and the DMA engine each ask for memory
// with the request/acknowledge handshake of the CPU: the requester raises req
// with a stable address, the controller raises ack (at the earliest one cycle
// later) with read data valid, the requester drops req, and the transfer ends
// when the controller drops ack. Because there is only one physical path to
// memory, the controller serves one requester at a time in rotating
// (round-robin) order: after a channel is served it has the lowest priority,
// so no channel is served twice while another one is waiting. Each access is
// carried out by the address interpreter through a start/done pair.
//
// Following the console's isolate-cache behaviour, a data-bus access made while
// d_squash is high (Cop0 Status bit 16) is acknowledged without touching memory
// and reads as zero. Channel numbering 0 = instruction, 1 = data, 2 = DMA and
// the squash path are this design's own.
module mem_ctrl (
  input  logic        clk,          // clock
  input  logic        rst_n,        // asynchronous reset, active low
  input  logic [2:0]  req,          // request per channel (0 instr, 1 data, 2 DMA)
  input  logic [2:0]  we,           // write per channel
  input  logic [31:0] addr [3],     // virtual byte address per channel
  input  logic [31:0] wdata [3],    // write data per channel
  input  logic [3:0]  be [3],       // byte enables per channel
  output logic [2:0]  ack,          // acknowledge per channel
  output logic [31:0] rdata,        // read data, valid while the channel's ack is high
  input  logic        d_squash,     // drop data-bus accesses (isolate cache)
  output logic        ai_start,     // start an access in the address interpreter
  output logic        ai_we,        // write access
  output logic [31:0] ai_addr,      // address of the access
  output logic [31:0] ai_wdata,     // write data of the access
  output logic [3:0]  ai_be,        // byte enables of the access
  input  logic        ai_done,      // access finished
  input  logic [31:0] ai_rdata      // read data, valid with ai_done
);
  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_ACK} state_e;
  state_e     state;
  logic [1:0] cur, last;
  logic [1:0] pick;
  logic       any;

  // Rotating priority: look at the channels after the last one served first.
  always_comb begin
    pick = 2'd0;
    any  = 1'b0;
    for (int k = 2; k >= 0; k--) begin
      int c;
      c = (int'(last) + 1 + k) % 3;
      if (req[c]) begin
        pick = 2'(c);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      last     <= 2'd2;
      ack      <= '0;
      rdata    <= '0;
      ai_start <= 1'b0;
      ai_we    <= 1'b0;
      ai_addr  <= '0;
      ai_wdata <= '0;
      ai_be    <= '0;
    end else begin
      ai_start <= 1'b0;
      unique case (state)
        S_IDLE: if (any) begin
          cur  <= pick;
          last <= pick;
          if (pick == 2'd1 && d_squash) begin
            rdata     <= '0;
            ack[pick] <= 1'b1;
            state     <= S_ACK;
          end else begin
            ai_start <= 1'b1;
            ai_we    <= we[pick];
            ai_addr  <= addr[pick];
            ai_wdata <= wdata[pick];
            ai_be    <= be[pick];
            state    <= S_ACCESS;
          end
        end
        S_ACCESS: if (ai_done) begin
          rdata    <= ai_rdata;
          ack[cur] <= 1'b1;
          state    <= S_ACK;
        end
        S_ACK: if (!req[cur]) begin
          ack[cur] <= 1'b0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
