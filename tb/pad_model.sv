// pad_model: behavioural model of a digital PlayStation controller, for
// simulation only. While ATT is low it takes one byte per eight CLK pulses
// from COMMAND (sampled on the rising edge, least significant bit first) and
// drives its answer on DATA, changing it on the falling edge. It answers the
// poll sequence 0x01 0x42 0x00 0x00 0x00 with 0xFF, the ID 0x41, 0x5A and the
// two button bytes (active low), and pulls ACK low for ACK_NS after every byte
// but the last, ACK_DLY_NS after it. The received bytes are kept in rx_log.
module pad_model #(
  parameter int ACK_DLY_NS = 200,   // delay from the last rising edge to ACK
  parameter int ACK_NS     = 100    // ACK low time
) (
  input  logic        att_n,     // select, active low
  input  logic        clk,       // serial clock from the console, idle high
  input  logic        cmd,       // COMMAND
  output logic        dat,       // DATA
  output logic        ack_n,     // ACK, active low
  input  logic [15:0] buttons    // button state, a 0 bit is a pressed button
);
  logic [7:0] rx_log [$];
  int   idx = 0, bitn = 0, acks = 0;
  logic [7:0] sh = 0, resp = 8'hFF;

  function automatic logic [7:0] answer(input int i);
    case (i)
      0: return 8'hFF;
      1: return 8'h41;
      2: return 8'h5A;
      3: return buttons[7:0];
      4: return buttons[15:8];
      default: return 8'hFF;
    endcase
  endfunction

  initial begin
    dat = 1; ack_n = 1;
  end
  always @(negedge att_n) begin
    idx = 0; bitn = 0; resp = answer(0);
  end
  always @(negedge clk) if (!att_n) dat = resp[bitn];
  always @(posedge clk) if (!att_n) begin
    sh = {cmd, sh[7:1]};
    bitn++;
    if (bitn == 8) begin
      rx_log.push_back(sh);
      bitn = 0;
      idx++;
      resp = answer(idx);
      if (idx < 5) fork begin
        #(ACK_DLY_NS) ack_n = 0;
        acks++;
        #(ACK_NS) ack_n = 1;
      end join_none
    end
  end
  always @(posedge att_n) dat = 1;
endmodule
