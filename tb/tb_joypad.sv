// tb_joypad: the serial controller interface polling a model of a digital
// pad. Runs the five-byte poll, checks every received byte, the bytes the pad
// saw, the ACK interrupt and its acknowledge, the status bits, the receive
// FIFO (0xFF when empty) and the serial clock period, which must be JOY_BAUD
// system clocks (two timer expiries of JOY_BAUD/2 each).
`timescale 1ns/1ps
module tb_joypad;
  logic clk = 0, rst_n = 1, reg_we = 0, reg_re = 0;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [1:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [3:0] reg_be = 4'hF;
  logic irq, pad_att_n, pad_clk, pad_cmd, pad_dat, pad_ack_n;
  logic [15:0] buttons = 16'hBEEF;
  int checks = 0, failures = 0;

  joypad dut (.*);
  pad_model #(.ACK_DLY_NS(300), .ACK_NS(150)) u_pad (
    .att_n(pad_att_n), .clk(pad_clk), .cmd(pad_cmd), .dat(pad_dat), .ack_n(pad_ack_n),
    .buttons(buttons));
  always #15 clk = ~clk;           // about 33 MHz
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wr(input int a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk); reg_we = 1; reg_addr = 2'(a); reg_wdata = d; reg_be = be;
    @(negedge clk); reg_we = 0; reg_be = 4'hF;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = 2'(a); #1 d = reg_rdata;
    @(negedge clk); reg_re = 0;
  endtask

  // serial clock period in system clocks
  int cyc = 0, last_fall = -1, period = 0;
  always @(posedge clk) cyc++;
  always @(negedge pad_clk) begin
    if (last_fall >= 0 && cyc - last_fall < 1000) period = cyc - last_fall;
    last_fall = cyc;
  end

  initial begin
    logic [31:0] v;
    logic [7:0] exp_rx [5];
    logic [7:0] cmds [5];
    exp_rx = '{8'hFF, 8'h41, 8'h5A, 8'hEF, 8'hBE};
    cmds   = '{8'h01, 8'h42, 8'h00, 8'h00, 8'h00};
    repeat (3) @(posedge clk); rst_n = 1;
    rd(3, v); chk(v[31:16] == 16'h0088, "JOY_BAUD reset value");
    rd(0, v); chk(v[7:0] == 8'hFF, "empty FIFO reads 0xFF");
    rd(1, v); chk(v[0] && !v[1], "status idle");
    wr(2, 32'h1003_0000, 4'hC);        // CTRL: TXEN, ATT, ACK interrupt enable
    chk(!pad_att_n, "ATT asserted");
    for (int i = 0; i < 5; i++) begin
      int n = 0;
      wr(0, {24'h0, cmds[i]}, 4'h1);
      do begin rd(1, v); n++; end while (!v[2] && n < 5000);
      chk(v[1], $sformatf("byte %0d: RX not empty", i));
      rd(0, v);
      chk(v[7:0] == exp_rx[i], $sformatf("byte %0d: got %h exp %h", i, v[7:0], exp_rx[i]));
      if (i < 4) begin
        n = 0;
        while (!irq && n < 1000) begin @(posedge clk); n++; end
        chk(irq, $sformatf("byte %0d: ACK interrupt", i));
        rd(1, v); chk(v[9], "STAT interrupt bit");
        wr(2, 32'h1013_0000, 4'hC);    // acknowledge
        chk(!irq, "interrupt acknowledged");
      end
    end
    chk(period == 136, $sformatf("serial clock period %0d cycles (expected 136)", period));
    chk(u_pad.rx_log.size() == 5 && u_pad.rx_log[0] == 8'h01 && u_pad.rx_log[1] == 8'h42,
        "pad received the poll command");
    // slower baud: 0x40 gives a period of 64 cycles
    wr(3, 32'h0040_0000, 4'hC);
    wr(0, 32'h0, 4'h1);
    repeat (2000) @(posedge clk);
    chk(period == 64, $sformatf("period after JOY_BAUD=0x40: %0d", period));
    rd(0, v);
    wr(2, 32'h0040_0000, 4'h4);        // soft reset releases ATT
    chk(pad_att_n, "reset releases ATT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
