// tb_addr_interp: the address interpreter in front of models of main RAM
// (random acknowledge delay), the BIOS ROM and scratchpad (one-cycle read)
// and the register bank (random delay). Each access goes through a random
// segment (KUSEG, KSEG0 or KSEG1); checks that it reaches the right target
// at the right offset, that RAM mirrors every 2 MB, that writes to ROM do
// nothing and that an unmapped address completes with zero.
module tb_addr_interp;
  import psx_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, we = 0, done;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [3:0] be = 0;
  logic ram_req, ram_we, ram_ack = 0;
  logic [20:0] ram_addr;
  logic [31:0] ram_wdata, ram_rdata = 0;
  logic [3:0] ram_be;
  logic rom_en;
  logic [16:0] rom_addr;
  logic [31:0] rom_rdata = 0;
  logic sp_en, sp_we;
  logic [7:0] sp_addr;
  logic [31:0] sp_wdata, sp_rdata = 0;
  logic [3:0] sp_be;
  logic io_req, io_we, io_ack = 0;
  logic [12:0] io_addr;
  logic [31:0] io_wdata, io_rdata = 0;
  logic [3:0] io_be;
  int checks = 0, failures = 0;

  addr_interp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // target models
  logic [31:0] ram [logic [18:0]];
  logic [31:0] sp [256];
  logic [31:0] io [logic [10:0]];
  int hits_ram = 0, hits_rom = 0, hits_sp = 0, hits_io = 0;
  logic [12:0] last_io_addr = 0;
  always @(posedge clk) begin
    if (rom_en) begin rom_rdata <= {15'h7ABC, rom_addr}; hits_rom++; end
    if (sp_en) begin
      hits_sp++;
      if (sp_we) sp[sp_addr] <= sp_wdata;
      sp_rdata <= sp[sp_addr];
    end
  end
  initial forever begin
    @(posedge clk);
    if (ram_req) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      hits_ram++;
      #1 ram_ack = 1;
      if (ram_we) ram[ram_addr[20:2]] = ram_wdata;
      ram_rdata = ram.exists(ram_addr[20:2]) ? ram[ram_addr[20:2]] : 32'h0;
      @(posedge clk); #1 ram_ack = 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (io_req) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      hits_io++;
      last_io_addr = io_addr;
      #1 io_ack = 1;
      if (io_we) io[io_addr[12:2]] = io_wdata;
      io_rdata = io.exists(io_addr[12:2]) ? io[io_addr[12:2]] : 32'h0;
      @(posedge clk); #1 io_ack = 0;
    end
  end
  initial for (int i = 0; i < 256; i++) sp[i] = 0;

  task automatic acc(input logic w, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] r);
    int n = 0;
    @(negedge clk); start = 1; we = w; addr = a; wdata = d; be = 4'hF;
    @(negedge clk); start = 0;
    while (!done && n < 100) begin @(negedge clk); n++; end
    r = rdata;
    chk(n < 100, "access finished");
  endtask

  function automatic logic [31:0] seg(input logic [28:0] pa);
    case ($urandom_range(0, 2))
      0: return {3'b000, pa};
      1: return {3'b100, pa};
      default: return {3'b101, pa};
    endcase
  endfunction

  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk); rst_n = 1;
    // RAM: write through one segment, read through another and a mirror
    for (int i = 0; i < 40; i++) begin
      logic [28:0] pa; logic [31:0] d;
      pa = 29'({$urandom} % 32'h0020_0000) & ~29'h3; d = $urandom;
      acc(1, seg(pa), d, r);
      acc(0, seg(pa + 29'h0020_0000 * 29'($urandom_range(0, 3))), 0, r);
      chk(r == d, $sformatf("RAM %h: %h vs %h", pa, r, d));
    end
    // BIOS: word address = offset / 4
    for (int i = 0; i < 30; i++) begin
      logic [18:0] off;
      off = 19'($urandom) & ~19'h3;
      acc(0, seg(29'(BIOS_BASE) + 29'(off)), 0, r);
      chk(r == {15'h7ABC, off[18:2]}, $sformatf("BIOS %h -> %h", off, r));
    end
    begin
      int n_before;
      n_before = hits_rom;
      acc(1, 32'hBFC0_0000, 32'h1234_5678, r);
      acc(0, 32'hBFC0_0000, 0, r);
      chk(r == {15'h7ABC, 17'h0}, "BIOS write ignored");
      chk(hits_rom == n_before + 2, "BIOS hit count");
    end
    // scratchpad
    for (int i = 0; i < 30; i++) begin
      logic [9:0] off; logic [31:0] d;
      off = 10'($urandom) & ~10'h3; d = $urandom;
      acc(1, 32'h1F80_0000 + 32'(off), d, r);
      acc(0, 32'h9F80_0000 + 32'(off), 0, r);
      chk(r == d, "scratchpad");
    end
    // I/O window
    for (int i = 0; i < 30; i++) begin
      logic [12:0] off; logic [31:0] d;
      off = 13'($urandom) & ~13'h3; d = $urandom;
      acc(1, seg(29'(IO_BASE) + 29'(off)), d, r);
      acc(0, seg(29'(IO_BASE) + 29'(off)), 0, r);
      chk(r == d && last_io_addr == off, $sformatf("I/O offset %h seen as %h", off, last_io_addr));
    end
    // unmapped: completes with zero and touches nothing
    begin
      int h;
      h = hits_ram + hits_rom + hits_sp + hits_io;
      acc(0, 32'h1F00_0000, 0, r);
      chk(r == 0 && h == hits_ram + hits_rom + hits_sp + hits_io, "unmapped");
    end
    chk(hits_ram >= 80 && hits_sp == 60 && hits_io >= 60, "target hit counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
