// addr_interp: address interpreter behind the memory controller.
//
// Takes one 32-bit access at a time (start .. done), removes the segment bits
// that make KUSEG, KSEG0 and KSEG1 mirrors of each other (the top three address
// bits), decides which physical memory the remaining 29-bit address falls in
// (main RAM, BIOS ROM, scratchpad, hardware registers) and runs the access on
// that memory's port. Main RAM and the hardware registers answer with a
// one-cycle ack after a held request; the BIOS ROM and the scratchpad are
// synchronous block RAMs: their enable is registered here, so the data is
// captured two cycles after start (one wait state). done pulses for one
// cycle with the read data. Unmapped addresses complete at once, reading zero.
// Main RAM (2 MB) is mirrored four times in its first 8 MB, as in the console.
// No cache is modelled, as in the original FPGA design.
module addr_interp import psx_pkg::*; (
  input  logic        clk,           // clock
  input  logic        rst_n,         // asynchronous reset, active low
  input  logic        start,         // begin an access (one-cycle pulse)
  input  logic        we,            // write access
  input  logic [31:0] addr,          // virtual byte address
  input  logic [31:0] wdata,         // write data
  input  logic [3:0]  be,            // byte enables
  output logic        done,          // access complete (one-cycle pulse)
  output logic [31:0] rdata,         // read data, valid with done
  output logic        ram_req,       // main RAM request, held until ram_ack
  output logic        ram_we,        // main RAM write
  output logic [20:0] ram_addr,      // main RAM byte address (2 MB)
  output logic [31:0] ram_wdata,     // main RAM write data
  output logic [3:0]  ram_be,        // main RAM byte enables
  input  logic        ram_ack,       // main RAM done (one-cycle pulse)
  input  logic [31:0] ram_rdata,     // main RAM read data, valid with ram_ack
  output logic        rom_en,        // BIOS read enable
  output logic [16:0] rom_addr,      // BIOS word address
  input  logic [31:0] rom_rdata,     // BIOS data, one cycle after rom_en
  output logic        sp_en,         // scratchpad enable
  output logic        sp_we,         // scratchpad write
  output logic [7:0]  sp_addr,       // scratchpad word address
  output logic [31:0] sp_wdata,      // scratchpad write data
  output logic [3:0]  sp_be,         // scratchpad byte enables
  input  logic [31:0] sp_rdata,      // scratchpad data, one cycle after sp_en
  output logic        io_req,        // hardware-register request, held until io_ack
  output logic        io_we,         // hardware-register write
  output logic [12:0] io_addr,       // byte offset in the 8 KB register window
  output logic [31:0] io_wdata,      // hardware-register write data
  output logic [3:0]  io_be,         // hardware-register byte enables
  input  logic        io_ack,        // hardware-register done (one-cycle pulse)
  input  logic [31:0] io_rdata       // hardware-register read data, valid with io_ack
);
  typedef enum logic [2:0] {S_IDLE, S_RAM, S_ROM, S_ROM_D, S_SP, S_SP_D, S_IO} state_e;
  state_e      state;
  logic [28:0] pa;
  region_e     rgn;

  assign pa  = addr[28:0];          // drop the KSEG0/KSEG1 segment bits
  assign rgn = region_of(pa);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0; rdata <= '0;
      ram_req <= 1'b0; ram_we <= 1'b0; ram_addr <= '0; ram_wdata <= '0; ram_be <= '0;
      rom_en <= 1'b0; rom_addr <= '0;
      sp_en <= 1'b0; sp_we <= 1'b0; sp_addr <= '0; sp_wdata <= '0; sp_be <= '0;
      io_req <= 1'b0; io_we <= 1'b0; io_addr <= '0; io_wdata <= '0; io_be <= '0;
    end else begin
      done   <= 1'b0;
      rom_en <= 1'b0;
      sp_en  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          unique case (rgn)
            REG_RAM: begin
              ram_req <= 1'b1; ram_we <= we; ram_addr <= pa[20:0];
              ram_wdata <= wdata; ram_be <= be;
              state <= S_RAM;
            end
            REG_BIOS: begin
              rom_en <= 1'b1; rom_addr <= pa[18:2];
              state <= S_ROM;
            end
            REG_SCRATCH: begin
              sp_en <= 1'b1; sp_we <= we; sp_addr <= pa[9:2];
              sp_wdata <= wdata; sp_be <= be;
              state <= S_SP;
            end
            REG_IO: begin
              io_req <= 1'b1; io_we <= we; io_addr <= 13'(pa - IO_BASE);
              io_wdata <= wdata; io_be <= be;
              state <= S_IO;
            end
            default: begin
              rdata <= '0;
              done  <= 1'b1;
            end
          endcase
        end
        S_RAM: if (ram_ack) begin
          ram_req <= 1'b0;
          rdata   <= ram_rdata;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        S_ROM: state <= S_ROM_D;          // ROM samples its registered enable
        S_ROM_D: begin
          rdata <= we ? 32'h0 : rom_rdata;   // the ROM ignores writes
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_SP: begin
          sp_we <= 1'b0;
          state <= S_SP_D;
        end
        S_SP_D: begin
          rdata <= sp_rdata;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_IO: if (io_ack) begin
          io_req <= 1'b0;
          rdata  <= io_rdata;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
