// irq_latch: the CPU-side copy of the console's interrupt controller.
//
// Rather than make the CPU read memory to find out whether an interrupt is
// pending, the interrupt status (I_STAT, 0x1F801070) and interrupt mask
// (I_MASK, 0x1F801074) registers are held next to the CPU. A rising edge on
// one of the IRQ_LINES hardware interrupt lines sets its I_STAT bit; a CPU
// write to I_STAT ANDs the written value into the register (writing 0
// acknowledges); a write to I_MASK replaces it. Reads are served from these
// copies. When any bit is set in both registers, Cop0 Cause bit 10 (IP2) is
// raised, which the CPU takes as a normal hardware interrupt when Status bit 0
// (interrupt enable) and the matching mask bit are also set; cpu_int is that
// product. Status bit 16 (isolate cache) is passed out as iso_cache so that
// the memory path can drop the BIOS's cache-initialisation stores.
//
// Timing: edges are registered, so I_STAT and cause_ip2 change one cycle
// after the interrupt line rises. If a new edge and an acknowledge write hit
// the same bit in the same cycle, the new edge wins.
module irq_latch #(
  parameter int IRQ_LINES = 10,  // hardware interrupt lines
  parameter int SR_IM_BIT = 10   // Status mask bit that pairs with Cause IP2
) (
  input  logic                 clk,        // clock
  input  logic                 rst_n,      // asynchronous reset, active low
  input  logic [IRQ_LINES-1:0] irq_in,     // interrupt lines (level, edge-detected)
  input  logic                 stat_we,    // CPU write to I_STAT (AND)
  input  logic                 mask_we,    // CPU write to I_MASK
  input  logic [31:0]          wdata,      // CPU write data
  output logic [31:0]          i_stat,     // I_STAT as read by the CPU
  output logic [31:0]          i_mask,     // I_MASK as read by the CPU
  input  logic [31:0]          cop0_sr,    // Cop0 Status register
  output logic                 cause_ip2,  // Cause bit 10 to Cop0
  output logic                 cpu_int,    // interrupt will be taken
  output logic                 iso_cache   // Status bit 16: isolate cache
);
  logic [IRQ_LINES-1:0] stat, mask, prev;
  logic [IRQ_LINES-1:0] rise;

  assign rise = irq_in & ~prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat <= '0;
      mask <= '0;
      prev <= '0;
    end else begin
      prev <= irq_in;
      stat <= (stat_we ? (stat & wdata[IRQ_LINES-1:0]) : stat) | rise;
      if (mask_we) mask <= wdata[IRQ_LINES-1:0];
    end
  end

  assign i_stat    = 32'(stat);
  assign i_mask    = 32'(mask);
  assign cause_ip2 = |(stat & mask);
  assign cpu_int   = cause_ip2 && cop0_sr[0] && cop0_sr[SR_IM_BIT];
  assign iso_cache = cop0_sr[16];
endmodule
