// tb_bios_rom: loads words through the load port across the whole 512 KB
// address space, including the unstored all-zero range, and reads them back.
// Words outside the zero range must come back as loaded; words inside it must
// read zero, and loading them must not disturb any stored word.
module tb_bios_rom;
  logic clk = 0, en = 0, ld_we = 0;
  logic [16:0] addr = 0, ld_addr = 0;
  logic [31:0] rdata, ld_data = 0;
  int checks = 0, failures = 0;

  bios_rom dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(input logic [16:0] a);
    return {a[7:0], ~a[15:8], 7'h11, a} ^ 32'h5A5A_0000;
  endfunction
  function automatic bit in_hole(input logic [16:0] a);
    return a >= 17'h13000 && a < 17'h19000;
  endfunction

  logic [16:0] list [$];
  initial begin
    list = '{17'h00000, 17'h0FFFF, 17'h10000, 17'h12FFF, 17'h13000, 17'h15555,
             17'h18FFF, 17'h19000, 17'h19001, 17'h1C000, 17'h1FFFF};
    for (int i = 0; i < 300; i++) list.push_back(17'($urandom));
    // load everything (hole words too: they must be dropped)
    foreach (list[i]) begin
      @(negedge clk); ld_we = 1; ld_addr = list[i]; ld_data = pat(list[i]);
    end
    @(negedge clk); ld_we = 0;
    foreach (list[i]) begin
      logic [31:0] exp;
      exp = in_hole(list[i]) ? 32'h0 : pat(list[i]);
      @(negedge clk); en = 1; addr = list[i];
      @(negedge clk); en = 0;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL addr %h got %h exp %h", list[i], rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
