// tb_gpu: the drawing processor over a VRAM model that grants requests at
// random and returns read data one cycle later. Each command is sent through
// GP0 (one through the DMA port) and the resulting VRAM is compared with
// what the command must produce, worked out here from the command itself:
// fill, flat and Gouraud triangles, a quad, rectangles, lines and a
// poly-line, semi-transparency (average and add), mask set and check, raw
// 15-bit and 4-bit palette textures with a transparent texel, a texture
// window, ordered dithering, CPU-to-VRAM,
// VRAM-to-VRAM and VRAM-to-CPU copies, and the GP1 commands (reset, display
// settings, information, interrupt acknowledge) with the GPUSTAT bits.
module tb_gpu;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic gp0_we = 0, gp1_we = 0, dma_wvalid = 0, gpuread_re = 0;
  logic [31:0] gp0_wdata = 0, gp1_wdata = 0, dma_wdata = 0, gpuread, gpustat;
  logic gp0_ready, dma_wready, dma_drq, irq;
  logic vram_req, vram_we, vram_gnt, vram_rvalid = 0;
  logic [18:0] vram_addr;
  logic [15:0] vram_wdata, vram_rdata = 0;
  logic [9:0] disp_x; logic [8:0] disp_y; logic [2:0] disp_hres; logic disp_vres, disp_en;
  int checks = 0, failures = 0;

  gpu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // VRAM model
  logic [15:0] vram [524288];
  bit gnt_rand = 0;
  int writes = 0;
  initial for (int i = 0; i < 524288; i++) vram[i] = 16'h0;
  assign vram_gnt = vram_req && gnt_rand;
  always @(posedge clk) begin
    gnt_rand <= ($urandom_range(0, 9) < 7);
    vram_rvalid <= vram_gnt && !vram_we;
    if (vram_gnt) begin
      if (vram_we) begin vram[vram_addr] <= vram_wdata; writes++; end
      else vram_rdata <= vram[vram_addr];
    end
  end
  function automatic logic [15:0] px(input int x, input int y);
    return vram[y * 1024 + x];
  endfunction

  task automatic gp0(input logic [31:0] w);
    @(negedge clk);
    while (!gp0_ready) @(negedge clk);
    gp0_we = 1; gp0_wdata = w;
    @(negedge clk); gp0_we = 0;
  endtask
  task automatic gp1(input logic [31:0] w);
    @(negedge clk); gp1_we = 1; gp1_wdata = w;
    @(negedge clk); gp1_we = 0;
  endtask
  task automatic idle();
    int n = 0;
    repeat (3) @(negedge clk);
    while (!gpustat[26] && n < 400000) begin @(negedge clk); n++; end
    chk(gpustat[26], "GPU returns to idle");
  endtask
  function automatic logic [31:0] xy(input int x, input int y);
    return {16'(y), 16'(x)};
  endfunction
  function automatic logic [15:0] c555(input logic [23:0] bgr);
    return {1'b0, bgr[23:19], bgr[15:11], bgr[7:3]};
  endfunction
  // count pixels equal to v in a rectangle
  function automatic int count(input int x0, input int y0, input int x1, input int y1,
                               input logic [15:0] v);
    int n = 0;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) if (px(x, y) == v) n++;
    return n;
  endfunction

  initial begin
    logic [15:0] red, blue;
    red = 16'h001F; blue = 16'h7C00;
    repeat (3) @(posedge clk); rst_n = 1;
    gp1(32'h0000_0000);
    gp0(32'hE300_0000);                       // area (0,0) .. (1023,511)
    gp0(32'hE400_0000 | (511 << 10) | 1023);
    gp0(32'hE500_0000);
    idle();
    chk(gpustat[28] && gpustat[26] && !irq, "GPUSTAT idle after reset");

    // FILL 32x4 at (16,8)
    gp0(32'h0200_00FF); gp0(xy(16, 8)); gp0(xy(32, 4));
    idle();
    chk(count(16, 8, 47, 11, red) == 128 && count(0, 0, 63, 15, red) == 128, "fill rectangle");

    // flat opaque rectangle 10x5 at (100,50)
    gp0(32'h6000_FF00); gp0(xy(100, 50)); gp0(xy(10, 5));
    idle();
    chk(count(100, 50, 109, 54, 16'h03E0) == 50 && count(95, 45, 115, 60, 16'h03E0) == 50, "flat rectangle");

    // flat triangle (200,10) (220,10) (200,30)
    gp0(32'h2000_00FF); gp0(xy(200, 10)); gp0(xy(220, 10)); gp0(xy(200, 30));
    idle();
    begin
      int bad_in = 0, bad_out = 0;
      for (int y = 5; y < 35; y++) for (int x = 195; x < 225; x++) begin
        int s;
        s = (x - 200) + (y - 10);
        if (x > 200 && y > 10 && s < 20 && px(x, y) != red) bad_in++;
        if ((x < 200 || y < 10 || s > 20) && px(x, y) != 0) bad_out++;
      end
      chk(bad_in == 0 && bad_out == 0, $sformatf("flat triangle (%0d missing, %0d outside)", bad_in, bad_out));
    end

    // Gouraud triangle: red, green, blue corners
    gp0(32'h3000_00FF); gp0(xy(300, 100)); gp0(32'h0000_FF00); gp0(xy(340, 100));
    gp0(32'h00FF_0000); gp0(xy(300, 140));
    idle();
    begin
      logic [15:0] a, b2, c, m;
      a = px(300, 100); b2 = px(339, 100); c = px(300, 139); m = px(310, 110);
      chk(a[4:0] >= 5'd30 && a[9:5] <= 5'd1 && a[14:10] <= 5'd1, $sformatf("Gouraud red corner %h", a));
      chk(b2[9:5] >= 5'd29 && b2[4:0] <= 5'd2, $sformatf("Gouraud green corner %h", b2));
      chk(c[14:10] >= 5'd29 && c[4:0] <= 5'd2, $sformatf("Gouraud blue corner %h", c));
      // at (310,110): weights r 0.5, g 0.25, b 0.25
      chk(m[4:0] >= 5'd14 && m[4:0] <= 5'd16 && m[9:5] >= 5'd6 && m[9:5] <= 5'd8,
          $sformatf("Gouraud interior %h", m));
    end

    // quad (two triangles) 20x20 at (400,10)
    gp0(32'h2800_FF00); gp0(xy(400, 10)); gp0(xy(420, 10)); gp0(xy(400, 30)); gp0(xy(420, 30));
    idle();
    chk(count(401, 11, 419, 29, 16'h03E0) == 19 * 19 && count(421, 5, 430, 35, 16'h03E0) == 0,
        "quad");

    // horizontal and diagonal lines
    gp0(32'h4000_00FF); gp0(xy(10, 200)); gp0(xy(40, 200));
    gp0(32'h4000_FF00); gp0(xy(10, 220)); gp0(xy(30, 240));
    idle();
    chk(count(10, 200, 40, 200, red) == 31 && count(5, 199, 45, 199, red) == 0 &&
        count(5, 201, 45, 201, red) == 0, "horizontal line");
    begin
      int on = 0, off = 0;
      for (int i = 0; i <= 20; i++) if (px(10 + i, 220 + i) == 16'h03E0) on++;
      for (int i = 0; i <= 18; i++) if (px(12 + i, 220 + i) != 0 || px(10 + i, 222 + i) != 0) off++;
      chk(on == 21 && off == 0, $sformatf("diagonal line (%0d on, %0d off)", on, off));
    end

    // poly-line with terminator
    gp0(32'h4800_00FF); gp0(xy(50, 300)); gp0(xy(70, 300)); gp0(xy(70, 320)); gp0(32'h5555_5555);
    idle();
    chk(count(50, 300, 70, 300, red) == 21 && count(70, 300, 70, 320, red) == 21, "poly-line");

    // semi-transparency: average of blue background and red rectangle
    gp0(32'h0200_0000 | 32'hFF0000); gp0(xy(512, 0)); gp0(xy(16, 16));   // blue fill
    gp0(32'hE100_0000);                                            // mode 0: (B+F)/2
    gp0(32'h6200_00FF); gp0(xy(512, 0)); gp0(xy(8, 8));
    gp0(32'hE100_0020);                                            // mode 1: B+F
    gp0(32'h6200_00FF); gp0(xy(520, 8)); gp0(xy(8, 8));
    idle();
    chk(count(512, 0, 519, 7, 16'h3C0F) == 64, $sformatf("average blend %h", px(512, 0)));
    chk(count(520, 8, 527, 15, 16'h7C1F) == 64, $sformatf("additive blend %h", px(520, 8)));
    chk(gpustat[6:5] == 2'd1, "GPUSTAT semi-transparency mode");

    // mask: set bit 15 on drawing, then a checked draw must leave it
    gp0(32'hE600_0001);
    gp0(32'h6000_00FF); gp0(xy(600, 0)); gp0(xy(4, 4));
    gp0(32'hE600_0002);
    gp0(32'h6000_FF00); gp0(xy(602, 0)); gp0(xy(4, 4));
    idle();
    chk(count(600, 0, 603, 3, 16'h801F) == 16, "mask bit set");
    chk(count(604, 0, 605, 3, 16'h03E0) == 8, "unmasked pixels drawn under mask check");
    chk(gpustat[12] && !gpustat[11], "GPUSTAT mask bits");
    gp0(32'hE600_0000);

    // CPU to VRAM 4x2 at (700,400), then VRAM to VRAM to (800,400)
    gp0(32'hA000_0000); gp0(xy(700, 400)); gp0(xy(4, 2));
    gp0(32'h1111_0000 | 16'h7001); gp0(32'h2222_0002); gp0(32'h0003_0004); gp0(32'h7FFF_0005);
    gp0(32'h8000_0000); gp0(xy(700, 400)); gp0(xy(800, 400)); gp0(xy(4, 2));
    idle();
    chk(px(700, 400) == 16'h7001 && px(701, 400) == 16'h1111 && px(703, 401) == 16'h7FFF,
        "CPU to VRAM");
    chk(px(800, 400) == 16'h7001 && px(802, 401) == 16'h0005 && px(803, 401) == 16'h7FFF,
        "VRAM to VRAM");
    // VRAM to CPU of the same block: four words of two pixels
    gp0(32'hC000_0000); gp0(xy(800, 400)); gp0(xy(4, 2));
    begin
      logic [31:0] w [4];
      for (int i = 0; i < 4; i++) begin
        int n = 0;
        while (!gpustat[27] && n < 1000) begin @(negedge clk); n++; end
        w[i] = gpuread;
        gpuread_re = 1; @(negedge clk); gpuread_re = 0;
      end
      chk(w[0] == 32'h1111_7001 && w[1] == 32'h2222_0002 && w[2] == 32'h0003_0004 &&
          w[3] == 32'h7FFF_0005, $sformatf("VRAM to CPU %h %h", w[0], w[3]));
    end
    idle();

    // raw 15-bit texture: page 10 (x 640), 4x4 texels, one transparent
    gp0(32'hA000_0000); gp0(xy(640, 0)); gp0(xy(4, 4));
    for (int i = 0; i < 8; i++) gp0((i == 3) ? {16'h4000 + 16'(2*i+1), 16'h0000} : {16'h4000 + 16'(2*i+1), 16'h4000 + 16'(2*i)});
    gp0(32'hE100_010A);                          // page x 10, 15-bit
    gp0(32'h6500_0000); gp0(xy(700, 300)); gp0(32'h0000_0000); gp0(xy(4, 4));
    idle();
    begin
      int bad = 0;
      for (int i = 0; i < 16; i++) begin
        logic [15:0] e;
        e = (i == 6) ? 16'h0000 : 16'h4000 + 16'(i);
        if (px(700 + i % 4, 300 + i / 4) != e) bad++;
      end
      chk(bad == 0, $sformatf("raw 15-bit texture (%0d bad)", bad));
    end

    // texture window: 16x16 15-bit texture on page x 11 (x 704), texel (u,v)
    // = 4000h + 16v + u; window mask x 1 / offset x 0 and mask y 1 / offset y 1
    // give u' = u & ~8 and v' = (v & ~8) | 8
    gp0(32'hA000_0000); gp0(xy(704, 0)); gp0(xy(16, 16));
    for (int i = 0; i < 128; i++) gp0({16'h4000 + 16'(2*i+1), 16'h4000 + 16'(2*i)});
    gp0(32'hE100_010B);                          // page x 11, 15-bit
    gp0(32'hE200_0000 | (1 << 15) | (1 << 5) | 1);
    gp0(32'h6500_0000); gp0(xy(720, 320)); gp0(32'h0000_0000); gp0(xy(16, 16));
    idle();
    begin
      int bad = 0;
      for (int v = 0; v < 16; v++)
        for (int u = 0; u < 16; u++)
          if (px(720 + u, 320 + v) != 16'h4000 + 16'((((v & 7) | 8) * 16) + (u & 7))) bad++;
      chk(bad == 0, $sformatf("texture window (%0d bad, %h)", bad, px(729, 321)));
    end
    gp0(32'hE200_0000);

    // dithering: a Gouraud triangle with red 70 at every vertex; with E1 bit 9
    // each pixel gets red (70 + d) >> 3 for the 4x4 matrix entry d at (x & 3, y & 3)
    gp0(32'hE100_0200);
    gp0(32'h3000_0046); gp0(xy(800, 300));
    gp0(32'h0000_0046); gp0(xy(840, 300));
    gp0(32'h0000_0046); gp0(xy(800, 340));
    idle();
    begin
      int dm [16] = '{-4, 0, -3, 1, 2, -2, 3, -1, -3, 1, -4, 0, 3, -1, 2, -2};
      int bad = 0, n9 = 0;
      for (int y = 302; y < 318; y++)
        for (int x = 802; x < 818; x++) begin
          if (px(x, y) != 16'((70 + dm[(y % 4) * 4 + x % 4]) >> 3)) bad++;
          if (px(x, y) == 16'd9) n9++;
        end
      chk(bad == 0 && n9 == 64, $sformatf("dithered shading (%0d bad, %0d raised)", bad, n9));
    end
    gp0(32'hE100_0000);

    // 4-bit texture through a palette at (0,500); page x 12 (x 768)
    gp0(32'hA000_0000); gp0(xy(0, 500)); gp0(xy(16, 1));
    for (int i = 0; i < 8; i++) gp0({16'h0200 + 16'(2*i+1), 16'h0200 + 16'(2*i)});
    gp0(32'hA000_0000); gp0(xy(768, 0)); gp0(xy(2, 1));
    gp0(32'h7654_3210);                          // texels 0..7
    gp0(32'hE100_000C);                          // page x 12, 4-bit
    gp0(32'h6500_0000); gp0(xy(700, 310)); gp0({16'((500 << 6) | 0), 16'h0000}); gp0(xy(8, 1));
    idle();
    begin
      int bad = 0;
      for (int i = 1; i < 8; i++) if (px(700 + i, 310) != 16'h0200 + 16'(i)) bad++;
      chk(bad == 0, $sformatf("4-bit palette texture (%0d bad, %h)", bad, px(701, 310)));
    end

    // a rectangle sent through the DMA port
    fork
      begin
        logic [31:0] ws [3];
        ws = '{32'h6000_FFFF, xy(900, 100), xy(6, 6)};
        for (int i = 0; i < 3; i++) begin
          @(negedge clk); dma_wvalid = 1; dma_wdata = ws[i];
          @(posedge clk); while (!dma_wready) @(posedge clk);
        end
        @(negedge clk); dma_wvalid = 0;
      end
    join
    idle();
    chk(count(900, 100, 905, 105, 16'h03FF) == 36, "rectangle by DMA");
    chk(dma_drq, "DMA request while FIFO empty");

    // interrupt command and acknowledge
    gp0(32'h1F00_0000);
    idle();
    chk(irq && gpustat[24], "GPU interrupt");
    gp1(32'h0200_0000);
    chk(!irq, "interrupt acknowledge");
    // display settings
    gp1(32'h0300_0000); chk(disp_en && gpustat[23], "display enable");
    gp1(32'h0500_0000 | (100 << 10) | 64); chk(disp_x == 64 && disp_y == 100, "display origin");
    gp1(32'h0800_0027); chk(disp_hres == 3'b011 && disp_vres && gpustat[19], "display mode");
    gp1(32'h0400_0002); chk(gpustat[30:29] == 2'd2 && gpustat[25] == gpustat[28], "DMA direction");
    gp1(32'h1000_0007); @(negedge clk); chk(gpuread == 32'h2, "GPU version");
    gp1(32'h0000_0000); chk(!disp_en && !gpustat[23], "GP1 reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
