// tb_display: the scan-out unit at a reduced screen size (16x8 visible) with
// a row-buffer and a model of the VRAM side that answers each row request
// after a random delay with the pattern pixel(y, x). Over two frames per mode
// it checks every visible output pixel against the pattern (RGB555 widened to
// eight bits per channel), the sync pulse widths and periods, the number of
// row requests per frame and vblank; then repeats in the 240-line,
// pixel-doubled mode, where each VRAM row serves two lines and is fetched once.
module tb_display;
  localparam int HV = 16, HF = 2, HS = 4, HB = 2, VV = 8, VF = 1, VS = 2, VB = 1;
  localparam int HT = HV + HF + HS + HB, VT = VV + VF + VS + VB;
  localparam int ROW_W = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [9:0] disp_x = 10'd100;
  logic [8:0] disp_y = 9'd20;
  logic [2:0] disp_hres = 3'b010;
  logic disp_vres = 1, disp_en = 1;
  logic row_req, row_bank, row_done = 0, rb_re;
  logic [8:0] row_y;
  logic [9:0] row_x0;
  logic [10:0] row_len;
  logic [5:0] rb_raddr, rb_waddr = 0;
  logic [15:0] rb_rdata, rb_wdata = 0;
  logic rb_we = 0;
  logic hsync_n, vsync_n, de, vblank;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;

  display #(.CLK_DIV(1), .H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
            .V_VIS(VV), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .ROW_W(ROW_W)) dut (.*);
  row_buffer #(.ROW_W(ROW_W)) u_rb (.clk, .we(rb_we), .waddr(rb_waddr), .wdata(rb_wdata),
                                    .re(rb_re), .raddr(rb_raddr), .rdata(rb_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [15:0] pix(input logic [8:0] y, input logic [9:0] x);
    return {1'b0, y[4:0], x[9:0]} ^ 16'h2A55;
  endfunction

  // VRAM side: copy the requested row after a short random delay
  int row_reqs = 0;
  initial forever begin
    @(posedge clk);
    if (row_req && !row_done) begin
      row_reqs++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      for (int i = 0; i < int'(row_len); i++) begin
        @(negedge clk);
        rb_we = 1; rb_waddr = {row_bank, 5'(i)}; rb_wdata = pix(row_y, row_x0 + 10'(i));
      end
      @(negedge clk); rb_we = 0; row_done = 1;
      @(negedge clk); row_done = 0;
    end
  end

  // output checker: line/column follow the data-enable runs
  int line = -1, col = 0, bad_pix = 0, pix_seen = 0;
  logic de_q = 0, vs_q = 1, hs_q = 1;
  int hs_len = 0, hs_period = 0, hs_last = -1, vs_len = 0, cyc = 0;
  int hs_bad = 0, vs_count = 0;
  always @(posedge clk) begin
    cyc++;
    if (!vsync_n && vs_q) begin line = -1; vs_count++; end
    if (de && !de_q) begin line++; col = 0; end
    if (de) begin
      logic [8:0] vy; logic [9:0] vx; logic [15:0] p;
      vy = disp_y + (disp_vres ? 9'(line) : 9'(line / 2));
      vx = disp_x + (disp_hres[1] ? 10'(col) : 10'(col / 2));
      p  = pix(vy, vx);
      if (line >= 0) begin
        pix_seen++;
        if (r != {p[4:0], p[4:2]} || g != {p[9:5], p[9:7]} || b != {p[14:10], p[14:12]}) begin
          bad_pix++;
          if (bad_pix < 5) $display("pixel line %0d col %0d: %h %h %h exp %h", line, col, r, g, b, p);
        end
      end
      col++;
    end
    if (!hsync_n && rst_n) hs_len++;
    if (hsync_n && !hs_q && rst_n) begin
      if (hs_last >= 0 && hs_len != HS) begin hs_bad++; $display("hsync low %0d", hs_len); end
      if (hs_last >= 0 && cyc - hs_last != HT) begin hs_bad++; $display("hsync period %0d", cyc - hs_last); end
      hs_last = cyc; hs_len = 0;
    end
    if (!vsync_n) vs_len++;
    de_q <= de; vs_q <= vsync_n; hs_q <= hsync_n;
  end

  task automatic frames(input int n);
    int v0;
    v0 = vs_count;
    while (vs_count < v0 + n) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    frames(1);                    // first frame may start without rows
    bad_pix = 0; pix_seen = 0; row_reqs = 0; vs_len = 0;
    frames(2);
    chk(bad_pix == 0 && pix_seen == 2 * HV * VV, $sformatf("640-mode pixels: %0d bad of %0d", bad_pix, pix_seen));
    chk(row_reqs == 2 * VV, $sformatf("row requests %0d", row_reqs));
    chk(hs_bad == 0, "hsync width and period");
    chk(vs_len == 2 * VS * HT, $sformatf("vsync low for %0d cycles", vs_len));
    // 240-line, pixel-doubled mode at another origin
    disp_hres = 3'b000; disp_vres = 0; disp_x = 10'd7; disp_y = 9'd3;
    frames(1);
    bad_pix = 0; pix_seen = 0; row_reqs = 0;
    frames(2);
    chk(bad_pix == 0 && pix_seen == 2 * HV * VV, $sformatf("320-mode pixels: %0d bad of %0d", bad_pix, pix_seen));
    chk(row_reqs == VV, $sformatf("rows fetched once per two lines: %0d", row_reqs));
    // vblank covers exactly the invisible lines
    begin
      int vb = 0;
      for (int i = 0; i < HT * VT; i++) begin @(posedge clk); vb += int'(vblank); end
      chk(vb == HT * (VT - VV), $sformatf("vblank %0d cycles", vb));
    end
    disp_en = 0;
    frames(1);
    chk(r == 0 && g == 0 && b == 0, "display disabled gives black");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
