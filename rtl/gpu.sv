// gpu: the 2D drawing processor of the console.
//
// Commands arrive as 32-bit words. GP0 words (drawing, VRAM transfers and
// drawing parameters) go through a 32-bit x 16-entry FIFO, from the CPU port or
// from DMA channel 2; GP1 words (reset, interrupt acknowledge, display
// control, information requests) act at once. A GP0 command is an 8-bit
// opcode with a 24-bit argument, followed by as many parameter words as the
// opcode needs.
//
// The decode FSM pops the opcode. Parameter commands (E1..E6) change the
// drawing state at once. Drawing and transfer commands first gather their
// parameter words into the global command register (GCMD: vertices with the
// drawing offset added, colours, texture coordinates, CLUT position, sizes),
// then run:
//   * triangles (3-vertex polygons; a 4-vertex polygon is the triangles
//     v0 v1 v2 and v1 v2 v3), lines and poly-lines, rectangles: a set-up step
//     finds the bounding box, clipped to the drawing area, and for each
//     triangle edge the side the third vertex lies on (three line finders next
//     to the GCMD). For shaded or textured primitives five interpolators
//     solve the plane equations of R, G, B, U and V. A textured 4/8-bit
//     primitive first loads its palette from VRAM into the CLUT buffer. The
//     X-Y generator then feeds the pixels of every 32x32 block overlapping
//     the box through the drawing pipeline, one pixel wide:
//       draw      in_prim test (three more line finders for triangles, half a
//                 pixel distance from the line for lines, the box for
//                 rectangles)
//       colour    texel fetch from VRAM for the interpolated (u,v), palette
//                 look-up; texel 0 is transparent
//       shade     flat or Gouraud colour, modulated by the texel unless the
//                 command is "raw"
//       writeback reads the destination pixel when the mask bit must be
//                 checked or when the pixel is semi-transparent, blends, and
//                 writes it back unless its mask bit protects it.
//   * FILL_VRAM writes a rectangle with one colour; CPYRECT V2V, C2V (FIFO to
//     VRAM, two pixels per word) and V2C (VRAM to GPUREAD) move rectangles.
// The pipeline is stall-driven: each stage waits for VRAM, so a pixel takes
// a few cycles; the original also ran it one pixel wide.
//
// VRAM (1024 x 512 x 16 bit) is reached through a request/grant port: a
// request is taken in a cycle with vram_req and vram_gnt both high, and read
// data returns with vram_rvalid. Display settings set by GP1 are output for
// the display block. GPUSTAT follows the bit map of the original status
// register; where the bit list names a field only, the console's encoding is
// used. The texture window follows the console's rule (masked bits of u and
// v, in 8-texel steps, replaced by the window offset), and so does the 4x4
// ordered dither of shaded and texture-modulated polygons. 24-bit display is
// not modelled.
module gpu import psx_pkg::*; #(
  parameter int FIFO_DEPTH = 16,  // GP0 FIFO entries
  parameter int BLK        = 32,  // X-Y generator block edge
  parameter int FRAC       = 16   // interpolator fraction bits
) (
  input  logic        clk,          // clock
  input  logic        rst_n,        // asynchronous reset, active low
  input  logic        gp0_we,       // CPU write to GP0
  input  logic [31:0] gp0_wdata,    // CPU GP0 word
  output logic        gp0_ready,    // GP0 FIFO not full
  input  logic        gp1_we,       // CPU write to GP1
  input  logic [31:0] gp1_wdata,    // GP1 word
  input  logic        dma_wvalid,   // DMA word for GP0
  input  logic [31:0] dma_wdata,    // DMA GP0 word
  output logic        dma_wready,   // DMA word taken
  output logic        dma_drq,      // ready to receive a DMA block (FIFO empty)
  input  logic        gpuread_re,   // CPU read of GPUREAD
  output logic [31:0] gpuread,      // GPUREAD register
  output logic [31:0] gpustat,      // GPUSTAT register
  output logic        irq,          // GPU interrupt request (GPUSTAT bit 24)
  output logic        vram_req,     // VRAM request
  output logic        vram_we,      // VRAM write
  output logic [18:0] vram_addr,    // VRAM pixel address, y*1024 + x
  output logic [15:0] vram_wdata,   // VRAM write data
  input  logic        vram_gnt,     // request taken this cycle
  input  logic        vram_rvalid,  // read data valid
  input  logic [15:0] vram_rdata,   // read data
  output logic [9:0]  disp_x,       // display area start x in VRAM
  output logic [8:0]  disp_y,       // display area start y in VRAM
  output logic [2:0]  disp_hres,    // {hres2, hres1}: 0 256, 1 320, 2 512, 3 640, 4 368
  output logic        disp_vres,    // 1 = 480 lines
  output logic        disp_en       // display enabled
);
  localparam int CW = 12;
  typedef logic signed [CW-1:0] crd_t;

  typedef enum logic [4:0] {
    S_IDLE, S_PARAM, S_EXEC, S_CLUT, S_CLUT_W, S_SETUP, S_INTERP, S_PIX, S_TEST,
    S_TEX_RD, S_TEX_W, S_TEX_CLUT_W, S_TEX_CLUT, S_SHADE, S_DST_RD, S_DST_W, S_WRITE, S_PRIM_END,
    S_PL_WAIT, S_FILL, S_CP_RD, S_CP_W, S_CP_WR, S_C2V, S_C2V_WR, S_V2C_RD, S_V2C_W,
    S_V2C_HOLD
  } state_e;
  typedef enum logic [2:0] {K_POLY, K_LINE, K_RECT, K_FILL, K_V2V, K_C2V, K_V2C} kind_e;

  state_e state;
  kind_e  kind;

  // ------------------------------------------------------------------ FIFO
  logic        f_wr, f_rd, f_empty, f_full, f_clr;
  logic [31:0] f_wdata, f_head;
  logic [$clog2(FIFO_DEPTH):0] f_cnt;

  assign f_wr       = gp0_we | (dma_wvalid & ~f_full);
  assign f_wdata    = gp0_we ? gp0_wdata : dma_wdata;
  assign gp0_ready  = ~f_full;
  assign dma_wready = dma_wvalid & ~f_full & ~gp0_we;
  assign dma_drq    = f_empty;

  sync_fifo #(.W(32), .D(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(f_clr), .wr(f_wr), .wdata(f_wdata), .rd(f_rd),
    .rdata(f_head), .empty(f_empty), .full(f_full), .count(f_cnt));

  // ------------------------------------------------------------------ drawing state
  logic [3:0]  tp_x;  logic tp_y;  logic [1:0] semi_mode, tex_depth;
  logic        dither, draw_disp, tex_dis, flip_x, flip_y, mask_set, mask_chk;
  logic [9:0]  area_x1, area_x2;  logic [8:0] area_y1, area_y2;
  crd_t        off_x, off_y;
  logic [19:0] tex_win;
  logic [1:0]  dma_dir;
  logic [9:0]  dx_r; logic [8:0] dy_r;
  logic [2:0]  hres; logic vres, vmode, col24, interl, den, irq_r;

  // ------------------------------------------------------------------ GCMD
  logic [7:0]  op;
  logic [31:0] P [12];
  logic [3:0]  pcnt, pneed;
  crd_t        vx [4], vy [4];
  logic [7:0]  vr [4], vg [4], vb [4], vu [4], vv [4];
  logic [9:0]  clut_x; logic [8:0] clut_y;
  logic [9:0]  rw;  logic [8:0] rh;        // rectangle / transfer size
  logic [9:0]  sx;  logic [8:0] sy;        // transfer source
  logic        tri2;                        // second triangle of a quad
  logic        pl_color;                    // poly-line: colour word taken

  logic is_g, is_t, is_q, is_raw, is_semi, is_pl;
  assign is_g    = (kind == K_POLY || kind == K_LINE) && op[4];
  assign is_t    = (kind == K_POLY || kind == K_RECT) && op[2] && !tex_dis;
  assign is_q    = (kind == K_POLY) && op[3];
  assign is_raw  = op[0];
  assign is_semi = op[1];
  assign is_pl   = (kind == K_LINE) && op[3];

  function automatic logic [3:0] words_for(input logic [7:0] o);
    logic g, t, q;
    g = o[4]; t = o[2]; q = o[3];
    unique casez (o)
      8'h02:      return 4'd2;
      8'b001?????: return q ? (t ? 4'd8 : 4'd4) + (g ? 4'd3 : 4'd0)
                           : (t ? 4'd6 : 4'd3) + (g ? 4'd2 : 4'd0);
      8'b010?????: return g ? 4'd3 : 4'd2;
      8'b011?????: return 4'd1 + (t ? 4'd1 : 4'd0) + (o[4:3] == 2'b00 ? 4'd1 : 4'd0);
      8'b100?????: return 4'd3;
      8'b101?????, 8'b110?????: return 4'd2;
      default:    return 4'd0;
    endcase
  endfunction

  function automatic crd_t sx11(input logic [10:0] v);
    return crd_t'($signed(v));
  endfunction

  // ------------------------------------------------------------------ current primitive
  crd_t       tx [3], ty [3];
  logic [7:0] tr [3], tg [3], tb [3], tu [3], tv [3];
  logic [9:0] bb_x1, bb_x2; logic [8:0] bb_y1, bb_y2;
  logic [1:0] ref_side [3];

  // Reference sides: where the third vertex of each edge lies.
  logic signed [2*CW+2:0] e_ref [3], e_pix [3];
  logic [1:0] s_ref [3], s_pix [3];
  crd_t px, py;
  for (genvar k = 0; k < 3; k++) begin : g_lf
    gpu_line_finder #(.CW(CW)) u_ref (
      .x0(tx[k]), .y0(ty[k]), .x1(tx[(k+1)%3]), .y1(ty[(k+1)%3]),
      .px(tx[(k+2)%3]), .py(ty[(k+2)%3]), .e(e_ref[k]), .side(s_ref[k]));
    gpu_line_finder #(.CW(CW)) u_pix (
      .x0(tx[k]), .y0(ty[k]), .x1(tx[(k+1)%3]), .y1(ty[(k+1)%3]),
      .px(px), .py(py), .e(e_pix[k]), .side(s_pix[k]));
  end

  // Interpolators for R, G, B, U, V.
  localparam int NW = 56;
  logic                 ip_start;
  logic [4:0]           ip_done, ip_seen;
  logic signed [NW-1:0] ip_cx [5], ip_cy [5], ip_cs [5];
  logic [7:0]           ip_v [5][3];
  always_comb
    for (int i = 0; i < 3; i++) begin
      ip_v[0][i] = tr[i]; ip_v[1][i] = tg[i]; ip_v[2][i] = tb[i];
      ip_v[3][i] = tu[i]; ip_v[4][i] = tv[i];
    end
  for (genvar c = 0; c < 5; c++) begin : g_ip
    gpu_interp #(.CW(CW), .FRAC(FRAC), .NW(NW)) u_ip (
      .clk, .rst_n, .start(ip_start), .x(tx), .y(ty), .v(ip_v[c]),
      .done(ip_done[c]), .cx(ip_cx[c]), .cy(ip_cy[c]), .cs(ip_cs[c]));
  end

  function automatic logic [7:0] eval_plane(input logic signed [NW-1:0] a, input logic signed [NW-1:0] b,
                                            input logic signed [NW-1:0] c, input crd_t x, input crd_t y);
    logic signed [NW+CW:0] s;
    s = (NW+CW+1)'(a) * (NW+CW+1)'(x) + (NW+CW+1)'(b) * (NW+CW+1)'(y) + (NW+CW+1)'(c)
        + (NW+CW+1)'(1 <<< (FRAC-1));
    s = s >>> FRAC;
    if (s < 0)   return 8'd0;
    if (s > 255) return 8'd255;
    return s[7:0];
  endfunction

  // X-Y generator.
  logic       xy_start, xy_valid, xy_ready, xy_last, xy_empty, xy_busy;
  logic [9:0] xy_x; logic [8:0] xy_y;
  logic       last_pix;
  gpu_xy_gen #(.BLK(BLK)) u_xy (
    .clk, .rst_n, .start(xy_start), .xmin(bb_x1), .xmax(bb_x2), .ymin(bb_y1), .ymax(bb_y2),
    .valid(xy_valid), .ready(xy_ready), .x(xy_x), .y(xy_y), .last(xy_last),
    .empty(xy_empty), .busy(xy_busy));

  // CLUT buffer.
  logic       clut_we;  logic [7:0] clut_widx, clut_ridx;  logic [15:0] clut_rdata;
  logic [8:0] clut_n;   logic [7:0] clut_i;
  gpu_clut #(.ENTRIES(256)) u_clut (
    .clk, .we(clut_we), .waddr(clut_widx), .wdata(vram_rdata), .raddr(clut_ridx), .rdata(clut_rdata));

  // ------------------------------------------------------------------ per-pixel datapath
  logic [7:0]  pu, pv, cr, cg, cb;
  logic [15:0] texel, dst;
  logic [14:0] color;
  logic        semi_px;
  logic [9:0]  cx_i; logic [8:0] cy_i;     // transfer loop counters
  logic [31:0] c2v_word; logic c2v_half;
  logic [31:0] rd_word; logic rd_half, rd_full;
  logic [3:0]  info_sel;

  // texel coordinate for this pixel
  logic [7:0] ddx, ddy;
  assign ddx = 8'(px - vx[0]);
  assign ddy = 8'(py - vy[0]);
  always_comb begin
    if (kind == K_RECT) begin
      pu = flip_x ? vu[0] - ddx : vu[0] + ddx;
      pv = flip_y ? vv[0] - ddy : vv[0] + ddy;
    end else begin
      pu = eval_plane(ip_cx[3], ip_cy[3], ip_cs[3], px, py);
      pv = eval_plane(ip_cx[4], ip_cy[4], ip_cs[4], px, py);
    end
    if (is_g) begin
      cr = eval_plane(ip_cx[0], ip_cy[0], ip_cs[0], px, py);
      cg = eval_plane(ip_cx[1], ip_cy[1], ip_cs[1], px, py);
      cb = eval_plane(ip_cx[2], ip_cy[2], ip_cs[2], px, py);
    end else begin
      cr = vr[0]; cg = vg[0]; cb = vb[0];
    end
  end

  // texture window (GP0 E2): masked coordinate bits, in steps of 8 texels,
  // are replaced by the window offset, so the window repeats across the page
  logic [7:0]  wu, wv;
  assign wu = (pu & ~{tex_win[4:0], 3'b000})   | ({tex_win[14:10] & tex_win[4:0], 3'b000});
  assign wv = (pv & ~{tex_win[9:5], 3'b000})   | ({tex_win[19:15] & tex_win[9:5], 3'b000});

  logic [9:0]  tex_x;  logic [8:0] tex_y;
  assign tex_x = {tp_x, 6'h0} + (tex_depth == 2'd0 ? 10'(wu[7:2]) :
                                 tex_depth == 2'd1 ? 10'(wu[7:1]) : 10'(wu));
  assign tex_y = {tp_y, 8'h0} + 9'(wv);

  // in_prim test for the latched pixel
  logic              in_prim, in_box, in_area;
  logic signed [CW:0] ldx, ldy;
  logic [CW:0]       adx, ady;
  logic [2*CW+2:0]   mag, len;
  assign ldx = (CW+1)'(tx[1]) - (CW+1)'(tx[0]);
  assign ldy = (CW+1)'(ty[1]) - (CW+1)'(ty[0]);
  assign adx = ldx[CW] ? -ldx : ldx;
  assign ady = ldy[CW] ? -ldy : ldy;
  assign mag = e_pix[0][2*CW+2] ? -e_pix[0] : e_pix[0];
  assign len = (2*CW+3)'((adx > ady) ? adx : ady);
  assign in_box  = px >= crd_t'({2'b0, bb_x1}) && px <= crd_t'({2'b0, bb_x2}) &&
                   py >= crd_t'({3'b0, bb_y1}) && py <= crd_t'({3'b0, bb_y2});
  assign in_area = px >= crd_t'({2'b0, area_x1}) && px <= crd_t'({2'b0, area_x2}) &&
                   py >= crd_t'({3'b0, area_y1}) && py <= crd_t'({3'b0, area_y2});
  always_comb begin
    in_prim = in_box && in_area;
    if (kind == K_POLY) begin
      for (int k = 0; k < 3; k++)
        if (!(s_pix[k] == 2'd0 || s_pix[k] == ref_side[k])) in_prim = 1'b0;
    end else if (kind == K_LINE) begin
      if ((mag << 1) > len) in_prim = 1'b0;
    end
  end

  // shaded colour before blending
  logic [7:0]  cc [3];     // shaded colour per channel: R, G, B
  logic [12:0] modc [3];
  assign cc[0] = cr; assign cc[1] = cg; assign cc[2] = cb;
  always_comb
    for (int c = 0; c < 3; c++)
      modc[c] = 13'(texel[c*5 +: 5]) * 13'(cc[c]);
  // 4x4 ordered dither (GP0 E1 bit 9) for shaded and texture-modulated
  // polygons: an offset of -4..+3 by screen position is added to the 8-bit
  // channel before it is cut to 5 bits
  function automatic logic signed [3:0] dither_at(input logic [1:0] y, input logic [1:0] x);
    logic signed [3:0] m [16];
    m = '{-4, 0, -3, 1,   2, -2, 3, -1,   -3, 1, -4, 0,   3, -1, 2, -2};
    return m[{y, x}];
  endfunction
  logic              dith_on;
  logic signed [3:0] dith;
  assign dith_on = dither && kind == K_POLY && (is_g || (is_t && !is_raw));
  assign dith    = dither_at(py[1:0], px[1:0]);
  always_comb begin
    logic [7:0]        c8;
    logic signed [9:0] cd;
    color = {cb[7:3], cg[7:3], cr[7:3]};
    for (int c = 0; c < 3; c++) begin
      if (is_t) c8 = (modc[c][12:4] > 9'd255) ? 8'd255 : modc[c][11:4];
      else      c8 = cc[c];
      cd = 10'(c8) + (dith_on ? 10'(dith) : 10'sd0);
      if (cd < 0)                 color[c*5 +: 5] = 5'd0;
      else if (cd > 10'sd255)     color[c*5 +: 5] = 5'd31;
      else                        color[c*5 +: 5] = cd[7:3];
    end
    if (is_t && is_raw) color = texel[14:0];
    semi_px = is_semi && (!is_t || texel[15]);
  end

  // ------------------------------------------------------------------ VRAM port
  logic [18:0] pix_addr;
  assign pix_addr = {py[8:0], px[9:0]};
  always_comb begin
    vram_req = 1'b0; vram_we = 1'b0; vram_addr = pix_addr; vram_wdata = '0;
    unique case (state)
      S_CLUT:   begin vram_req = 1'b1; vram_addr = {clut_y, clut_x + 10'(clut_i)}; end
      S_TEX_RD: begin vram_req = 1'b1; vram_addr = {tex_y, tex_x}; end
      S_DST_RD: vram_req = 1'b1;
      S_WRITE: begin
        vram_req = 1'b1; vram_we = 1'b1;
        vram_wdata = {mask_set | (is_t & texel[15]),
                      semi_px ? blend555(dst[14:0], color, semi_mode) : color};
      end
      S_FILL: begin
        vram_req = 1'b1; vram_we = 1'b1;
        vram_addr  = {vy[0][8:0] + cy_i, vx[0][9:0] + cx_i};
        vram_wdata = {1'b0, vb[0][7:3], vg[0][7:3], vr[0][7:3]};
      end
      S_CP_RD:  begin vram_req = 1'b1; vram_addr = {sy + cy_i, sx + cx_i}; end
      S_CP_WR:  begin
        vram_req = 1'b1; vram_we = 1'b1;
        vram_addr  = {vy[0][8:0] + cy_i, vx[0][9:0] + cx_i};
        vram_wdata = {dst[15] | mask_set, dst[14:0]};
      end
      S_C2V_WR: begin
        vram_req = 1'b1; vram_we = 1'b1;
        vram_addr  = {vy[0][8:0] + cy_i, vx[0][9:0] + cx_i};
        vram_wdata = c2v_half ? c2v_word[31:16] : c2v_word[15:0];
        vram_wdata[15] = vram_wdata[15] | mask_set;
      end
      S_V2C_RD: begin vram_req = 1'b1; vram_addr = {sy + cy_i, sx + cx_i}; end
      default: ;
    endcase
  end

  // ------------------------------------------------------------------ status / read
  always_comb begin
    gpustat = '0;
    gpustat[3:0]   = tp_x;       gpustat[4]     = tp_y;
    gpustat[6:5]   = semi_mode;  gpustat[8:7]   = tex_depth;
    gpustat[9]     = dither;     gpustat[10]    = draw_disp;
    gpustat[11]    = mask_set;   gpustat[12]    = mask_chk;
    gpustat[15]    = ~tex_dis;    gpustat[16]    = hres[2];
    gpustat[18:17] = hres[1:0];  gpustat[19]    = vres;
    gpustat[20]    = vmode;      gpustat[21]    = col24;
    gpustat[22]    = interl;     gpustat[23]    = den;
    gpustat[24]    = irq_r;
    gpustat[26]    = (state == S_IDLE) && f_empty;
    gpustat[27]    = rd_full;
    gpustat[28]    = f_empty;
    gpustat[30:29] = dma_dir;
    unique case (dma_dir)
      2'd1: gpustat[25] = ~f_full;
      2'd2: gpustat[25] = f_empty;
      2'd3: gpustat[25] = rd_full;
      default: gpustat[25] = 1'b0;
    endcase
  end
  assign irq       = irq_r;
  assign disp_x    = dx_r;
  assign disp_y    = dy_r;
  assign disp_hres = hres;
  assign disp_vres = vres;
  assign disp_en   = den;

  // FIFO pops and generator handshakes, decided by the state machine below.
  logic pl_term;
  assign pl_term = (f_head & 32'hF000_F000) == 32'h5000_5000;
  always_comb begin
    f_rd = 1'b0;
    unique case (state)
      S_IDLE, S_PARAM, S_C2V: f_rd = !f_empty;
      S_PL_WAIT: f_rd = !f_empty;
      default: ;
    endcase
  end
  assign xy_ready = (state == S_PIX) && xy_valid;

  // ------------------------------------------------------------------ main FSM
  logic gp1_reset, gp1_fifo_clr;
  assign gp1_reset    = gp1_we && gp1_wdata[31:24] == 8'h00;
  assign gp1_fifo_clr = gp1_we && gp1_wdata[31:24] == 8'h01;
  assign f_clr        = gp1_reset || gp1_fifo_clr;

  // parse the gathered parameter words of a polygon into the vertex arrays
  task automatic parse_poly();
    int k;
    k = 0;
    for (int i = 0; i < 4; i++) begin
      logic [31:0] c;
      if (i == 0) c = {8'h0, vb[0], vg[0], vr[0]};
      else if (op[4]) begin c = P[k]; k++; end
      else c = {8'h0, vb[0], vg[0], vr[0]};
      vr[i] <= c[7:0]; vg[i] <= c[15:8]; vb[i] <= c[23:16];
      vx[i] <= sx11(P[k][10:0]) + off_x;
      vy[i] <= sx11(P[k][26:16]) + off_y;
      k++;
      if (op[2]) begin
        vu[i] <= P[k][7:0]; vv[i] <= P[k][15:8];
        if (i == 0) begin clut_x <= {P[k][21:16], 4'h0}; clut_y <= P[k][30:22]; end
        if (i == 1) begin
          tp_x <= P[k][19:16]; tp_y <= P[k][20]; semi_mode <= P[k][22:21];
          tex_depth <= P[k][24:23];
        end
        k++;
      end
      if (i == 2 && !op[3]) break;
    end
  endtask

  // Primitive set-up: the triangle (or the line plus a helper point) handed to
  // the interpolator and line finder, and its bounding box clipped to the
  // drawing area. Computed here and loaded in state S_SETUP.
  crd_t       su_x [3], su_y [3];
  logic [7:0] su_r [3], su_g [3], su_b [3], su_u [3], su_v [3];
  logic [9:0] su_x1, su_x2;
  logic [8:0] su_y1, su_y2;
  always_comb begin
    crd_t x0, y0, x1, y1, x2, y2, lo_x, hi_x, lo_y, hi_y;
    logic [7:0] w0r, w0g, w0b, w1r, w1g, w1b, w2r, w2g, w2b;
    int a, b, c;
    a = tri2 ? 1 : 0; b = tri2 ? 2 : 1; c = tri2 ? 3 : 2;
    x0 = vx[a]; y0 = vy[a]; x1 = vx[b]; y1 = vy[b]; x2 = vx[c]; y2 = vy[c];
    w0r = vr[a]; w0g = vg[a]; w0b = vb[a];
    w1r = vr[b]; w1g = vg[b]; w1b = vb[b];
    w2r = vr[c]; w2g = vg[c]; w2b = vb[c];
    if (kind == K_LINE) begin
      // third point at right angles to the line, carrying v0's values,
      // so that the planes vary along the line only
      x0 = vx[0]; y0 = vy[0]; x1 = vx[1]; y1 = vy[1];
      x2 = vx[0] - (vy[1] - vy[0]); y2 = vy[0] + (vx[1] - vx[0]);
      w0r = vr[0]; w0g = vg[0]; w0b = vb[0]; w1r = vr[1]; w1g = vg[1]; w1b = vb[1];
      w2r = vr[0]; w2g = vg[0]; w2b = vb[0];
      lo_x = (x0 < x1) ? x0 : x1; hi_x = (x0 < x1) ? x1 : x0;
      lo_y = (y0 < y1) ? y0 : y1; hi_y = (y0 < y1) ? y1 : y0;
    end else if (kind == K_RECT) begin
      lo_x = vx[0]; hi_x = vx[0] + crd_t'({2'b0, rw}) - 1;
      lo_y = vy[0]; hi_y = vy[0] + crd_t'({3'b0, rh}) - 1;
    end else begin
      lo_x = x0; hi_x = x0; lo_y = y0; hi_y = y0;
      if (x1 < lo_x) lo_x = x1; if (x1 > hi_x) hi_x = x1;
      if (x2 < lo_x) lo_x = x2; if (x2 > hi_x) hi_x = x2;
      if (y1 < lo_y) lo_y = y1; if (y1 > hi_y) hi_y = y1;
      if (y2 < lo_y) lo_y = y2; if (y2 > hi_y) hi_y = y2;
    end
    // clip to the drawing area
    if (lo_x < crd_t'({2'b0, area_x1})) lo_x = crd_t'({2'b0, area_x1});
    if (hi_x > crd_t'({2'b0, area_x2})) hi_x = crd_t'({2'b0, area_x2});
    if (lo_y < crd_t'({3'b0, area_y1})) lo_y = crd_t'({3'b0, area_y1});
    if (hi_y > crd_t'({3'b0, area_y2})) hi_y = crd_t'({3'b0, area_y2});
    su_x[0] = x0; su_y[0] = y0; su_x[1] = x1; su_y[1] = y1; su_x[2] = x2; su_y[2] = y2;
    su_r[0] = w0r; su_g[0] = w0g; su_b[0] = w0b;
    su_r[1] = w1r; su_g[1] = w1g; su_b[1] = w1b;
    su_r[2] = w2r; su_g[2] = w2g; su_b[2] = w2b;
    su_u[0] = vu[a]; su_v[0] = vv[a]; su_u[1] = vu[b]; su_v[1] = vv[b];
    su_u[2] = vu[c]; su_v[2] = vv[c];
    if (hi_x < lo_x || hi_y < lo_y) begin
      su_x1 = 10'd1; su_x2 = 10'd0; su_y1 = 9'd1; su_y2 = 9'd0;   // empty
    end else begin
      su_x1 = lo_x[9:0]; su_x2 = hi_x[9:0]; su_y1 = lo_y[8:0]; su_y2 = hi_y[8:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; kind <= K_POLY; op <= '0; pcnt <= '0; pneed <= '0;
      for (int i = 0; i < 12; i++) P[i] <= '0;
      for (int i = 0; i < 4; i++) begin
        vx[i] <= '0; vy[i] <= '0; vr[i] <= '0; vg[i] <= '0; vb[i] <= '0; vu[i] <= '0; vv[i] <= '0;
      end
      for (int i = 0; i < 3; i++) begin
        tx[i] <= '0; ty[i] <= '0; tr[i] <= '0; tg[i] <= '0; tb[i] <= '0; tu[i] <= '0; tv[i] <= '0;
        ref_side[i] <= '0;
      end
      clut_x <= '0; clut_y <= '0; rw <= '0; rh <= '0; sx <= '0; sy <= '0;
      tri2 <= 1'b0; pl_color <= 1'b0;
      tp_x <= '0; tp_y <= 1'b0; semi_mode <= '0; tex_depth <= '0; dither <= 1'b0;
      draw_disp <= 1'b0; tex_dis <= 1'b0; flip_x <= 1'b0; flip_y <= 1'b0;
      mask_set <= 1'b0; mask_chk <= 1'b0;
      area_x1 <= '0; area_x2 <= '0; area_y1 <= '0; area_y2 <= '0;
      off_x <= '0; off_y <= '0; tex_win <= '0; dma_dir <= '0;
      dx_r <= '0; dy_r <= '0; hres <= '0; vres <= 1'b0; vmode <= 1'b0; col24 <= 1'b0;
      interl <= 1'b0; den <= 1'b0; irq_r <= 1'b0;
      bb_x1 <= '0; bb_x2 <= '0; bb_y1 <= '0; bb_y2 <= '0;
      ip_start <= 1'b0; ip_seen <= '0; xy_start <= 1'b0; last_pix <= 1'b0;
      px <= '0; py <= '0; texel <= '0; dst <= '0; clut_we <= 1'b0; clut_widx <= '0;
      clut_ridx <= '0; clut_n <= '0; clut_i <= '0;
      cx_i <= '0; cy_i <= '0; c2v_word <= '0; c2v_half <= 1'b0;
      rd_word <= '0; rd_half <= 1'b0; rd_full <= 1'b0; gpuread <= '0; info_sel <= '0;
    end else begin
      ip_start <= 1'b0;
      xy_start <= 1'b0;
      clut_we  <= 1'b0;
      if (gpuread_re && state != S_V2C_HOLD) rd_full <= 1'b0;

      unique case (state)
        // -------------------------------------------------------- decode
        S_IDLE: if (!f_empty) begin
          op <= f_head[31:24];
          vr[0] <= f_head[7:0]; vg[0] <= f_head[15:8]; vb[0] <= f_head[23:16];
          pcnt  <= '0;
          pneed <= words_for(f_head[31:24]);
          unique casez (f_head[31:24])
            8'h01: ;                                   // no texture cache to clear
            8'h1F: irq_r <= 1'b1;
            8'hE1: begin
              tp_x <= f_head[3:0]; tp_y <= f_head[4]; semi_mode <= f_head[6:5];
              tex_depth <= f_head[8:7]; dither <= f_head[9]; draw_disp <= f_head[10];
              tex_dis <= f_head[11]; flip_x <= f_head[12]; flip_y <= f_head[13];
            end
            8'hE2: tex_win <= f_head[19:0];
            8'hE3: begin area_x1 <= f_head[9:0]; area_y1 <= f_head[18:10]; end
            8'hE4: begin area_x2 <= f_head[9:0]; area_y2 <= f_head[18:10]; end
            8'hE5: begin off_x <= sx11(f_head[10:0]); off_y <= sx11(f_head[21:11]); end
            8'hE6: begin mask_set <= f_head[0]; mask_chk <= f_head[1]; end
            8'h02, 8'b001?????, 8'b010?????, 8'b011?????, 8'b100?????,
            8'b101?????, 8'b110?????: begin
              unique casez (f_head[31:24])
                8'h02:       kind <= K_FILL;
                8'b001?????: kind <= K_POLY;
                8'b010?????: kind <= K_LINE;
                8'b011?????: kind <= K_RECT;
                8'b100?????: kind <= K_V2V;
                8'b101?????: kind <= K_C2V;
                default:     kind <= K_V2C;
              endcase
              state <= S_PARAM;
            end
            default: ;                                 // NOP
          endcase
        end
        S_PARAM: if (!f_empty) begin
          P[pcnt] <= f_head;
          pcnt    <= pcnt + 1'b1;
          if (pcnt + 1'b1 == pneed) state <= S_EXEC;
        end
        S_EXEC: begin
          tri2 <= 1'b0;
          pl_color <= 1'b0;
          unique case (kind)
            K_POLY: begin parse_poly(); state <= S_CLUT; clut_i <= '0; end
            K_LINE: begin
              vx[0] <= sx11(P[0][10:0]) + off_x; vy[0] <= sx11(P[0][26:16]) + off_y;
              if (op[4]) begin
                vr[1] <= P[1][7:0]; vg[1] <= P[1][15:8]; vb[1] <= P[1][23:16];
                vx[1] <= sx11(P[2][10:0]) + off_x; vy[1] <= sx11(P[2][26:16]) + off_y;
              end else begin
                vr[1] <= vr[0]; vg[1] <= vg[0]; vb[1] <= vb[0];
                vx[1] <= sx11(P[1][10:0]) + off_x; vy[1] <= sx11(P[1][26:16]) + off_y;
              end
              state <= S_SETUP;
            end
            K_RECT: begin
              vx[0] <= sx11(P[0][10:0]) + off_x; vy[0] <= sx11(P[0][26:16]) + off_y;
              if (op[2]) begin
                vu[0] <= P[1][7:0]; vv[0] <= P[1][15:8];
                clut_x <= {P[1][21:16], 4'h0}; clut_y <= P[1][30:22];
              end
              unique case (op[4:3])
                2'd0: begin rw <= op[2] ? P[2][9:0] : P[1][9:0]; rh <= op[2] ? P[2][24:16] : P[1][24:16]; end
                2'd1: begin rw <= 10'd1;  rh <= 9'd1;  end
                2'd2: begin rw <= 10'd8;  rh <= 9'd8;  end
                default: begin rw <= 10'd16; rh <= 9'd16; end
              endcase
              state <= S_CLUT; clut_i <= '0;
            end
            K_FILL: begin
              vx[0] <= crd_t'({2'b0, P[0][9:4], 4'h0}); vy[0] <= crd_t'({3'b0, P[0][24:16]});
              rw <= (P[1][9:0] + 10'd15) & 10'h3F0; rh <= P[1][24:16];
              cx_i <= '0; cy_i <= '0;
              state <= ((P[1][9:0] + 10'd15) & 10'h3F0) == 10'd0 || P[1][24:16] == 9'd0 ? S_IDLE : S_FILL;
            end
            K_V2V: begin
              sx <= P[0][9:0]; sy <= P[0][24:16];
              vx[0] <= crd_t'({2'b0, P[1][9:0]}); vy[0] <= crd_t'({3'b0, P[1][24:16]});
              rw <= P[2][9:0] - 10'd1; rh <= P[2][24:16] - 9'd1;
              cx_i <= '0; cy_i <= '0; state <= S_CP_RD;
            end
            K_C2V: begin
              vx[0] <= crd_t'({2'b0, P[0][9:0]}); vy[0] <= crd_t'({3'b0, P[0][24:16]});
              rw <= P[1][9:0] - 10'd1; rh <= P[1][24:16] - 9'd1;
              cx_i <= '0; cy_i <= '0; state <= S_C2V;
            end
            default: begin
              sx <= P[0][9:0]; sy <= P[0][24:16];
              rw <= P[1][9:0] - 10'd1; rh <= P[1][24:16] - 9'd1;
              cx_i <= '0; cy_i <= '0; rd_half <= 1'b0; state <= S_V2C_RD;
            end
          endcase
        end
        // -------------------------------------------------------- palette load
        S_CLUT: begin
          clut_n <= (tex_depth == 2'd0) ? 9'd16 : 9'd256;
          if (!is_t || tex_depth[1]) state <= S_SETUP;
          else if (vram_gnt) state <= S_CLUT_W;
        end
        S_CLUT_W: if (vram_rvalid) begin
          clut_we   <= 1'b1;
          clut_widx <= clut_i;
          clut_i    <= clut_i + 1'b1;
          state     <= (9'(clut_i) + 9'd1 == clut_n) ? S_SETUP : S_CLUT;
        end
        // -------------------------------------------------------- primitive set-up
        S_SETUP: begin
          bb_x1 <= su_x1; bb_x2 <= su_x2; bb_y1 <= su_y1; bb_y2 <= su_y2;
          for (int k = 0; k < 3; k++) begin
            tx[k] <= su_x[k]; ty[k] <= su_y[k]; tr[k] <= su_r[k]; tg[k] <= su_g[k];
            tb[k] <= su_b[k]; tu[k] <= su_u[k]; tv[k] <= su_v[k];
          end
          ip_seen <= '0;
          state   <= S_INTERP;
          ip_start <= 1'b1;
        end
        S_INTERP: begin
          // reference sides are valid now that the triangle registers are loaded
          for (int k = 0; k < 3; k++) ref_side[k] <= s_ref[k];
          ip_seen <= ip_seen | ip_done;
          if (kind == K_RECT || (!is_g && !is_t) || (&(ip_seen | ip_done))) begin
            if (kind == K_POLY && (s_ref[0] == 2'd0 || s_ref[1] == 2'd0 || s_ref[2] == 2'd0))
              state <= S_PRIM_END;                     // degenerate triangle
            else begin
              xy_start <= 1'b1;
              last_pix <= 1'b0;
              state    <= S_PIX;
            end
          end
        end
        // -------------------------------------------------------- drawing pipeline
        S_PIX: begin
          if (xy_valid) begin
            px <= crd_t'({2'b0, xy_x});
            py <= crd_t'({3'b0, xy_y});
            last_pix <= xy_last;
            state <= S_TEST;
          end else if (!xy_busy && !xy_start) state <= S_PRIM_END;
        end
        S_TEST: begin
          texel <= 16'h0000;
          if (!in_prim) state <= last_pix ? S_PRIM_END : S_PIX;
          else if (is_t) state <= S_TEX_RD;
          else state <= S_SHADE;
        end
        S_TEX_RD: if (vram_gnt) state <= S_TEX_W;
        S_TEX_W: if (vram_rvalid) begin
          unique case (tex_depth)
            2'd0: clut_ridx <= 8'(vram_rdata >> {wu[1:0], 2'b00}) & 8'h0F;
            2'd1: clut_ridx <= wu[0] ? vram_rdata[15:8] : vram_rdata[7:0];
            default: ;
          endcase
          texel <= vram_rdata;
          state <= tex_depth[1] ? S_SHADE : S_TEX_CLUT_W;
        end
        S_TEX_CLUT_W: state <= S_TEX_CLUT;   // palette RAM reads the index
        S_TEX_CLUT: begin
          texel <= clut_rdata;
          state <= S_SHADE;
        end
        S_SHADE: begin
          if (is_t && texel == 16'h0000) state <= last_pix ? S_PRIM_END : S_PIX;  // transparent texel
          else if (mask_chk || semi_px) state <= S_DST_RD;
          else state <= S_WRITE;
        end
        S_DST_RD: if (vram_gnt) state <= S_DST_W;
        S_DST_W: if (vram_rvalid) begin
          dst <= vram_rdata;
          if (mask_chk && vram_rdata[15]) state <= last_pix ? S_PRIM_END : S_PIX;
          else state <= S_WRITE;
        end
        S_WRITE: if (vram_gnt) state <= last_pix ? S_PRIM_END : S_PIX;
        S_PRIM_END: begin
          if (kind == K_POLY && is_q && !tri2) begin
            tri2  <= 1'b1;
            state <= S_SETUP;
          end else if (is_pl) begin
            vx[0] <= vx[1]; vy[0] <= vy[1];
            vr[0] <= vr[1]; vg[0] <= vg[1]; vb[0] <= vb[1];
            pl_color <= 1'b0;
            state <= S_PL_WAIT;
          end else state <= S_IDLE;
        end
        S_PL_WAIT: if (!f_empty) begin
          if (pl_term) state <= S_IDLE;
          else if (is_g && !pl_color) begin
            vr[1] <= f_head[7:0]; vg[1] <= f_head[15:8]; vb[1] <= f_head[23:16];
            pl_color <= 1'b1;
          end else begin
            if (!is_g) begin vr[1] <= vr[0]; vg[1] <= vg[0]; vb[1] <= vb[0]; end
            vx[1] <= sx11(f_head[10:0]) + off_x; vy[1] <= sx11(f_head[26:16]) + off_y;
            state <= S_SETUP;
          end
        end
        // -------------------------------------------------------- fill and transfers
        S_FILL: if (vram_gnt) begin
          if (cx_i == rw - 10'd1) begin
            cx_i <= '0;
            cy_i <= cy_i + 1'b1;
            if (cy_i == rh - 9'd1) state <= S_IDLE;
          end else cx_i <= cx_i + 1'b1;
        end
        S_CP_RD: if (vram_gnt) state <= S_CP_W;
        S_CP_W: if (vram_rvalid) begin dst <= vram_rdata; state <= S_CP_WR; end
        S_CP_WR: if (vram_gnt) begin
          state <= S_CP_RD;
          if (cx_i == rw) begin
            cx_i <= '0;
            cy_i <= cy_i + 1'b1;
            if (cy_i == rh) state <= S_IDLE;
          end else cx_i <= cx_i + 1'b1;
        end
        S_C2V: if (!f_empty) begin
          c2v_word <= f_head;
          c2v_half <= 1'b0;
          state    <= S_C2V_WR;
        end
        S_C2V_WR: if (vram_gnt) begin
          c2v_half <= ~c2v_half;
          if (c2v_half) state <= S_C2V;
          if (cx_i == rw) begin
            cx_i <= '0;
            cy_i <= cy_i + 1'b1;
            if (cy_i == rh) state <= S_IDLE;   // a final odd pixel's partner is dropped
          end else cx_i <= cx_i + 1'b1;
        end
        S_V2C_RD: if (vram_gnt) state <= S_V2C_W;
        S_V2C_W: if (vram_rvalid) begin
          logic fin;
          fin = (cx_i == rw) && (cy_i == rh);
          if (rd_half) rd_word[31:16] <= vram_rdata;
          else         rd_word        <= {16'h0, vram_rdata};
          rd_half <= ~rd_half;
          if (cx_i == rw) begin cx_i <= '0; cy_i <= cy_i + 1'b1; end
          else cx_i <= cx_i + 1'b1;
          if (rd_half || fin) begin
            gpuread <= rd_half ? {vram_rdata, rd_word[15:0]} : {16'h0, vram_rdata};
            rd_full <= 1'b1;
            state   <= S_V2C_HOLD;
          end else state <= S_V2C_RD;
        end
        S_V2C_HOLD: if (gpuread_re) begin
          rd_full <= 1'b0;
          rd_half <= 1'b0;
          state   <= (cy_i == rh + 9'd1 && cx_i == 10'd0) ? S_IDLE : S_V2C_RD;
        end
        default: state <= S_IDLE;
      endcase

      // ---------------------------------------------------------- GP1 commands
      if (gp1_we) begin
        unique casez (gp1_wdata[31:24])
          8'h00: begin
            state <= S_IDLE; irq_r <= 1'b0; den <= 1'b0; dma_dir <= '0;
            dx_r <= '0; dy_r <= '0; hres <= '0; vres <= 1'b0; vmode <= 1'b0;
            col24 <= 1'b0; interl <= 1'b0; tp_x <= '0; tp_y <= 1'b0; semi_mode <= '0;
            tex_depth <= '0; dither <= 1'b0; draw_disp <= 1'b0; tex_dis <= 1'b0;
            mask_set <= 1'b0; mask_chk <= 1'b0; rd_full <= 1'b0;
            area_x1 <= '0; area_x2 <= '0; area_y1 <= '0; area_y2 <= '0; off_x <= '0; off_y <= '0;
          end
          8'h01: begin state <= S_IDLE; rd_full <= 1'b0; end
          8'h02: irq_r <= 1'b0;
          8'h03: den <= ~gp1_wdata[0];
          8'h04: dma_dir <= gp1_wdata[1:0];
          8'h05: begin dx_r <= gp1_wdata[9:0]; dy_r <= gp1_wdata[18:10]; end
          8'h06, 8'h07: ;                              // display ranges: fixed VGA timing
          8'h08: begin
            hres <= {gp1_wdata[6], gp1_wdata[1:0]}; vres <= gp1_wdata[2];
            vmode <= gp1_wdata[3]; col24 <= gp1_wdata[4]; interl <= gp1_wdata[5];
          end
          8'h09: tex_dis <= gp1_wdata[0];
          8'b0001????: begin
            info_sel <= gp1_wdata[3:0];
            unique case (gp1_wdata[3:0])
              4'h2: gpuread <= {12'h0, tex_win};
              4'h3: gpuread <= {12'h0, 1'b0, area_y1, area_x1};
              4'h4: gpuread <= {12'h0, 1'b0, area_y2, area_x2};
              4'h5: gpuread <= {10'h0, off_y[10:0], off_x[10:0]};
              4'h7: gpuread <= 32'h2;
              default: ;
            endcase
          end
          default: ;
        endcase
      end
    end
  end
endmodule
