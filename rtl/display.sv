// display: VGA scan-out of the GPU's display area.
//
// Generates 640x480 VGA timing from the system clock with a pixel enable
// every CLK_DIV cycles, and shows the part of VRAM that starts at the display
// area origin set by GP1(05). Each screen line is mapped to a VRAM row: with
// 240-line modes every VRAM row is shown on two screen lines, and with 256-
// and 320-pixel modes every VRAM pixel is shown twice across (512- and
// 640-pixel modes show one VRAM pixel per screen pixel; 368 counts as 320).
// The display does not read VRAM itself: at the start of each line it works
// out the VRAM row of the next line and, only if that differs from the row
// already buffered, asks the VRAM controller to copy it into the free bank
// of the row buffer; the banks swap at the start of the line that needs the
// new row. Pixels are then read from the row buffer, RGB555 widened to 8
// bits per channel. Syncs are active low.
//
// Outputs lag the counters by two pixel times (row-buffer read, then output
// register). The single clock, the ping-pong row buffer and the scaling
// rules are this design's choices.
module display #(
  parameter int CLK_DIV = 2,     // system clocks per pixel
  parameter int H_VIS = 640, parameter int H_FP = 16, parameter int H_SYNC = 96, parameter int H_BP = 48,
  parameter int V_VIS = 480, parameter int V_FP = 10, parameter int V_SYNC = 2,  parameter int V_BP = 33,
  parameter int ROW_W = 1024     // pixels per row-buffer bank
) (
  input  logic        clk,        // clock
  input  logic        rst_n,      // asynchronous reset, active low
  input  logic [9:0]  disp_x,     // display area origin, x
  input  logic [8:0]  disp_y,     // display area origin, y
  input  logic [2:0]  disp_hres,  // GP1(08) horizontal mode
  input  logic        disp_vres,  // 1 = 480 lines
  input  logic        disp_en,    // display enabled (black when low)
  output logic        row_req,    // row copy request
  output logic [8:0]  row_y,      // VRAM row to copy
  output logic [9:0]  row_x0,     // first VRAM column
  output logic [10:0] row_len,    // pixels to copy
  output logic        row_bank,   // bank to fill
  input  logic        row_done,   // copy finished
  output logic        rb_re,      // row-buffer read enable
  output logic [$clog2(ROW_W):0] rb_raddr,  // row-buffer {bank, column}
  input  logic [15:0] rb_rdata,   // row-buffer pixel
  output logic        hsync_n,    // horizontal sync
  output logic        vsync_n,    // vertical sync
  output logic        de,         // video active
  output logic [7:0]  r,          // red
  output logic [7:0]  g,          // green
  output logic [7:0]  b,          // blue
  output logic        vblank      // vertical blanking (interrupt source)
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int RW = $clog2(ROW_W);

  logic [$clog2(CLK_DIV+1):0] div;
  logic        pe;
  logic [11:0] hc, vc;
  logic        wide;                 // one VRAM pixel per screen pixel
  logic        cur_bank, cur_valid, swap_next;
  logic [8:0]  cur_y;
  logic [11:0] nl;                   // next line
  logic [8:0]  ny;                   // VRAM row for the next line
  logic        de1, hs1, vs1;

  assign wide = disp_hres[1];
  assign pe   = (div == '0);
  assign nl   = (vc == 12'(V_TOT - 1)) ? 12'd0 : vc + 12'd1;
  assign ny   = disp_y + (disp_vres ? nl[8:0] : 9'(nl[11:1]));

  assign row_x0  = disp_x;
  assign row_len = wide ? 11'(H_VIS) : 11'(H_VIS / 2);
  assign rb_re   = pe;
  assign rb_raddr = {cur_bank, wide ? RW'(hc) : RW'(hc >> 1)};   // the row starts at column 0
  assign vblank  = (vc >= 12'(V_VIS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; hc <= '0; vc <= '0;
      cur_bank <= 1'b0; cur_valid <= 1'b0; cur_y <= '0; swap_next <= 1'b0;
      row_req <= 1'b0; row_y <= '0; row_bank <= 1'b0;
      de1 <= 1'b0; hs1 <= 1'b1; vs1 <= 1'b1;
      de <= 1'b0; hsync_n <= 1'b1; vsync_n <= 1'b1; r <= '0; g <= '0; b <= '0;
    end else begin
      div <= (int'(div) == CLK_DIV - 1) ? '0 : div + 1'b1;
      if (row_done) row_req <= 1'b0;
      if (pe) begin
        // counters
        if (hc == 12'(H_TOT - 1)) begin
          hc <= '0;
          vc <= nl;
        end else hc <= hc + 12'd1;
        // on the last pixel of a line: swap in the row fetched for the next
        // line, so that its first pixel is read from the new bank
        if (hc == 12'(H_TOT - 1) && swap_next && !row_req) begin
          cur_bank  <= ~cur_bank;
          cur_y     <= row_y;
          cur_valid <= 1'b1;
          swap_next <= 1'b0;
        end
        // at the start of a line: fetch the row of the following line into
        // the free bank if it is a new one (not while a fetch is unfinished)
        if (hc == 12'd0 && nl < 12'(V_VIS) && !row_req && !swap_next &&
            (!cur_valid || cur_y != ny)) begin
          row_req   <= 1'b1;
          row_y     <= ny;
          row_bank  <= ~cur_bank;
          swap_next <= 1'b1;
        end
        // stage 1: timing of the pixel whose buffer read starts now
        de1 <= (hc < 12'(H_VIS)) && (vc < 12'(V_VIS));
        hs1 <= !(hc >= 12'(H_VIS + H_FP) && hc < 12'(H_VIS + H_FP + H_SYNC));
        vs1 <= !(vc >= 12'(V_VIS + V_FP) && vc < 12'(V_VIS + V_FP + V_SYNC));
        // stage 2: outputs
        de      <= de1;
        hsync_n <= hs1;
        vsync_n <= vs1;
        if (de1 && disp_en) begin
          r <= {rb_rdata[4:0],   rb_rdata[4:2]};
          g <= {rb_rdata[9:5],   rb_rdata[9:7]};
          b <= {rb_rdata[14:10], rb_rdata[14:12]};
        end else begin
          r <= '0; g <= '0; b <= '0;
        end
      end
    end
  end
endmodule
