// gpu_xy_gen: pixel coordinate generator for the drawing pipeline.
//
// The drawing space is cut into BLK x BLK pixel blocks. For a primitive with
// bounding box (xmin..xmax, ymin..ymax), the generator compares each block's
// extent with the box and visits only the blocks that overlap it, row of
// blocks by row of blocks. Inside a visited block it feeds every pixel
// coordinate, row by row, to the top of the pipeline; the drawing stage then
// decides per pixel whether it lies in the primitive. Output is a
// valid/ready stream, one pixel per cycle when ready is high; last marks the
// final pixel of the primitive. start (while idle) latches the box; a box
// with xmin > xmax or ymin > ymax produces no pixels and ends at once
// (empty pulses).
module gpu_xy_gen #(
  parameter int BLK = 32    // block edge in pixels, a power of two
) (
  input  logic       clk,     // clock
  input  logic       rst_n,   // asynchronous reset, active low
  input  logic       start,   // latch a bounding box and begin
  input  logic [9:0] xmin,    // bounding box, inclusive
  input  logic [9:0] xmax,
  input  logic [8:0] ymin,
  input  logic [8:0] ymax,
  output logic       valid,   // x,y hold a pixel
  input  logic       ready,   // pixel taken
  output logic [9:0] x,       // pixel x
  output logic [8:0] y,       // pixel y
  output logic       last,    // final pixel of the primitive
  output logic       empty,   // the box was empty (one-cycle pulse)
  output logic       busy     // a primitive is being walked
);
  localparam int LB = $clog2(BLK);
  logic [9:0] bx0, bx1, bx;     // block column range and current, in pixels
  logic [8:0] by1, by;          // block row range end and current
  logic [LB-1:0] ix, iy;        // pixel inside the block
  logic       at_end_x, at_end_y, blk_last_col, blk_last_row;

  assign x = bx + 10'(ix);
  assign y = by + 9'(iy);
  assign at_end_x     = (ix == LB'(BLK-1));
  assign at_end_y     = (iy == LB'(BLK-1));
  assign blk_last_col = (bx == bx1);
  assign blk_last_row = (by == by1);
  assign last  = valid && at_end_x && at_end_y && blk_last_col && blk_last_row;
  assign valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; empty <= 1'b0;
      bx0 <= '0; bx1 <= '0; bx <= '0; by1 <= '0; by <= '0; ix <= '0; iy <= '0;
    end else begin
      empty <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (xmin > xmax || ymin > ymax) empty <= 1'b1;
          else begin
            // blocks whose extent overlaps [min, max]
            bx0  <= {xmin[9:LB], LB'(0)};
            bx1  <= {xmax[9:LB], LB'(0)};
            bx   <= {xmin[9:LB], LB'(0)};
            by1  <= {ymax[8:LB], LB'(0)};
            by   <= {ymin[8:LB], LB'(0)};
            ix   <= '0;
            iy   <= '0;
            busy <= 1'b1;
          end
        end
      end else if (ready) begin
        ix <= ix + 1'b1;
        if (at_end_x) begin
          iy <= iy + 1'b1;
          if (at_end_y) begin
            if (!blk_last_col) bx <= bx + 10'(BLK);
            else begin
              bx <= bx0;
              if (!blk_last_row) by <= by + 9'(BLK);
              else busy <= 1'b0;
            end
          end
        end
      end
    end
  end
endmodule
