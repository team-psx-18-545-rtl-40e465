// gpu_line_finder: on which side of a line a pixel lies.
//
// For the line through (x0,y0) and (x1,y1) and the point (px,py) it forms the
// 2x2 determinant  e = (x1-x0)*(py-y0) - (y1-y0)*(px-x0)  with two
// multipliers and a subtractor. The sign of e says whether the point is above
// (e > 0), below (e < 0) or on (e = 0) the line; its magnitude is the
// distance from the line scaled by the line's length, which the line
// rasteriser uses to decide which pixels lie within half a pixel of it.
// Purely combinational. Coordinates are 12-bit signed (VRAM coordinates plus
// the signed drawing offset).
module gpu_line_finder #(
  parameter int CW = 12   // coordinate width, signed
) (
  input  logic signed [CW-1:0] x0,   // first line point, x
  input  logic signed [CW-1:0] y0,   // first line point, y
  input  logic signed [CW-1:0] x1,   // second line point, x
  input  logic signed [CW-1:0] y1,   // second line point, y
  input  logic signed [CW-1:0] px,   // tested point, x
  input  logic signed [CW-1:0] py,   // tested point, y
  output logic signed [2*CW+2:0] e,  // determinant
  output logic [1:0]           side  // 0 on the line, 1 above (e>0), 2 below (e<0)
);
  logic signed [CW:0]     dx, dy, qx, qy;
  logic signed [2*CW+1:0] m0, m1;

  always_comb begin
    dx = (CW+1)'(x1) - (CW+1)'(x0);
    dy = (CW+1)'(y1) - (CW+1)'(y0);
    qx = (CW+1)'(px) - (CW+1)'(x0);
    qy = (CW+1)'(py) - (CW+1)'(y0);
    m0 = dx * qy;
    m1 = dy * qx;
    e  = (2*CW+3)'(m0) - (2*CW+3)'(m1);
    side = (e == 0) ? 2'd0 : (e > 0) ? 2'd1 : 2'd2;
  end
endmodule
