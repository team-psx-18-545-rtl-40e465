// gpu_interp: plane-equation setup for colour and texture interpolation.
//
// Inside a triangle a colour channel or texture coordinate n is a linear
// function of the pixel position:  n = c_x*x + c_y*y + c_s.  Given the three
// vertices (x_i, y_i) and their values v_i, this block solves the three
// equations for c_x, c_y and c_s with Cramer's rule:
//   D   = det[x y 1],  D_x = det[v y 1],  D_y = det[x v 1],  D_s = det[x y v]
//   c_x = D_x/D,  c_y = D_y/D,  c_s = D_s/D
// The numerators are formed in one registered cycle and then divided by D in
// three sequential dividers running side by side. Results are signed fixed
// point with FRAC fraction bits. A degenerate triangle (D = 0) gives c_x = c_y
// = 0 and c_s = v_0. The GPU uses five of these units (R, G, B, U, V).
//
// Timing: start is a one-cycle pulse; done pulses NW+2 cycles later and the
// coefficients then stay until the next start. The solve by Cramer's rule is
// the original design's method; the sequential (rather than deeply pipelined)
// division and the widths are this design's choices.
module gpu_interp #(
  parameter int CW   = 12,  // coordinate width, signed
  parameter int FRAC = 16,  // fraction bits of the coefficients
  parameter int NW   = 56   // coefficient width
) (
  input  logic                 clk,    // clock
  input  logic                 rst_n,  // asynchronous reset, active low
  input  logic                 start,  // begin a solve
  input  logic signed [CW-1:0] x [3],  // vertex x
  input  logic signed [CW-1:0] y [3],  // vertex y
  input  logic [7:0]           v [3],  // vertex value (colour or texel coordinate)
  output logic                 done,   // coefficients valid (one-cycle pulse)
  output logic signed [NW-1:0] cx,     // d n / d x
  output logic signed [NW-1:0] cy,     // d n / d y
  output logic signed [NW-1:0] cs      // constant term
);
  localparam int DW = 2*CW + 4;

  logic signed [NW-1:0] nx, ny, ns;
  logic signed [DW-1:0] den;
  logic                 go, degenerate;
  logic [7:0]           v0_q;
  logic                 dn_x, dn_y, dn_s;
  logic signed [NW-1:0] q_x, q_y, q_s;

  // Cramer's-rule determinants, expanded along the third column.
  function automatic logic signed [NW-1:0] det3(
      input logic signed [NW-1:0] a0, input logic signed [NW-1:0] b0, input logic signed [NW-1:0] c0,
      input logic signed [NW-1:0] a1, input logic signed [NW-1:0] b1, input logic signed [NW-1:0] c1,
      input logic signed [NW-1:0] a2, input logic signed [NW-1:0] b2, input logic signed [NW-1:0] c2);
    return c0 * (a1*b2 - a2*b1) - c1 * (a0*b2 - a2*b0) + c2 * (a0*b1 - a1*b0);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx <= '0; ny <= '0; ns <= '0; den <= '0; go <= 1'b0; degenerate <= 1'b0; v0_q <= '0;
    end else begin
      go <= start;
      if (start) begin
        logic signed [NW-1:0] X0, X1, X2, Y0, Y1, Y2, V0, V1, V2, ONE, d;
        X0 = NW'(x[0]); X1 = NW'(x[1]); X2 = NW'(x[2]);
        Y0 = NW'(y[0]); Y1 = NW'(y[1]); Y2 = NW'(y[2]);
        V0 = NW'({1'b0, v[0]}); V1 = NW'({1'b0, v[1]}); V2 = NW'({1'b0, v[2]});
        ONE = NW'(1);
        d  = det3(X0, Y0, ONE, X1, Y1, ONE, X2, Y2, ONE);
        den <= DW'(d);
        degenerate <= (d == 0);
        nx <= det3(V0, Y0, ONE, V1, Y1, ONE, V2, Y2, ONE) <<< FRAC;
        ny <= det3(X0, V0, ONE, X1, V1, ONE, X2, V2, ONE) <<< FRAC;
        ns <= det3(X0, Y0, V0, X1, Y1, V1, X2, Y2, V2) <<< FRAC;
        v0_q <= v[0];
      end
    end
  end

  seq_div #(.NW(NW), .DW(DW)) u_dx (.clk, .rst_n, .start(go), .dividend(nx), .divisor(den), .done(dn_x), .quotient(q_x));
  seq_div #(.NW(NW), .DW(DW)) u_dy (.clk, .rst_n, .start(go), .dividend(ny), .divisor(den), .done(dn_y), .quotient(q_y));
  seq_div #(.NW(NW), .DW(DW)) u_ds (.clk, .rst_n, .start(go), .dividend(ns), .divisor(den), .done(dn_s), .quotient(q_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0; cs <= '0; done <= 1'b0;
    end else begin
      done <= dn_x & dn_y & dn_s;
      if (dn_x & dn_y & dn_s) begin
        cx <= degenerate ? '0 : q_x;
        cy <= degenerate ? '0 : q_y;
        cs <= degenerate ? (NW'({1'b0, v0_q}) <<< FRAC) : q_s;
      end
    end
  end
endmodule
