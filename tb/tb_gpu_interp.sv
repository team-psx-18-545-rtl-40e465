// tb_gpu_interp: random non-degenerate triangles; the plane coefficients
// produced must reproduce each vertex value to within one unit (the
// coefficients are truncated fixed point) and the centroid value to within
// one unit of the exact value worked out in real arithmetic. Also checks the
// latency (fixed, independent of the data) and the degenerate case (flat).
module tb_gpu_interp;
  localparam int CW = 12, FRAC = 16, NW = 56;
  logic clk = 0, rst_n = 1, start = 0, done;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic signed [CW-1:0] x [3], y [3];
  logic [7:0] v [3];
  logic signed [NW-1:0] cx, cy, cs;
  int checks = 0, failures = 0;

  gpu_interp #(.CW(CW), .FRAC(FRAC), .NW(NW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic real ev(input real px, input real py);
    return ($itor(cx) * px + $itor(cy) * py + $itor(cs)) / real'(1 << FRAC);
  endfunction

  int lat0 = -1;
  initial begin
    for (int i = 0; i < 3; i++) begin x[i] = 0; y[i] = 0; v[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      longint det; int lat;
      do begin
        for (int i = 0; i < 3; i++) begin
          x[i] = CW'($urandom_range(0, 1023)); y[i] = CW'($urandom_range(0, 511));
          v[i] = 8'($urandom);
        end
        det = (longint'(x[1]) - x[0]) * (longint'(y[2]) - y[0]) -
              (longint'(x[2]) - x[0]) * (longint'(y[1]) - y[0]);
      end while (det == 0);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      if (lat0 < 0) lat0 = lat;
      chk(lat == lat0, $sformatf("latency %0d vs %0d", lat, lat0));
      begin
        real e; real ctr, exp_c;
        e = 0;
        for (int i = 0; i < 3; i++) begin
          real d;
          d = ev(x[i], y[i]) - v[i];
          if (d < 0) d = -d;
          if (d > e) e = d;
        end
        chk(e <= 1.0, $sformatf("vertex error %f", e));
        ctr = ev(($itor(x[0]) + $itor(x[1]) + $itor(x[2])) / 3.0, ($itor(y[0]) + $itor(y[1]) + $itor(y[2])) / 3.0);
        exp_c = ($itor(v[0]) + $itor(v[1]) + $itor(v[2])) / 3.0;
        chk(ctr - exp_c <= 1.0 && exp_c - ctr <= 1.0, $sformatf("centroid %f vs %f", ctr, exp_c));
      end
    end
    // degenerate: all on a line -> constant value v0
    x = '{12'sd0, 12'sd10, 12'sd20}; y = '{12'sd5, 12'sd5, 12'sd5}; v = '{8'd77, 8'd1, 8'd2};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    chk(cx == 0 && cy == 0 && cs == (NW'(77) <<< FRAC), "degenerate triangle is flat");
    $display("interpolator latency %0d cycles", lat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
