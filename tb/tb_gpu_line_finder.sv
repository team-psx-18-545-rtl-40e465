// tb_gpu_line_finder: random lines and points, determinant and side checked
// against an integer computation in the testbench.
module tb_gpu_line_finder;
  logic signed [11:0] x0, y0, x1, y1, px, py;
  logic signed [26:0] e;
  logic [1:0] side;
  int checks = 0, failures = 0;

  gpu_line_finder dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint ex; logic [1:0] es;
      x0 = 12'($urandom_range(0, 2047)) - 12'sd1024; y0 = 12'($urandom_range(0, 2047)) - 12'sd1024;
      x1 = 12'($urandom_range(0, 2047)) - 12'sd1024; y1 = 12'($urandom_range(0, 2047)) - 12'sd1024;
      px = 12'($urandom_range(0, 2047)) - 12'sd1024; py = 12'($urandom_range(0, 2047)) - 12'sd1024;
      if (n % 7 == 0) begin px = x0 + (x1 - x0) / 2; py = y0 + (y1 - y0) / 2; end
      if (n % 11 == 0) begin px = x1; py = y1; end
      #1;
      ex = (longint'(x1) - x0) * (longint'(py) - y0) - (longint'(y1) - y0) * (longint'(px) - x0);
      es = (ex == 0) ? 2'd0 : (ex > 0) ? 2'd1 : 2'd2;
      checks++;
      if (longint'(e) != ex || side != es) begin
        failures++;
        $display("FAIL e=%0d exp %0d side %0d exp %0d", e, ex, side, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
