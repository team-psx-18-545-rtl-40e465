// tb_gpu_xy_gen: random bounding boxes (with random back-pressure) must be
// covered exactly: every pixel of every 32x32 block that overlaps the box is
// produced once, block by block, nothing outside those blocks, the last flag
// only on the final pixel; an empty box gives the empty pulse and no pixels.
module tb_gpu_xy_gen;
  localparam int BLK = 32;
  logic clk = 0, rst_n = 1, start = 0, ready = 0;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts at once
  logic [9:0] xmin = 0, xmax = 0, x;
  logic [8:0] ymin = 0, ymax = 0, y;
  logic valid, last, empty, busy;
  int checks = 0, failures = 0;

  gpu_xy_gen #(.BLK(BLK)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 25; n++) begin
      int bx0, bx1, by0, by1, cnt, dup, outside, lastcnt, blk_switch, cur_blk, nblk;
      bit seen [int];
      xmin = 10'($urandom_range(0, 1023)); xmax = 10'($urandom_range(int'(xmin), int'(xmin) + 90 > 1023 ? 1023 : int'(xmin) + 90));
      ymin = 9'($urandom_range(0, 511));   ymax = 9'($urandom_range(int'(ymin), int'(ymin) + 70 > 511 ? 511 : int'(ymin) + 70));
      seen.delete();
      bx0 = xmin / BLK; bx1 = xmax / BLK; by0 = ymin / BLK; by1 = ymax / BLK;
      nblk = (bx1 - bx0 + 1) * (by1 - by0 + 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cnt = 0; dup = 0; outside = 0; lastcnt = 0; blk_switch = 0; cur_blk = -1;
      while (busy) begin
        ready = 1'($urandom);
        #1;
        if (valid && ready) begin
          int k, bk;
          k = int'(y) * 1024 + int'(x);
          bk = (int'(y) / BLK) * 64 + int'(x) / BLK;
          if (bk != cur_blk) begin blk_switch++; cur_blk = bk; end
          if (seen.exists(k)) dup++;
          seen[k] = 1;
          if (int'(x) / BLK < bx0 || int'(x) / BLK > bx1 || int'(y) / BLK < by0 || int'(y) / BLK > by1) outside++;
          cnt++;
          if (last) lastcnt++;
          if (last && cnt != nblk * BLK * BLK) lastcnt += 100;
        end
        @(negedge clk);
      end
      ready = 0;
      chk(cnt == nblk * BLK * BLK && dup == 0 && outside == 0,
          $sformatf("box %0d: %0d pixels (exp %0d) dup %0d out %0d", n, cnt, nblk * BLK * BLK, dup, outside));
      chk(lastcnt == 1, "last flag once, on the final pixel");
      chk(blk_switch == nblk, "blocks walked one at a time");
    end
    // empty box
    begin
      int got = 0; bit e = 0;
      xmin = 10'd50; xmax = 10'd40; ymin = 9'd10; ymax = 9'd20;
      @(negedge clk); start = 1; ready = 1;
      @(negedge clk); start = 0;
      repeat (5) begin #1 if (empty) e = 1; if (valid) got++; @(negedge clk); end
      chk(e && got == 0 && !busy, "empty box");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
