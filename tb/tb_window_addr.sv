// tb_window_addr: self-checking test of the frame addressing of the
// windowing: every pixel of every sub-image of the four regions is mapped,
// checked against the region/sub-image geometry, and the whole 300x190
// pre-processed frame must be covered exactly once.
module tb_window_addr;
  logic [1:0] region;
  logic [4:0] sub, row, col;
  logic [8:0] x;
  logic [7:0] y;
  bit seen [312][200];
  int checks = 0, failures = 0;

  window_addr dut (.region(region), .sub(sub), .row(row), .col(col), .x(x), .y(y));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey, dup, miss;
    dup = 0; miss = 0;
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 30; k++)
        for (int r = 0; r < 19; r++)
          for (int c = 0; c < 25; c++) begin
            region = 2'(g); sub = 5'(k); row = 5'(r); col = 5'(c);
            #1;
            ex = 6 + (g % 2) * 150 + (k % 6) * 25 + c;
            ey = 5 + (g / 2) * 95 + (k / 6) * 19 + r;
            checks++;
            if (int'(x) != ex || int'(y) != ey) begin
              failures++;
              if (failures < 10) $display("g%0d k%0d (%0d,%0d): %0d,%0d expected %0d,%0d", g, k, r, c, x, y, ex, ey);
            end
            if (seen[x][y]) dup++;
            seen[x][y] = 1;
          end
    for (int xx = 0; xx < 312; xx++)
      for (int yy = 0; yy < 200; yy++)
        if ((xx >= 6 && xx < 306 && yy >= 5 && yy < 195) != seen[xx][yy]) miss++;
    checks++;
    if (dup != 0 || miss != 0) begin failures++; $display("coverage: %0d duplicates, %0d wrong", dup, miss); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
