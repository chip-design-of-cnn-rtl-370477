// tb_lmv_frame: one whole frame through the local motion estimator at its
// default size, as a stabilizer would use it at 40 frames per second.
//
// The scene is a textured background moving by (4,-3) pixels between frames,
// with a large object moving by (-5,6) that covers the lower-left region. The
// host loop writes the representative points of each region in turn, starts
// the estimator and waits for finish; four local motion vectors come back.
// Checks: every region's position agrees with the reference model; the three
// background regions report the background motion and the lower-left region
// the object's; the whole frame, representative-point writes included, takes
// at most 4 * (30877 + 64 + 32) cycles, about 6.2 ms at 20 MHz, well inside
// the 25 ms of a 40 Hz frame.
module tb_lmv_frame;
  import ascnn_pkg::*;
  import tb_ascnn_ref_pkg::*;
  localparam int R = 19, C = 25, N = 30;
  localparam int CR = 9, CC = 12;
  localparam int BG_X = 4, BG_Y = -3, OB_X = -5, OB_Y = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] region = 0;
  logic rp_we = 0;
  logic [4:0] rp_sub = 0;
  logic [7:0] rp_val = 0, pix;
  logic pix_req, finish;
  logic [8:0] pix_x;
  logic [7:0] pix_y;
  logic [4:0] axis_x, axis_y, vb;
  logic [R-1:0] row_chain;
  logic [C-1:0] col_chain;
  ctrl_state_e state;
  real v_corner [4];
  real v_bias;

  int checks = 0, failures = 0;
  int rp [N];

  ascnn_lmv_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .region(region), .rp_we(rp_we),
    .rp_sub(rp_sub), .rp_val(rp_val), .pix_req(pix_req), .pix_x(pix_x),
    .pix_y(pix_y), .pix(pix), .finish(finish), .axis_x(axis_x), .axis_y(axis_y),
    .vb(vb), .row_chain(row_chain), .col_chain(col_chain), .state(state),
    .v_mem_corner(v_corner), .v_bias(v_bias));

  always #25 clk = ~clk;   // 20 MHz

  // The object covers the lower-left region and a margin around it.
  function automatic bit in_object(input int x, input int y);
    return x < 170 && y >= 85;
  endfunction

  function automatic int frame_t(input int x, input int y);
    int v;
    if (in_object(x, y)) v = texture(x - OB_X, y - OB_Y);
    else                 v = texture(x - BG_X, y - BG_Y);
    v += noise(x, y);
    return (v > 255) ? 255 : v;
  endfunction

  assign pix = 8'(frame_t(int'(pix_x), int'(pix_y)));

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sad[], level, er, ec, nflip, d, cyc, ex, ey;
    int lmv_x [4], lmv_y [4];
    sad = new[R*C];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cyc = 0;
    for (int g = 0; g < 4; g++) begin
      // representative points of region g from frame t-1
      region = 2'(g);
      for (int k = 0; k < N; k++) begin
        rp[k] = texture(px(g, k, CC), py(g, k, CR));
        rp_we = 1; rp_sub = 5'(k); rp_val = 8'(rp[k]);
        @(negedge clk); cyc++;
      end
      rp_we = 0;
      start = 1;
      @(negedge clk); cyc++;
      start = 0;
      while (!finish && cyc < 200000) begin @(negedge clk); cyc++; end
      // reference
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          sad[r*C + c] = 0;
          for (int k = 0; k < N; k++) begin
            d = frame_t(px(g, k, c), py(g, k, r)) - rp[k];
            sad[r*C + c] += (d < 0) ? -d : d;
          end
        end
      predict(sad, R, C, level, er, ec, nflip);
      check(int'(axis_x) == er && int'(axis_y) == ec,
            $sformatf("region %0d: position %0d,%0d expected %0d,%0d", g, axis_x, axis_y, er, ec));
      lmv_x[g] = int'(axis_y) - CC;
      lmv_y[g] = int'(axis_x) - CR;
      ex = (g == 2) ? OB_X : BG_X;
      ey = (g == 2) ? OB_Y : BG_Y;
      check(nflip == 1 && lmv_x[g] == ex && lmv_y[g] == ey,
            $sformatf("region %0d: LMV (%0d,%0d) expected (%0d,%0d), %0d flips",
                      g, lmv_x[g], lmv_y[g], ex, ey, nflip));
      $display("region %0d: level %0d LMV (%0d,%0d) after %0d cycles", g, level,
               lmv_x[g], lmv_y[g], cyc);
    end
    check(cyc <= 4 * (30877 + 64 + 32), $sformatf("frame took %0d cycles", cyc));
    check(real'(cyc) * 50.0e-9 < 25.0e-3, "frame fits the 25 ms of 40 Hz");
    $display("four LMVs in %0d cycles = %0.3f ms at 20 MHz", cyc, real'(cyc) * 50.0e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
