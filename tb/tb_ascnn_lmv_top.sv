// tb_ascnn_lmv_top: end-to-end test of the local motion estimator at its
// default size (19x25 array, 30 sub-images, four 150x95 regions of a
// 312x200 frame).
//
// The testbench synthesises frame t-1 from a smooth texture, writes the 30
// sub-image centre pixels of the selected region into the representative
// point buffer, and answers the estimator's pixel requests (frame
// coordinates) from frame t, the texture shifted by a known motion plus a
// little noise. The reference model predicts position and bias level from
// sums of absolute differences the testbench computes itself; loading must
// take 2 + 475*65 = 30877 cycles (1543.75 us at 20 MHz) and the search 2
// cycles per level.
//
// Operations: shifted textures in two regions (the minimum found and, without
// ties, equal to centre + motion), a restart in the middle of loading, a
// frame with no match (saturated memories, all-ones code) and a frame with
// two equal matches in different rows and columns. Mechanism counters (bias
// raised, minimum found, not dependable, LAM saturated, restart, tie) must
// each reach at least one.
module tb_ascnn_lmv_top;
  import ascnn_pkg::*;
  import tb_ascnn_ref_pkg::*;
  localparam int R = 19, C = 25, N = 30;
  localparam int CR = 9, CC = 12;   // centre of a sub-image

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
  int n_raise = 0, n_found = 0, n_undep = 0, n_sat = 0, n_restart = 0, n_tie = 0;

  int mode;          // 0 shifted texture, 1 no match, 2 two matches
  int mx, my;        // motion of frame t against frame t-1
  int rp [N];

  ascnn_lmv_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .region(region), .rp_we(rp_we),
    .rp_sub(rp_sub), .rp_val(rp_val), .pix_req(pix_req), .pix_x(pix_x),
    .pix_y(pix_y), .pix(pix), .finish(finish), .axis_x(axis_x), .axis_y(axis_y),
    .vb(vb), .row_chain(row_chain), .col_chain(col_chain), .state(state),
    .v_mem_corner(v_corner), .v_bias(v_bias));

  always #25 clk = ~clk;   // 20 MHz

  // Frame t at frame coordinates (x,y), for the current region.
  function automatic int frame_t(input int x, input int y);
    int g, xr, yr, k, r, c, v;
    g  = int'(region);
    xr = x - CROP_X - (g % 2) * REG_W;
    yr = y - CROP_Y - (g / 2) * REG_H;
    k  = (yr / SUB_H) * SUBS_X + xr / SUB_W;
    r  = yr % SUB_H;
    c  = xr % SUB_W;
    case (mode)
      0: begin
        v = texture(x - mx, y - my) + noise(x, y);
        return (v > 255) ? 255 : v;
      end
      1: return rp[k] ^ 8'h80;
      default: begin
        if ((r == 2 && c == 20) || (r == 15 && c == 3)) return rp[k];
        return rp[k] ^ 8'h40;
      end
    endcase
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

  task automatic write_rps(input int g);
    region = 2'(g);
    for (int k = 0; k < N; k++) begin
      rp[k] = texture(px(g, k, CC), py(g, k, CR));
      @(negedge clk); rp_we = 1; rp_sub = 5'(k); rp_val = 8'(rp[k]);
    end
    @(negedge clk); rp_we = 0;
  endtask

  task automatic run(input string name);
    int sad[], level, er, ec, nflip, cyc, t_load, d, g;
    g = int'(region);
    sad = new[R*C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        sad[r*C + c] = 0;
        for (int k = 0; k < N; k++) begin
          d = frame_t(px(g, k, c), py(g, k, r)) - rp[k];
          sad[r*C + c] += (d < 0) ? -d : d;
        end
        if (lam_volts(sad[r*C + c]) >= 3.3) n_sat++;
      end
    predict(sad, R, C, level, er, ec, nflip);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; t_load = 0;
    while (!finish && cyc < 40000) begin
      if (t_load == 0 && state == ST_BIAS) t_load = cyc;
      @(negedge clk); cyc++;
    end
    check(t_load == 1 + 2 + R*C*65, $sformatf("%s: loading ended at cycle %0d", name, t_load));
    check(cyc - t_load == 2*((level > 31 ? 31 : level) + 1),
          $sformatf("%s: search took %0d cycles, level %0d", name, cyc - t_load, level));
    check(int'(axis_x) == er && int'(axis_y) == ec,
          $sformatf("%s: position %0d,%0d expected %0d,%0d", name, axis_x, axis_y, er, ec));
    if (level > 0 && level < 32) n_raise++;
    if (level < 32) n_found++; else n_undep++;
    if (nflip > 1) n_tie++;
    if (mode == 0 && nflip == 1)
      check(int'(axis_x) - CR == my && int'(axis_y) - CC == mx,
            $sformatf("%s: motion (%0d,%0d) estimated as (%0d,%0d)", name, mx, my,
                      int'(axis_y) - CC, int'(axis_x) - CR));
    $display("%s: level %0d position (%0d,%0d) flips %0d", name, level, axis_x, axis_y, nflip);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_rps(0);
    mode = 0; mx = -7; my = -5;
    run("region 0, shift (-7,-5)");
    // restart: abandon an operation in the middle of loading
    write_rps(3);
    mode = 0; mx = 3; my = 2;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (5000) @(negedge clk);
    check(state inside {ST_PRE, ST_LOAD, ST_REST} && !finish, "restart: loading under way");
    n_restart++;
    run("region 3, shift (3,2) after restart");
    write_rps(1);
    mode = 1;
    run("region 1, no match");
    mode = 2;
    run("region 1, two matches");
    check(n_raise > 0, "bias raised at least once");
    check(n_found > 0, "minimum found at least once");
    check(n_undep > 0, "not-dependable result at least once");
    check(n_sat > 0, "LAM saturation at least once");
    check(n_restart > 0, "restart at least once");
    check(n_tie > 0, "tie at least once");
    $display("mechanisms: raise %0d found %0d undependable %0d saturated-cells %0d restart %0d tie %0d",
             n_raise, n_found, n_undep, n_sat, n_restart, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
