// tb_ascnn_chip_full: the chip at its default size (19x25 units, 30
// sub-images) on a difference matrix shaped like the chip's own test frame:
// the smallest sum, 89, at 1-based position (6,4); the next smallest, 109,
// directly above it at (5,4); sums growing with the distance from the minimum
// elsewhere. Each unit's sum is spread over its 30 samples as evenly as the
// integer codes allow.
//
// Checks: every one of the 475 LAM voltages after loading matches the
// reference charge model; the 89 unit holds the lowest voltage and the 109
// unit the second lowest; the search stops at the level the reference
// predicts with exactly one unit flipped, although the two smallest sums are
// only 20 apart and share a column; the result is axis_x = 5, axis_y = 3
// (0-based); loading takes 30877 cycles and the search 2 cycles per level.
module tb_ascnn_chip_full;
  import ascnn_pkg::*;
  import tb_ascnn_ref_pkg::*;
  localparam int R = 19, C = 25, N = 30;
  localparam int MR = 5, MC = 3;   // 0-based position of the minimum

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] din;
  logic load_en, finish;
  logic [4:0] ld_row, ld_col, ld_sub, axis_x, axis_y, vb;
  logic [R-1:0] row_chain;
  logic [C-1:0] col_chain;
  ctrl_state_e state;
  real v_corner [4];
  real v_bias;
  int sad [R*C];
  real vm [R][C];
  int checks = 0, failures = 0;

  ascnn_chip dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din(din), .load_en(load_en),
    .ld_row(ld_row), .ld_col(ld_col), .ld_sub(ld_sub), .finish(finish),
    .axis_x(axis_x), .axis_y(axis_y), .vb(vb), .row_chain(row_chain),
    .col_chain(col_chain), .state(state), .v_mem_corner(v_corner), .v_bias(v_bias));

  for (genvar r = 0; r < R; r++) begin : g_probe_r
    for (genvar c = 0; c < C; c++) begin : g_probe_c
      always_comb vm[r][c] = dut.g_r[r].g_c[c].u_pu.v_mem;
    end
  end

  always #25 clk = ~clk;   // 20 MHz

  // Sample k of unit (r,c): the sum split into 30 near-equal codes.
  function automatic int sample(input int r, input int c, input int k);
    int s;
    s = sad[r*C + c];
    return s / N + ((k < s % N) ? 1 : 0);
  endfunction

  assign din = load_en ? 8'(sample(int'(ld_row), int'(ld_col), int'(ld_sub))) : 8'h00;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int level, er, ec, nflip, cyc, t_load, dr, dc, bad, r1, c1, r2, c2;
    real d, v1, v2;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        dr = (r > MR) ? r - MR : MR - r;
        dc = (c > MC) ? c - MC : MC - c;
        sad[r*C + c] = 150 + 35 * (dr + dc) + $urandom_range(0, 60);
        if (sad[r*C + c] > 7000) sad[r*C + c] = 7000;
      end
    sad[MR*C + MC] = 89;
    sad[(MR-1)*C + MC] = 109;
    predict(sad, R, C, level, er, ec, nflip);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; t_load = 0;
    while (!finish && cyc < 40000) begin
      if (t_load == 0 && state == ST_BIAS) begin
        t_load = cyc;
        // every LAM after loading
        bad = 0;
        v1 = 10.0; v2 = 10.0; r1 = -1; c1 = -1; r2 = -1; c2 = -1;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            d = vm[r][c] - lam_volts(sad[r*C + c]);
            if (d > 1e-6 || d < -1e-6) bad++;
            if (vm[r][c] < v1) begin
              v2 = v1; r2 = r1; c2 = c1; v1 = vm[r][c]; r1 = r; c1 = c;
            end else if (vm[r][c] < v2) begin
              v2 = vm[r][c]; r2 = r; c2 = c;
            end
          end
        check(bad == 0, $sformatf("%0d LAM voltages differ from the charge model", bad));
        check(r1 == MR && c1 == MC && r2 == MR - 1 && c2 == MC,
              $sformatf("lowest LAMs at (%0d,%0d) and (%0d,%0d)", r1, c1, r2, c2));
        $display("lowest LAM %0.3f V, next %0.3f V", v1, v2);
      end
      @(negedge clk); cyc++;
    end
    check(t_load == 1 + 2 + R*C*65, $sformatf("loading ended at cycle %0d", t_load));
    check(cyc - t_load == 2*(level + 1), $sformatf("search took %0d cycles, level %0d", cyc - t_load, level));
    check(nflip == 1 && int'(vb) == level, $sformatf("vb %0d, level %0d, %0d flips", vb, level, nflip));
    check(int'(axis_x) == MR && int'(axis_y) == MC && er == MR && ec == MC,
          $sformatf("position %0d,%0d expected %0d,%0d", axis_x, axis_y, MR, MC));
    $display("axis_x %0d axis_y %0d at level %0d", axis_x, axis_y, vb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
