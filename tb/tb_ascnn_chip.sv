// tb_ascnn_chip: self-checking test of the chip on a reduced 5x6 array with
// 4 sub-images. A host model answers every sample request with the planned
// difference; each operation's position, bias level, loading time
// (2 + cells*(2 + 2*4 + 3) cycles) and search time (2 cycles per level) are
// compared with the reference model. Scenarios: a planted minimum, a flat
// saturated array (all-ones code), a tie between units of different rows and
// columns, and random arrays.
module tb_ascnn_chip;
  import ascnn_pkg::*;
  import tb_ascnn_ref_pkg::*;
  localparam int R = 5, C = 6, N = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] din;
  logic load_en, finish;
  logic [4:0] ld_row, ld_col, axis_x, axis_y, vb;
  logic [1:0] ld_sub;
  logic [R-1:0] row_chain;
  logic [C-1:0] col_chain;
  ctrl_state_e state;
  real v_corner [4];
  real v_bias;
  int diff [R][C][N];
  int checks = 0, failures = 0;

  ascnn_chip #(.ROWS(R), .COLS(C), .NSUB(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din(din), .load_en(load_en),
    .ld_row(ld_row), .ld_col(ld_col), .ld_sub(ld_sub), .finish(finish),
    .axis_x(axis_x), .axis_y(axis_y), .vb(vb), .row_chain(row_chain),
    .col_chain(col_chain), .state(state), .v_mem_corner(v_corner), .v_bias(v_bias));

  always #25 clk = ~clk;   // 20 MHz
  assign din = load_en ? 8'(diff[ld_row][ld_col][ld_sub]) : 8'h00;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input string name);
    int sad[], level, er, ec, nflip, cyc, t_load;
    real d;
    sad = new[R*C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        sad[r*C + c] = 0;
        for (int k = 0; k < N; k++) sad[r*C + c] += diff[r][c][k];
      end
    predict(sad, R, C, level, er, ec, nflip);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; t_load = 0;
    while (!finish && cyc < 100000) begin
      if (t_load == 0 && state == ST_BIAS) t_load = cyc;
      @(negedge clk); cyc++;
    end
    check(t_load == 1 + 2 + R*C*(2 + 2*N + 3), $sformatf("%s: loading ended at cycle %0d", name, t_load));
    check(cyc - t_load == 2*((level > 31 ? 31 : level) + 1), $sformatf("%s: search %0d cycles", name, cyc - t_load));
    check(int'(axis_x) == er && int'(axis_y) == ec,
          $sformatf("%s: position %0d,%0d expected %0d,%0d (level %0d)", name, axis_x, axis_y, er, ec, level));
    check(int'(vb) == (level > 31 ? 31 : level), $sformatf("%s: vb %0d expected %0d", name, vb, level));
    d = v_corner[3] - lam_volts(sad[R*C - 1]);
    check(d < 1e-6 && d > -1e-6, $sformatf("%s: corner LAM %f", name, v_corner[3]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // planted minimum at (3,2)
    foreach (diff[r, c, k]) diff[r][c][k] = $urandom_range(40, 120);
    for (int k = 0; k < N; k++) diff[3][2][k] = $urandom_range(0, 8);
    run("planted");
    // saturated array: nothing dependable
    foreach (diff[r, c, k]) diff[r][c][k] = 255;
    run("saturated");
    // tie at (1,4) and (2,1): lowest row and lowest column are reported
    foreach (diff[r, c, k]) diff[r][c][k] = 150;
    for (int k = 0; k < N; k++) begin diff[1][4][k] = 5; diff[2][1][k] = 5; end
    run("tie");
    for (int t = 0; t < 6; t++) begin
      foreach (diff[r, c, k]) diff[r][c][k] = $urandom_range(0, 255 >> (t % 4));
      run($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
