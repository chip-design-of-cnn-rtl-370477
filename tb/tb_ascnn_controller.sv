// tb_ascnn_controller: self-checking test of the controller on a 3x4 array
// with 3 sub-images. A scoreboard checks the raster loading order and the
// sample requests, the one-hot Vx/Vy selection, the cycle budget of
// INIT + cells*(2 + 2*NSUB + 3), two cycles per bias level, latching of the
// decoded position at the first level that reports found, the all-ones code
// after 32 fruitless levels (64 cycles), and restart by start mid-operation.
module tb_ascnn_controller;
  import ascnn_pkg::*;
  localparam int R = 3, C = 4, N = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] row_idx = 0, col_idx = 0;
  logic found;
  logic [R-1:0] vx;
  logic [C-1:0] vy;
  logic vrst, pre, dac_en, line_rst, load_en, cnn_sw, finish;
  logic [4:0] ld_row, ld_col, axis_x, axis_y, vb;
  logic [1:0] ld_sub;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int target;      // bias level at which the fake chains report a flip

  ascnn_controller #(.ROWS(R), .COLS(C), .NSUB(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .row_idx(row_idx), .col_idx(col_idx),
    .found(found), .vx(vx), .vy(vy), .vrst(vrst), .pre(pre), .dac_en(dac_en),
    .line_rst(line_rst), .load_en(load_en), .ld_row(ld_row), .ld_col(ld_col),
    .ld_sub(ld_sub), .cnn_sw(cnn_sw), .vb(vb), .axis_x(axis_x), .axis_y(axis_y),
    .finish(finish), .state(state));

  always #5 clk = ~clk;
  assign found = cnn_sw && (int'(vb) >= target);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One complete operation; returns after finish.
  task automatic run(input int tgt, input int er, input int ec);
    int cyc, nreq, ndac, exp_row, exp_col, exp_sub, t_search, t_load;
    target = tgt; row_idx = 5'(er); col_idx = 5'(ec);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(axis_x == AXIS_NONE && axis_y == AXIS_NONE && !finish, "results cleared by start");
    cyc = 1; nreq = 0; ndac = 0; exp_row = 0; exp_col = 0; exp_sub = 0; t_load = 0; t_search = 0;
    while (!finish && cyc < 5000) begin
      if (state == ST_INIT) check(vrst && vx == 0 && vy == 0, "vrst without selection");
      if (pre || dac_en) check(vx == (R'(1) << ld_row) && vy == (C'(1) << ld_col), "one-hot selection");
      if (load_en) begin
        check(int'(ld_row) == exp_row && int'(ld_col) == exp_col && int'(ld_sub) == exp_sub,
              $sformatf("request %0d/%0d/%0d expected %0d/%0d/%0d", ld_row, ld_col, ld_sub, exp_row, exp_col, exp_sub));
        nreq++;
        exp_sub++;
        if (exp_sub == N) begin
          exp_sub = 0; exp_col++;
          if (exp_col == C) begin exp_col = 0; exp_row++; end
        end
      end
      if (dac_en) ndac++;
      if (state inside {ST_BIAS, ST_CHECK}) begin
        if (t_load == 0) t_load = cyc;
        t_search++;
        check(int'(vb) == (t_search - 1) / 2, $sformatf("vb %0d at search cycle %0d", vb, t_search));
        check(cnn_sw == (state == ST_CHECK), "switch only in check cycles");
      end
      @(negedge clk); cyc++;
    end
    check(nreq == R*C*N, $sformatf("%0d sample requests", nreq));
    check(ndac == R*C*N*2, $sformatf("%0d DAC cycles", ndac));
    check(t_load == 1 + 2 + R*C*(2 + 2*N + 3), $sformatf("loading ended at cycle %0d", t_load));
    if (tgt <= 31) begin
      check(t_search == 2*(tgt + 1), $sformatf("search took %0d cycles", t_search));
      check(int'(axis_x) == er && int'(axis_y) == ec && int'(vb) == tgt, "position latched, VB held");
    end else begin
      check(t_search == 64, $sformatf("fruitless search took %0d cycles", t_search));
      check(axis_x == 5'b11111 && axis_y == 5'b11111, "all-ones code");
    end
    check(finish && state == ST_DONE, "finish");
    repeat (3) @(negedge clk);
    check(finish && int'(vb) == ((tgt <= 31) ? tgt : 31), "results held after finish");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_IDLE && axis_x == 5'b11111 && !finish, "reset state");
    run(23, 5, 3);
    run(0, 2, 1);
    run(99, 0, 0);
    // restart in the middle of loading
    target = 4;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (40) @(negedge clk);
    check(state inside {ST_PRE, ST_LOAD, ST_REST}, "loading under way");
    run(4, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
