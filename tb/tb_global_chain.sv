// tb_global_chain: self-checking test of the global output connected chains.
// Checks the 3x3 example of the published figure (only the unit in row 1,
// column 0 flipped: rows read 1,0,1, columns 0,1,1) and random patterns on
// the full 19x25 array against row-wise and column-wise AND reductions.
module tb_global_chain;
  localparam int R = 19, C = 25;
  logic [R-1:0][C-1:0] y;
  logic [R-1:0] row_o;
  logic [C-1:0] col_o;
  logic [2:0][2:0] y3;
  logic [2:0] row3, col3;
  int checks = 0, failures = 0;

  global_chain #(.ROWS(R), .COLS(C)) dut (.cnn_y(y), .row_o(row_o), .col_o(col_o));
  global_chain #(.ROWS(3), .COLS(3)) dut3 (.cnn_y(y3), .row_o(row3), .col_o(col3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic er, ec;
    y3 = '1; y3[1][0] = 1'b0; #1;
    checks++;
    if (row3 !== 3'b101 || col3 !== 3'b110) begin
      failures++; $display("3x3 example: rows %b cols %b", row3, col3);
    end
    for (int t = 0; t < 400; t++) begin
      y = '1;
      for (int n = 0; n < int'($urandom_range(0, 4)); n++)
        y[$urandom_range(0, R-1)][$urandom_range(0, C-1)] = 1'b0;
      #1;
      for (int r = 0; r < R; r++) begin
        er = 1'b1;
        for (int c = 0; c < C; c++) er &= y[r][c];
        checks++;
        if (row_o[r] !== er) begin failures++; $display("row %0d mismatch", r); end
      end
      for (int c = 0; c < C; c++) begin
        ec = 1'b1;
        for (int r = 0; r < R; r++) ec &= y[r][c];
        checks++;
        if (col_o[c] !== ec) begin failures++; $display("col %0d mismatch", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
