// global_chain: the global output connected chains of the processing array.
//
// Every processing unit owns two 2-input AND gates. One ANDs the unit's CNN
// output with the horizontal chain arriving from the unit on its left and
// passes the result to the right; the other ANDs it with the vertical chain
// arriving from the unit above and passes it down. The right end of each row
// is that row's chain output and the bottom end of each column is that
// column's chain output, so a row (column) output is 0 exactly when some unit
// of that row (column) has flipped its CNN output to 0. The chain ends at the
// left and top edges are tied to 1.
//
// Interface: cnn_y[r][c] is the binary CNN output of unit (r,c), row 0 at the
// top, column 0 at the left. row_o[r] and col_o[c] are the chain ends.
// Timing: purely combinational, a ripple of up to COLS (ROWS) gates.
//
// The gate structure, the left/top-to-right/bottom direction and the 19 row
// and 25 column chains follow the published array; the tie-off of the chain
// inputs at the array edge to 1 is this design's choice.
module global_chain #(
  parameter int unsigned ROWS = 19,
  parameter int unsigned COLS = 25
) (
  input  logic [ROWS-1:0][COLS-1:0] cnn_y,
  output logic [ROWS-1:0]           row_o,
  output logic [COLS-1:0]           col_o
);

  // h[r][c] is the horizontal chain leaving unit (r,c) to the right,
  // v[r][c] the vertical chain leaving it downwards.
  logic [ROWS-1:0][COLS-1:0] h;
  logic [ROWS-1:0][COLS-1:0] v;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      if (c == 0) begin : g_hleft
        assign h[r][c] = cnn_y[r][c];
      end else begin : g_hchain
        assign h[r][c] = cnn_y[r][c] & h[r][c-1];
      end
      if (r == 0) begin : g_vtop
        assign v[r][c] = cnn_y[r][c];
      end else begin : g_vchain
        assign v[r][c] = cnn_y[r][c] & v[r-1][c];
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_rowo
    assign row_o[r] = h[r][COLS-1];
  end
  for (genvar c = 0; c < COLS; c++) begin : g_colo
    assign col_o[c] = v[ROWS-1][c];
  end

endmodule
