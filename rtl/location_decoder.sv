// location_decoder: turns the row and column chain outputs into the 5-bit
// position of the global minimum.
//
// A chain output at 0 marks a row or column holding a unit whose CNN output
// flipped. The decoder reports the lowest-numbered such row and column, that
// is the flipped position nearest the top-left unit, and raises found only
// when both a row and a column are marked. Without a marked row or column it
// reports the all-ones index, which is also the chip's "not dependable" code.
// When several units flip at the same bias level in different rows and
// columns, the row and column are resolved independently.
//
// Interface: row_i[ROWS], col_i[COLS] from the chains (active low marks);
// row_idx/col_idx are 0-based indices, found qualifies them.
// Timing: combinational; the controller registers the result.
//
// Decoding from the chain outputs and the 5-bit index width follow the
// published chip; preferring the lowest index on ties is this design's reading
// of "the output decoder will choose the closer to original position's
// address".
module location_decoder #(
  parameter int unsigned ROWS = 19,
  parameter int unsigned COLS = 25,
  parameter int unsigned W    = 5
) (
  input  logic [ROWS-1:0] row_i,
  input  logic [COLS-1:0] col_i,
  output logic [W-1:0]    row_idx,
  output logic [W-1:0]    col_idx,
  output logic            found
);

  logic row_hit, col_hit;

  always_comb begin
    row_idx = '1;
    row_hit = 1'b0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      if (!row_i[r]) begin
        row_idx = W'(r);
        row_hit = 1'b1;
      end
    end
  end

  always_comb begin
    col_idx = '1;
    col_hit = 1'b0;
    for (int c = COLS - 1; c >= 0; c--) begin
      if (!col_i[c]) begin
        col_idx = W'(c);
        col_hit = 1'b1;
      end
    end
  end

  assign found = row_hit & col_hit;

endmodule
