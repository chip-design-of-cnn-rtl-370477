// tb_location_decoder: self-checking test of the chain-output decoder.
// Random chain patterns; the expected index is the lowest-numbered chain at
// 0 (all ones when none), found only when a row and a column are marked.
module tb_location_decoder;
  localparam int R = 19, C = 25;
  logic [R-1:0] row_i;
  logic [C-1:0] col_i;
  logic [4:0] ri, ci;
  logic found;
  int checks = 0, failures = 0;

  location_decoder #(.ROWS(R), .COLS(C), .W(5)) dut (
    .row_i(row_i), .col_i(col_i), .row_idx(ri), .col_idx(ci), .found(found));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ec;
    for (int t = 0; t < 2000; t++) begin
      row_i = '1; col_i = '1;
      if ($urandom_range(0, 9) != 0)
        for (int n = 0; n < int'($urandom_range(1, 3)); n++) row_i[$urandom_range(0, R-1)] = 1'b0;
      if ($urandom_range(0, 9) != 0)
        for (int n = 0; n < int'($urandom_range(1, 3)); n++) col_i[$urandom_range(0, C-1)] = 1'b0;
      if (t == 0) begin row_i = '1; row_i[5] = 1'b0; col_i = '1; col_i[3] = 1'b0; end
      #1;
      er = 31; ec = 31;
      for (int r = R-1; r >= 0; r--) if (!row_i[r]) er = r;
      for (int c = C-1; c >= 0; c--) if (!col_i[c]) ec = c;
      checks++;
      if (int'(ri) != er || int'(ci) != ec || found !== (er != 31 && ec != 31)) begin
        failures++;
        $display("rows %b cols %b -> %0d,%0d,%0b expected %0d,%0d", row_i, col_i, ri, ci, found, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
