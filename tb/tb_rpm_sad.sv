// tb_rpm_sad: self-checking test of the representative point buffer and
// absolute difference unit. Writes 30 random representative points, then
// compares |pix - rp[sub]| for random pixels against a model array.
module tb_rpm_sad;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] wsub = 0, sub = 0;
  logic [7:0] wval = 0, pix = 0, diff;
  int rp [30];
  int checks = 0, failures = 0;

  rpm_sad #(.NSUB(30), .PW(8)) dut (
    .clk(clk), .rst_n(rst_n), .rp_we(we), .rp_sub(wsub), .rp_val(wval),
    .sub(sub), .pix(pix), .diff(diff));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      rp[k] = $urandom_range(0, 255);
      if (k == 0) rp[k] = 255;
      if (k == 1) rp[k] = 0;
      @(negedge clk); we = 1; wsub = 5'(k); wval = 8'(rp[k]);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      sub = 5'($urandom_range(0, 29));
      pix = 8'($urandom_range(0, 255));
      if (t == 0) begin sub = 0; pix = 0; end
      if (t == 1) begin sub = 1; pix = 255; end
      #1;
      e = int'(pix) - rp[sub];
      if (e < 0) e = -e;
      checks++;
      if (int'(diff) != e) begin
        failures++; $display("sub %0d pix %0d: %0d expected %0d", sub, pix, diff, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
