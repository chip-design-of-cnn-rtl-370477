// tb_sad_dac: self-checking test of the 8-bit DAC model and its input
// register: the code changes only on a clock edge with load high, and the
// output current is code * 0.43091 uA while enabled, 0 otherwise.
module tb_sad_dac;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] din = 0, code;
  real i_out;
  int checks = 0, failures = 0;

  sad_dac #(.BITS(8)) dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en),
                           .din(din), .code(code), .i_out(i_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_i(input real e);
    real d;
    d = i_out - e;
    checks++;
    if (d > 1e-6 || d < -1e-6) begin
      failures++; $display("code %0d en %0b: i=%f expected %f", code, en, i_out, e);
    end
  endtask

  initial begin
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      c = (t < 256) ? t : int'($urandom_range(0, 255));
      @(negedge clk); din = 8'(c); load = 1; en = 1;
      @(negedge clk); load = 0; din = ~din;   // din changes must not reach code
      checks++;
      if (int'(code) != c) begin failures++; $display("register holds %0d expected %0d", code, c); end
      expect_i(0.43091 * real'(c));
      en = 0; #1;
      expect_i(0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
