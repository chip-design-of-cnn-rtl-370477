// tb_processing_unit: self-checking test of one processing unit model.
// Loads 30 random differences through a pre-charged LAM exactly as the
// controller does (2 cycles per sample), checks that only Vx AND Vy opens
// the memory, then sweeps the 32 bias levels and compares the CNN output
// with the expected comparison of the converted LAM current and the bias.
module tb_processing_unit;
  localparam real ILSB = 0.43091;
  logic clk = 0, vx = 0, vy = 0, vrst = 0, pre = 0, sw = 0, y;
  real i_line = 0.0, i_bias = 0.0, v_mem;
  int checks = 0, failures = 0;

  processing_unit dut (.clk(clk), .vx(vx), .vy(vy), .vrst(vrst), .pre(pre),
                       .i_line(i_line), .cnn_sw(sw), .i_bias(i_bias), .y(y), .v_mem(v_mem));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, iu, d;
    int total, code;
    for (int trial = 0; trial < 40; trial++) begin
      @(negedge clk); vrst = 1;
      @(negedge clk); vrst = 0;
      // half-selected unit must not take charge
      vx = 1; vy = 0; i_line = ILSB * 100.0;
      repeat (4) @(negedge clk);
      checks++;
      if (v_mem != 0.0) begin failures++; $display("half-selected unit charged: %f", v_mem); end
      vy = 1; pre = 1; i_line = 0.0;
      repeat (2) @(negedge clk);
      pre = 0;
      total = 0;
      for (int k = 0; k < 30; k++) begin
        code = $urandom_range(0, (trial % 4 == 0) ? 255 : 20);
        total += code;
        i_line = ILSB * real'(code);
        repeat (2) @(negedge clk);
      end
      vx = 0; vy = 0; i_line = 0.0;
      e = 0.65 + real'(total) * 3.3 / 1024.0;
      if (e > 3.3) e = 3.3;
      d = v_mem - e;
      checks++;
      if (d > 1e-6 || d < -1e-6) begin failures++; $display("LAM %f expected %f", v_mem, e); end
      iu = (e >= 3.3) ? 21.2 : 8.0 * (e - 0.65);
      for (int k = 0; k < 32; k++) begin
        i_bias = real'(k) * 20.15 / 31.0;
        sw = 0; @(negedge clk);
        checks++;
        if (y !== 1'b1) begin failures++; $display("output flipped with switch off"); end
        sw = 1; @(negedge clk);
        checks++;
        if (y !== (iu >= i_bias)) begin
          failures++; $display("level %0d: y %0b, iu %f bias %f", k, y, iu, i_bias);
        end
      end
      sw = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
