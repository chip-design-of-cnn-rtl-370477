// tb_bias_dac: self-checking test of the 5-bit bias current model: level k
// gives k * 20.15/31 uA, 0 to 20.15 uA over the 32 levels, and the test-point
// voltage runs from 0.55 V to 0.90 V.
module tb_bias_dac;
  logic [4:0] vb;
  real i_bias, v_bias;
  int checks = 0, failures = 0;

  bias_dac #(.BITS(5)) dut (.vb(vb), .i_bias(i_bias), .v_bias(v_bias));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, d;
    for (int k = 0; k < 32; k++) begin
      vb = 5'(k); #1;
      e = real'(k) * 20.15 / 31.0;
      d = i_bias - e;
      checks++;
      if (d > 1e-6 || d < -1e-6) begin failures++; $display("level %0d: %f expected %f", k, i_bias, e); end
      e = 0.55 + 0.35 * real'(k) / 31.0;
      d = v_bias - e;
      checks++;
      if (d > 1e-6 || d < -1e-6) begin failures++; $display("level %0d: v %f expected %f", k, v_bias, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
