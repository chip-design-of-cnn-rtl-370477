// tb_vcc: self-checking test of the voltage-to-current converter model:
// 0 uA up to 0.65 V, 8 uA/V above it, 21.2 uA at 3.3 V.
module tb_vcc;
  real v, i;
  int checks = 0, failures = 0;

  vcc dut (.v_in(v), .i_out(i));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, d;
    for (int k = 0; k <= 340; k++) begin
      v = real'(k) / 100.0; #1;
      if (v <= 0.65) e = 0.0;
      else if (v >= 3.3) e = 21.2;
      else e = 8.0 * (v - 0.65);
      d = i - e;
      checks++;
      if (d > 1e-6 || d < -1e-6) begin failures++; $display("v=%f: %f expected %f", v, i, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
