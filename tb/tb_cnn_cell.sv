// tb_cnn_cell: self-checking test of the adaptive threshold CNN cell model.
// With the switch on the output is 1 when the input current exceeds the bias
// and 0 when it is below (margins of 0.05 uA and more), 1 at equality, and
// always 1 with the switch off. The two cases of the published template
// analysis (u = +-10 uA against biases of -20..20 uA, entering as -I_bias)
// are checked for the sign of the settled state.
module tb_cnn_cell;
  logic sw;
  real u, ib, xs;
  logic y;
  int checks = 0, failures = 0;

  cnn_cell dut (.sw(sw), .u(u), .i_bias(ib), .y(y), .x_settled(xs));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int t = 0; t < 2000; t++) begin
      sw = ($urandom_range(0, 3) != 0);
      u  = real'($urandom_range(0, 2000)) / 100.0;
      ib = real'($urandom_range(0, 2015)) / 100.0;
      if (t % 7 == 0) ib = u;
      if (u - ib < 0.05 && u - ib > -0.05 && u != ib) ib = u + 0.1;
      #1;
      e = sw ? (u >= ib) : 1'b1;
      checks++;
      if (y !== e) begin failures++; $display("sw %0b u %f bias %f: y %0b", sw, u, ib, y); end
    end
    // Saturation: the settled state leaves the +-20 uA linear range.
    sw = 1; u = 10.0; ib = 0.0; #1;
    checks++;
    if (!(xs >= 20.0)) begin failures++; $display("u=10 bias=0: x %f not saturated high", xs); end
    u = 0.0; ib = 10.0; #1;
    checks++;
    if (!(xs <= -20.0)) begin failures++; $display("u=0 bias=10: x %f not saturated low", xs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
