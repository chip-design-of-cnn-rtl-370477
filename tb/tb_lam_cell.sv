// tb_lam_cell: self-checking test of the local analog memory model:
// discharge, pre-charge to 0.65 V, integration of the input current only while
// selected (3.3/1024 V per difference unit per 2-cycle slot), hold while
// deselected, and clipping at 3.3 V.
module tb_lam_cell;
  localparam real ILSB = 0.43091;
  logic clk = 0, vrst = 0, pre = 0, sel = 0;
  real i_in = 0.0, v_mem;
  int checks = 0, failures = 0;

  lam_cell dut (.clk(clk), .vrst(vrst), .pre(pre), .sel(sel), .i_in(i_in), .v_mem(v_mem));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_v(input real e, input string what);
    real d;
    d = v_mem - e;
    checks++;
    if (d > 1e-6 || d < -1e-6) begin failures++; $display("%s: %f expected %f", what, v_mem, e); end
  endtask

  initial begin
    real e;
    int code, total;
    @(negedge clk); vrst = 1;
    @(negedge clk); vrst = 0;
    expect_v(0.0, "after vrst");
    sel = 1; pre = 1;
    repeat (2) @(negedge clk);
    pre = 0;
    expect_v(0.65, "after pre-charge");
    e = 0.65; total = 0;
    for (int k = 0; k < 30; k++) begin
      code = $urandom_range(0, 40);
      total += code;
      i_in = ILSB * real'(code);
      repeat (2) @(negedge clk);
    end
    e = 0.65 + real'(total) * 3.3 / 1024.0;
    if (e > 3.3) e = 3.3;
    expect_v(e, "after 30 slots");
    // deselected: holds even with current on the line
    sel = 0; i_in = ILSB * 200.0;
    repeat (10) @(negedge clk);
    expect_v(e, "hold while deselected");
    // saturation
    sel = 1; i_in = ILSB * 255.0;
    repeat (20) @(negedge clk);
    expect_v(3.3, "clipped at supply");
    sel = 0; vrst = 1;
    @(negedge clk); vrst = 0;
    expect_v(0.0, "second vrst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
