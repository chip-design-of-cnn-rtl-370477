// tb_ascnn_ref_pkg: reference model for the testbenches of the estimator.
//
// Given the accumulated absolute differences S(r,c) of an array, it predicts
// the result without reusing any design module: the LAM ends at
// min(3.3, 0.65 + S*3.3/1024) V, the converter gives 8 uA/V above 0.65 V,
// bias level k is k*20.15/31 uA, and a unit flips at the first level whose
// bias exceeds its current. The result is the first level with any flip and
// the lowest row and lowest column holding a flipped unit, or level 32 with
// row = column = 31 when no unit flips.
//
// It also holds the synthetic scene of the frame-level testbenches: a smooth
// texture for frame t-1 and the geometry of the pre-processed frame (crop of
// 6 columns and 5 rows, 2 x 2 regions of 150 x 95, 6 x 5 sub-images of
// 25 x 19 per region), written here independently of the design.
package tb_ascnn_ref_pkg;

  localparam int SUB_W = 25, SUB_H = 19, SUBS_X = 6, REG_W = 150, REG_H = 95;
  localparam int CROP_X = 6, CROP_Y = 5;

  function automatic int texture(input int x, input int y);
    real v;
    v = 128.0 + 60.0 * $sin(0.31 * real'(x)) + 50.0 * $cos(0.23 * real'(y))
        + 10.0 * $sin(0.7 * real'(x + y));
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return int'(v);
  endfunction

  function automatic int noise(input int x, input int y);
    return ((x * 37 + y * 91 + x * y * 7) % 5);
  endfunction

  // Frame coordinates of pixel (r,c) of sub-image k in region g.
  function automatic int px(input int g, input int k, input int c);
    return CROP_X + (g % 2) * REG_W + (k % SUBS_X) * SUB_W + c;
  endfunction
  function automatic int py(input int g, input int k, input int r);
    return CROP_Y + (g / 2) * REG_H + (k / SUBS_X) * SUB_H + r;
  endfunction

  function automatic real lam_volts(input int s);
    real v;
    v = 0.65 + real'(s) * 3.3 / 1024.0;
    return (v > 3.3) ? 3.3 : v;
  endfunction

  function automatic real unit_current(input int s);
    return 8.0 * (lam_volts(s) - 0.65);
  endfunction

  // sad is indexed [r*cols + c].
  function automatic void predict(input int sad[], input int rows, input int cols,
                                  output int level, output int er, output int ec,
                                  output int nflip);
    level = 32; er = 31; ec = 31; nflip = 0;
    for (int k = 0; k < 32; k++) begin
      real ib;
      ib = real'(k) * 20.15 / 31.0;
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++)
          if (unit_current(sad[r*cols + c]) < ib) begin
            nflip++;
            if (r < er) er = r;
            if (c < ec) ec = c;
          end
      if (nflip > 0) begin
        level = k;
        return;
      end
    end
  endfunction

endpackage
