// rpm_sad: representative point matching front end (windowing) of one region.
//
// A region is cut into NSUB sub-images of 19x25 pixels. From frame t-1 only
// the centre pixel of each sub-image is kept, its representative point; the
// buffer holds the NSUB 8-bit representative points, written one at a time
// through rp_we/rp_sub/rp_val. For frame t the front end returns, for a pixel
// of sub-image sub, the absolute difference |pixel - rp[sub]|, which is the
// 8-bit code loaded through the DAC into the local analog memory of that
// pixel's position. Accumulating it over the NSUB sub-images yields the
// region's 19x25 sum of absolute differences.
//
// Interface: clk, synchronous buffer write; pix/sub in, diff out.
// Timing: the write takes effect at the next rising edge; diff is
// combinational in pix, sub and the buffer contents. The buffer is reset to 0
// by rst_n.
//
// The representative-point method, the 30 sub-images and the 8-bit absolute
// difference follow the published algorithm; the buffer write port and the
// combinational read are this design's choices.
module rpm_sad #(
  parameter int unsigned NSUB = 30,
  parameter int unsigned PW   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rp_we,
  input  logic [$clog2(NSUB)-1:0] rp_sub,
  input  logic [PW-1:0]           rp_val,
  input  logic [$clog2(NSUB)-1:0] sub,
  input  logic [PW-1:0]           pix,
  output logic [PW-1:0]           diff
);

  logic [PW-1:0] rp_q [NSUB];
  logic [PW-1:0] rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NSUB); k++) rp_q[k] <= '0;
    end else if (rp_we && (int'(rp_sub) < int'(NSUB))) begin
      rp_q[rp_sub] <= rp_val;
    end
  end

  always_comb begin
    rp = (int'(sub) < int'(NSUB)) ? rp_q[sub] : '0;
    diff = (pix >= rp) ? pix - rp : rp - pix;
  end

endmodule
