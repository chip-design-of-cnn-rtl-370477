// ascnn_lmv_top: local motion vector estimator of one image region.
//
// The pre-processed frame is split into four regions, each cut into NSUB
// sub-images of ROWS x COLS pixels; region selects the one being estimated.
// The representative point matching front end (rpm_sad) holds the centre
// pixel of each sub-image of frame t-1. The ASCNN chip asks for one sample at
// a time, naming a pixel position (ld_row, ld_col) and a sub-image (ld_sub);
// window_addr turns that into frame coordinates pix_x/pix_y, the frame-t
// pixel memory outside answers combinationally on pix, and the front end
// turns it into |pix - rp[sub]| for the chip's DAC. When finish rises,
// axis_x/axis_y hold the position (0-based row, column) of the smallest sum
// of absolute differences; its offset from the array centre is the region's
// local motion vector. 5'b11111 marks an undependable region.
//
// Interface: clk, rst_n (active low), start, region (held during an
// operation); representative-point write port rp_we/rp_sub/rp_val; pixel
// read port pix_req/pix_x/pix_y out, pix in; results and the observation
// signals of the chip.
// Timing: that of ascnn_chip (30877 loading cycles, then 2 cycles per bias
// level, with the defaults).
//
// Windowing outside the analog array, the frame split and the array size
// follow the published system; the pixel read port is this design's
// interface.
module ascnn_lmv_top
  import ascnn_pkg::*;
#(
  parameter int unsigned ROWS = ARRAY_ROWS,
  parameter int unsigned COLS = ARRAY_COLS,
  parameter int unsigned NSUB = SUB_IMAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [1:0]              region,
  input  logic                    rp_we,
  input  logic [$clog2(NSUB)-1:0] rp_sub,
  input  logic [DAC_BITS-1:0]     rp_val,
  output logic                    pix_req,
  output logic [8:0]              pix_x,
  output logic [7:0]              pix_y,
  input  logic [DAC_BITS-1:0]     pix,
  output logic                    finish,
  output logic [AXIS_BITS-1:0]    axis_x,
  output logic [AXIS_BITS-1:0]    axis_y,
  output logic [BIAS_BITS-1:0]    vb,
  output logic [ROWS-1:0]         row_chain,
  output logic [COLS-1:0]         col_chain,
  output ctrl_state_e             state,
  output real                     v_mem_corner [4],
  output real                     v_bias
);

  logic [DAC_BITS-1:0]     diff;
  logic [AXIS_BITS-1:0]    pix_row, pix_col;
  logic [$clog2(NSUB)-1:0] pix_sub;

  window_addr #(.SUB_W(COLS), .SUB_H(ROWS), .NSUB(NSUB)) u_win (
    .region(region),
    .sub   (pix_sub),
    .row   (pix_row),
    .col   (pix_col),
    .x     (pix_x),
    .y     (pix_y)
  );

  rpm_sad #(.NSUB(NSUB), .PW(DAC_BITS)) u_rpm (
    .clk   (clk),
    .rst_n (rst_n),
    .rp_we (rp_we),
    .rp_sub(rp_sub),
    .rp_val(rp_val),
    .sub   (pix_sub),
    .pix   (pix),
    .diff  (diff)
  );

  ascnn_chip #(.ROWS(ROWS), .COLS(COLS), .NSUB(NSUB)) u_chip (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .din         (diff),
    .load_en     (pix_req),
    .ld_row      (pix_row),
    .ld_col      (pix_col),
    .ld_sub      (pix_sub),
    .finish      (finish),
    .axis_x      (axis_x),
    .axis_y      (axis_y),
    .vb          (vb),
    .row_chain   (row_chain),
    .col_chain   (col_chain),
    .state       (state),
    .v_mem_corner(v_mem_corner),
    .v_bias      (v_bias)
  );

endmodule
