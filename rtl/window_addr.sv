// window_addr: frame coordinates of a sample requested by the estimator.
//
// The sensor frame (312 x 200) first loses a boundary kept as the
// compensation margin, CROP_X columns on the left and CROP_Y rows on the top
// (6 and 5, leaving 300 x 190). The remaining image is split into 2 x 2
// regions of REG_W x REG_H (150 x 95) pixels, one local motion vector each,
// and every region into SUBS_X x SUBS_Y (6 x 5) sub-images of SUB_W x SUB_H
// (25 x 19) pixels, numbered row by row. For region g, sub-image k and pixel
// (row, col) of that sub-image the module returns
//   x = CROP_X + (g % 2)*REG_W + (k % SUBS_X)*SUB_W + col
//   y = CROP_Y + (g / 2)*REG_H + (k / SUBS_X)*SUB_H + row.
// The representative point of sub-image k is the pixel at row SUB_H/2,
// column SUB_W/2 (9, 12) of frame t-1.
//
// Interface: region, sub, row, col in; x, y out. Timing: combinational.
//
// The frame, crop, region and sub-image sizes follow the published test
// set-up (312 x 200 in, 300 x 190 after pre-processing, four 150 x 95
// regions, 30 sub-images of 19 x 25); splitting the crop evenly between the
// two sides and numbering regions and sub-images row by row are this
// design's choices.
module window_addr #(
  parameter int unsigned CROP_X = 6,
  parameter int unsigned CROP_Y = 5,
  parameter int unsigned REG_W  = 150,
  parameter int unsigned REG_H  = 95,
  parameter int unsigned SUB_W  = 25,
  parameter int unsigned SUB_H  = 19,
  parameter int unsigned SUBS_X = 6,
  parameter int unsigned NSUB   = 30,
  parameter int unsigned XW     = 9,
  parameter int unsigned YW     = 8
) (
  input  logic [1:0]              region,
  input  logic [$clog2(NSUB)-1:0] sub,
  input  logic [4:0]              row,
  input  logic [4:0]              col,
  output logic [XW-1:0]           x,
  output logic [YW-1:0]           y
);

  localparam int unsigned SW = $clog2(NSUB);

  logic [SW-1:0] sub_x, sub_y;

  always_comb begin
    sub_x = SW'(sub % SW'(SUBS_X));
    sub_y = SW'(sub / SW'(SUBS_X));
    x = XW'(CROP_X) + (region[0] ? XW'(REG_W) : '0)
        + XW'(sub_x) * XW'(SUB_W) + XW'(col);
    y = YW'(CROP_Y) + (region[1] ? YW'(REG_H) : '0)
        + YW'(sub_y) * YW'(SUB_H) + YW'(row);
  end

endmodule
