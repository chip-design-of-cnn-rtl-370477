// ascnn_pkg: constants and types shared by the CNN-based local motion
// estimator.
//
// The array is 19 rows by 25 columns of pixel processing units, each holding
// the accumulated absolute difference of one pixel position over the 30
// sub-images of a region. Row and column positions are reported as 5-bit
// indices counted from 0 at the top-left unit; the code 5'b11111 means "no
// minimum found" (all 32 bias levels tried). The array size, the 30
// sub-images, the 8-bit difference input, the 5-bit bias and the all-ones
// failure code follow the chip as published; the state encoding is this
// design's own.
package ascnn_pkg;

  localparam int unsigned ARRAY_ROWS = 19;  // row chains, Vx width
  localparam int unsigned ARRAY_COLS = 25;  // column chains, Vy width
  localparam int unsigned SUB_IMAGES = 30;  // sub-images accumulated per region
  localparam int unsigned DAC_BITS  = 8;   // absolute difference code width
  localparam int unsigned BIAS_BITS = 5;   // bias counter width (32 levels)
  localparam int unsigned AXIS_BITS = 5;   // width of a reported index

  // Index reported when no unit flipped below the highest bias level.
  localparam logic [AXIS_BITS-1:0] AXIS_NONE = '1;

  // Controller states (eight, as the published controller has).
  typedef enum logic [2:0] {
    ST_IDLE,      // waiting for start; results held
    ST_INIT,      // Vrst: discharge every LAM and the input line
    ST_PRE,       // pre-charge the addressed LAM past the MOS-cap knee
    ST_LOAD,      // 30 difference samples, 2 cycles each, into one LAM
    ST_REST,      // input line reset before the next LAM is addressed
    ST_BIAS,      // new bias level applied, CNN switches off
    ST_CHECK,     // CNN switches on, chains sampled
    ST_DONE       // finish asserted, position held
  } ctrl_state_e;

endpackage
