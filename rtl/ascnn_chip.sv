// ascnn_chip: the application-specific CNN (ASCNN) local motion estimation
// chip for one 19x25 array.
//
// The host streams 8-bit absolute differences through din. A synchronising
// register and an 8-bit current DAC drive one input line shared by all
// processing units; the controller selects one unit at a time with one-hot
// row (vx) and column (vy) lines, so each unit's local analog memory (LAM)
// accumulates the NSUB differences of its pixel position. After the whole
// array is loaded the controller raises the 5-bit bias counter one level
// every two cycles. Each unit's CNN cell compares its LAM current with the
// bias current and flips its output to 0 once the bias exceeds it. The
// flipped outputs ripple through the AND chains to the 19 row and 25 column
// outputs; the first level that marks a row and a column gives the position
// of the smallest accumulated difference, which is latched in axis_x (row,
// 0-based) and axis_y (column, 0-based). 5'b11111 in both means that even the
// top bias level found no minimum and the vector is not dependable.
//
// Interface (chip pads): clk (20 MHz), rst_n (Frst, active low), start,
// din[7:0] (the DAC inputs), load_en (the host must show on din the sample
// named by ld_row/ld_col/ld_sub while it is high), finish, axis_x, axis_y;
// plus observation of vb, the chain outputs, the four corner LAM voltages
// and the bias test voltage.
// Timing with the defaults: 2 reset cycles, 475 x 65 loading cycles,
// 2 cycles per bias level, at most 32 levels.
//
// The partitioning into DAC, LAM array, voltage-to-current converters, CNN
// cells, AND chains, bias circuit and controller follows the published chip.
// The analog parts are behavioural models; the scan chain and unity-gain
// buffer of the chip are not modelled.
module ascnn_chip
  import ascnn_pkg::*;
#(
  parameter int unsigned ROWS = ARRAY_ROWS,
  parameter int unsigned COLS = ARRAY_COLS,
  parameter int unsigned NSUB = SUB_IMAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [DAC_BITS-1:0]     din,
  output logic                    load_en,
  output logic [AXIS_BITS-1:0]    ld_row,
  output logic [AXIS_BITS-1:0]    ld_col,
  output logic [$clog2(NSUB)-1:0] ld_sub,
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

  logic [ROWS-1:0] vx;
  logic [COLS-1:0] vy;
  logic vrst, pre, dac_en, line_rst, cnn_sw;
  logic [AXIS_BITS-1:0] row_idx, col_idx;
  logic found;
  real  i_dac, i_line, i_bias;

  logic [ROWS-1:0][COLS-1:0] cnn_y;
  real  v_mem [ROWS][COLS];

  ascnn_controller #(
    .ROWS(ROWS), .COLS(COLS), .NSUB(NSUB),
    .VB_BITS(BIAS_BITS), .W(AXIS_BITS)
  ) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .row_idx (row_idx),
    .col_idx (col_idx),
    .found   (found),
    .vx      (vx),
    .vy      (vy),
    .vrst    (vrst),
    .pre     (pre),
    .dac_en  (dac_en),
    .line_rst(line_rst),
    .load_en (load_en),
    .ld_row  (ld_row),
    .ld_col  (ld_col),
    .ld_sub  (ld_sub),
    .cnn_sw  (cnn_sw),
    .vb      (vb),
    .axis_x  (axis_x),
    .axis_y  (axis_y),
    .finish  (finish),
    .state   (state)
  );

  sad_dac #(.BITS(DAC_BITS)) u_dac (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load_en),
    .en   (dac_en),
    .din  (din),
    .code (),
    .i_out(i_dac)
  );

  // The shared input line is clamped while it is being reset.
  assign i_line = line_rst ? 0.0 : i_dac;

  bias_dac #(.BITS(BIAS_BITS)) u_bias (
    .vb    (vb),
    .i_bias(i_bias),
    .v_bias(v_bias)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      processing_unit u_pu (
        .clk   (clk),
        .vx    (vx[r]),
        .vy    (vy[c]),
        .vrst  (vrst),
        .pre   (pre),
        .i_line(i_line),
        .cnn_sw(cnn_sw),
        .i_bias(i_bias),
        .y     (cnn_y[r][c]),
        .v_mem (v_mem[r][c])
      );
    end
  end

  global_chain #(.ROWS(ROWS), .COLS(COLS)) u_chain (
    .cnn_y(cnn_y),
    .row_o(row_chain),
    .col_o(col_chain)
  );

  location_decoder #(.ROWS(ROWS), .COLS(COLS), .W(AXIS_BITS)) u_dec (
    .row_i  (row_chain),
    .col_i  (col_chain),
    .row_idx(row_idx),
    .col_idx(col_idx),
    .found  (found)
  );

  // LAM test points (1,1), (1,COLS), (ROWS,1), (ROWS,COLS).
  assign v_mem_corner[0] = v_mem[0][0];
  assign v_mem_corner[1] = v_mem[0][COLS-1];
  assign v_mem_corner[2] = v_mem[ROWS-1][0];
  assign v_mem_corner[3] = v_mem[ROWS-1][COLS-1];

endmodule
