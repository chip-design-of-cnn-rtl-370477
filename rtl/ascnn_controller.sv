// ascnn_controller: digital control of the CNN-based local motion estimator.
//
// One operation has two phases.
//
// Loading. After start the controller discharges every local analog memory
// (LAM) for INIT_CYC cycles (vrst). It then visits the 19x25 LAM cells in
// raster order, row 0 left to right, then row 1, and so on. For each cell it
// selects the cell with one-hot vx/vy, pre-charges it for PRE_CYC cycles,
// then feeds it NSUB absolute differences, one per LOAD_CYC-cycle slot, from
// the 8-bit DAC, and finally holds the shared input line in reset for
// REST_CYC cycles with no cell selected. With the defaults that is
// 2 + 30*2 + 3 = 65 cycles per cell and 475*65 = 30875 cycles per array.
// ld_row/ld_col/ld_sub name the difference sample wanted next; load_en is
// high in the cycle whose closing edge captures din into the DAC register,
// which is the cycle before the sample's slot begins, so each code is on the
// DAC for exactly its slot.
//
// Searching. The bias counter vb starts at 0. Each level takes LEVEL_CYC = 2
// cycles: one with the CNN switches off while the new bias settles, one with
// cnn_sw on, at whose end the decoded chain outputs are sampled. The first
// level at which some row and some column chain read 0 ends the search and
// latches the row index into axis_x and the column index into axis_y. If
// level 31 still shows no flip, both stay at 5'b11111, the "not dependable"
// code. Worst case: 32 levels, 64 cycles. finish then stays high until the
// next start; start in any state restarts the operation.
//
// Interface: rst_n is the asynchronous active-low reset (Frst); all outputs
// are registered or decoded from registers. row_idx/col_idx/found come from
// the location decoder of the chain outputs.
//
// The 65-cycle cell schedule, the raster loading order, 2 cycles per bias
// level, 32 levels, the one-hot Vx/Vy addressing, the held VB and the
// all-ones code follow the published chip. The vrst length (INIT_CYC), the
// start/restart behaviour and the one-cycle-early load_en are this design's
// choices.
module ascnn_controller
  import ascnn_pkg::*;
#(
  parameter int unsigned ROWS      = ARRAY_ROWS,
  parameter int unsigned COLS      = ARRAY_COLS,
  parameter int unsigned NSUB      = SUB_IMAGES,
  parameter int unsigned INIT_CYC  = 2,
  parameter int unsigned PRE_CYC   = 2,
  parameter int unsigned LOAD_CYC  = 2,
  parameter int unsigned REST_CYC  = 3,
  parameter int unsigned VB_BITS   = BIAS_BITS,
  parameter int unsigned W         = AXIS_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  // decoded chain outputs
  input  logic [W-1:0]         row_idx,
  input  logic [W-1:0]         col_idx,
  input  logic                 found,
  // LAM addressing and loading
  output logic [ROWS-1:0]      vx,
  output logic [COLS-1:0]      vy,
  output logic                 vrst,
  output logic                 pre,
  output logic                 dac_en,
  output logic                 line_rst,
  output logic                 load_en,
  output logic [W-1:0]         ld_row,
  output logic [W-1:0]         ld_col,
  output logic [$clog2(NSUB)-1:0] ld_sub,
  // searching
  output logic                 cnn_sw,
  output logic [VB_BITS-1:0]   vb,
  output logic [W-1:0]         axis_x,
  output logic [W-1:0]         axis_y,
  output logic                 finish,
  output ctrl_state_e          state
);

  localparam int unsigned CW = 8;   // wide enough for every phase counter
  localparam int unsigned SW = $clog2(NSUB);

  ctrl_state_e     st_q;
  logic [CW-1:0]   cnt_q;     // cycle within the current phase / slot
  logic [SW-1:0]   sub_q;     // current sub-image slot
  logic [W-1:0]    row_q, col_q;

  wire last_cell = (row_q == W'(ROWS - 1)) && (col_q == W'(COLS - 1));
  wire last_slot = (sub_q == SW'(NSUB - 1));
  wire vb_max    = (vb == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= ST_IDLE;
      cnt_q  <= '0;
      sub_q  <= '0;
      row_q  <= '0;
      col_q  <= '0;
      vb     <= '0;
      axis_x <= AXIS_NONE;
      axis_y <= AXIS_NONE;
      finish <= 1'b0;
    end else if (start) begin
      st_q   <= ST_INIT;
      cnt_q  <= '0;
      sub_q  <= '0;
      row_q  <= '0;
      col_q  <= '0;
      vb     <= '0;
      axis_x <= AXIS_NONE;
      axis_y <= AXIS_NONE;
      finish <= 1'b0;
    end else begin
      unique case (st_q)
        ST_IDLE: ;
        ST_INIT: begin
          if (cnt_q == CW'(INIT_CYC - 1)) begin
            st_q  <= ST_PRE;
            cnt_q <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        ST_PRE: begin
          if (cnt_q == CW'(PRE_CYC - 1)) begin
            st_q  <= ST_LOAD;
            cnt_q <= '0;
            sub_q <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        ST_LOAD: begin
          if (cnt_q == CW'(LOAD_CYC - 1)) begin
            cnt_q <= '0;
            if (last_slot) st_q <= ST_REST;
            else           sub_q <= sub_q + 1'b1;
          end else cnt_q <= cnt_q + 1'b1;
        end
        ST_REST: begin
          if (cnt_q == CW'(REST_CYC - 1)) begin
            cnt_q <= '0;
            if (last_cell) begin
              st_q <= ST_BIAS;
              vb   <= '0;
            end else begin
              st_q <= ST_PRE;
              if (col_q == W'(COLS - 1)) begin
                col_q <= '0;
                row_q <= row_q + 1'b1;
              end else col_q <= col_q + 1'b1;
            end
          end else cnt_q <= cnt_q + 1'b1;
        end
        ST_BIAS: st_q <= ST_CHECK;
        ST_CHECK: begin
          if (found) begin
            axis_x <= row_idx;
            axis_y <= col_idx;
            st_q   <= ST_DONE;
            finish <= 1'b1;
          end else if (vb_max) begin
            st_q   <= ST_DONE;
            finish <= 1'b1;
          end else begin
            vb   <= vb + 1'b1;
            st_q <= ST_BIAS;
          end
        end
        ST_DONE: ;
        default: st_q <= ST_IDLE;
      endcase
    end
  end

  assign state = st_q;

  // Cell selection during pre-charge and loading.
  wire sel = (st_q == ST_PRE) || (st_q == ST_LOAD);
  always_comb begin
    vx = '0;
    vy = '0;
    if (sel) begin
      vx[row_q] = 1'b1;
      vy[col_q] = 1'b1;
    end
  end

  assign vrst     = (st_q == ST_INIT);
  assign pre      = (st_q == ST_PRE);
  assign dac_en   = (st_q == ST_LOAD);
  assign line_rst = (st_q == ST_REST) || (st_q == ST_INIT);
  assign cnn_sw   = (st_q == ST_CHECK);

  // Request of the next sample: slot 0 during the last pre-charge cycle,
  // slot k+1 during the last cycle of slot k.
  assign load_en = ((st_q == ST_PRE)  && (cnt_q == CW'(PRE_CYC - 1))) ||
                   ((st_q == ST_LOAD) && (cnt_q == CW'(LOAD_CYC - 1)) && !last_slot);
  assign ld_row  = row_q;
  assign ld_col  = col_q;
  assign ld_sub  = (st_q == ST_LOAD) ? sub_q + 1'b1 : '0;

  // Rules of the schedule.
  a_onehot_sel : assert property (@(posedge clk) disable iff (!rst_n)
                                  sel |-> ($onehot(vx) && $onehot(vy)));
  a_sw_not_loading : assert property (@(posedge clk) disable iff (!rst_n)
                                      cnn_sw |-> !dac_en && !sel);

endmodule
