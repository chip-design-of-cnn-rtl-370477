// processing_unit: behavioural model (not synthesizable: analog parts are
// real-valued) of one ASCNN pixel processing unit.
//
// The unit is selected for loading when both its row line vx and its column
// line vy are high (the position decision AND gate, whose inverted copy
// drives the complementary transmission-gate control). Its local analog
// memory then takes the input-line current; vrst discharges it and pre
// pre-charges it. The stored voltage is turned into a current by the
// voltage-to-current converter and compared with the shared bias current by
// the threshold CNN cell while cnn_sw is on. y is the cell's binary output
// toward the global output connected chains (the chain AND gates themselves
// are in global_chain).
//
// Interface: clk, vx, vy, vrst, pre, cnn_sw digital; i_line and i_bias in uA;
// v_mem in volts for observation and the corner test points.
// Timing: v_mem changes at rising clock edges; y follows the bias at once.
//
// The composition LAM -> VCC -> CNN cell and the Vx AND Vy selection follow
// the published unit; placing the two chain AND gates outside it is this
// design's partitioning.
module processing_unit (
  input  logic clk,
  input  logic vx,
  input  logic vy,
  input  logic vrst,
  input  logic pre,
  input  real  i_line,
  input  logic cnn_sw,
  input  real  i_bias,
  output logic y,
  output real  v_mem
);

  logic sel;
  real  i_u;

  assign sel = vx & vy;

  lam_cell u_lam (
    .clk  (clk),
    .vrst (vrst),
    .pre  (pre),
    .sel  (sel),
    .i_in (i_line),
    .v_mem(v_mem)
  );

  vcc u_vcc (
    .v_in (v_mem),
    .i_out(i_u)
  );

  cnn_cell u_cnn (
    .sw       (cnn_sw),
    .u        (i_u),
    .i_bias   (i_bias),
    .y        (y),
    .x_settled()
  );

endmodule
