// lam_cell: behavioural model (not synthesizable: real-valued state) of one
// local analog memory, a transmission gate in front of a 2 pF MOS capacitor.
//
// The gate is open while sel (Vx AND Vy of the unit) is high. vrst discharges
// the capacitor to 0 V. While selected and pre is high the cell is charged to
// V_PRE, past the knee of the MOS capacitance. While selected otherwise the
// cell integrates the input-line current: on every rising clock edge the
// voltage rises by K_V * i_in, i_in in microamperes, and clips at the supply
// V_MAX. K_V is set so that a difference of 1 held for one 2-cycle load slot
// adds 3.3/1024 V, i.e. 4 x 256 difference units span the 3.3 V supply, which
// is the chip's stated charge budget. A deselected cell holds its voltage.
//
// Interface: clk, vrst, pre, sel digital; i_in in uA; v_mem in volts.
// Timing: v_mem changes only at rising clock edges.
//
// Reset, pre-charge, the supply limit and the 3.3 V per 1024 units scale follow
// the published chip; a linear capacitor without leakage or charge sharing is
// this model's simplification.
module lam_cell #(
  parameter real V_PRE = 0.65,
  parameter real V_MAX = 3.3,
  parameter real K_V   = 3.3 / 1024.0 / 2.0 / 0.43091
) (
  input  logic clk,
  input  logic vrst,
  input  logic pre,
  input  logic sel,
  input  real  i_in,
  output real  v_mem
);

  real v_q;

  always @(posedge clk) begin
    if (vrst)             v_q <= 0.0;
    else if (sel && pre)  v_q <= V_PRE;
    else if (sel) begin
      if (v_q + K_V * i_in > V_MAX) v_q <= V_MAX;
      else                          v_q <= v_q + K_V * i_in;
    end
  end

  assign v_mem = v_q;

endmodule
