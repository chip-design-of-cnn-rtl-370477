// vcc: behavioural model (not synthesizable: real-valued ports) of the
// voltage-to-current converter between a local analog memory and its CNN
// cell.
//
// A PMOS input device turns the LAM voltage into a current, mirrored by a
// common-centroid pair. The model is a straight line of 8 uA/V starting at
// V_LO = 0.65 V, the pre-charge level: the reliable LAM swing 0.65 V to
// 3.15 V then maps onto 0 to 20 uA, the span of the 32 bias levels. Above
// that the line continues to I_MAX = 21.2 uA at the 3.3 V supply, so a LAM
// that ran into the supply draws more than the top bias level (20.15 uA) and
// is never taken as the minimum; a region whose every memory is saturated
// ends with the "not dependable" code.
//
// Interface: v_in in volts, i_out in microamperes. Timing: combinational.
//
// The 0.65 V to 3.15 V swing against a 20 uA span follows the published
// chip. Its text also calls the converter output "limited to 20uA" and quotes
// 0 to 140 uA into a 50 ohm load; the model follows neither figure above
// 3.15 V and uses the straight-line continuation instead.
module vcc #(
  parameter real I_MAX = 21.2,
  parameter real V_LO  = 0.65,
  parameter real V_HI  = 3.3
) (
  input  real v_in,
  output real i_out
);

  always_comb begin
    if (v_in <= V_LO)      i_out = 0.0;
    else if (v_in >= V_HI) i_out = I_MAX;
    else                   i_out = I_MAX * (v_in - V_LO) / (V_HI - V_LO);
  end

endmodule
