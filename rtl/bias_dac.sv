// bias_dac: behavioural model (not synthesizable: real-valued output) of the
// 5-bit adaptive bias circuit, a binary-weighted cascode current mirror
// driven by the controller's bias counter VB.
//
// The five mirror branches carry 1, 2, 4, 8 and 16 unit currents; the sum is
// the threshold current fed (through a unity-gain buffer, not modelled) to
// every CNN cell. The unit is chosen so that the 32 levels run from 0 to
// I_FULL = 20.15 uA, the span of the published bias sweep. v_bias is the
// matching test-point voltage, linear between 0.55 V and 0.90 V, the
// published CNN bias range.
//
// Interface: vb is the 5-bit level; i_bias in microamperes, v_bias in volts.
// Timing: combinational.
//
// The 5-bit width, 32 levels, 0 to 20.15 uA and the 0.55 V to 0.90 V range
// follow the published chip; the exactly linear steps are this model's.
module bias_dac #(
  parameter int unsigned BITS   = 5,
  parameter real         I_FULL = 20.15,
  parameter real         V_LO   = 0.55,
  parameter real         V_HI   = 0.90
) (
  input  logic [BITS-1:0] vb,
  output real             i_bias,
  output real             v_bias
);

  localparam real LEVELS = real'((1 << BITS) - 1);

  always_comb begin
    i_bias = 0.0;
    for (int b = 0; b < int'(BITS); b++) begin
      if (vb[b]) i_bias = i_bias + (I_FULL / LEVELS) * real'(1 << b);
    end
    v_bias = V_LO + (V_HI - V_LO) * (i_bias / I_FULL);
  end

endmodule
