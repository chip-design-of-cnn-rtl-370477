// cnn_cell: behavioural model (not synthesizable: real-valued inputs and
// arithmetic) of the threshold CNN cell with the adaptive threshold template
// A = 2 (self feedback only), B = 1, zero initial state.
//
// With the switch on, the cell's state obeys
//   dx/dt = -x + 2*f(x) + u - I_bias,  f(x) = (|x+S| - |x-S|)/2,
// where u is the input current from the voltage-to-current converter,
// I_bias the adaptive threshold and S = 20 uA the saturation level of the
// current sources. Starting from x = 0 the state runs away from 0 in the
// direction of u - I_bias and settles at a saturated output, so the cell is
// a current comparator: output 1 while u > I_bias, 0 (a flip) once the bias
// exceeds the input. The model integrates the equation with forward Euler
// steps (STEPS steps of DT time constants) each time its inputs change and
// drives y from the sign of the settled state; u = I_bias is the critical
// point, where x stays at 0 and y reads 1. With the switch off the cell and
// its current sources are unpowered and y rests at 1, so the chains see no
// flip.
//
// Interface: sw (CNN switch), u and i_bias in microamperes, y binary.
// Timing: combinational in the model; the controller allows one clock cycle.
//
// The template, the zero initial state, the 20 uA saturation and the sense of
// the output follow the published cell; the integration step and count are
// this model's.
module cnn_cell #(
  parameter real S     = 20.0,
  parameter real DT    = 0.25,
  parameter int  STEPS = 40
) (
  input  logic sw,
  input  real  u,
  input  real  i_bias,
  output logic y,
  output real  x_settled
);

  function automatic real sat(input real x);
    real a, b;
    a = (x + S < 0.0) ? -(x + S) : (x + S);
    b = (x - S < 0.0) ? -(x - S) : (x - S);
    return 0.5 * (a - b);
  endfunction

  always_comb begin
    real x;
    x = 0.0;
    for (int k = 0; k < STEPS; k++) begin
      x = x + DT * (-x + 2.0 * sat(x) + u - i_bias);
    end
    x_settled = x;
    y = sw ? (x >= 0.0) : 1'b1;
  end

endmodule
