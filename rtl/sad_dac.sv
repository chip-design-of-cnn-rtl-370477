// sad_dac: behavioural model (not synthesizable: real-valued output) of the
// 8-bit current-mode D/A converter that charges the local analog memories.
//
// The 8-bit absolute difference first passes a synchronising register clocked
// with the controller (captured on a rising edge while load is high). The
// converter is a bank of eight binary-weighted current mirrors, modelled as
// i_out = code * I_LSB microamperes while en is high and 0 otherwise. The
// output feeds the one input line shared by all processing units; only the
// unit selected by Vx/Vy takes the charge.
//
// Interface: din/load/clk/rst_n digital; i_out in microamperes.
// Timing: the code changes one clock after load; i_out follows it at once.
//
// The register in front of the converter, the 8-bit width and the
// binary-weighted current-mirror structure follow the published chip; the
// ideal linear transfer and the value of I_LSB (the 0.43091 slope quoted in
// the chip's DNL analysis, read as microamperes per code) are this model's.
module sad_dac #(
  parameter int unsigned BITS  = 8,
  parameter real         I_LSB = 0.43091
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            en,
  input  logic [BITS-1:0] din,
  output logic [BITS-1:0] code,
  output real             i_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    code <= '0;
    else if (load) code <= din;
  end

  // Sum of the binary-weighted mirror branches switched on by the code.
  always_comb begin
    i_out = 0.0;
    if (en) begin
      for (int b = 0; b < int'(BITS); b++) begin
        if (code[b]) i_out = i_out + I_LSB * real'(1 << b);
      end
    end
  end

endmodule
