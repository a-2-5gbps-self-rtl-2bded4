// current_mode_dac - behavioural model of the 2-bit current-mode DAC.
//
// Behavioural model of an analog block.  The output node is pulled up by a
// 50 ohm termination; a bias sink (gate G0, always on) sets the top level and
// three switched sinks G[3:1], driven by a thermometer code, each pull the
// node down by one step.  The model is ideal: with n gates on the output is
// VHIGH_MV - n * VSTEP_MV, i.e. 1200, 1000, 800 and 600 mV by default, the
// 600..1200 mV swing of the design.  Transistor mismatch, settling and the
// non-linearity of real current sinks are not modelled.  Combinational.
module current_mode_dac #(
  parameter int unsigned VHIGH_MV = 1200,
  parameter int unsigned VSTEP_MV = 200
) (
  input  logic [3:1]  g,        // thermometer-coded sink enables
  output logic [10:0] vout_mv   // output voltage, millivolts
);

  always_comb begin
    vout_mv = 11'(VHIGH_MV - VSTEP_MV * (32'(g[1]) + 32'(g[2]) + 32'(g[3])));
  end

endmodule
