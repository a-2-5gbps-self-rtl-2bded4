// tiq_comparator_array - behavioural model of the threshold-inverter comparator bank.
//
// Behavioural model of an analog block: sixteen tri-state inverters sized for
// monotonically rising switching thresholds.  Comparator i switches at
// VTH0_MV + i*VGAP_MV millivolts; the defaults (600 mV, 40 mV gap) put the
// thresholds from 600 mV to 1200 mV as in the design's conversion range.  The
// input is given as an integer number of millivolts.  The logic polarity is
// that at the MUX output after the even number of inverting stages: 1 when the
// input is above the threshold.  A comparator whose enable is low is switched
// off and reads as 0.  The model is purely combinational; the real part's
// ~65 ps transition time is not modelled.  Process corners can be imitated by
// changing VTH0_MV and VGAP_MV (a fast corner widens the gap, a slow one
// narrows it).
module tiq_comparator_array #(
  parameter int unsigned NUM_CMP = 16,
  parameter int unsigned VTH0_MV = 600,
  parameter int unsigned VGAP_MV = 40
) (
  input  logic [10:0]        vin_mv,  // analog input, millivolts
  input  logic [NUM_CMP-1:0] en,      // per-comparator power enable
  output logic [NUM_CMP-1:0] cmp      // 1: input above threshold i
);

  always_comb begin
    for (int unsigned i = 0; i < NUM_CMP; i++) begin
      cmp[i] = en[i] && (32'(vin_mv) > VTH0_MV + i * VGAP_MV);
    end
  end

endmodule
