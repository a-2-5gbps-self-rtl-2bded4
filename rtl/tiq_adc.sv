// tiq_adc - 2-bit threshold-inverter-quantization flash ADC for 4-PAM.
//
// Sixteen threshold comparators feed three overlapping 8-to-1 channel MUXes:
// MUX L (data output D[L]) reaches comparators 4L .. 4L+7, so D0 covers
// V0..V7, D1 covers V4..V11 and D2 covers V8..V15 (24 MUX inputs in all).
// The select of each MUX comes from the calibration circuit or the manual
// pins.  A comparator is powered only while some MUX selects it.  D[2:0] is
// the thermometer-coded decision of a 4-PAM symbol and goes straight out to a
// clock-and-data-recovery stage; Q[2:0] is the same three bits sampled by a
// flip-flop on the (under)sampling clock, used for duty-cycle estimation.
// Timing: d is combinational in vin_mv and sel; q is d one clk later.
module tiq_adc
  import pam4_pkg::*;
#(
  parameter int unsigned NUM_CMP = 16,
  parameter int unsigned VTH0_MV = 600,
  parameter int unsigned VGAP_MV = 40
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [10:0]           vin_mv,               // analog input, mV
  input  ch_t  [NUM_LEVELS-1:0] sel,                  // channel of each MUX
  output logic [NUM_LEVELS-1:0] d,                    // MUX outputs D[2:0]
  output logic [NUM_LEVELS-1:0] q,                    // sampled outputs Q[2:0]
  output logic [NUM_CMP-1:0]    cmp_en                // comparator enables
);

  logic [NUM_CMP-1:0]    cmp;
  logic [NUM_CH-1:0]     need [NUM_LEVELS];

  tiq_comparator_array #(
    .NUM_CMP(NUM_CMP), .VTH0_MV(VTH0_MV), .VGAP_MV(VGAP_MV)
  ) u_cmp (
    .vin_mv(vin_mv), .en(cmp_en), .cmp(cmp)
  );

  for (genvar l = 0; l < NUM_LEVELS; l++) begin : g_mux
    channel_mux u_mux (
      .din     (cmp[MUX_STRIDE*l +: NUM_CH]),
      .sel     (sel[l]),
      .dout    (d[l]),
      .need_cmp(need[l])
    );
  end

  always_comb begin
    cmp_en = '0;
    for (int l = 0; l < NUM_LEVELS; l++) begin
      cmp_en[MUX_STRIDE*l +: NUM_CH] |= need[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
