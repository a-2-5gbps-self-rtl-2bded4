// pam4_receiver - self-calibrating 4-PAM receiver: 2-bit TIQ ADC plus calibration.
//
// The 2-bit ADC turns the 4-PAM input into a 3-bit thermometer code D[2:0]
// using one comparator per threshold, each chosen out of eight candidates by a
// channel MUX.  With Mode = 1 the calibration circuit scans the candidates of
// every MUX and keeps the one whose undersampled duty cycle is closest to
// 75 %, 50 % or 25 %; with Mode = 0 the receiver runs on the stored choice
// (channel 3 of each MUX after reset).  Auto = 0 overrides all three selects
// with the MS pins for characterisation.  State, Lev (the channel stored for
// level LS) and the sampled outputs Q are brought out for test.  clk is the
// undersampling clock: it clocks Q and the whole calibration circuit.
module pam4_receiver
  import pam4_pkg::*;
#(
  parameter int unsigned NUM_CMP = 16,
  parameter int unsigned VTH0_MV = 600,
  parameter int unsigned VGAP_MV = 40,
  parameter int unsigned TIMER_W = 8,
  parameter int unsigned CNT_W   = TIMER_W - 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [10:0]                vin_mv,     // analog input, mV
  input  logic                       mode,       // Mode pin
  input  logic                       auto_sel,   // Auto pin
  input  logic [NUM_LEVELS*CH_W-1:0] ms,         // MS[8:0]
  input  logic [1:0]                 ls,         // LS[1:0]
  output logic [NUM_LEVELS-1:0]      d,          // D[2:0]
  output logic [NUM_LEVELS-1:0]      q,          // Q[2:0]
  output ch_t                        lev,        // Lev[2:0]
  output logic [2:0]                 state,      // State[2:0]
  output logic [NUM_CMP-1:0]         cmp_en,     // comparator enables
  output logic                       upd         // minimum register updated
);

  ch_t  [NUM_LEVELS-1:0] sel, regs;
  logic [NUM_LEVELS-1:0] cal_lev_sel;
  ch_t                   cal_ch;
  cal_state_e            st;

  tiq_adc #(.NUM_CMP(NUM_CMP), .VTH0_MV(VTH0_MV), .VGAP_MV(VGAP_MV)) u_adc (
    .clk, .rst_n, .vin_mv, .sel, .d, .q, .cmp_en
  );

  calibration_unit #(.TIMER_W(TIMER_W), .CNT_W(CNT_W)) u_cal (
    .clk, .rst_n, .mode, .q, .state(st), .regs, .cal_lev_sel,
    .cal_ch, .upd
  );

  channel_switch u_sw (
    .regs, .cal_lev_sel, .cal_ch, .auto_sel, .ms, .ls, .sel, .lev_out(lev)
  );

  assign state = st;

endmodule
