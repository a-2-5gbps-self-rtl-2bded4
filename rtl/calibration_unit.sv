// calibration_unit - picks, for each 4-PAM threshold, the comparator whose
// output duty cycle is closest to the ideal one.
//
// For a 4-PAM signal the best decision thresholds sit midway between levels,
// where the comparator outputs are 1 for 75 %, 50 % and 25 % of the time.
// For each MUX (level) in turn the unit scans its eight channels.  For each
// channel it undersamples the sampled ADC output 2**(TIMER_W-1) = 128 times,
// counts the ones, takes the absolute offset from the level's target count
// (96, 64, 32), and if the offset is below the minimum so far, stores it and
// the channel number.  After the eighth channel the register of that level
// holds its best channel.  A full calibration takes
// 1 + 3 * (8 * (2**(TIMER_W-1) + 4) + 1) clocks from S1 to S7 (3172 at the
// default size).
// Outputs: the three stored channels (regs), and, while a MUX is being
// scanned (states S2..S6), its one-hot level cal_lev_sel and the channel
// counter value cal_ch that it must select.
module calibration_unit
  import pam4_pkg::*;
#(
  parameter int unsigned TIMER_W = 8,
  parameter int unsigned CNT_W   = TIMER_W - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  mode,        // 1 = calibration mode
  input  logic [NUM_LEVELS-1:0] q,           // sampled ADC outputs Q[2:0]
  output cal_state_e            state,       // State[2:0]
  output ch_t  [NUM_LEVELS-1:0] regs,        // calibrated channels
  output logic [NUM_LEVELS-1:0] cal_lev_sel, // one-hot level being scanned
  output ch_t                   cal_ch,      // channel being scanned
  output logic                  upd          // minimum updated (observability)
);

  localparam int unsigned NSAMP = 2 ** (TIMER_W - 1);

  cal_ctrl_t             ctrl;
  logic                  t_up, ch_end, lev_end;
  logic [CNT_W-1:0]      count, target, offset, min_q;
  logic                  less, equal, greater, din;
  lev_t                  lev;
  logic                  cal_active;
  logic [NUM_LEVELS-1:0] lev_sel;

  calibration_controller u_ctrl (
    .clk, .rst_n, .mode, .t_up, .ch_end, .lev_end, .state, .ctrl
  );

  level_select_counter u_lsc (
    .clk, .rst_n, .clear(ctrl.reset), .inc(ctrl.lev_in),
    .lev, .lev_end, .lev_sel
  );

  channel_select_counter u_csc (
    .clk, .rst_n, .clear(ctrl.reset_ch), .inc(ctrl.ch_in),
    .ch(cal_ch), .ch_end
  );

  // The ADC output of the level under calibration feeds the estimator.
  assign din = |(q & lev_sel);

  duty_cycle_estimator #(.TIMER_W(TIMER_W), .CNT_W(CNT_W)) u_dce (
    .clk, .rst_n, .reset_t(ctrl.reset_t), .ck_sw(ctrl.ck_sw), .din,
    .t_up, .count
  );

  // Target counts: 3/4, 2/4 and 1/4 of the number of samples.
  always_comb begin
    target = '0;
    for (int l = 0; l < NUM_LEVELS; l++) begin
      if (lev_sel[l]) target = CNT_W'((NSAMP * (NUM_LEVELS - l)) / (NUM_LEVELS + 1));
    end
  end

  abs_offset_comparator #(.W(CNT_W)) u_aoc (
    .count, .target, .min_q, .compare(ctrl.cmpr),
    .offset, .less, .equal, .greater
  );

  assign upd = ctrl.cmpr && less;

  minimum_register #(.W(CNT_W)) u_min (
    .clk, .rst_n, .clear(ctrl.reset_ch), .load(upd), .d(offset), .q(min_q)
  );

  channel_select_registers u_csr (
    .clk, .rst_n, .reset(ctrl.reset), .lev_sel, .load(upd), .ch(cal_ch), .regs
  );

  assign cal_active  = (state != S_IDLE) && (state != S_DONE) && (state != S_INIT);
  assign cal_lev_sel = cal_active ? lev_sel : '0;

endmodule
