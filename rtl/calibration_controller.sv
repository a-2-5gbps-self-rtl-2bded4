// calibration_controller - eight-state sequencer of the self-calibration.
//
// The states and their outputs follow the design's state table:
//   S0 idle (normal mode)      -> S1 when Mode = 1
//   S1 Reset, Reset_CH         -> S2
//   S2 Reset_T, CK_SW          -> S3
//   S3 CK_SW                   -> S4 when T_up, else stay
//   S4 CMPR                    -> S5
//   S5 CH_in                   -> S6 when CH_END, else S2 (next channel)
//   S6 Reset_CH, Lev_in        -> S7 when Lev_END, else S2 (next level)
//   S7 done                    -> S0 when Mode = 0, else stay
// Mode = 0 returns the machine to S0 from every state.  The outputs depend on
// the present state only (Moore); the state register is three flip-flops
// whose value is the State[2:0] pin code.  Mode is expected to be
// synchronous to clk.
module calibration_controller
  import pam4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode,     // 1 = calibration mode
  input  logic       t_up,     // stimulus timer expired
  input  logic       ch_end,   // last channel of the MUX
  input  logic       lev_end,  // last level
  output cal_state_e state,
  output cal_ctrl_t  ctrl
);

  cal_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:    next = S_INIT;
      S_INIT:    next = S_START;
      S_START:   next = S_SAMPLE;
      S_SAMPLE:  if (t_up) next = S_COMPARE;
      S_COMPARE: next = S_NEXT_CH;
      S_NEXT_CH: next = ch_end  ? S_NEXT_LV : S_START;
      S_NEXT_LV: next = lev_end ? S_DONE    : S_START;
      S_DONE:    next = S_DONE;
      default:   next = S_IDLE;
    endcase
    if (!mode) next = S_IDLE;
  end

  always_comb begin
    ctrl          = '0;
    ctrl.reset    = (state == S_INIT);
    ctrl.reset_ch = (state == S_INIT) || (state == S_NEXT_LV);
    ctrl.reset_t  = (state == S_START);
    ctrl.ck_sw    = (state == S_START) || (state == S_SAMPLE);
    ctrl.cmpr     = (state == S_COMPARE);
    ctrl.ch_in    = (state == S_NEXT_CH);
    ctrl.lev_in   = (state == S_NEXT_LV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= next;
  end

endmodule
