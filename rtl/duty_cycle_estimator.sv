// duty_cycle_estimator - stimulus timer and one's counter for duty-cycle estimation.
//
// While the sampling clock is let through (ck_sw high) the stimulus timer
// counts sampling clocks and the one's counter counts how many of those
// samples of the selected ADC output were 1.  The timer is TIMER_W bits wide
// and its top bit is T_up, so one estimate takes 2**(TIMER_W-1) samples: 128
// with the default 8-bit timer, counted by a 7-bit one's counter.  Both stop
// once T_up is set, so exactly 128 samples enter an estimate, and both are
// cleared synchronously by reset_t.  count / 128 is the duty cycle.  The
// one's counter wraps, as a plain 7-bit counter does, if all 128 samples are 1.
// Timing: din is counted on the clock edge at which it is presented.
module duty_cycle_estimator #(
  parameter int unsigned TIMER_W = 8,
  parameter int unsigned CNT_W   = TIMER_W - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset_t,  // Reset_T: clear timer and counter
  input  logic             ck_sw,    // CK_SW: sampling clock switched on
  input  logic             din,      // sampled ADC output
  output logic             t_up,     // sampling period over
  output logic [CNT_W-1:0] count     // number of ones sampled
);

  logic [TIMER_W-1:0] timer;
  logic               run;

  assign t_up = timer[TIMER_W-1];
  assign run  = ck_sw && !t_up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
      count <= '0;
    end else if (reset_t) begin
      timer <= '0;
      count <= '0;
    end else if (run) begin
      timer <= timer + 1'b1;
      if (din) count <= count + 1'b1;
    end
  end

endmodule
