// channel_select_registers - the calibrated channel of each of the three MUXes.
//
// Three CH_W-bit registers (S0, S1, S2).  Reset and the calibration start
// (Reset) load the default channel 3 into all of them.  During calibration the
// register of the level being calibrated takes the channel counter value each
// time the minimum register is updated, so when the level is finished it holds
// the channel with the smallest offset (the first one if several tie).
// Timing: load takes effect at the next clock edge.
module channel_select_registers
  import pam4_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reset,     // Reset: back to the default channel
  input  logic [NUM_LEVELS-1:0] lev_sel,   // one-hot level under calibration
  input  logic                  load,      // minimum register update
  input  ch_t                   ch,        // channel counter value
  output ch_t  [NUM_LEVELS-1:0] regs       // stored channel of each MUX
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= {NUM_LEVELS{DEFAULT_CH}};
    end else if (reset) begin
      regs <= {NUM_LEVELS{DEFAULT_CH}};
    end else if (load) begin
      for (int l = 0; l < NUM_LEVELS; l++) begin
        if (lev_sel[l]) regs[l] <= ch;
      end
    end
  end

endmodule
