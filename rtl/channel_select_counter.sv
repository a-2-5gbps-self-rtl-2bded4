// channel_select_counter - steps through the channels of the MUX under calibration.
//
// A CH_W-bit counter (3 bits, channels 0..7).  clear returns it to channel 0;
// inc (CH_in) advances it and wraps from 7 to 0.  ch_end is high while the
// counter is on the last channel, so the controller can decide, in the same
// state in which it issues CH_in, whether the level is finished.
module channel_select_counter
  import pam4_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,   // Reset_CH
  input  logic inc,     // CH_in
  output ch_t  ch,      // channel under evaluation
  output logic ch_end   // CH_END: last channel
);

  assign ch_end = (ch == ch_t'(NUM_CH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ch <= '0;
    else if (clear) ch <= '0;
    else if (inc)   ch <= ch + 1'b1;
  end

endmodule
