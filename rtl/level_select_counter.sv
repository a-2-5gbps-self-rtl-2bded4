// level_select_counter - counts the three threshold levels and decodes them.
//
// A LEV_W-bit counter: 0, 1, 2 are the levels (MUXes D0, D1, D2), 3 means all
// levels are done and the counter stays there.  clear (Reset) returns it to
// level 0 and inc (Lev_in) advances it.  lev_end is high while the last level
// (2) is being calibrated.  The encoder output lev_sel is the one-hot level,
// all zero once the counter reaches 3, and picks the ADC output, the channel
// register and the target duty cycle.
module level_select_counter
  import pam4_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,    // Reset
  input  logic                  inc,      // Lev_in
  output lev_t                  lev,      // level under calibration
  output logic                  lev_end,  // Lev_END: last level
  output logic [NUM_LEVELS-1:0] lev_sel   // one-hot decode of lev
);

  assign lev_end = (lev == lev_t'(NUM_LEVELS - 1));

  always_comb begin
    lev_sel = '0;
    for (int l = 0; l < NUM_LEVELS; l++) lev_sel[l] = (lev == lev_t'(l));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 lev <= '0;
    else if (clear)                             lev <= '0;
    else if (inc && lev != lev_t'(NUM_LEVELS))  lev <= lev + 1'b1;
  end

endmodule
