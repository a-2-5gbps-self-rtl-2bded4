// channel_switch - selects what drives the three MUX channel selects.
//
// Two rows of 2:1 switches per MUX.  The first row picks the channel counter
// for the MUX whose level is being calibrated and the stored calibration
// register for the others.  The second row, steered by the Auto pin, picks
// between that result (Auto = 1, self-calibration) and the manual switch pins
// MS[8:0] (Auto = 0), three bits per MUX with MUX L on MS[3L+2:3L].  Lev[2:0]
// shows the stored channel of the level chosen with LS[1:0] (LS = 3 shows 0).
// Purely combinational.
module channel_switch
  import pam4_pkg::*;
(
  input  ch_t  [NUM_LEVELS-1:0]      regs,         // calibrated channels
  input  logic [NUM_LEVELS-1:0]      cal_lev_sel,  // level being scanned
  input  ch_t                        cal_ch,       // channel being scanned
  input  logic                       auto_sel,     // Auto pin
  input  logic [NUM_LEVELS*CH_W-1:0] ms,           // MS manual selects
  input  logic [1:0]                 ls,           // LS level select
  output ch_t  [NUM_LEVELS-1:0]      sel,          // MUX selects S0..S2
  output ch_t                        lev_out       // Lev[2:0]
);

  always_comb begin
    for (int l = 0; l < NUM_LEVELS; l++) begin
      if (!auto_sel)          sel[l] = ms[CH_W*l +: CH_W];
      else if (cal_lev_sel[l]) sel[l] = cal_ch;
      else                    sel[l] = regs[l];
    end
    lev_out = (32'(ls) < NUM_LEVELS) ? regs[ls] : '0;
  end

endmodule
