// pam4_rx_chip - top level: self-calibrating 4-PAM receiver and its on-chip test source.
//
// The chip holds two independent parts with their own pins.  The receiver
// (pam4_receiver) converts a 4-PAM input, given as millivolts on vin_mv, into
// the thermometer code D[2:0] and calibrates its thresholds when Mode = 1.
// The test source (pam_signal_gen and current_mode_dac) makes a random 4-PAM
// signal or one of four binary PRBS patterns on gen_vout_mv, running on its
// own symbol clock.  On the bench the source output is wired to the receiver
// input; the top leaves that connection to the board.
module pam4_rx_chip
  import pam4_pkg::*;
#(
  parameter int unsigned NUM_CMP = 16,
  parameter int unsigned VTH0_MV = 600,
  parameter int unsigned VGAP_MV = 40,
  parameter int unsigned TIMER_W = 8,
  parameter int unsigned CNT_W   = TIMER_W - 1
) (
  // receiver
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [10:0]                vin_mv,
  input  logic                       mode,
  input  logic                       auto_sel,
  input  logic [NUM_LEVELS*CH_W-1:0] ms,
  input  logic [1:0]                 ls,
  output logic [NUM_LEVELS-1:0]      d,
  output logic [NUM_LEVELS-1:0]      q,
  output logic [CH_W-1:0]            lev,
  output logic [2:0]                 state,
  output logic [NUM_CMP-1:0]         cmp_en,
  output logic                       upd,
  // test signal generator
  input  logic                       gen_clk,
  input  logic                       gen_rst_n,
  input  logic                       gen_sw,
  input  logic [1:0]                 gen_s,
  output logic [10:0]                gen_vout_mv,
  output logic [1:0]                 gen_sym
);

  logic [3:1] g;

  pam4_receiver #(
    .NUM_CMP(NUM_CMP), .VTH0_MV(VTH0_MV), .VGAP_MV(VGAP_MV),
    .TIMER_W(TIMER_W), .CNT_W(CNT_W)
  ) u_rx (
    .clk, .rst_n, .vin_mv, .mode, .auto_sel, .ms, .ls,
    .d, .q, .lev, .state, .cmp_en, .upd
  );

  pam_signal_gen u_gen (
    .clk(gen_clk), .rst_n(gen_rst_n), .sw(gen_sw), .s(gen_s), .sym(gen_sym), .g
  );

  current_mode_dac u_dac (.g, .vout_mv(gen_vout_mv));

endmodule
