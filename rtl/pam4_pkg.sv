// pam4_pkg - types and constants shared by the self-calibrating 4-PAM receiver.
//
// The receiver has sixteen threshold comparators (V0..V15) and three 8-to-1
// channel MUXes, one per 4-PAM threshold level.  MUX L (L = 0, 1, 2) reaches
// comparators 4L .. 4L+7, so neighbouring MUXes overlap by four comparators.
// Level 0 is the lowest threshold and wants a 75 % duty cycle, level 1 wants
// 50 % and level 2 wants 25 %.  The controller has eight states S0..S7 whose
// binary codes 000..111 are the ones shown on the State[2:0] pins.
package pam4_pkg;

  localparam int unsigned NUM_LEVELS = 3;   // MUXes / 4-PAM decision thresholds
  localparam int unsigned NUM_CH     = 8;   // inputs of one channel MUX
  localparam int unsigned CH_W       = 3;   // width of a channel number
  localparam int unsigned LEV_W      = 2;   // width of a level number (3 = done)
  localparam int unsigned MUX_STRIDE = 4;   // first comparator of MUX L is 4*L

  typedef logic [CH_W-1:0]  ch_t;
  typedef logic [LEV_W-1:0] lev_t;

  // Default channel of every MUX after reset: channel 3, the centre one.
  localparam ch_t DEFAULT_CH = ch_t'(3);

  // Calibration controller states with the codes of the state table.
  typedef enum logic [2:0] {
    S_IDLE    = 3'b000,  // S0: normal operation
    S_INIT    = 3'b001,  // S1: reset counters and registers
    S_START   = 3'b010,  // S2: reset stimulus timer, open sampling clock
    S_SAMPLE  = 3'b011,  // S3: sample until T_up
    S_COMPARE = 3'b100,  // S4: compare offset with minimum
    S_NEXT_CH = 3'b101,  // S5: step the channel counter
    S_NEXT_LV = 3'b110,  // S6: step the level counter
    S_DONE    = 3'b111   // S7: calibration finished
  } cal_state_e;

  // Controller outputs, one bit per signal of the state table.
  typedef struct packed {
    logic reset;     // Reset    : clear level counter and channel registers
    logic reset_ch;  // Reset_CH : clear channel counter and minimum register
    logic reset_t;   // Reset_T  : clear stimulus timer and one's counter
    logic ck_sw;     // CK_SW    : let the sampling clock reach the estimator
    logic cmpr;      // CMPR     : compare and conditionally update
    logic ch_in;     // CH_in    : increment channel counter
    logic lev_in;    // Lev_in   : increment level counter
  } cal_ctrl_t;

endpackage
