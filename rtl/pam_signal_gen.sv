// pam_signal_gen - digital part of the on-chip 4-PAM / PRBS test source.
//
// A 16-bit LFSR supplies random bits every clock.  Two of them form a random
// 4-PAM symbol; one of them, through the pattern control logic, forms a
// binary PRBS that toggles between two adjacent DAC levels (one eye of the
// 4-PAM signal) or between the two outer levels.  SW picks the source:
//   SW S1 S0   pattern   symbol B when the PRBS bit is 1 / 0
//    0  x  x   4-PAM     LFSR bits [1:0]
//    1  0  0   PRBS_0    2 / 3   (lowest eye: 800 / 600 mV)
//    1  0  1   PRBS_1    1 / 2   (middle eye: 1000 / 800 mV)
//    1  1  0   PRBS_2    0 / 1   (top eye:  1200 / 1000 mV)
//    1  1  1   PRBS_F    0 / 3   (full swing)
// The symbol goes through a clocked binary-to-thermometer decoder whose
// outputs G[3:1] switch the current sinks of the DAC: symbol B turns on the
// B lowest gates, so a larger symbol sinks more current and gives a lower
// voltage.  The assignment of the four binary patterns to eyes is this
// design's choice.  Timing: g follows sym by one clock.
module pam_signal_gen (
  input  logic       clk,    // symbol clock
  input  logic       rst_n,
  input  logic       sw,     // SW: 0 = 4-PAM, 1 = binary PRBS
  input  logic [1:0] s,      // {S1, S0} binary pattern
  output logic [1:0] sym,    // symbol B fed to the decoder
  output logic [3:1] g       // DAC gate controls G[3:1]
);

  logic [15:0] lfsr;
  logic        bin;
  logic [1:0]  b;

  lfsr16 u_lfsr (.clk, .rst_n, .en(1'b1), .state(lfsr));

  assign bin = lfsr[0];

  // Pattern control logic.
  always_comb begin
    unique case (s)
      2'b00: b = bin ? 2'd2 : 2'd3;
      2'b01: b = bin ? 2'd1 : 2'd2;
      2'b10: b = bin ? 2'd0 : 2'd1;
      default: b = bin ? 2'd0 : 2'd3;
    endcase
  end

  assign sym = sw ? b : lfsr[1:0];

  // Clocked binary-to-thermometer decoder.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) g <= '0;
    else        g <= {sym == 2'd3, sym >= 2'd2, sym >= 2'd1};
  end

endmodule
