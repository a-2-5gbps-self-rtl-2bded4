// lfsr16 - 16-bit maximal-length linear feedback shift register.
//
// Fibonacci form with taps 16, 14, 13, 11 (x^16 + x^14 + x^13 + x^11 + 1):
// each enabled clock shifts left by one and inserts the XOR of bits 15, 13,
// 12 and 10 at bit 0.  The sequence repeats after 65535 steps and never
// reaches zero; reset loads the non-zero SEED.  The tap set and seed are this
// design's choice: only the register length is fixed.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] state
);

  logic fb;
  assign fb = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[14:0], fb};
  end

endmodule
