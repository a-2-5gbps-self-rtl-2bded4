// minimum_register - holds the smallest absolute offset found in a level.
//
// A W-bit parallel-in parallel-out register.  It loads the offset when the
// comparison says the new offset is less than what it holds ("Less"); here
// Less acts as a clock enable of an ordinary clocked register.  clear presets
// it to all ones, the largest offset, so the first channel of a level always
// loads.  Timing: load takes effect at the next clock edge.
module minimum_register #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,  // start of a level: preset to maximum
  input  logic         load,   // Less gated by CMPR
  input  logic [W-1:0] d,      // absolute offset
  output logic [W-1:0] q       // current minimum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '1;
    else if (clear) q <= '1;
    else if (load)  q <= d;
  end

endmodule
