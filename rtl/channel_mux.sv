// channel_mux - 8-to-1 channel MUX of the TIQ ADC with stage power-down.
//
// Each MUX is a binary tree of three 2:1 stages built from tri-state
// inverters: four first-stage cells pick between comparator pairs, two
// second-stage cells pick between those, one last cell drives the output.
// Only the cells on the path to the selected channel are enabled; the others
// are switched off to save power, and a switched-off cell reads as 0 here.
// The stage enables come from the select bits: a first-stage cell i is on when
// sel[2:1] == i, a second-stage cell j when sel[2] == j.  need_cmp is the
// one-hot set of comparators this MUX uses, so unused comparators can be
// switched off too.  The logic is written non-inverting; in silicon every
// stage inverts and the stage count makes the path non-inverting overall.
// Purely combinational (in silicon: three gain-of-two stages).
module channel_mux
  import pam4_pkg::*;
(
  input  logic [NUM_CH-1:0] din,       // comparator outputs, channel 0..7
  input  ch_t               sel,       // selected channel
  output logic              dout,      // data output D
  output logic [NUM_CH-1:0] need_cmp   // comparators to keep powered
);

  logic [3:0] en_b, out_b;   // first 2:1 stage
  logic [1:0] en_c, out_c;   // second 2:1 stage

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      en_b[i]  = (sel[2:1] == 2'(i));
      out_b[i] = en_b[i] && (sel[0] ? din[2*i+1] : din[2*i]);
    end
    for (int j = 0; j < 2; j++) begin
      en_c[j]  = (sel[2] == 1'(j));
      out_c[j] = en_c[j] && (sel[1] ? out_b[2*j+1] : out_b[2*j]);
    end
    dout = sel[2] ? out_c[1] : out_c[0];
    need_cmp = '0;
    need_cmp[sel] = 1'b1;
  end

endmodule
