// tb_current_mode_dac - every gate combination against the ideal 50 ohm /
// current-sink levels 1200 - 200 * (gates on) mV.
module tb_current_mode_dac;
  logic [3:1] g;
  logic [10:0] v;
  int checks = 0, failures = 0;

  current_mode_dac dut (.g, .vout_mv(v));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      g = 3'(k);
      #1;
      checks++;
      if (int'(v) != 1200 - 200 * ((k & 1) + ((k >> 1) & 1) + ((k >> 2) & 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
