// tb_channel_select_counter - random clear/increment sequence against a
// modulo-8 model, with CH_END on channel 7.
module tb_channel_select_counter;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, ch_end;
  ch_t  ch;
  int model, checks = 0, failures = 0;

  channel_select_counter dut (.clk, .rst_n, .clear, .inc, .ch, .ch_end);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks += 2;
      if (int'(ch) != model) failures++;
      if (ch_end !== (model == 7)) failures++;
      clear = ($urandom_range(0, 29) == 0);
      inc   = ($urandom_range(0, 1) == 0);
      if (clear)    model = 0;
      else if (inc) model = (model + 1) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
