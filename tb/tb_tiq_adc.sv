// tb_tiq_adc - checks the 2-bit TIQ ADC: D[L] must equal "vin above the
// threshold of comparator 4L + sel[L]", Q must be D one clock later, and only
// the selected comparators may be powered.
module tb_tiq_adc;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [10:0] vin;
  ch_t  [2:0]  sel;
  logic [2:0]  d, q, d_prev;
  logic [15:0] cmp_en, exp_en;
  int checks = 0, failures = 0;

  tiq_adc dut (.clk, .rst_n, .vin_mv(vin), .sel, .d, .q, .cmp_en);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 11'd900; sel = '0; d_prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (n > 0 && q !== d_prev) failures++;
      vin = 11'($urandom_range(550, 1250));
      for (int l = 0; l < 3; l++) sel[l] = ch_t'($urandom_range(0, 7));
      #1;
      exp_en = '0;
      for (int l = 0; l < 3; l++) begin
        int idx;
        idx = 4 * l + int'(sel[l]);
        exp_en[idx] = 1'b1;
        checks++;
        if (d[l] !== (int'(vin) > 600 + 40 * idx)) begin
          failures++;
          if (failures < 10) $display("vin=%0d l=%0d sel=%0d d=%b", vin, l, sel[l], d[l]);
        end
      end
      checks++;
      if (cmp_en !== exp_en) failures++;
      d_prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
