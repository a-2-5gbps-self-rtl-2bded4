// tb_channel_select_registers - reset value 3 in all registers, loads steered
// by the one-hot level, Reset restoring the default; compared with a model.
module tb_channel_select_registers;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, reset = 0, load = 0;
  logic [2:0] lev_sel;
  ch_t  ch;
  ch_t  [2:0] regs;
  int model [3];
  int checks = 0, failures = 0;

  channel_select_registers dut (.clk, .rst_n, .reset, .lev_sel, .load, .ch, .regs);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lev_sel = '0; ch = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = '{3, 3, 3};
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (int'(regs[l]) != model[l]) begin
          failures++;
          if (failures < 10) $display("n=%0d l=%0d reg=%0d model=%0d", n, l, regs[l], model[l]);
        end
      end
      reset   = ($urandom_range(0, 39) == 0);
      load    = ($urandom_range(0, 1) == 0);
      lev_sel = 3'(1 << $urandom_range(0, 3));
      ch      = ch_t'($urandom);
      if (reset) model = '{3, 3, 3};
      else if (load)
        for (int l = 0; l < 3; l++) if (lev_sel[l]) model[l] = int'(ch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
