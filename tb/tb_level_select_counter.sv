// tb_level_select_counter - counts 0, 1, 2, then holds at 3 (done); Lev_END
// on level 2; one-hot decode all zero at 3; compared with a model.
module tb_level_select_counter;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, lev_end;
  lev_t lev;
  logic [2:0] lev_sel;
  int model, checks = 0, failures = 0;

  level_select_counter dut (.clk, .rst_n, .clear, .inc, .lev, .lev_end, .lev_sel);

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
      checks += 3;
      if (int'(lev) != model) failures++;
      if (lev_end !== (model == 2)) failures++;
      if (lev_sel !== ((model < 3) ? 3'(1 << model) : 3'b000)) failures++;
      clear = ($urandom_range(0, 9) == 0);
      inc   = ($urandom_range(0, 1) == 0);
      if (clear)                  model = 0;
      else if (inc && model < 3)  model = model + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
