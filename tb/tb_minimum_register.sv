// tb_minimum_register - random clear/load/data sequence compared with a
// reference model; clear must preset to all ones.
module tb_minimum_register;
  logic clk = 0, rst_n = 0, clear = 0, load = 0;
  logic [6:0] d, q;
  int model, checks = 0, failures = 0;

  minimum_register dut (.clk, .rst_n, .clear, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 127;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(q) != model) begin
        failures++;
        if (failures < 10) $display("n=%0d q=%0d model=%0d", n, q, model);
      end
      clear = ($urandom_range(0, 19) == 0);
      load  = ($urandom_range(0, 2) == 0);
      d     = 7'($urandom);
      if (clear)     model = 127;
      else if (load) model = int'(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
