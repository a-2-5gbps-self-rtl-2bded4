// tb_lfsr16 - compares the LFSR with an independent Galois-free recurrence
// on a bit array, checks it never reaches zero and that its period is 65535.
module tb_lfsr16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] state, model, first;
  int checks = 0, failures = 0;

  lfsr16 dut (.clk, .rst_n, .en, .state);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    checks++;
    if (state !== 16'hACE1) failures++;
    model = state; first = state;
    en = 1;
    for (int n = 1; n <= 65535; n++) begin
      logic nb;
      @(negedge clk);
      nb = model[15] ^ model[13] ^ model[12] ^ model[10];
      model = {model[14:0], nb};
      if (n < 2000) begin
        checks++;
        if (state !== model) failures++;
      end
      if (state == 16'h0) begin checks++; failures++; end
      if (n < 65535 && state == first) begin
        checks++; failures++;
        $display("period too short: %0d", n);
      end
    end
    checks++;
    if (state !== first) failures++;
    en = 0;
    @(negedge clk);
    checks++;
    if (state !== first) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
