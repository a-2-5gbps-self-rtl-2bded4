// tb_duty_cycle_estimator - drives random sample streams of varying density,
// with pauses of the sampling clock, and checks that T_up rises after exactly
// 128 enabled clocks and that the count equals the ones seen in them.
module tb_duty_cycle_estimator;
  logic clk = 0, rst_n = 0, reset_t = 0, ck_sw = 0, din = 0, t_up;
  logic [6:0] count;
  int checks = 0, failures = 0;

  duty_cycle_estimator dut (.clk, .rst_n, .reset_t, .ck_sw, .din, .t_up, .count);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      int ones, enabled, dens, cycles;
      dens = (run == 0) ? 100 : (run == 1) ? 0 : $urandom_range(0, 100);
      @(negedge clk); reset_t = 1; ck_sw = 1;
      @(negedge clk); reset_t = 0;
      ones = 0; enabled = 0; cycles = 0;
      while (!t_up) begin
        ck_sw = ($urandom_range(0, 9) != 0);
        din   = ($urandom_range(1, 100) <= dens);
        checks++;
        if (count !== 7'(ones)) failures++;
        @(negedge clk);
        if (ck_sw) begin
          enabled++;
          if (din) ones++;
        end
        cycles++;
        if (cycles > 1000) break;
      end
      checks += 2;
      if (enabled != 128) begin
        failures++;
        $display("run %0d: T_up after %0d enabled clocks", run, enabled);
      end
      if (count !== 7'(ones)) begin
        failures++;
        $display("run %0d: count %0d expected %0d", run, count, ones);
      end
      // counting stops once T_up is set
      ck_sw = 1; din = 1;
      @(negedge clk);
      checks++;
      if (count !== 7'(ones) || !t_up) failures++;
      ck_sw = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
