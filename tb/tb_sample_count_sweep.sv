// tb_sample_count_sweep - how the number of samples per estimate affects the
// choice.  Five receivers with 32, 64, 128, 512 and 2048 samples per channel
// (TIMER_W = 6, 7, 8, 10, 12) calibrate repeatedly on a 300 mV triangular
// input (760..1060 mV) strobed at random instants, so every sample is an
// independent Bernoulli trial with p equal to the comparator's duty cycle.
// The ideal comparators for 75 / 50 / 25 % are 6, 8 and 10 (duty 73.3 %,
// 46.7 %, 20 %).  The testbench checks every calibration's duration against
// 1 + 3 * (8 * (2**(TIMER_W-1) + 4) + 1), reports how often each size picked
// the ideal comparator, and checks that more samples never do clearly worse
// and that 2048 samples nearly always pick it.
module tb_sample_count_sweep;
  import pam4_pkg::*;
  localparam int NSZ = 5;
  localparam int TW [NSZ] = '{6, 7, 8, 10, 12};
  localparam int RUNS = 40;

  logic clk = 0, rst_n = 0;
  logic        mode [NSZ];
  logic [10:0] vin [NSZ];
  logic [2:0]  d [NSZ], q [NSZ], st [NSZ];
  ch_t         lev [NSZ];
  logic [15:0] cmp_en [NSZ];
  logic        upd [NSZ];
  logic [1:0]  ls [NSZ];
  int hits [NSZ], done_cnt [NSZ];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic int tri_rand();
    int ph;
    ph = $urandom_range(0, 9999);
    return (ph < 5000) ? 760 + (300 * ph) / 5000 : 1060 - (300 * (ph - 5000)) / 5000;
  endfunction

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    pam4_receiver #(.TIMER_W(TW[k])) dut (
      .clk, .rst_n, .vin_mv(vin[k]), .mode(mode[k]), .auto_sel(1'b1), .ms(9'd0), .ls(ls[k]),
      .d(d[k]), .q(q[k]), .lev(lev[k]), .state(st[k]), .cmp_en(cmp_en[k]), .upd(upd[k])
    );

    always @(negedge clk) vin[k] = 11'(tri_rand());

    initial begin
      int expect_cyc;
      expect_cyc = 1 + 3 * (8 * (2 ** (TW[k] - 1) + 4) + 1);
      mode[k] = 0; ls[k] = '0; hits[k] = 0; done_cnt[k] = 0;
      wait (rst_n);
      for (int r = 0; r < RUNS; r++) begin
        int cyc;
        @(negedge clk) mode[k] = 1;
        @(negedge clk);
        cyc = 0;
        while (st[k] != 3'(S_DONE)) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != expect_cyc) begin
          failures++;
          $display("TIMER_W=%0d: calibration took %0d clocks, expected %0d", TW[k], cyc, expect_cyc);
        end
        for (int l = 0; l < 3; l++) begin
          ls[k] = 2'(l);
          #1;
          if (4 * l + int'(lev[k]) == 6 + 2 * l) hits[k]++;
        end
        mode[k] = 0;
        @(negedge clk);
      end
      done_cnt[k] = 1;
    end
  end

  initial begin
    #20000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NSZ; k++) wait (done_cnt[k] == 1);
    for (int k = 0; k < NSZ; k++)
      $display("%0d samples: ideal comparator chosen in %0d of %0d level calibrations",
               2 ** (TW[k] - 1), hits[k], 3 * RUNS);
    for (int k = 1; k < NSZ; k++) begin
      checks++;
      if (hits[k] + 12 < hits[k-1]) failures++;   // allow 10 % statistical slack
    end
    checks++;
    if (hits[NSZ-1] < (3 * RUNS * 95) / 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
