// tb_binary_test_flow - the bench procedure for a receiver without a 4-PAM
// source: each eye is tested on its own with a binary PRBS from the on-chip
// source.  The source runs at 400 ps per bit and reaches the receiver through
// a first-order RC channel (time constant 120 ps, +-8 mV noise; both are this
// testbench's choice); the receiver samples at 2.9 ns.  For level l = 0, 1, 2:
//   1. Pattern PRBS_l (SW = 1, {S1,S0} = l) toggles between the two levels
//      around eye l.  A full calibration runs, and the channel stored for
//      level l is read through LS/Lev.  It must match a prediction made from
//      the input values seen at each sampling edge, and the calibration must
//      take 3172 clocks.
//   2. In normal mode with Auto = 0, MUX l is stepped through its 8 channels
//      with the MS pins.  Each is compared with the transmitted bit at the end
//      of 1000 bits, and at least one channel must be error-free.
// The errors of the calibrated channel are reported.  A binary input has a
// 50 % duty cycle at the eye centre, while the targets stay at 75 / 50 /
// 25 %, so for levels 0 and 2 the calibration lands off the eye centre; the
// channel scan of step 2 is what picks the best channel in this procedure.
module tb_binary_test_flow;
  import pam4_pkg::*;
  localparam real TAU_PS = 120.0;
  localparam real DT_PS  = 50.0;
  localparam int  NS = 128;
  localparam int  PER_CH = NS + 4;
  localparam int  PER_LEV = 8 * PER_CH + 1;

  logic clk = 0, gclk = 0, rst_n = 0, mode = 0, auto_sel = 1, gen_sw = 1;
  logic [8:0]  ms = '0;
  logic [1:0]  ls = '0, gen_s = '0, gen_sym;
  logic [10:0] vin, gen_v;
  logic [2:0]  d, q, lev, state;
  logic [15:0] cmp_en;
  logic        upd;
  real v_rc = 900.0;
  int vs [0:32767];
  int cyc = 0;
  int checks = 0, failures = 0;

  pam4_rx_chip dut (
    .clk, .rst_n, .vin_mv(vin), .mode, .auto_sel, .ms, .ls, .d, .q, .lev, .state,
    .cmp_en, .upd, .gen_clk(gclk), .gen_rst_n(rst_n), .gen_sw, .gen_s,
    .gen_vout_mv(gen_v), .gen_sym
  );

  always #1450 clk = ~clk;   // 2.9 ns sampling period
  always #200 gclk = ~gclk;  // 400 ps bits

  // RC channel with noise, updated off the clock edges
  initial begin
    #25;
    forever begin
      v_rc = v_rc + (real'(gen_v) - v_rc) * (1.0 - $exp(-DT_PS / TAU_PS));
      vin = 11'($rtoi(v_rc + 0.5) + $urandom_range(0, 16) - 8);
      #50;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc <= 32767) vs[cyc] = int'(vin);
  end

  function automatic int offs(int c, int t);
    return (c >= t) ? c - t : t - c - 1;
  endfunction

  // errors of D[l] against the transmitted bit, 10 ps before each bit edge
  task automatic count_errors(input int l, input int nbits, output int errs);
    errs = 0;
    for (int n = 0; n < nbits; n++) begin
      @(posedge gclk);
      #390;
      if (d[l] !== (int'(gen_v) > 700 + 200 * l)) errs++;
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, done, exp_ch, errs, scan [8], best_scan;
    vin = 11'd900;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int l = 0; l < 3; l++) begin
      // 1. calibrate on PRBS_l
      gen_s = 2'(l);
      auto_sel = 1;
      repeat (20) @(negedge clk);
      mode = 1;
      e0 = cyc + 1;
      while (state != 3'(S_DONE) && cyc < 32000) @(negedge clk);
      done = cyc - e0;
      checks++;
      if (done != 1 + 3 * PER_LEV) begin
        failures++;
        $display("level %0d: calibration took %0d clocks", l, done);
      end
      begin
        int best, tgt;
        tgt = (NS * (3 - l)) / 4; best = 1 << 30; exp_ch = 0;
        for (int c = 0; c < 8; c++) begin
          int b, cnt;
          b = e0 + 1 + PER_LEV * l + PER_CH * c;
          cnt = 0;
          for (int n = b; n < b + NS; n++) if (vs[n + 1] > 600 + 40 * (4 * l + c)) cnt++;
          cnt = cnt % NS;
          if (offs(cnt, tgt) < best) begin best = offs(cnt, tgt); exp_ch = c; end
        end
      end
      ls = 2'(l); #1;
      checks++;
      if (int'(lev) != exp_ch) begin
        failures++;
        $display("level %0d: chose %0d, expected %0d", l, lev, exp_ch);
      end
      mode = 0;
      @(negedge clk);
      // 2. scan MUX l by hand
      auto_sel = 0;
      best_scan = 1 << 30;
      for (int c = 0; c < 8; c++) begin
        ms = {3'(c), 3'(c), 3'(c)};
        count_errors(l, 1000, scan[c]);
        if (scan[c] < best_scan) best_scan = scan[c];
      end
      checks++;
      if (best_scan != 0) failures++;
      auto_sel = 1;
      count_errors(l, 1000, errs);
      $display("PRBS_%0d: calibrated comparator %0d makes %0d errors in 1000 bits; scan of comparators %0d..%0d: %0d %0d %0d %0d %0d %0d %0d %0d",
               l, 4 * l + lev, errs, 4 * l, 4 * l + 7, scan[0], scan[1], scan[2], scan[3],
               scan[4], scan[5], scan[6], scan[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
