// tb_pam4_rx_chip - end-to-end test of the chip at its default size, with the
// on-chip test source wired to the receiver input as on the bench.
//   1. After reset all three MUXes sit on channel 3 (read through Lev/LS).
//   2. Normal mode on the random 4-PAM source: D[2:0] must be the
//      thermometer code of every symbol.
//   3. Each binary PRBS pattern: the input must stay on its two levels and
//      the decisions must follow.
//   4. Calibration on the 4-PAM source: the chosen channels are predicted from
//      the recorded input, the duration must be 3172 clocks, and the data must
//      still be decoded without error afterwards.
//   5. Mode = 0 in the middle of a calibration aborts it.
//   6. Auto = 0 hands the MUXes to the MS pins.
// Every mechanism is counted and must have happened at least once.
module tb_pam4_rx_chip;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, mode = 0, auto_sel = 1;
  logic gen_sw = 0;
  logic [1:0]  gen_s = '0, ls = '0, gen_sym;
  logic [8:0]  ms = '0;
  logic [10:0] vin, gen_v;
  logic [2:0]  d, q, lev, state;
  logic [15:0] cmp_en;
  logic        upd;
  int vh [0:9999];
  int cyc = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_sym = 0, n_prbs [4], n_cal = 0, n_upd = 0, n_ch_end = 0, n_lev_end = 0,
      n_abort = 0, n_manual = 0, n_pwr_down = 0;
  int cur_ch [3];

  pam4_rx_chip dut (
    .clk, .rst_n, .vin_mv(vin), .mode, .auto_sel, .ms, .ls, .d, .q, .lev, .state,
    .cmp_en, .upd, .gen_clk(clk), .gen_rst_n(rst_n), .gen_sw, .gen_s,
    .gen_vout_mv(gen_v), .gen_sym
  );

  assign vin = gen_v;   // board connection: source output to receiver input

  always #1449 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (cyc < 10000) vh[cyc] = int'(vin);
    if (upd) n_upd++;
    if (state == 3'(S_NEXT_LV)) n_ch_end++;
    if (state == 3'(S_DONE) && $past(state) == 3'(S_NEXT_LV)) n_lev_end++;
    if ($countones(cmp_en) <= 3) n_pwr_down++;
  end

  function automatic int offs(int c, int t);
    return (c >= t) ? c - t : t - c - 1;
  endfunction

  // D must be the thermometer code of the input against the selected comparators
  task automatic check_data(input int ch0, input int ch1, input int ch2, output int errs);
    int chs [3];
    chs = '{ch0, ch1, ch2};
    errs = 0;
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (d[l] !== (int'(vin) > 600 + 40 * (4 * l + chs[l]))) begin
        failures++; errs++;
      end
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs, e0, exp_ch [3];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. default channels
    for (int l = 0; l < 3; l++) begin
      ls = 2'(l); #1;
      checks++;
      if (lev !== 3'd3) failures++;
      cur_ch[l] = 3;
    end
    // 2. normal mode, random 4-PAM
    for (int n = 0; n < 500; n++) begin
      int v;
      @(negedge clk);
      v = 1200 - 200 * int'(gen_sym);
      check_data(3, 3, 3, errs);
      @(posedge clk); #1;
      checks++;
      if (int'(vin) != v) failures++;   // the DAC shows the symbol one clock later
      n_sym++;
    end
    // 3. binary patterns
    gen_sw = 1;
    for (int p = 0; p < 4; p++) begin
      int lo, hi, seen_lo, seen_hi;
      gen_s = 2'(p);
      lo = (p == 0) ? 600 : (p == 1) ? 800 : (p == 2) ? 1000 : 600;
      hi = (p == 0) ? 800 : (p == 1) ? 1000 : 1200;
      seen_lo = 0; seen_hi = 0;
      repeat (2) @(negedge clk);
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        checks++;
        if (int'(vin) != lo && int'(vin) != hi) failures++;
        if (int'(vin) == lo) seen_lo++;
        if (int'(vin) == hi) seen_hi++;
        check_data(3, 3, 3, errs);
      end
      checks++;
      if (seen_lo == 0 || seen_hi == 0) failures++;
      n_prbs[p] = seen_lo + seen_hi;
    end
    // 4. calibration on the 4-PAM source
    gen_sw = 0;
    repeat (4) @(negedge clk);
    mode = 1;
    e0 = cyc + 1;
    @(negedge clk);
    while (state != 3'(S_DONE) && cyc < 9000) @(negedge clk);
    checks++;
    if (cyc - e0 != 3172) begin
      failures++;
      $display("calibration took %0d clocks", cyc - e0);
    end else n_cal++;
    for (int l = 0; l < 3; l++) begin
      int best, tgt;
      tgt = 96 - 32 * l; best = 1000; exp_ch[l] = 0;
      for (int c = 0; c < 8; c++) begin
        int b, cnt;
        b = e0 + 1 + 1057 * l + 132 * c;
        cnt = 0;
        for (int n = b; n < b + 128; n++) if (vh[n] > 600 + 40 * (4 * l + c)) cnt++;
        cnt = cnt % 128;
        if (offs(cnt, tgt) < best) begin best = offs(cnt, tgt); exp_ch[l] = c; end
      end
      ls = 2'(l); #1;
      checks++;
      if (int'(lev) != exp_ch[l]) begin
        failures++;
        $display("level %0d: chose %0d, expected %0d", l, lev, exp_ch[l]);
      end
      $display("level %0d calibrated to comparator %0d", l, 4 * l + int'(lev));
    end
    mode = 0;
    @(negedge clk);
    errs = 0;
    for (int n = 0; n < 500; n++) begin
      int e;
      @(negedge clk);
      check_data(exp_ch[0], exp_ch[1], exp_ch[2], e);
      errs += e;
    end
    $display("decision errors after calibration: %0d", errs);
    // 5. abort
    mode = 1;
    repeat (1500) @(negedge clk);
    mode = 0;
    @(negedge clk);
    checks++;
    if (state != 3'(S_IDLE)) failures++; else n_abort++;
    // 6. manual channels
    auto_sel = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ms = 9'($urandom);
      #1;
      check_data(int'(ms[2:0]), int'(ms[5:3]), int'(ms[8:6]), errs);
      checks++;
      if (cmp_en !== ((16'(1) << ms[2:0]) | (16'(1) << (4 + ms[5:3])) | (16'(1) << (8 + ms[8:6]))))
        failures++;
      n_manual++;
    end
    // mechanism coverage
    $display("4-PAM symbols %0d, PRBS_0..F %0d %0d %0d %0d, calibrations %0d, minimum updates %0d,",
             n_sym, n_prbs[0], n_prbs[1], n_prbs[2], n_prbs[3], n_cal, n_upd);
    $display("levels scanned to the last channel %0d, calibration finishes %0d, aborts %0d, manual %0d, power-down cycles %0d",
             n_ch_end, n_lev_end, n_abort, n_manual, n_pwr_down);
    begin
      int m [12];
      m = '{n_sym, n_prbs[0], n_prbs[1], n_prbs[2], n_prbs[3], n_cal, n_upd, n_ch_end,
            n_lev_end, n_abort, n_manual, n_pwr_down};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
