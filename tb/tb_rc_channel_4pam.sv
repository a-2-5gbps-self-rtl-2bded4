// tb_rc_channel_4pam - the chip's own random 4-PAM source at 2.5 Gsym/s
// (400 ps symbols) drives the receiver through a first-order RC channel
// (time constant 120 ps, updated every 50 ps) with +-8 mV of uniform noise
// (channel and noise are this testbench's choice).  The receivers run on an
// unrelated 2.9 ns sampling clock, as in an undersampled calibration.  Two
// chips see the same input: one at the default 128 samples per estimate, one
// with TIMER_W = 12, i.e. 2048 samples.
// 1. Calibration: each chip's choice must match a prediction made from the
//    input values seen at each sampling edge, and its duration must be
//    1 + 3 * (8 * (samples + 4) + 1) clocks.
// 2. Channel scan with the manual pins (Auto = 0): every channel of every MUX
//    is compared at the end of each symbol with the transmitted level, as an
//    ideal clock recovery would, and its errors are reported.
// 3. With Auto = 1 each chip decodes 3000 symbols on its calibrated channels.
//    The 2048-sample chip must make no error.  With 128 samples the estimate
//    of two neighbouring comparators can differ by less than its own spread,
//    so the 128-sample result is reported, not required.
module tb_rc_channel_4pam;
  import pam4_pkg::*;
  localparam real TAU_PS = 120.0;
  localparam real DT_PS  = 50.0;
  localparam int  NCHIP = 2;
  localparam int  TW [NCHIP] = '{8, 12};

  logic clk = 0, gclk = 0, rst_n = 0, mode = 0, auto_sel = 1;
  logic [8:0]  ms = '0;
  logic [1:0]  ls = '0, gen_sym [NCHIP];
  logic [10:0] vin, gen_v [NCHIP];
  logic [2:0]  d [NCHIP], q [NCHIP], lev [NCHIP], state [NCHIP];
  logic [15:0] cmp_en [NCHIP];
  logic        upd [NCHIP];
  real v_rc = 900.0;
  int vs [0:65535];
  int cyc = 0;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    pam4_rx_chip #(.TIMER_W(TW[k])) dut (
      .clk, .rst_n, .vin_mv(vin), .mode, .auto_sel, .ms, .ls, .d(d[k]), .q(q[k]),
      .lev(lev[k]), .state(state[k]), .cmp_en(cmp_en[k]), .upd(upd[k]), .gen_clk(gclk),
      .gen_rst_n(rst_n), .gen_sw(1'b0), .gen_s(2'b00), .gen_vout_mv(gen_v[k]),
      .gen_sym(gen_sym[k])
    );
  end

  always #1450 clk = ~clk;   // 2.9 ns sampling period
  always #200 gclk = ~gclk;  // 400 ps symbols

  // RC channel with noise, updated off the clock edges
  initial begin
    #25;
    forever begin
      v_rc = v_rc + (real'(gen_v[0]) - v_rc) * (1.0 - $exp(-DT_PS / TAU_PS));
      vin = 11'($rtoi(v_rc + 0.5) + $urandom_range(0, 16) - 8);
      #50;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc <= 65535) vs[cyc] = int'(vin);
  end

  function automatic int offs(int c, int t);
    return (c >= t) ? c - t : t - c - 1;
  endfunction

  // errors of D[l] of chip k against the transmitted level, 10 ps before each symbol edge
  task automatic count_errors(input int k, input int nsym, output int errs [3]);
    errs = '{0, 0, 0};
    for (int n = 0; n < nsym; n++) begin
      @(posedge gclk);
      #390;
      for (int l = 0; l < 3; l++)
        if (d[k][l] !== (int'(gen_v[0]) > 700 + 200 * l)) errs[l]++;
    end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, exp_ch [NCHIP][3], errs [3], scan [3][8], done [NCHIP];
    vin = 11'd900;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(negedge clk);
    // 1. calibration of both chips at once
    mode = 1;
    e0 = cyc + 1;
    done = '{0, 0};
    while ((done[0] == 0 || done[1] == 0) && cyc < 60000) begin
      @(negedge clk);
      for (int k = 0; k < NCHIP; k++)
        if (done[k] == 0 && state[k] == 3'(S_DONE)) done[k] = cyc - e0;
    end
    for (int k = 0; k < NCHIP; k++) begin
      int ns, per_ch, per_lev;
      ns = 2 ** (TW[k] - 1);
      per_ch = ns + 4;
      per_lev = 8 * per_ch + 1;
      checks++;
      if (done[k] != 1 + 3 * per_lev) begin
        failures++;
        $display("chip %0d: calibration took %0d clocks", k, done[k]);
      end
      for (int l = 0; l < 3; l++) begin
        int best, tgt;
        tgt = (ns * (3 - l)) / 4; best = 1 << 30; exp_ch[k][l] = 0;
        for (int c = 0; c < 8; c++) begin
          int b, cnt;
          b = e0 + 1 + per_lev * l + per_ch * c;
          cnt = 0;
          for (int n = b; n < b + ns; n++) if (vs[n + 1] > 600 + 40 * (4 * l + c)) cnt++;
          cnt = cnt % ns;
          if (offs(cnt, tgt) < best) begin best = offs(cnt, tgt); exp_ch[k][l] = c; end
        end
        ls = 2'(l); #1;
        checks++;
        if (int'(lev[k]) != exp_ch[k][l]) begin
          failures++;
          $display("chip %0d level %0d: chose %0d, expected %0d", k, l, lev[k], exp_ch[k][l]);
        end
      end
    end
    mode = 0;
    // 2. manual scan of every channel
    auto_sel = 0;
    for (int c = 0; c < 8; c++) begin
      ms = {3'(c), 3'(c), 3'(c)};
      count_errors(0, 1000, errs);
      for (int l = 0; l < 3; l++) scan[l][c] = errs[l];
    end
    for (int l = 0; l < 3; l++)
      $display("MUX %0d errors per channel (1000 symbols): %0d %0d %0d %0d %0d %0d %0d %0d; chosen with 128 / 2048 samples: comparator %0d / %0d",
               l, scan[l][0], scan[l][1], scan[l][2], scan[l][3], scan[l][4], scan[l][5], scan[l][6],
               scan[l][7], 4 * l + exp_ch[0][l], 4 * l + exp_ch[1][l]);
    // 3. calibrated decoding
    auto_sel = 1;
    for (int k = 0; k < NCHIP; k++) begin
      count_errors(k, 3000, errs);
      $display("%0d samples: errors in 3000 symbols on the calibrated channels: %0d %0d %0d",
               2 ** (TW[k] - 1), errs[0], errs[1], errs[2]);
      if (k == 1)
        for (int l = 0; l < 3; l++) begin
          checks++;
          if (errs[l] != 0) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
