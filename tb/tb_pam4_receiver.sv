// tb_pam4_receiver - calibration of the whole receiver on an 80 MHz
// triangular input swinging 600..1200 mV, undersampled by a 345 MHz clock.
// Three receivers run side by side: nominal thresholds (600 mV + 40 mV * i),
// a fast corner with a wider threshold spread and a slow corner with a
// narrower one.  For each the testbench records the input it applied, works
// out from it which samples every channel's estimate covers (S2 of channel
// (L, c) starts 1 + 1057 L + 132 c clocks after S1), counts the ones an ideal
// comparator would give, and predicts the chosen channels.  It also checks:
// the nominal result against the published one (comparators 4, 7 or 8, 11),
// that the fast corner picks channels closer together and the slow corner
// ones further apart, the Lev/LS readout, the normal-mode decisions, and the
// manual override.
module tb_pam4_receiver;
  import pam4_pkg::*;
  localparam int NCORNER = 3;
  localparam int VTH0 [NCORNER] = '{600, 525, 660};
  localparam int VGAP [NCORNER] = '{40, 50, 32};
  localparam real TS_PS = 1.0e6 / 345.0;   // sampling period
  localparam real TP_PS = 12500.0;         // 80 MHz input period

  logic clk = 0, rst_n = 0, mode = 0, auto_sel = 1;
  logic [10:0] vin;
  logic [8:0]  ms;
  logic [1:0]  ls;
  logic [2:0]  d [NCORNER], q [NCORNER], st [NCORNER];
  ch_t         lev [NCORNER];
  logic [15:0] cmp_en [NCORNER];
  logic        upd [NCORNER];
  int vh [8000];
  int cyc = 0, e0;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NCORNER; k++) begin : g_rx
    pam4_receiver #(.VTH0_MV(VTH0[k]), .VGAP_MV(VGAP[k])) dut (
      .clk, .rst_n, .vin_mv(vin), .mode, .auto_sel, .ms, .ls,
      .d(d[k]), .q(q[k]), .lev(lev[k]), .state(st[k]), .cmp_en(cmp_en[k]), .upd(upd[k])
    );
  end

  always #1449 clk = ~clk;   // ~345 MHz in ps
  always @(posedge clk) cyc++;

  function automatic int tri_mv(int n);
    real t, ph;
    t  = 777.0 + n * TS_PS;
    ph = t / TP_PS - $floor(t / TP_PS);
    return (ph < 0.5) ? int'(600.0 + 1200.0 * ph) : int'(1800.0 - 1200.0 * ph);
  endfunction

  function automatic int offs(int c, int t);
    return (c >= t) ? c - t : t - c - 1;
  endfunction

  always @(negedge clk) begin
    if (cyc < 8000) begin
      vh[cyc] = tri_mv(cyc);
      vin = 11'(vh[cyc]);
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ch [NCORNER][3], spread [NCORNER];
    ms = '0; ls = '0; vin = 11'd900;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    mode = 1;
    e0 = cyc + 1;            // the edge that enters S1
    @(negedge clk);
    while (st[0] != 3'(S_DONE) && cyc < 7000) @(negedge clk);
    checks++;
    if (cyc - e0 != 3172) begin
      failures++;
      $display("calibration took %0d clocks", cyc - e0);
    end
    // predict each corner's choice from the applied input
    for (int k = 0; k < NCORNER; k++) begin
      for (int l = 0; l < 3; l++) begin
        int best, tgt;
        tgt = 96 - 32 * l; best = 1000; exp_ch[k][l] = 0;
        for (int c = 0; c < 8; c++) begin
          int b, cnt, vth;
          b = e0 + 1 + 1057 * l + 132 * c;
          vth = VTH0[k] + VGAP[k] * (4 * l + c);
          cnt = 0;
          for (int n = b; n < b + 128; n++) if (vh[n] > vth) cnt++;
          cnt = cnt % 128;
          if (offs(cnt, tgt) < best) begin best = offs(cnt, tgt); exp_ch[k][l] = c; end
        end
      end
      for (int l = 0; l < 3; l++) begin
        ls = 2'(l);
        #1;
        checks++;
        if (int'(lev[k]) != exp_ch[k][l]) begin
          failures++;
          $display("corner %0d level %0d: chose %0d, expected %0d", k, l, lev[k], exp_ch[k][l]);
        end
      end
      spread[k] = (8 + exp_ch[k][2]) - exp_ch[k][0];
      $display("corner %0d (Vth0 %0d mV, gap %0d mV): comparators %0d %0d %0d", k, VTH0[k], VGAP[k],
               exp_ch[k][0], 4 + exp_ch[k][1], 8 + exp_ch[k][2]);
    end
    // published nominal result: comparators 4, 7 (8 is equally close), 11
    checks += 3;
    if (exp_ch[0][0] != 4) failures++;
    if (exp_ch[0][1] != 3 && exp_ch[0][1] != 4) failures++;
    if (exp_ch[0][2] != 3) failures++;
    checks += 2;
    if (!(spread[1] < spread[0])) failures++;
    if (!(spread[2] > spread[0])) failures++;
    // S7 holds, then normal mode uses the stored channels
    repeat (10) @(negedge clk);
    mode = 0;
    @(negedge clk);
    checks++;
    if (st[0] != 3'(S_IDLE)) failures++;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      #1;
      for (int k = 0; k < NCORNER; k++)
        for (int l = 0; l < 3; l++) begin
          checks++;
          if (d[k][l] !== (int'(vin) > VTH0[k] + VGAP[k] * (4 * l + exp_ch[k][l]))) failures++;
        end
      checks++;
      if ($countones(cmp_en[0]) > 3) failures++;
    end
    // manual override: Auto = 0 selects the MS channels
    auto_sel = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      ms = 9'($urandom);
      #1;
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (d[0][l] !== (int'(vin) > 600 + 40 * (4 * l + int'(ms[3*l +: 3])))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
