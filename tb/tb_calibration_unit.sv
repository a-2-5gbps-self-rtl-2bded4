// tb_calibration_unit - feeds the calibration circuit a synthetic ADC whose
// channel (L, c) produces a 128-periodic sample stream with exactly
// ones[L][c] ones per period, so any 128-sample window counts ones[L][c].
// The expected result per level is the first channel with the smallest
// one's-complement offset from 96 / 64 / 32.  Also checks the calibration time
// (3172 clocks from S1 to S7), the hold in S7, and abort by Mode = 0.
module tb_calibration_unit;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, mode = 0, upd;
  logic [2:0] q, cal_lev_sel;
  cal_state_e state;
  ch_t [2:0]  regs;
  ch_t        cal_ch;
  int ones [3][8];
  int phase;
  int checks = 0, failures = 0;

  calibration_unit dut (.clk, .rst_n, .mode, .q, .state, .regs, .cal_lev_sel, .cal_ch, .upd);

  always #5 clk = ~clk;

  // synthetic sampled ADC output
  always @(negedge clk) begin
    phase = (phase + 1) % 128;
    q = '0;
    for (int l = 0; l < 3; l++)
      if (cal_lev_sel[l]) q[l] = (phase < ones[l][int'(cal_ch)]);
  end

  function automatic int offs(int c, int t);
    return (c >= t) ? c - t : t - c - 1;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = 0; q = '0;
    ones = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    checks++;
    if (regs !== {3{ch_t'(3)}}) failures++;
    for (int run = 0; run < 6; run++) begin
      int cyc, exp_ch [3];
      for (int l = 0; l < 3; l++)
        for (int c = 0; c < 8; c++)
          ones[l][c] = (run == 0) ? 64 : (run == 1) ? 127 - 16 * c : $urandom_range(0, 127);
      for (int l = 0; l < 3; l++) begin
        int best, tgt;
        tgt = 96 - 32 * l; best = 1000; exp_ch[l] = 0;
        for (int c = 0; c < 8; c++)
          if (offs(ones[l][c], tgt) < best) begin best = offs(ones[l][c], tgt); exp_ch[l] = c; end
      end
      @(negedge clk); mode = 1;
      @(negedge clk);
      checks++;
      if (state != S_INIT) failures++;
      cyc = 0;
      while (state != S_DONE && cyc < 5000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3172) begin
        failures++;
        $display("run %0d: calibration took %0d clocks", run, cyc);
      end
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (int'(regs[l]) != exp_ch[l]) begin
          failures++;
          $display("run %0d level %0d: got ch %0d expected %0d", run, l, regs[l], exp_ch[l]);
        end
      end
      repeat (20) @(negedge clk);
      checks++;
      if (state != S_DONE) failures++;
      mode = 0;
      @(negedge clk);
      checks++;
      if (state != S_IDLE) failures++;
    end
    // abort: Mode back to 0 in the middle of a calibration
    mode = 1;
    repeat (700) @(negedge clk);
    mode = 0;
    @(negedge clk);
    checks += 2;
    if (state != S_IDLE) failures++;
    if (cal_lev_sel != 3'b000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
