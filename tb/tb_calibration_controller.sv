// tb_calibration_controller - random inputs, every transition and every
// output compared with the state table written out as constants:
// next state per (present state, inputs) and the seven outputs per state.
module tb_calibration_controller;
  import pam4_pkg::*;
  logic clk = 0, rst_n = 0, mode = 0, t_up = 0, ch_end = 0, lev_end = 0;
  cal_state_e state;
  cal_ctrl_t  ctrl;
  int ps, checks = 0, failures = 0;
  int seen [8];
  // outputs per state, order Reset Reset_CH Reset_T CK_SW CMPR CH_in Lev_in
  localparam logic [6:0] OUT_TAB [8] = '{
    7'b0000000, 7'b1100000, 7'b0011000, 7'b0001000,
    7'b0000100, 7'b0000010, 7'b0100001, 7'b0000000 };

  calibration_controller dut (.clk, .rst_n, .mode, .t_up, .ch_end, .lev_end, .state, .ctrl);

  always #5 clk = ~clk;

  function automatic int next_of(int s, logic m, logic t, logic c, logic l);
    if (!m) return 0;
    case (s)
      0: return 1;
      1: return 2;
      2: return 3;
      3: return t ? 4 : 3;
      4: return 5;
      5: return c ? 6 : 2;
      6: return l ? 7 : 2;
      default: return 7;
    endcase
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ps = 0;
    seen = '{default: 0};
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks += 2;
      if (int'(state) != ps) begin
        failures++;
        if (failures < 10) $display("n=%0d state=%0d expected %0d", n, state, ps);
      end
      if (ctrl !== OUT_TAB[ps]) failures++;
      seen[ps]++;
      mode    = ($urandom_range(0, 49) != 0);
      t_up    = ($urandom_range(0, 3) == 0);
      ch_end  = ($urandom_range(0, 1) == 0);
      lev_end = ($urandom_range(0, 1) == 0);
      ps = next_of(ps, mode, t_up, ch_end, lev_end);
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("state %0d never reached", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
