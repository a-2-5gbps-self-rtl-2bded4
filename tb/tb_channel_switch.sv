// tb_channel_switch - random register, counter, Auto, MS and LS values
// against a model of the switch rows and the Lev readout.
module tb_channel_switch;
  import pam4_pkg::*;
  ch_t  [2:0] regs, sel;
  logic [2:0] cal_lev_sel;
  ch_t        cal_ch, lev_out;
  logic       auto_sel;
  logic [8:0] ms;
  logic [1:0] ls;
  int checks = 0, failures = 0;

  channel_switch dut (.regs, .cal_lev_sel, .cal_ch, .auto_sel, .ms, .ls, .sel, .lev_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      regs = 9'($urandom); cal_ch = ch_t'($urandom); ms = 9'($urandom);
      ls = 2'($urandom); auto_sel = 1'($urandom);
      cal_lev_sel = ($urandom_range(0, 3) == 3) ? 3'b000 : 3'(1 << $urandom_range(0, 2));
      #1;
      for (int l = 0; l < 3; l++) begin
        int e;
        e = !auto_sel ? int'(ms[3*l +: 3]) : cal_lev_sel[l] ? int'(cal_ch) : int'(regs[l]);
        checks++;
        if (int'(sel[l]) != e) failures++;
      end
      checks++;
      if (int'(lev_out) != ((ls == 3) ? 0 : int'(regs[ls]))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
