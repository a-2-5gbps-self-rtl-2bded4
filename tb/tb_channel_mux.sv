// tb_channel_mux - exhaustive check of the 8-to-1 channel MUX: every input
// pattern and select, output and comparator power mask.
module tb_channel_mux;
  import pam4_pkg::*;
  logic [7:0] din, need;
  ch_t        sel;
  logic       dout;
  int checks = 0, failures = 0;

  channel_mux dut (.din, .sel, .dout, .need_cmp(need));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      for (int s = 0; s < 8; s++) begin
        din = 8'(p); sel = ch_t'(s);
        #1;
        checks += 2;
        if (dout !== ((p >> s) & 1)) begin
          failures++;
          if (failures < 10) $display("din=%h sel=%0d dout=%b", din, sel, dout);
        end
        if (need !== 8'(1 << s)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
