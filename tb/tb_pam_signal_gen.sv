// tb_pam_signal_gen - runs every pattern of the switching code table and
// checks the symbol against a copy of the LFSR bit stream, the decoder output
// one clock later, and that each pattern visits both of its levels (all four
// for 4-PAM).
module tb_pam_signal_gen;
  logic clk = 0, rst_n = 0, sw = 0;
  logic [1:0] s, sym, sym_d;
  logic [3:1] g;
  logic [15:0] lf;
  int checks = 0, failures = 0;

  pam_signal_gen dut (.clk, .rst_n, .sw, .s, .sym, .g);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 2'b00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    lf = 16'hACE1;
    // one clock edge passes before the first check
    lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
    sym_d = 'x;
    for (int p = 0; p < 5; p++) begin
      int hits [4];
      hits = '{default: 0};
      sw = (p != 0);
      s  = 2'(p - 1);
      for (int n = 0; n < 400; n++) begin
        int e;
        @(negedge clk);
        #1;
        if (!sw) e = int'(lf[1:0]);
        else case (s)
          2'b00: e = lf[0] ? 2 : 3;
          2'b01: e = lf[0] ? 1 : 2;
          2'b10: e = lf[0] ? 0 : 1;
          default: e = lf[0] ? 0 : 3;
        endcase
        checks++;
        if (int'(sym) != e) begin
          failures++;
          if (failures < 10) $display("p=%0d n=%0d sym=%0d exp=%0d", p, n, sym, e);
        end
        if (n > 0) begin
          checks++;
          if (g !== {sym_d == 2'd3, sym_d >= 2'd2, sym_d >= 2'd1}) failures++;
        end
        hits[e]++;
        sym_d = sym;
        @(posedge clk);
        lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
      end
      for (int k = 0; k < 4; k++) begin
        logic want;
        want = !sw ? 1'b1 :
               (s == 2'b00) ? (k == 2 || k == 3) :
               (s == 2'b01) ? (k == 1 || k == 2) :
               (s == 2'b10) ? (k == 0 || k == 1) : (k == 0 || k == 3);
        checks++;
        if ((hits[k] > 0) != want) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
