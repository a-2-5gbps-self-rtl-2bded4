// tb_abs_offset_comparator - exhaustive count/target sweep with random minima:
// offset = count - target when count >= target, else target - count - 1
// (one's complement), zero when compare is low; Less/Equal/Greater against Q.
module tb_abs_offset_comparator;
  logic [6:0] count, target, min_q, offset;
  logic compare, less, equal, greater;
  int checks = 0, failures = 0;

  abs_offset_comparator dut (.count, .target, .min_q, .compare, .offset, .less, .equal, .greater);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      for (int t = 0; t < 128; t++) begin
        int exp_off;
        count = 7'(c); target = 7'(t);
        compare = ($urandom_range(0, 7) != 0);
        min_q = (t % 4 == 0) ? 7'((c >= t) ? c - t : t - c - 1) : 7'($urandom);
        #1;
        exp_off = !compare ? 0 : (c >= t) ? c - t : t - c - 1;
        checks += 2;
        if (int'(offset) != exp_off) begin
          failures++;
          if (failures < 10) $display("c=%0d t=%0d off=%0d exp=%0d", c, t, offset, exp_off);
        end
        if (less !== (exp_off < int'(min_q)) || equal !== (exp_off == int'(min_q)) ||
            greater !== (exp_off > int'(min_q))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
