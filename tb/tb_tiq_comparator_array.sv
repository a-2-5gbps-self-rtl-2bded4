// tb_tiq_comparator_array - checks the comparator bank model against the
// threshold rule Vth(i) = 600 mV + 40 mV * i, with random inputs and enables,
// plus a second instance with a wider threshold gap.
module tb_tiq_comparator_array;
  logic [10:0] vin;
  logic [15:0] en, cmp, cmp_w;
  int checks = 0, failures = 0;

  tiq_comparator_array dut (.vin_mv(vin), .en(en), .cmp(cmp));
  tiq_comparator_array #(.VTH0_MV(525), .VGAP_MV(50)) dut_w (.vin_mv(vin), .en(en), .cmp(cmp_w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      vin = 11'($urandom_range(500, 1300));
      en  = (n % 3 == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++) begin
        logic exp_t, exp_w;
        exp_t = en[i] && (int'(vin) > 600 + 40 * i);
        exp_w = en[i] && (int'(vin) > 525 + 50 * i);
        checks += 2;
        if (cmp[i] !== exp_t) begin
          failures++;
          if (failures < 10) $display("mismatch vin=%0d i=%0d got %b", vin, i, cmp[i]);
        end
        if (cmp_w[i] !== exp_w) failures++;
      end
    end
    // exact boundary: equal to threshold reads 0, one mV above reads 1
    en = '1; vin = 11'd880; #1;
    checks++; if (cmp[7] !== 1'b0 || cmp[6] !== 1'b1) failures++;
    vin = 11'd881; #1;
    checks++; if (cmp[7] !== 1'b1 || cmp[8] !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
