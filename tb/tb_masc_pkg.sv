// tb_masc_pkg: checks the constants and functions of masc_pkg against the
// figures they encode: exact refresh periods of 7, 5 and 4 searches for 2-,
// 4- and 8-bit blocks, relaxed periods two and four searches longer, the
// age thresholds of the sense tolerance, and the FPU key widths.
module tb_masc_pkg;
  import masc_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ep [3];
    int bw [3];
    ep = '{7, 5, 4};
    bw = '{2, 4, 8};
    for (int i = 0; i < 3; i++) begin
      expect_eq($sformatf("exact_period(%0d)", bw[i]), int'(exact_period(bw[i])), ep[i]);
      expect_eq("period exact", int'(refresh_period(bw[i], APPROX_EXACT)), ep[i]);
      expect_eq("period 1-HD", int'(refresh_period(bw[i], APPROX_1HD)), ep[i] + 2);
      expect_eq("period 2-HD", int'(refresh_period(bw[i], APPROX_2HD)), ep[i] + 4);
      for (int a = 1; a < 16; a++) begin
        int exp;
        exp = (a <= ep[i]) ? 0 : (a <= ep[i] + 2) ? 1 : 2;
        expect_eq($sformatf("tolerance(%0d, age %0d)", bw[i], a),
                  int'(sense_tolerance(bw[i], AGE_W'(a))), exp);
      end
    end
    expect_eq("ADD key", int'(fpu_key_w(FPU_ADD)), 64);
    expect_eq("MUL key", int'(fpu_key_w(FPU_MUL)), 64);
    expect_eq("SQRT key", int'(fpu_key_w(FPU_SQRT)), 32);
    expect_eq("MAD key", int'(fpu_key_w(FPU_MAD)), 96);
    expect_eq("NUM_FPU", int'(NUM_FPU), 4);
    expect_eq("OPERAND_W", int'(OPERAND_W), 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
