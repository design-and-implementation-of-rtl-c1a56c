// tb_vedic_mul4: end-to-end test of the 4x4 Vedic multiplier at its only
// size, all 256 operand pairs.
//
// Each product is compared with the integer a*b. The intermediate results of
// the column adders are also checked against the seven steps of the method,
// worked out here from the operand bits: step k adds all A_i*B_j with
// i+j = k-1. The column-3 adder's count must equal step 4, and the column
// sums plus carries must rebuild a*b. The test also counts how often each
// carry mechanism of the network fires (column-1 carry, column-2 second
// carry, the column-3 adder's weight-4 carry C1, the ripple carry into the
// S5 and S6 adders, and the final carry S7) and fails if one never does.
// The multiplier is combinational: outputs are sampled 1 time unit after
// the operands change. A watchdog ends the run with a failure if it hangs.
module tb_vedic_mul4;
  import vedic_pkg::*;
  operand_t a, b;
  product_t s;
  int checks = 0, failures = 0;
  int n_c0 = 0, n_c2ha = 0, n_c1 = 0, n_r4 = 0, n_r5 = 0, n_s7 = 0;

  vedic_mul4 dut (.a(a), .b(b), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL a=%0d b=%0d: %s", a, b, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step [7];
    int rebuilt;
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++) begin
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        // the seven vertical-and-crosswise steps
        foreach (step[k]) step[k] = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            step[i+j] += ((va >> i) & 1) & ((vb >> j) & 1);
        rebuilt = 0;
        foreach (step[k]) rebuilt += step[k] << k;

        check(int'(s) == va * vb, $sformatf("product %0d, expected %0d", s, va * vb));
        check(rebuilt == va * vb, "column steps do not rebuild a*b");
        check(int'({dut.cc1, dut.cc2, dut.s3}) == step[3],
              $sformatf("column-3 adder count %0d, step 4 gives %0d",
                        {dut.cc1, dut.cc2, dut.s3}, step[3]));
        check(s[0] == 1'(step[0]), "S0 is not step 1");

        if (dut.c0)    n_c0++;
        if (dut.c2_ha) n_c2ha++;
        if (dut.cc1)   n_c1++;
        if (dut.r4)    n_r4++;
        if (dut.r5)    n_r5++;
        if (s[7])      n_s7++;
      end

    $display("events: col1 carry=%0d col2 second carry=%0d col3 C1=%0d row carry into S5=%0d into S6=%0d S7=%0d",
             n_c0, n_c2ha, n_c1, n_r4, n_r5, n_s7);
    check(n_c0   > 0, "column-1 carry never set");
    check(n_c2ha > 0, "column-2 second carry never set");
    check(n_c1   > 0, "column-3 adder carry C1 never set");
    check(n_r4   > 0, "row carry into S5 never set");
    check(n_r5   > 0, "row carry into S6 never set");
    check(n_s7   > 0, "product bit S7 never set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
