// tb_partial_products: exhaustive self-checking test of the partial-product
// matrix. For all 256 operand pairs, each of the 16 outputs pp[i][j] is
// compared with bit i of a times bit j of b, taken by shifting the operands.
// A watchdog ends the run with a failure if it hangs.
module tb_partial_products;
  import vedic_pkg::*;
  operand_t a, b;
  pp_t      pp;
  int checks = 0, failures = 0;

  partial_products dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++) begin
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (pp[i][j] !== 1'(((va >> i) & 1) * ((vb >> j) & 1))) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0d", va, vb, i, j, pp[i][j]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
