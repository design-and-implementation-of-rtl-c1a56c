// tb_four_bit_adder: exhaustive self-checking test of the four-input bit
// counter. For all 16 input patterns the outputs {c1,c2,s} must equal the
// number of ones in x (0 to 4), so c1 (weight 4) is set only by 4'b1111.
// A watchdog ends the run with a failure if it hangs.
module tb_four_bit_adder;
  logic [3:0] x;
  logic       s, c2, c1;
  int checks = 0, failures = 0;

  four_bit_adder dut (.x(x), .s(s), .c2(c2), .c1(c1));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      ones = 0;
      for (int k = 0; k < 4; k++) if (v[k]) ones++;
      checks++;
      if ({c1, c2, s} !== 3'(ones)) begin
        failures++;
        $display("FAIL x=%b got c1=%0d c2=%0d s=%0d, expected count %0d", x, c1, c2, s, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
