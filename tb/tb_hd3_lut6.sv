// tb_hd3_lut6: exhaustive test of the 3-bit XOR/full-adder cell. For all 64
// operand pairs, sum + 2*carry must equal the number of differing bits.
module tb_hd3_lut6;
  logic [2:0] a, b;
  logic sum, carry;
  int checks = 0, failures = 0;
  hd3_lut6 dut (.a, .b, .sum, .carry);
  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        int exp_d;
        a = 3'(i); b = 3'(j);
        #1;
        exp_d = 0;
        for (int k = 0; k < 3; k++) if (((i >> k) & 1) != ((j >> k) & 1)) exp_d++;
        checks++;
        if (int'(sum) + 2 * int'(carry) != exp_d) begin
          failures++;
          $display("FAIL a=%0d b=%0d sum=%0d carry=%0d exp=%0d", i, j, sum, carry, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
