// tb_gf_add -- exhaustive check of the GF(2^3) adder.
// Every pair (a, b) is applied; the sum must satisfy the field rules checked
// here through the antilog table: a + a = 0, a + 0 = a, and for non-zero
// operands alpha^i + alpha^j equals the bit-by-bit sum modulo 2.
module tb_gf_add;
  import glfsr_ref_pkg::*;
  logic [2:0] a, b, s;
  int checks = 0, failures = 0;

  gf_add #(.DELTA(3)) dut (.a_i(a), .b_i(b), .sum_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        logic [2:0] exp_s;
        a = 3'(i); b = 3'(j);
        #1;
        for (int k = 0; k < 3; k++) exp_s[k] = ((a[k] + b[k]) % 2) == 1;
        checks++;
        if (s !== exp_s) begin
          failures++;
          $display("FAIL %0d + %0d = %0d, expected %0d", a, b, s, exp_s);
        end
        if (i == j) begin
          checks++;
          if (s !== 3'b000) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
