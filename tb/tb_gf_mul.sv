// tb_gf_mul -- exhaustive check of the GF(2^3) multiplier, p(x) = x^3 + x + 1.
// All 64 products are compared with a log/antilog-table reference. Also
// checks that alpha (010) generates all seven non-zero elements.
module tb_gf_mul;
  import glfsr_ref_pkg::*;
  logic [2:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mul #(.DELTA(3), .FIELD_POLY(4'b1011)) dut (.a_i(a), .b_i(b), .prod_o(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] pw;
    logic [7:0] seen;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (p !== gf_mul_ref(a, b)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, gf_mul_ref(a, b));
        end
      end
    end
    // powers of alpha through the DUT
    pw = 3'b001; seen = '0;
    for (int k = 0; k < 7; k++) begin
      seen[pw] = 1'b1;
      a = pw; b = 3'b010;
      #1;
      pw = p;
    end
    checks++;
    if (seen !== 8'hFE || pw !== 3'b001) begin
      failures++;
      $display("FAIL alpha does not generate the field: seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
