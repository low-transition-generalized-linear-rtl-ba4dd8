// gf_mul -- multiplier over GF(2^DELTA), polynomial basis.
//
// Computes prod = a * b mod p(x), where p(x) is the field polynomial given as
// FIELD_POLY (bit i = coefficient of x^i, bit DELTA must be set). The default
// p(x) = x^3 + x + 1 is the primitive polynomial of GF(2^3) that the GLFSR(3,4)
// test pattern generator is built on. The product is formed by shift-and-add:
// for each set bit of b the correspondingly shifted a is accumulated, and
// after every shift the x^DELTA term is folded back with p(x).
//
// Interface: a_i, b_i -> prod_o (DELTA bits each), purely combinational.
// Inside the GLFSR b_i is a constant feedback coefficient, and synthesis
// reduces the block to the few XOR gates seen in the register's feedback.
// The field and its polynomial follow the document; the shift-and-add form is
// this design's choice.
module gf_mul #(
  parameter int unsigned   DELTA      = 3,
  parameter logic [DELTA:0] FIELD_POLY = 4'b1011
) (
  input  logic [DELTA-1:0] a_i,
  input  logic [DELTA-1:0] b_i,
  output logic [DELTA-1:0] prod_o
);
  logic [DELTA-1:0] acc;
  logic [DELTA-1:0] sh;   // a * x^i mod p(x)

  always_comb begin
    acc = '0;
    sh  = a_i;
    for (int i = 0; i < DELTA; i++) begin
      if (b_i[i]) acc = acc ^ sh;
      // multiply sh by x and reduce
      sh = (sh << 1) ^ (sh[DELTA-1] ? FIELD_POLY[DELTA-1:0] : '0);
    end
    prod_o = acc;
  end
endmodule
