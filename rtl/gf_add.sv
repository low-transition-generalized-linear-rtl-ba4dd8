// gf_add -- adder over GF(2^DELTA).
//
// Two field elements in polynomial basis (bit i is the coefficient of
// alpha^i) are added. In a field of characteristic two that is a bitwise XOR,
// so the block is DELTA two-input XOR gates and has no clock.
// This is the "GF(2^delta) adder" symbol of the generalized LFSR; the document
// only names it, the XOR realisation is the standard one.
//
// Interface: a_i, b_i -> sum_o, all DELTA bits, purely combinational.
module gf_add #(
  parameter int unsigned DELTA = 3
) (
  input  logic [DELTA-1:0] a_i,
  input  logic [DELTA-1:0] b_i,
  output logic [DELTA-1:0] sum_o
);
  always_comb sum_o = a_i ^ b_i;
endmodule
