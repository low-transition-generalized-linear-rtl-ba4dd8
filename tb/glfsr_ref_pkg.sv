// glfsr_ref_pkg -- reference model for the GLFSR(3,4) testbenches.
//
// Independent of the RTL: GF(2^3) products are taken through log/antilog
// tables of alpha (alpha^3 = alpha + 1), not by shift-and-add, and the register
// step is written per stage from phi(x) = x^4 + alpha x^3 + alpha^6 x^2 +
// alpha^5. Also holds the first 16 states of GLFSR(3,4) from the all-ones
// seed, written D0 first (leftmost digit = flip-flop D0), and helpers.
package glfsr_ref_pkg;
  // alpha^k for k = 0..6
  localparam logic [2:0] ANTILOG [7] = '{3'b001, 3'b010, 3'b100, 3'b011, 3'b110, 3'b111, 3'b101};

  function automatic int unsigned gf_log(input logic [2:0] a);
    for (int k = 0; k < 7; k++) if (ANTILOG[k] == a) return k;
    return 0;
  endfunction

  function automatic logic [2:0] gf_mul_ref(input logic [2:0] a, input logic [2:0] b);
    if (a == 0 || b == 0) return 3'b000;
    return ANTILOG[(gf_log(a) + gf_log(b)) % 7];
  endfunction

  // phi_i as powers of alpha; -1 means zero coefficient
  localparam int PHI_EXP [4] = '{5, -1, 6, 1};

  function automatic logic [2:0] coef(input int i);
    return (PHI_EXP[i] < 0) ? 3'b000 : ANTILOG[PHI_EXP[i]];
  endfunction

  // one GLFSR step with input symbol sym (0 for pattern generation)
  function automatic logic [11:0] glfsr_step(input logic [11:0] s, input logic [2:0] sym);
    logic [11:0] n;
    logic [2:0]  fb;
    fb = s[11:9];
    n[2:0] = gf_mul_ref(fb, coef(0)) ^ sym;
    for (int i = 1; i < 4; i++) n[i*3 +: 3] = s[(i-1)*3 +: 3] ^ gf_mul_ref(fb, coef(i));
    return n;
  endfunction

  // state written D0..D11 left to right -> vector with bit k = D_k
  function automatic logic [11:0] from_d0_first(input logic [11:0] w);
    logic [11:0] r;
    for (int k = 0; k < 12; k++) r[k] = w[11-k];
    return r;
  endfunction

  // first 16 states of GLFSR(3,4) from the all-ones seed, D0 first
  localparam logic [11:0] FIRST_STATES [16] = '{
    12'b1111_1111_1111, 12'b1101_1110_0010, 12'b1011_1001_1101, 12'b0111_0100_1111,
    12'b1100_1111_0100, 12'b1111_1011_0100, 12'b1111_1101_1100, 12'b1111_1101_0001,
    12'b1001_1110_1100, 12'b1111_0001_0111, 12'b1101_1111_1111, 12'b1101_1010_0010,
    12'b1011_1001_0101, 12'b0111_0100_1110, 12'b0100_1110_0010, 12'b1010_1011_1101};

  // bits of part 2 (row 2: D2, D5, D8, D11)
  localparam logic [11:0] PART2_MASK = 12'b1001_0010_0100;

  function automatic int unsigned popcount12(input logic [11:0] v);
    int unsigned c = 0;
    for (int k = 0; k < 12; k++) c += v[k];
    return c;
  endfunction
endpackage
