// glfsr -- generalized linear feedback shift register over GF(2^DELTA).
//
// M stages D_0..D_{M-1}, each one element of GF(2^DELTA) held in DELTA
// flip-flops, so the register is N = M*DELTA bits wide. On every enabled
// clock the last stage fb = D_{M-1} is fed back to all stages through constant
// multipliers phi_i (Galois form):
//     D_0 <= fb*phi_0 + sym_i
//     D_i <= D_{i-1} + fb*phi_i        (i = 1..M-1)
// With sym_i = 0 and a primitive feedback polynomial
// phi(x) = x^M + phi_{M-1} x^{M-1} + ... + phi_0 over GF(2^DELTA) the register
// walks through all 2^N - 1 non-zero states and serves as a test pattern
// generator; with the delta outputs of a circuit under test on sym_i it
// compacts them into a signature.
//
// Defaults: GLFSR(3,4), GF(2^3) with p(x) = x^3 + x + 1, and
// phi(x) = x^4 + alpha x^3 + alpha^6 x^2 + alpha^5, i.e. phi_3 = alpha (010),
// phi_2 = alpha^6 (101), phi_1 = 0, phi_0 = alpha^5 (111). The structure,
// field and polynomial follow the document. Bit k of state_o is flip-flop D_k
// (stage k/DELTA, coefficient of x^(k%DELTA)). Reset value, seed load and the
// enable are this design's choices: reset loads all ones (the seed the
// document uses), load_i loads seed_i and has priority over en_i.
//
// Timing: state_o is registered; it changes one clock after en_i or load_i.
module glfsr #(
  parameter int unsigned       DELTA      = 3,
  parameter int unsigned       M          = 4,
  parameter logic [DELTA:0]    FIELD_POLY = 4'b1011,
  // phi_i is PHI[i*DELTA +: DELTA]
  parameter logic [M*DELTA-1:0] PHI       = 12'b010_101_000_111,
  parameter logic [M*DELTA-1:0] RESET_SEED = '1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_i,
  input  logic [M*DELTA-1:0]   seed_i,
  input  logic                 en_i,
  input  logic [DELTA-1:0]     sym_i,
  output logic [M*DELTA-1:0]   state_o
);
  typedef logic [DELTA-1:0] elem_t;

  elem_t stage_q [M];
  elem_t stage_d [M];
  elem_t fb_mul  [M];
  elem_t fb;

  assign fb = stage_q[M-1];

  for (genvar i = 0; i < M; i++) begin : g_stage
    gf_mul #(.DELTA(DELTA), .FIELD_POLY(FIELD_POLY)) u_mul (
      .a_i(fb), .b_i(PHI[i*DELTA +: DELTA]), .prod_o(fb_mul[i])
    );
    if (i == 0) begin : g_first
      gf_add #(.DELTA(DELTA)) u_add (.a_i(fb_mul[0]), .b_i(sym_i), .sum_o(stage_d[0]));
    end else begin : g_rest
      gf_add #(.DELTA(DELTA)) u_add (.a_i(fb_mul[i]), .b_i(stage_q[i-1]), .sum_o(stage_d[i]));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      stage_q[i] <= RESET_SEED[i*DELTA +: DELTA];
      else if (load_i) stage_q[i] <= seed_i[i*DELTA +: DELTA];
      else if (en_i)   stage_q[i] <= stage_d[i];
    end

    assign state_o[i*DELTA +: DELTA] = stage_q[i];
  end
endmodule
