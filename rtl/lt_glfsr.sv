// lt_glfsr -- low-transition (bipartite) GLFSR test pattern generator.
//
// A GLFSR over GF(2^DELTA) with M stages (default GLFSR(3,4): 12 bits,
// p(x) = x^3 + x + 1, phi(x) = x^4 + alpha x^3 + alpha^6 x^2 + alpha^5) whose
// flip-flops are split into two parts with separate enables. Part 2 is the
// set of bit rows selected by PART2_ROWS (default row 2: D2, D5, D8, D11);
// part 1 is the rest (D0, D1, D3, D4, D6, D7, D9, D10). One GLFSR step
// T(i) -> T(i+1) is done in two clocks:
//   en2_i (En1En2 = 01): part 2 takes its next-state value, part 1 holds;
//                        the output is the intermediate pattern T(i1).
//   en1_i (En1En2 = 10): part 1 takes its next-state value, part 2 holds;
//                        the output is the full pattern T(i+1).
// Each intermediate pattern shares its part-1 bits with T(i) and its part-2
// bits with T(i+1), so no more bits toggle per clock than the part has.
//
// Next-state bits depend on the other part only through the feedback symbol
// (the last stage). Shadow flip-flops on the last stage keep the feedback of
// the step valid although half of it has already moved: the part-2 feedback
// bit (D11) is saved when part 2 moves and used when part 1 moves; the part-1
// feedback bits (D9, D10) are saved when part 1 moves and used when part 2
// moves. So every second pattern is exactly the plain GLFSR sequence.
// This split, the order of the two steps and the shadow registers follow the
// document. That a bit row is wholly in one part is what makes shifts stay
// inside a part; the parameterisation by rows, the all-ones reset value, the
// seed load (priority over the enables) and the inter_o flag are this design's
// own.
//
// Interface: en1_i and en2_i must not be high together (asserted). pattern_o
// (bit k = D_k) is registered and changes one clock after an enable.
// inter_o is 1 while pattern_o holds an intermediate pattern.
module lt_glfsr #(
  parameter int unsigned        DELTA      = 3,
  parameter int unsigned        M          = 4,
  parameter logic [DELTA:0]     FIELD_POLY = 4'b1011,
  parameter logic [M*DELTA-1:0] PHI        = 12'b010_101_000_111,
  parameter logic [DELTA-1:0]   PART2_ROWS = 3'b100,
  parameter logic [M*DELTA-1:0] RESET_SEED = '1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_i,
  input  logic [M*DELTA-1:0] seed_i,
  input  logic               en1_i,
  input  logic               en2_i,
  output logic [M*DELTA-1:0] pattern_o,
  output logic               inter_o
);
  typedef logic [DELTA-1:0] elem_t;

  localparam elem_t P2 = PART2_ROWS;
  localparam elem_t P1 = ~PART2_ROWS;

  elem_t stage_q [M];
  elem_t stage_d [M];
  elem_t fb_mul  [M];
  elem_t shadow_q;   // shaded flip-flops: saved copy of the last stage
  elem_t fb;         // feedback symbol of the step in progress
  logic  inter_q;

  // Part 2 moves first, so while it moves part 1's feedback bits are current;
  // while part 1 moves, part 2's feedback bits come from the shadow.
  always_comb begin
    if (en2_i) fb = (stage_q[M-1] & P2) | (shadow_q & P1);
    else       fb = (stage_q[M-1] & P1) | (shadow_q & P2);
  end

  for (genvar i = 0; i < M; i++) begin : g_stage
    gf_mul #(.DELTA(DELTA), .FIELD_POLY(FIELD_POLY)) u_mul (
      .a_i(fb), .b_i(PHI[i*DELTA +: DELTA]), .prod_o(fb_mul[i])
    );
    if (i == 0) begin : g_first
      assign stage_d[0] = fb_mul[0];
    end else begin : g_rest
      gf_add #(.DELTA(DELTA)) u_add (.a_i(fb_mul[i]), .b_i(stage_q[i-1]), .sum_o(stage_d[i]));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      stage_q[i] <= RESET_SEED[i*DELTA +: DELTA];
      else if (load_i) stage_q[i] <= seed_i[i*DELTA +: DELTA];
      else if (en2_i)  stage_q[i] <= (stage_d[i] & P2) | (stage_q[i] & P1);
      else if (en1_i)  stage_q[i] <= (stage_d[i] & P1) | (stage_q[i] & P2);
    end

    assign pattern_o[i*DELTA +: DELTA] = stage_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow_q <= RESET_SEED[(M-1)*DELTA +: DELTA];
      inter_q  <= 1'b0;
    end else if (load_i) begin
      shadow_q <= seed_i[(M-1)*DELTA +: DELTA];
      inter_q  <= 1'b0;
    end else if (en2_i) begin
      // save the part-2 feedback bits before they move
      shadow_q <= (stage_q[M-1] & P2) | (shadow_q & P1);
      inter_q  <= 1'b1;
    end else if (en1_i) begin
      // save the part-1 feedback bits as they move
      shadow_q <= (stage_d[M-1] & P1) | (shadow_q & P2);
      inter_q  <= 1'b0;
    end
  end

  assign inter_o = inter_q;

  a_non_overlap: assert property (@(posedge clk) !(en1_i && en2_i));
endmodule
