// lt_glfsr_bist -- low-power BIST core: LT-GLFSR pattern generator plus a
// GLFSR signature analyser.
//
// The test pattern generator is the bipartite GLFSR (lt_glfsr) driven by the
// non-overlapping enables of lt_enable_gen. While run_i is high it produces
// one pattern per clock, alternating intermediate and full GLFSR patterns:
// T(0), T(0i), T(1), T(1i), T(2), ... Patterns leave on cut_pattern_o (bit k =
// register bit D_k) to the circuit under test, which is outside this block.
// DELTA outputs of that circuit come back on cut_resp_i and are folded, one
// symbol per clock, into a second GLFSR of the same field and polynomial used
// as a signature analyser; signature_o is its content.
//
// That the generator is the LT-GLFSR(3,4) and that a GLFSR with DELTA
// inputs serves as the signature analyser follow the document. The control
// (run_i, load_i, analyser cleared to zero on load, compaction of the
// response of every applied pattern, intermediate ones included) is this
// design's own.
//
// Timing: load_i (one clock) loads seed_i into the generator, clears the
// analyser and restarts the enable sequence at the intermediate step. In each
// clock with run_i high the analyser absorbs cut_resp_i, which must be the
// response to the pattern currently on cut_pattern_o, and the generator moves
// to the next pattern. pattern_inter_o flags intermediate patterns.
module lt_glfsr_bist #(
  parameter int unsigned        DELTA      = 3,
  parameter int unsigned        M          = 4,
  parameter logic [DELTA:0]     FIELD_POLY = 4'b1011,
  parameter logic [M*DELTA-1:0] PHI        = 12'b010_101_000_111,
  parameter logic [DELTA-1:0]   PART2_ROWS = 3'b100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_i,
  input  logic [M*DELTA-1:0] seed_i,
  input  logic               run_i,
  output logic [M*DELTA-1:0] cut_pattern_o,
  output logic               pattern_inter_o,
  input  logic [DELTA-1:0]   cut_resp_i,
  output logic [M*DELTA-1:0] signature_o
);
  logic en1, en2;
  logic sa_en;

  lt_enable_gen u_engen (
    .clk      (clk),
    .rst_n    (rst_n),
    .restart_i(load_i),
    .run_i    (run_i),
    .en1_o    (en1),
    .en2_o    (en2)
  );

  lt_glfsr #(
    .DELTA(DELTA), .M(M), .FIELD_POLY(FIELD_POLY), .PHI(PHI), .PART2_ROWS(PART2_ROWS)
  ) u_tpg (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_i   (load_i),
    .seed_i   (seed_i),
    .en1_i    (en1),
    .en2_i    (en2),
    .pattern_o(cut_pattern_o),
    .inter_o  (pattern_inter_o)
  );

  assign sa_en = run_i && !load_i;

  glfsr #(
    .DELTA(DELTA), .M(M), .FIELD_POLY(FIELD_POLY), .PHI(PHI), .RESET_SEED('0)
  ) u_sa (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (load_i),
    .seed_i ('0),
    .en_i   (sa_en),
    .sym_i  (cut_resp_i),
    .state_o(signature_o)
  );
endmodule
