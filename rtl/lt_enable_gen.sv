// lt_enable_gen -- the two non-overlapping enables of the low-transition GLFSR.
//
// The bipartite GLFSR advances one half of its flip-flops per clock. This
// block produces the two complementary enables that select the half:
// En1En2 = 01 (part 2 moves, an intermediate pattern appears) and
// En1En2 = 10 (part 1 moves, the next full GLFSR pattern appears), strictly
// alternating, so each enable is active every second clock, like the CLK/2 and
// shifted CLK/2 waveforms of the scheme. The order 01 then 10 follows the
// document's Step 1 / Step 2.
//
// A single phase flip-flop does the work. While run_i is low both enables are
// 0 and the phase holds, so a paused sequence resumes where it stopped;
// restart_i (given together with a seed load) returns to Step 1. The design
// uses the enables as synchronous clock enables on one clock rather than as
// two gated clocks; that, run_i and restart_i are this design's choices.
//
// Timing: en1_o/en2_o are combinational from run_i and the phase register.
module lt_enable_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic restart_i,
  input  logic run_i,
  output logic en1_o,
  output logic en2_o
);
  typedef enum logic {STEP1_PART2 = 1'b0, STEP2_PART1 = 1'b1} phase_e;

  phase_e phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase_q <= STEP1_PART2;
    else if (restart_i) phase_q <= STEP1_PART2;
    else if (run_i)     phase_q <= (phase_q == STEP1_PART2) ? STEP2_PART1 : STEP1_PART2;
  end

  always_comb begin
    en1_o = run_i && !restart_i && (phase_q == STEP2_PART1);
    en2_o = run_i && !restart_i && (phase_q == STEP1_PART2);
  end

  // the two enables never overlap
  a_non_overlap: assert property (@(posedge clk) !(en1_o && en2_o));
endmodule
