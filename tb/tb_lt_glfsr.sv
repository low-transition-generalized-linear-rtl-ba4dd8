// tb_lt_glfsr -- self-checking test of the bipartite (low-transition) GLFSR.
// Enables are driven 01, 10, 01, ... as the scheme requires. Checked:
//  - every second pattern (after En1En2 = 10) is the plain GLFSR(3,4) state:
//    the first 16 against the known sequence, then against the reference
//    model over a whole period (8190 clocks), after which the seed returns;
//  - every intermediate pattern takes its part-1 bits (D0,D1,D3,D4,D6,D7,D9,
//    D10) from T(i) and its part-2 bits (D2,D5,D8,D11) from T(i+1);
//  - bit changes per clock: at most 4 in the part-2 clock, at most 8 in the
//    part-1 clock, and their sum equals the change of the plain GLFSR step;
//  - inter_o, hold with both enables low, seed load.
module tb_lt_glfsr;
  import glfsr_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, en1 = 0, en2 = 0;
  logic [11:0] seed = '0, pat;
  logic        inter;
  int checks = 0, failures = 0;
  int max_tr_inter = 0, max_tr_full = 0, max_tr_glfsr = 0;
  longint sum_tr_lt = 0, sum_tr_glfsr = 0;

  lt_glfsr dut (.clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed),
                .en1_i(en1), .en2_i(en2), .pattern_o(pat), .inter_o(inter));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pattern=%b)", msg, pat);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] t_i, t_next, expv;
    int tr1, tr2, trg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pat == 12'hFFF && !inter, "reset to all-ones seed");
    t_i = pat;
    for (int i = 0; i < 4095; i++) begin
      t_next = glfsr_step(t_i, 3'b000);
      if (i < 15) check(t_next == from_d0_first(FIRST_STATES[i+1]), "reference model sequence");
      // Step 1: En1En2 = 01
      en2 = 1; en1 = 0;
      @(negedge clk);
      expv = (t_i & ~PART2_MASK) | (t_next & PART2_MASK);
      check(pat == expv, $sformatf("intermediate pattern %0d", i));
      check(inter, "inter_o set on intermediate pattern");
      tr1 = popcount12(pat ^ t_i);
      // Step 2: En1En2 = 10
      en2 = 0; en1 = 1;
      @(negedge clk);
      check(pat == t_next, $sformatf("full pattern %0d", i + 1));
      check(!inter, "inter_o clear on full pattern");
      tr2 = popcount12(pat ^ expv);
      trg = popcount12(t_next ^ t_i);
      check(tr1 <= 4 && tr2 <= 8 && tr1 + tr2 == trg, "transition bound");
      if (tr1 > max_tr_inter) max_tr_inter = tr1;
      if (tr2 > max_tr_full) max_tr_full = tr2;
      if (trg > max_tr_glfsr) max_tr_glfsr = trg;
      sum_tr_lt += tr1 + tr2;
      sum_tr_glfsr += trg;
      t_i = t_next;
    end
    check(pat == 12'hFFF, "seed returns after 4095 full patterns");
    // hold
    en1 = 0; en2 = 0;
    repeat (3) @(negedge clk);
    check(pat == 12'hFFF, "hold with both enables low");
    // seed load, then one step from that seed
    seed = 12'h2C7; load = 1;
    @(negedge clk);
    load = 0;
    check(pat == 12'h2C7 && !inter, "seed load");
    en2 = 1; @(negedge clk);
    en2 = 0; en1 = 1; @(negedge clk);
    en1 = 0;
    check(pat == glfsr_step(12'h2C7, 3'b000), "step from loaded seed");
    $display("peak bit changes per clock: LT-GLFSR part2 %0d, part1 %0d; plain GLFSR %0d",
             max_tr_inter, max_tr_full, max_tr_glfsr);
    $display("average changes per full step: %0.3f (same for both)", real'(sum_tr_lt) / 4095.0);
    check(sum_tr_lt == sum_tr_glfsr, "total transitions equal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
