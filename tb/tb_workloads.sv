// tb_workloads -- runs the BIST core for the test lengths of four benchmark
// experiments (ISCAS'89 s344, s298, s386, s526) and reports the switching
// activity of the applied patterns.
// The benchmark netlists are not modelled; a small stand-in function is the
// circuit under test. For each test length N (number of LT-GLFSR patterns:
// 32, 12, 79, 197) the core is loaded with the all-ones seed and run N
// clocks. Checked every clock: the pattern against the reference sequence, at
// most 4 bit changes when an intermediate pattern is applied and at most 8
// when a full one is, and the signature against a reference compaction.
// Reported: peak and average bit changes per applied pattern, against those
// of the plain GLFSR(3,4) run for the same number of patterns.
module tb_workloads;
  import glfsr_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, run = 0;
  logic [11:0] seed = '0, pat, sig;
  logic        inter;
  logic [2:0]  resp;
  int checks = 0, failures = 0;

  localparam int NW = 4;
  localparam string NAMES [NW] = '{"s344", "s298", "s386", "s526"};
  localparam int    LT_N  [NW] = '{32, 12, 79, 197};

  lt_glfsr_bist dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed), .run_i(run),
    .cut_pattern_o(pat), .pattern_inter_o(inter), .cut_resp_i(resp), .signature_o(sig)
  );

  always_comb begin
    resp[0] = ^(pat & 12'h3C9);
    resp[1] = (pat[0] & pat[6]) ^ pat[11];
    resp[2] = |(pat[7:4] & ~pat[3:0]);
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pattern=%h)", msg, pat);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      logic [11:0] t_i, t_next, exp_pat, prev, exp_sig, g;
      logic        exp_inter;
      int lt_peak, g_peak, lt_sum, g_sum, tr;
      lt_peak = 0; g_peak = 0; lt_sum = 0; g_sum = 0;
      @(negedge clk);
      seed = 12'hFFF; load = 1;
      @(negedge clk);
      load = 0;
      t_i = 12'hFFF; exp_pat = t_i; exp_inter = 0; exp_sig = '0; g = 12'hFFF;
      for (int n = 0; n < LT_N[w]; n++) begin
        logic [2:0] r;
        run = 1;
        #1;
        r = resp;
        prev = pat;
        @(negedge clk);
        exp_sig = glfsr_step(exp_sig, r);
        if (!exp_inter) begin
          t_next = glfsr_step(t_i, 3'b000);
          exp_pat = (t_i & ~PART2_MASK) | (t_next & PART2_MASK);
        end else begin
          exp_pat = t_next;
          t_i = t_next;
        end
        exp_inter = !exp_inter;
        tr = popcount12(pat ^ prev);
        check(pat == exp_pat && sig == exp_sig && inter == exp_inter, $sformatf("%s pattern %0d", NAMES[w], n));
        check(tr <= (exp_inter ? 4 : 8), "bit changes within the active part");
        lt_sum += tr;
        if (tr > lt_peak) lt_peak = tr;
        // plain GLFSR for the same number of applied patterns
        tr = popcount12(glfsr_step(g, 3'b000) ^ g);
        g = glfsr_step(g, 3'b000);
        g_sum += tr;
        if (tr > g_peak) g_peak = tr;
      end
      run = 0;
      $display("%s: %0d patterns in %0d clocks; bit changes per pattern LT-GLFSR peak %0d avg %0.2f, GLFSR peak %0d avg %0.2f; signature %h",
               NAMES[w], LT_N[w], LT_N[w], lt_peak, real'(lt_sum) / LT_N[w],
               g_peak, real'(g_sum) / LT_N[w], sig);
      check(lt_peak <= g_peak, "peak not above plain GLFSR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
