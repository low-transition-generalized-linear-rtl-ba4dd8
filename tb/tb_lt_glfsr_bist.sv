// tb_lt_glfsr_bist -- end-to-end test of the BIST core at its default size
// (GLFSR(3,4), 12-bit patterns, 3-bit responses).
// A small combinational function in this testbench stands in for the
// circuit under test. The test loads the all-ones seed and runs through a
// complete period of the generator (4095 full and 4095 intermediate patterns)
// with random pauses, then reloads a seed in the middle of a step. Every clock
// the applied pattern is compared with the reference GLFSR sequence (full and
// intermediate), and the signature with a reference compaction of the
// responses. Each mechanism is counted and must occur: seed load, intermediate
// pattern, full pattern, pause, restart in mid-step, wrap of the sequence.
module tb_lt_glfsr_bist;
  import glfsr_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, run = 0;
  logic [11:0] seed = '0, pat, sig;
  logic        inter;
  logic [2:0]  resp;
  int checks = 0, failures = 0;
  int n_load = 0, n_inter = 0, n_full = 0, n_pause = 0, n_midload = 0, n_wrap = 0;

  lt_glfsr_bist dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed), .run_i(run),
    .cut_pattern_o(pat), .pattern_inter_o(inter), .cut_resp_i(resp), .signature_o(sig)
  );

  // stand-in circuit under test
  always_comb begin
    resp[0] = ^(pat & 12'hA5C);
    resp[1] = (&pat[3:0]) ^ pat[11] ^ (pat[5] & pat[9]);
    resp[2] = pat[7] | (pat[2] & ~pat[10]);
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pattern=%h sig=%h)", msg, pat, sig);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [11:0] t_i, t_next, exp_pat, exp_sig;
  logic        exp_inter;

  task automatic do_load(input logic [11:0] s);
    seed = s; load = 1; run = 1;   // load wins over run
    @(negedge clk);
    load = 0;
    n_load++;
    t_i = s; exp_pat = s; exp_inter = 0; exp_sig = '0;
    check(pat == s && !inter && sig == '0, "seed load");
  endtask

  // one clock with run high: compact response, advance pattern
  task automatic run_clock();
    logic [2:0] r;
    run = 1;
    #1;
    r = resp;
    @(negedge clk);
    exp_sig = glfsr_step(exp_sig, r);
    if (!exp_inter) begin
      t_next = glfsr_step(t_i, 3'b000);
      exp_pat = (t_i & ~PART2_MASK) | (t_next & PART2_MASK);
      exp_inter = 1;
      n_inter++;
    end else begin
      exp_pat = t_next;
      t_i = t_next;
      exp_inter = 0;
      n_full++;
      if (t_i == 12'hFFF) n_wrap++;
    end
    check(pat == exp_pat, "pattern");
    check(inter == exp_inter, "intermediate flag");
    check(sig == exp_sig, "signature");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pat == 12'hFFF && sig == '0, "reset state");
    do_load(12'hFFF);
    for (int i = 0; i < 8190; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        run = 0;
        repeat ($urandom_range(1, 3)) begin
          @(negedge clk);
          n_pause++;
          check(pat == exp_pat && sig == exp_sig, "hold while paused");
        end
      end
      run_clock();
    end
    check(pat == 12'hFFF && n_full == 4095, "complete period");
    // reload in the middle of a step
    run_clock();
    if (exp_inter) n_midload++;
    do_load(12'h3A5);
    repeat (40) run_clock();
    run = 0;
    $display("mechanisms: load=%0d intermediate=%0d full=%0d pause_clocks=%0d midstep_reload=%0d wrap=%0d",
             n_load, n_inter, n_full, n_pause, n_midload, n_wrap);
    checks++; if (n_load == 0) failures++;
    checks++; if (n_inter == 0) failures++;
    checks++; if (n_full == 0) failures++;
    checks++; if (n_pause == 0) failures++;
    checks++; if (n_midload == 0) failures++;
    checks++; if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
