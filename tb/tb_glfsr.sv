// tb_glfsr -- self-checking test of the generalized LFSR in its GLFSR(3,4)
// configuration.
// 1. After reset the register holds the all-ones seed, and the first 16
//    states match the known GLFSR(3,4) sequence.
// 2. The sequence has period 4095 and visits every non-zero 12-bit state.
// 3. With en_i low the state holds; load_i loads a seed.
// 4. Signature mode: random 3-bit symbols on sym_i are compacted and the
//    state is compared with the reference step every clock.
module tb_glfsr;
  import glfsr_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, en = 0;
  logic [11:0] seed = '0, st;
  logic [2:0]  sym = '0;
  int checks = 0, failures = 0;

  glfsr dut (.clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed), .en_i(en),
             .sym_i(sym), .state_o(st));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state=%b)", msg, st);
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
    logic [4095:0] seen;
    logic [11:0]   expv;
    int            period;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. known first states
    for (int i = 0; i < 16; i++) begin
      check(st == from_d0_first(FIRST_STATES[i]), $sformatf("state %0d", i));
      en = 1;
      @(negedge clk);
    end
    // 2. period
    en = 0; load = 1; seed = '1;
    @(negedge clk);
    load = 0; en = 1;
    seen = '0; period = 0;
    do begin
      seen[st] = 1'b1;
      @(negedge clk);
      period++;
    end while (st != 12'hFFF && period < 5000);
    check(period == 4095, $sformatf("period %0d", period));
    check(seen[0] == 1'b0 && seen[4095:1] == '1, "all non-zero states visited");
    // 3. hold and load
    en = 0;
    expv = st;
    repeat (3) @(negedge clk);
    check(st == expv, "hold with en low");
    seed = 12'h5A3; load = 1; en = 1;
    @(negedge clk);
    load = 0;
    check(st == 12'h5A3, "seed load has priority");
    // 4. signature mode against the reference
    expv = st;
    for (int i = 0; i < 300; i++) begin
      sym = 3'($urandom_range(0, 7));
      expv = glfsr_step(expv, sym);
      @(negedge clk);
      check(st == expv, $sformatf("signature step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
