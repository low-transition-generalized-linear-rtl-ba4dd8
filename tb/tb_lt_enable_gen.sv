// tb_lt_enable_gen -- checks of the non-overlapping enable generator.
// After reset and while running, the enables alternate 01, 10, 01, ... starting
// with En1En2 = 01; they never overlap; with run low both are 0 and the phase
// is kept; restart returns to 01.
module tb_lt_enable_gen;
  logic clk = 0, rst_n = 0, restart = 0, run = 0;
  logic en1, en2;
  int checks = 0, failures = 0;
  int cycles_en1 = 0, cycles_en2 = 0;

  lt_enable_gen dut (.clk(clk), .rst_n(rst_n), .restart_i(restart), .run_i(run),
                     .en1_o(en1), .en2_o(en2));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s en1=%b en2=%b", msg, en1, en2);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_phase;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!en1 && !en2, "idle when not running");
    run = 1;
    exp_phase = 0;
    for (int i = 0; i < 40; i++) begin
      #1;
      check({en1, en2} == (exp_phase ? 2'b10 : 2'b01), $sformatf("cycle %0d", i));
      if (en1) cycles_en1++;
      if (en2) cycles_en2++;
      @(negedge clk);
      exp_phase = !exp_phase;
      if (i == 13) begin
        // pause for a few clocks: the phase must be kept
        run = 0;
        #1;
        check({en1, en2} == 2'b00, "paused");
        repeat (3) @(negedge clk);
        run = 1;
      end
    end
    check(cycles_en1 == 20 && cycles_en2 == 20, "each enable active every second clock");
    // restart in the middle of a step
    @(negedge clk);
    restart = 1;
    #1;
    check({en1, en2} == 2'b00, "no enable during restart");
    @(negedge clk);
    restart = 0;
    #1;
    check({en1, en2} == 2'b01, "restart returns to step 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
