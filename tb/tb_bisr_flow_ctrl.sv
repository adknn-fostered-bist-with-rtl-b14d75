// tb_bisr_flow_ctrl: drives the flow controller with small behavioural
// stand-ins for the test controller, recorder and repair analyzer, and checks
// the sequence of launches and clears and the result for each outcome: clean
// memory, repaired memory, analyzer out of spares, fault-table overflow and
// a failing re-test; also soft reset.
module tb_bisr_flow_ctrl;
  logic clk = 0, rst_n = 0, soft_reset = 0, start = 0;
  logic test_start, test_done, rec_clear, rl_clear, alloc_start, alloc_done;
  logic rec_any_fail, rec_overflow, alloc_repairable;
  logic busy, done, pass1_failed, in_retest;
  logic [1:0] result;
  int checks = 0, failures = 0;

  bisr_flow_ctrl dut (.clk, .rst_n, .soft_reset, .start, .test_start, .test_done, .rec_clear,
    .rec_any_fail, .rec_overflow, .rl_clear, .alloc_start, .alloc_done, .alloc_repairable,
    .busy, .done, .result, .pass1_failed, .in_retest);

  always #5 clk = ~clk;

  // stand-ins: a test takes 20 clocks, the analysis 5
  logic fail_pass1 = 0, fail_pass2 = 0, ovf = 0, rep = 1;
  int tests = 0, allocs = 0, rl_clears = 0, rec_clears = 0, tcnt = 0, acnt = 0;
  always_ff @(posedge clk) begin
    if (test_start) begin tests <= tests + 1; tcnt <= 20; end
    else if (tcnt > 0) tcnt <= tcnt - 1;
    if (alloc_start) begin allocs <= allocs + 1; acnt <= 5; end
    else if (acnt > 0) acnt <= acnt - 1;
    if (rl_clear) rl_clears <= rl_clears + 1;
    if (rec_clear) rec_clears <= rec_clears + 1;
  end
  assign test_done        = (tcnt == 0);
  assign alloc_done       = (acnt == 0);
  assign rec_any_fail     = (tests >= 2) ? fail_pass2 : fail_pass1;
  assign rec_overflow     = ovf;
  assign alloc_repairable = rep;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic flow(input logic f1, input logic f2, input logic o, input logic r,
                      input logic [1:0] exp_res, input int exp_tests, input int exp_allocs, input string name);
    int cyc = 0;
    fail_pass1 = f1; fail_pass2 = f2; ovf = o; rep = r;
    tests = 0; allocs = 0; rl_clears = 0; rec_clears = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(busy, {name, ": busy"});
    while (!done && cyc < 500) begin
      @(negedge clk); cyc++;
      if (in_retest) chk(allocs == 1, {name, ": retest only after analysis"});
    end
    chk(done && result == exp_res, $sformatf("%s: result %0d expected %0d", name, result, exp_res));
    chk(tests == exp_tests && allocs == exp_allocs && rl_clears == 1 && rec_clears == exp_tests,
        $sformatf("%s: tests %0d allocs %0d rl_clears %0d rec_clears %0d", name, tests, allocs, rl_clears, rec_clears));
    chk(pass1_failed == f1, {name, ": pass1_failed"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && result == 0, "idle after reset");
    flow(0, 0, 0, 1, 2'd1, 1, 0, "clean");
    flow(1, 0, 0, 1, 2'd2, 2, 1, "repaired");
    flow(1, 0, 0, 0, 2'd3, 1, 1, "out of spares");
    flow(1, 0, 1, 1, 2'd3, 1, 0, "overflow");
    flow(1, 1, 0, 1, 2'd3, 2, 1, "retest fails");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    soft_reset = 1; @(negedge clk); soft_reset = 0;
    chk(!busy && !done && result == 0, "soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
