// tb_test_controller: runs the March controller with the pattern generator
// and comparator over a small behavioural memory (16 words, 2 backgrounds).
// Every issued operation is checked against an operation list built here
// from the March definition (w0; r0 w1; r1 w0 r0; w0 r0 w1 down; r1 w0 down;
// r0). Checks the cycle count of a clean test (12*N*B+2), the failure
// records and the cycle count with a stuck-at-0 bit in the memory (2 extra
// clocks per failing read), stop/resume, halt-on-error and clock enable.
module tb_test_controller;
  import bist_pkg::*;
  localparam int unsigned N = 16, W = 8, B = 2;
  logic clk = 0, rst_n = 0, soft_reset = 0, clk_en = 1, start = 0, stop = 0, resume = 0, hoe = 0;
  logic tpg_addr_init, tpg_down, tpg_addr_step, tpg_bg_clear, tpg_bg_step, tpg_addr_last, tpg_bg_last;
  logic [3:0] tpg_addr;
  logic [W-1:0] tpg_background;
  logic [0:0] bg_index;
  logic mem_en, mem_we, rd_pending_q, cmp_fail, rec_valid, busy, done, paused, halted;
  logic [3:0] mem_addr, rec_addr;
  logic [W-1:0] mem_wdata, exp_q, cmp_mask, rec_mask, rec_exp, mem_rdata;
  march_el_e element;
  int checks = 0, failures = 0;

  test_controller #(.NUM_WORDS(N), .DATA_W(W)) dut (
    .clk, .rst_n, .soft_reset, .clk_en, .start, .stop, .resume, .halt_on_error(hoe),
    .tpg_addr_init, .tpg_down, .tpg_addr_step, .tpg_bg_clear, .tpg_bg_step,
    .tpg_addr, .tpg_addr_last, .tpg_background, .tpg_bg_last,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .rd_pending_q, .exp_q, .cmp_fail, .cmp_mask,
    .rec_valid, .rec_addr, .rec_mask, .rec_exp, .busy, .done, .paused, .halted, .element);

  test_pattern_gen #(.NUM_WORDS(N), .DATA_W(W), .NUM_BG(B)) tpg (
    .clk, .rst_n, .addr_init(tpg_addr_init), .down(tpg_down), .addr_step(tpg_addr_step),
    .bg_clear(tpg_bg_clear), .bg_step(tpg_bg_step), .addr(tpg_addr), .addr_last(tpg_addr_last),
    .background(tpg_background), .bg_index, .bg_last(tpg_bg_last));

  comparator #(.DATA_W(W)) cmp (.valid(rd_pending_q), .rdata(mem_rdata), .expected(exp_q),
    .fail(cmp_fail), .fail_mask(cmp_mask));

  // behavioural memory with an optional stuck-at-0 bit
  logic [W-1:0] tmem [N];
  logic sa_on = 0;
  int sa_addr = 5, sa_bit = 0;
  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) tmem[mem_addr] <= mem_wdata & ~((sa_on && mem_addr == 4'(sa_addr)) ? W'(1) << sa_bit : W'(0));
      else mem_rdata <= tmem[mem_addr] & ~((sa_on && mem_addr == 4'(sa_addr)) ? W'(1) << sa_bit : W'(0));
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference operation list
  typedef struct { logic we; int addr; logic [W-1:0] data; } op_t;
  op_t exp_ops [$];
  int op_i = 0, op_err = 0, recs = 0, rec_bad = 0, en_while_paused = 0;

  task automatic build_ops();
    // element: list of (is_read, value), direction
    string els [6] = '{"w0", "r0w1", "r1w0r0", "w0r0w1", "r1w0", "r0"};
    logic dn [6] = '{0, 0, 0, 1, 1, 0};
    exp_ops.delete();
    for (int bg = 0; bg < B; bg++)
      for (int e = 0; e < 6; e++)
        for (int k = 0; k < N; k++) begin
          automatic int a = dn[e] ? N - 1 - k : k;
          for (int c = 0; c < els[e].len(); c += 2) begin
            automatic op_t o;
            o.we = (els[e][c] == "w");
            o.addr = a;
            o.data = (els[e][c+1] == "1") ? ~W'(bg) : W'(bg);
            exp_ops.push_back(o);
          end
        end
  endtask

  always @(posedge clk) begin
    if (mem_en) begin
      if (paused || stop) en_while_paused++;
      if (op_i >= exp_ops.size()) op_err++;
      else if (mem_we != exp_ops[op_i].we || int'(mem_addr) != exp_ops[op_i].addr ||
               (mem_we && mem_wdata != exp_ops[op_i].data) || (!mem_we && mem_wdata != exp_ops[op_i].data)) begin
        op_err++;
        if (op_err < 5) $display("op %0d mismatch: we=%b a=%0d d=%h", op_i, mem_we, mem_addr, mem_wdata);
      end
      op_i++;
    end
    if (rec_valid) begin
      recs++;
      if (!(int'(rec_addr) == sa_addr && rec_mask == (W'(1) << sa_bit) && rec_exp[sa_bit])) rec_bad++;
    end
  end

  task automatic run_test(output int cyc);
    op_i = 0; op_err = 0; recs = 0; rec_bad = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 10000) begin @(negedge clk); if (!paused) cyc++; end
  endtask

  initial begin
    int cyc;
    build_ops();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1: clean memory
    run_test(cyc);
    chk(cyc == 12 * N * B + 2, $sformatf("clean test clocks %0d, expected %0d", cyc, 12 * N * B + 2));
    chk(op_i == exp_ops.size() && op_err == 0, $sformatf("clean op sequence (%0d ops, %0d errors)", op_i, op_err));
    chk(recs == 0, "no failure records on a clean memory");
    // 2: stuck-at-0 on word 5 bit 0: per background 0 the two r1 reads fail,
    //    per background 1 the four r0 reads fail: 6 failures
    sa_on = 1;
    run_test(cyc);
    chk(recs == 6 && rec_bad == 0, $sformatf("failure records %0d (bad %0d)", recs, rec_bad));
    chk(cyc == 12 * N * B + 2 + 2 * 6, $sformatf("faulty test clocks %0d", cyc));
    chk(op_err == 0 && op_i == exp_ops.size(), "op sequence with failures");
    // 3: halt on error: pauses after each failure until resume
    hoe = 1;
    op_i = 0; op_err = 0; recs = 0; rec_bad = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int f = 0; f < 6; f++) begin
      cyc = 0;
      while (!halted && cyc < 2000) begin @(negedge clk); cyc++; end
      chk(halted && paused, $sformatf("halted after failure %0d", f));
      repeat (5) @(negedge clk);
      chk(halted && recs == f + 1, "stays halted");
      resume = 1; @(negedge clk); resume = 0;
    end
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    chk(done && op_err == 0 && op_i == exp_ops.size() && recs == 6, "halt-on-error run completes");
    hoe = 0; sa_on = 0;
    // 4: stop / resume and clock enable in the middle of a clean test
    op_i = 0; op_err = 0; recs = 0; en_while_paused = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (37) @(negedge clk);
    stop = 1; repeat (2) @(negedge clk);
    chk(paused, "paused on stop");
    repeat (10) @(negedge clk);
    stop = 0; resume = 1; @(negedge clk); resume = 0;
    repeat (50) @(negedge clk);
    begin
      automatic int frozen = op_i;
      clk_en = 0; repeat (20) @(negedge clk);
      chk(op_i == frozen + 1 || op_i == frozen, "clock enable freezes");
      clk_en = 1;
    end
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    chk(done && op_err == 0 && op_i == exp_ops.size() && en_while_paused == 0, "stop/resume run completes");
    // 5: soft reset returns to idle
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    soft_reset = 1; @(negedge clk); soft_reset = 0;
    chk(!busy && !done, "soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
