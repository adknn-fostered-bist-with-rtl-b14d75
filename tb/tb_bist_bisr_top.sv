// tb_bist_bisr_top: end-to-end test of the whole BIST/BISR at its default
// size (16x16 words of 8 bits, 256 data backgrounds, 2 spare rows, 2 spare
// columns, 8-entry fault table). Each scenario writes the start register,
// lets the flow run test, repair analysis and re-test, and checks the result
// against what the injected faults call for:
//   clean memory -> pass; a deceptive read destructive fault alone -> pass
//   (this March sequence cannot see it); stuck-at/transition/read-destructive faults ->
//   spare row for the row with two faults, spare columns for the rest,
//   fault kinds in the pass-1 fault table, re-test passes, system reads and
//   writes of repaired words work; coupling faults -> detected and repaired
//   with columns first and then a row; write-destructive and incorrect-read
//   faults and an address-decoder fault -> detected and repaired; five scattered faults -> unrepairable;
//   nine faulty words -> fault-table overflow; halt-on-error, stop/resume,
//   BIST clock enable and soft reset in the middle of a test.
// The March pass length (12*N*B+2 clocks plus 2 per failing read) is checked
// on every pass. Each mechanism is counted, and one never seen is a failure.
module tb_bist_bisr_top;
  import bist_pkg::*;
  localparam int unsigned N = 256, B = 256, NF = 10;
  localparam logic [1:0] RES_PASS = 2'd1, RES_REPAIRED = 2'd2, RES_UNREP = 2'd3;

  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [9:0] cfg_wdata = '0, cfg_rdata;
  fault_cfg_t fault [NF];
  logic sys_en = 0, sys_we = 0;
  logic [7:0] sys_addr = '0, sys_wdata = '0, sys_rdata;
  logic busy, done, pass1_failed, in_retest, paused, halted, ft_overflow;
  logic [1:0] result;
  march_el_e element;
  logic [3:0] rec_mem_id;
  logic [15:0] fail_count, faulty_words, faulty_cells;
  logic [7:0] first_fail_addr;
  logic [7:0] ft_valid;
  logic [7:0] ft_addr [8];
  logic [7:0] ft_mask [8];
  fault_kind_e ft_kind [8];
  logic [1:0] spare_row_used, spare_col_used;
  int checks = 0, failures = 0;

  bist_bisr_top dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .cfg_rdata, .fault,
    .sys_en, .sys_we, .sys_addr, .sys_wdata, .sys_rdata,
    .busy, .done, .result, .pass1_failed, .in_retest, .paused, .halted, .element,
    .rec_mem_id, .fail_count, .faulty_words, .faulty_cells, .first_fail_addr, .ft_overflow,
    .ft_valid, .ft_addr, .ft_mask, .ft_kind, .spare_row_used, .spare_col_used);

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_pass = 0, n_repaired = 0, n_unrep = 0, n_overflow = 0, n_row_spare = 0, n_col_spare = 0;
  int n_fail_rec = 0, n_halt = 0, n_stop = 0, n_clk_freeze = 0, n_soft_reset = 0, n_retest = 0;
  int n_kind1 = 0, n_kind0 = 0, n_kind_both = 0, n_spare_access = 0;

  // Pass length check: from the test controller leaving idle/done to done.
  int pass_cyc = 0, pass_fails = 0;
  logic tc_busy_q = 0;
  always @(posedge clk) begin
    if (dut.u_tc.rec_valid) begin n_fail_rec++; pass_fails++; end
    if (dut.u_rl.s_en) n_spare_access++;
    if (dut.u_tc.busy && !dut.u_tc.paused && dut.u_start.bist_clk_en && !dut.u_start.stop) pass_cyc++;
    if (!dut.u_start.bist_clk_en && dut.u_tc.busy) n_clk_freeze++;
    if (tc_busy_q && dut.u_tc.done) begin
      chk(pass_cyc + 1 == 12 * N * B + 2 + 2 * pass_fails,
          $sformatf("pass length %0d, expected %0d", pass_cyc + 1, 12 * N * B + 2 + 2 * pass_fails));
      pass_cyc = 0; pass_fails = 0;
    end
    if (!dut.u_tc.busy) begin pass_cyc = 0; pass_fails = 0; end
    tc_busy_q <= dut.u_tc.busy;
  end

  // Pass-1 fault table, captured when the re-test starts.
  logic [7:0] p1_valid;
  logic [7:0] p1_addr [8];
  fault_kind_e p1_kind [8];
  always @(posedge clk) if (dut.u_flow.state == dut.u_flow.F_LAUNCH2) begin
    p1_valid = ft_valid;
    for (int i = 0; i < 8; i++) begin p1_addr[i] = ft_addr[i]; p1_kind[i] = ft_kind[i]; end
    n_retest++;
  end

  function automatic fault_kind_e p1_kind_of(input logic [7:0] a);
    for (int i = 0; i < 8; i++) if (p1_valid[i] && p1_addr[i] == a) return p1_kind[i];
    return FK_NONE;
  endfunction

  function automatic logic [9:0] cfg(input logic st, input logic sp, input logic rs, input logic rst,
                                     input logic hoe, input logic ce, input logic [3:0] id);
    return {id, ce, hoe, rst, rs, sp, st};
  endfunction

  task automatic wr_cfg(input logic [9:0] v);
    @(negedge clk); cfg_we = 1; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic clear_faults();
    for (int i = 0; i < NF; i++) fault[i] = '0;
  endtask

  task automatic set_fault(input int s, input fault_type_e t, input logic p, input int vr, input int vc,
                           input int vb, input int ar = 0, input int ac = 0, input int ab = 0);
    fault[s] = '{ftype: t, pol: p, vaddr: 16'(vr * 16 + vc), vbit: 8'(vb), aaddr: 16'(ar * 16 + ac), abit: 8'(ab)};
  endtask

  task automatic run_flow(input logic [3:0] id);
    int guard = 0;
    wr_cfg(cfg(1, 0, 0, 0, 0, 1, id));
    while (!busy && guard < 10) begin @(negedge clk); guard++; end
    while (!done && guard < 4_000_000) begin @(negedge clk); guard++; end
    chk(done, "flow finished");
    chk(rec_mem_id == id, "memory ID recorded");
    case (result)
      RES_PASS:     n_pass++;
      RES_REPAIRED: n_repaired++;
      RES_UNREP:    n_unrep++;
      default: ;
    endcase
    n_row_spare += $countones(spare_row_used);
    n_col_spare += $countones(spare_col_used);
    if (ft_overflow) n_overflow++;
  endtask

  task automatic sys_write(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); sys_en = 1; sys_we = 1; sys_addr = a; sys_wdata = d;
    @(negedge clk); sys_en = 0; sys_we = 0;
  endtask
  task automatic sys_read_chk(input logic [7:0] a, input logic [7:0] e, input string what);
    @(negedge clk); sys_en = 1; sys_we = 0; sys_addr = a;
    @(negedge clk); sys_en = 0;
    chk(sys_rdata == e, $sformatf("%s: sys read %h = %h, expected %h", what, a, sys_rdata, e));
  endtask

  function automatic logic row_spared(input int r);
    for (int k = 0; k < 2; k++) if (spare_row_used[k] && dut.u_rl.row_addr[k] == 4'(r)) return 1;
    return 0;
  endfunction
  function automatic logic col_spared(input int c);
    for (int k = 0; k < 2; k++) if (spare_col_used[k] && dut.u_rl.col_addr[k] == 4'(c)) return 1;
    return 0;
  endfunction

  initial begin
    clear_faults();
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---- 1: clean memory ----
    run_flow(4'd1);
    chk(result == RES_PASS && !pass1_failed && spare_row_used == 0 && spare_col_used == 0, "clean memory passes");
    $display("scenario 1 done: result %0d", result);

    // ---- 1b: a deceptive read destructive fault is invisible to this March
    //      sequence (every read is followed by a write before the next read) ----
    clear_faults();
    set_fault(0, FT_DRDF, 1, 4, 4, 4);
    run_flow(4'd8);
    chk(result == RES_PASS && fail_count == 0, "DRDF alone escapes the March test");
    $display("scenario 1b done: result %0d", result);

    // ---- 2: single-cell faults ----
    clear_faults();
    set_fault(0, FT_SA,  0, 3, 5, 2);     // stuck-at-0
    set_fault(1, FT_SA,  1, 3, 9, 7);     // stuck-at-1, same row
    set_fault(2, FT_TF,  1, 10, 1, 0);    // up-transition fault
    set_fault(3, FT_RDF, 1, 12, 12, 4);   // read destructive (fails on reads of 0)
    set_fault(4, FT_SA,  0, 12, 12, 5);   // stuck-at-0 in the same word (fails on reads of 1)
    run_flow(4'd2);
    chk(result == RES_REPAIRED && pass1_failed, "single-cell faults repaired");
    chk(row_spared(3) && col_spared(1) && col_spared(12) && spare_row_used == 2'b01, "spare row 3, columns 1 and 12");
    chk(p1_kind_of(8'h35) == FK_FAILS_ON1, "stuck-at-0 fails on 1");
    chk(p1_kind_of(8'h39) == FK_FAILS_ON0, "stuck-at-1 fails on 0");
    chk(p1_kind_of(8'hA1) == FK_FAILS_ON1, "up-transition fails on 1");
    chk(p1_kind_of(8'hCC) == FK_FAILS_ON_BOTH, "read destructive plus stuck-at-1 word fails on both");
    for (int i = 0; i < 8; i++) if (p1_valid[i])
      case (p1_kind[i]) FK_FAILS_ON1: n_kind1++; FK_FAILS_ON0: n_kind0++; FK_FAILS_ON_BOTH: n_kind_both++; default: ; endcase
    chk($countones(p1_valid) == 4, "four faulty words in pass 1");
    // system access through the repair
    sys_write(8'h35, 8'hFF); sys_write(8'h39, 8'h00); sys_write(8'hA1, 8'h01);
    sys_write(8'hCC, 8'h00); sys_write(8'h77, 8'h5A);
    sys_read_chk(8'h35, 8'hFF, "repaired SA0 word");
    sys_read_chk(8'h39, 8'h00, "repaired SA1 word");
    sys_read_chk(8'hA1, 8'h01, "repaired TF word");
    sys_read_chk(8'hCC, 8'h00, "repaired RDF word");
    sys_read_chk(8'hCC, 8'h00, "repaired RDF word, second read");
    sys_read_chk(8'h77, 8'h5A, "healthy word");
    $display("scenario 2 done: result %0d", result);

    // ---- 3: coupling faults on four separate rows and columns ----
    clear_faults();
    set_fault(0, FT_CFID, 0, 5, 5, 1, 6, 6, 1);
    set_fault(1, FT_CFST, 1, 7, 7, 3, 8, 8, 3);
    set_fault(2, FT_CFDS, 1, 9, 9, 6, 1, 1, 0);
    set_fault(3, FT_TCF,  1, 2, 2, 5, 4, 4, 5);
    run_flow(4'd3);
    chk(result == RES_REPAIRED, "coupling faults repaired");
    chk($countones(p1_valid) == 4 && p1_kind_of(8'h55) != FK_NONE && p1_kind_of(8'h77) != FK_NONE &&
        p1_kind_of(8'h99) != FK_NONE && p1_kind_of(8'h22) != FK_NONE, "all four coupling victims found");
    chk(spare_col_used == 2'b11 && spare_row_used == 2'b11, "columns first, then rows");
    $display("scenario 3 done: result %0d", result);

    // ---- 4: write destructive and incorrect read in one column ----
    clear_faults();
    set_fault(0, FT_WDF, 1, 1, 3, 0);
    set_fault(1, FT_IRF, 0, 6, 3, 7);
    set_fault(2, FT_AF,  0, 13, 8, 0, 2, 9, 0);
    run_flow(4'd4);
    chk(result == RES_REPAIRED && col_spared(3) && col_spared(8) && spare_row_used == 0,
        "WDF and IRF repaired by one column, address-decoder victim by another");
    chk($countones(p1_valid) == 3 && p1_kind_of(8'hD8) != FK_NONE, "address-decoder victim found");
    $display("scenario 4 done: result %0d", result);

    // ---- 5: five scattered faults, four spares ----
    clear_faults();
    for (int i = 0; i < 5; i++) set_fault(i, FT_SA, 1, i * 3, i * 3 + 1, i);
    run_flow(4'd5);
    chk(result == RES_UNREP && !ft_overflow, "five scattered faults unrepairable");
    $display("scenario 5 done: result %0d", result);

    // ---- 6: nine faulty words overflow the fault table ----
    clear_faults();
    for (int i = 0; i < 9; i++) set_fault(i, FT_SA, 0, i, 15 - i, 0);
    run_flow(4'd6);
    chk(result == RES_UNREP && ft_overflow, "fault-table overflow");
    $display("scenario 6 done: result %0d", result);

    // ---- 7: halt on error, stop/resume, clock enable, soft reset ----
    clear_faults();
    set_fault(0, FT_SA, 1, 0, 0, 0);
    wr_cfg(cfg(1, 0, 0, 0, 1, 1, 4'd7));
    begin
      int g = 0;
      while (!halted && g < 100000) begin @(negedge clk); g++; end
      chk(halted && paused, "halted on first failure");
      if (halted) n_halt++;
      chk(fail_count == 1 && first_fail_addr == 8'h00, "one failure recorded when halted");
      repeat (20) @(negedge clk);
      chk(halted && fail_count == 1, "stays halted");
    end
    wr_cfg(cfg(0, 0, 1, 0, 0, 1, 4'd7));          // resume, halt-on-error off
    repeat (5000) @(negedge clk);
    wr_cfg(cfg(0, 1, 0, 0, 0, 1, 4'd7));          // stop
    repeat (3) @(negedge clk);
    chk(paused, "paused on stop");
    if (paused) n_stop++;
    begin
      automatic int a0 = int'(dut.u_tpg.addr);
      repeat (50) @(negedge clk);
      chk(int'(dut.u_tpg.addr) == a0, "no progress while stopped");
    end
    wr_cfg(cfg(0, 0, 1, 0, 0, 1, 4'd7));          // resume
    repeat (100) @(negedge clk);
    wr_cfg(cfg(0, 0, 0, 0, 0, 0, 4'd7));          // BIST clock off
    begin
      automatic int a0 = int'(dut.u_tpg.addr);
      repeat (50) @(negedge clk);
      chk(int'(dut.u_tpg.addr) == a0 && busy, "no progress with BIST clock off");
    end
    wr_cfg(cfg(0, 0, 0, 0, 0, 1, 4'd7));          // clock on again
    begin
      int g = 0;
      while (!done && g < 4_000_000) begin @(negedge clk); g++; end
    end
    chk(done && result == RES_REPAIRED && row_spared(0) == 0 && col_spared(0), $sformatf("run with pauses completes and repairs: done %0d result %0d rows %b cols %b", done, result, spare_row_used, spare_col_used));
    n_repaired += (result == RES_REPAIRED);
    wr_cfg(cfg(1, 0, 0, 0, 0, 1, 4'd7));
    repeat (100) @(negedge clk);
    wr_cfg(cfg(0, 0, 0, 1, 0, 1, 4'd7));          // soft reset
    @(negedge clk);
    chk(!busy && !done && result == 2'd0, "soft reset returns to idle");
    if (!busy) n_soft_reset++;

    // ---- mechanisms seen ----
    $display("pass=%0d repaired=%0d unrepairable=%0d overflow=%0d row_spares=%0d col_spares=%0d",
             n_pass, n_repaired, n_unrep, n_overflow, n_row_spare, n_col_spare);
    $display("fail_records=%0d halts=%0d stops=%0d clk_freeze=%0d soft_resets=%0d retests=%0d spare_accesses=%0d",
             n_fail_rec, n_halt, n_stop, n_clk_freeze, n_soft_reset, n_retest, n_spare_access);
    $display("kinds: on1=%0d on0=%0d both=%0d", n_kind1, n_kind0, n_kind_both);
    chk(n_pass > 0, "mechanism: clean pass");
    chk(n_repaired > 0, "mechanism: repair");
    chk(n_unrep > 0, "mechanism: unrepairable");
    chk(n_overflow > 0, "mechanism: fault-table overflow");
    chk(n_row_spare > 0, "mechanism: spare row");
    chk(n_col_spare > 0, "mechanism: spare column");
    chk(n_fail_rec > 0, "mechanism: failure record");
    chk(n_halt > 0, "mechanism: halt on error");
    chk(n_stop > 0, "mechanism: stop/resume");
    chk(n_clk_freeze > 0, "mechanism: BIST clock enable");
    chk(n_soft_reset > 0, "mechanism: soft reset");
    chk(n_retest > 0, "mechanism: re-test");
    chk(n_spare_access > 0, "mechanism: spare memory access");
    chk(n_kind1 > 0 && n_kind0 > 0 && n_kind_both > 0, "mechanism: all fault kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
