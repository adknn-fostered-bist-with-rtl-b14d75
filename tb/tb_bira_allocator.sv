// tb_bira_allocator: runs the repair analyzer on hand-made fault tables,
// with a redundancy_logic instance holding the repair registers, and checks
// which rows and columns get spares, the repairable flag and the number of
// clocks to done (2*FT_DEPTH+1, or 1 on an overflowed table).
module tb_bira_allocator;
  localparam int unsigned ROWS = 16, COLS = 16, FT = 8, SR = 2, SC = 2;
  logic clk = 0, rst_n = 0, start = 0, overflow = 0, clear = 0;
  logic [FT-1:0] ent_valid = '0;
  logic [7:0] ent_addr [FT];
  logic [SR-1:0] row_valid;
  logic [3:0] row_addr [SR];
  logic [SC-1:0] col_valid;
  logic [3:0] col_addr [SC];
  logic rows_full, cols_full, ld_row, ld_col, busy, done, repairable;
  logic [7:0] ld_addr;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  bira_allocator #(.ROWS(ROWS), .COLS(COLS), .FT_DEPTH(FT), .SPARE_ROWS(SR), .SPARE_COLS(SC), .THRESH(2)) dut (
    .clk, .rst_n, .start, .ent_valid, .ent_addr, .overflow, .row_valid, .row_addr, .col_valid,
    .col_addr, .rows_full, .cols_full, .ld_row, .ld_col, .ld_addr, .busy, .done, .repairable);

  redundancy_logic #(.ROWS(ROWS), .COLS(COLS), .DATA_W(8), .SPARE_ROWS(SR), .SPARE_COLS(SC)) regs (
    .clk, .rst_n, .clear, .ld_row, .ld_col, .ld_addr, .row_valid, .row_addr, .col_valid, .col_addr,
    .rows_full, .cols_full, .en(1'b0), .we(1'b0), .addr(8'h00), .wdata(8'h00), .rdata,
    .m_en(), .m_we(), .m_addr(), .m_wdata(), .m_rdata(8'h00),
    .s_en(), .s_we(), .s_is_col(), .s_idx(), .s_row(), .s_col(), .s_wdata(), .s_rdata(8'h00));

  always #5 clk = ~clk;

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

  task automatic set_table(input int n, input logic [7:0] a [FT]);
    for (int i = 0; i < FT; i++) begin
      ent_valid[i] = (i < n);
      ent_addr[i]  = a[i];
    end
  endtask

  task automatic run(input int exp_cycles);
    int cyc;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(cyc == exp_cycles, $sformatf("clocks to done %0d, expected %0d", cyc, exp_cycles));
  endtask

  function automatic logic has_row(input int r);
    for (int k = 0; k < SR; k++) if (row_valid[k] && row_addr[k] == 4'(r)) return 1;
    return 0;
  endfunction
  function automatic logic has_col(input int c);
    for (int k = 0; k < SC; k++) if (col_valid[k] && col_addr[k] == 4'(c)) return 1;
    return 0;
  endfunction

  initial begin
    for (int i = 0; i < FT; i++) ent_addr[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A: two faults in row 2 -> spare row; lone fault (7,3) -> spare column
    set_table(3, '{8'h21, 8'h25, 8'h73, 0, 0, 0, 0, 0});
    run(2 * FT + 1);
    chk(repairable && has_row(2) && has_col(3) && $countones(row_valid) == 1 && $countones(col_valid) == 1, "case A");
    // B: rows 1 and 6 come first in the table and take the spare rows; row 4 takes the columns
    set_table(6, '{8'h10, 8'h6A, 8'h1F, 8'h44, 8'h49, 8'h6B, 0, 0});
    run(2 * FT + 1);
    chk(repairable && has_row(1) && has_row(6) && has_col(4) && has_col(9), "case B");
    // C: one more uncovered fault than spares -> unrepairable
    set_table(7, '{8'h10, 8'h6A, 8'h1F, 8'h44, 8'h49, 8'h6B, 8'h8C, 0});
    run(2 * FT + 1);
    chk(!repairable, "case C unrepairable");
    // D: a single column of faults: no row reaches the threshold, one spare column
    set_table(4, '{8'h03, 8'h13, 8'h23, 8'h33, 0, 0, 0, 0});
    run(2 * FT + 1);
    chk(repairable && row_valid == 0 && has_col(3) && $countones(col_valid) == 1, "case D column");
    // E: columns run out, the leftover fault takes a spare row
    set_table(3, '{8'h01, 8'h22, 8'h43, 0, 0, 0, 0, 0});
    run(2 * FT + 1);
    chk(repairable && has_col(1) && has_col(2) && has_row(4), "case E row after columns");
    // F: overflowed table
    overflow = 1;
    run(1);
    chk(!repairable && row_valid == 0 && col_valid == 0, "case F overflow");
    overflow = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
