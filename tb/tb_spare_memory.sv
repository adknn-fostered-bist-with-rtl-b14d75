// tb_spare_memory: writes distinct words into every spare-row and
// spare-column word, reads them all back and compares with a reference
// model; checks the one-clock read latency.
module tb_spare_memory;
  localparam int unsigned ROWS = 16, COLS = 16, W = 8, SR = 2, SC = 2;
  logic clk = 0, en = 0, we = 0, is_col = 0;
  logic [0:0] idx = '0;
  logic [3:0] row = '0, col = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_row [SR][COLS];
  logic [W-1:0] ref_col [SC][ROWS];
  int checks = 0, failures = 0;

  spare_memory #(.ROWS(ROWS), .COLS(COLS), .DATA_W(W), .SPARE_ROWS(SR), .SPARE_COLS(SC)) dut (
    .clk, .en, .we, .is_col, .idx, .row, .col, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic acc(input logic c, input int i, input int r, input int k, input logic w, input logic [W-1:0] d);
    @(negedge clk);
    en = 1; we = w; is_col = c; idx = 1'(i); row = 4'(r); col = 4'(k); wdata = d;
    @(negedge clk);
    en = 0;
  endtask

  initial begin
    for (int i = 0; i < SR; i++) for (int k = 0; k < COLS; k++) begin
      ref_row[i][k] = W'($urandom);
      acc(0, i, $urandom_range(0, 15), k, 1, ref_row[i][k]);
    end
    for (int i = 0; i < SC; i++) for (int r = 0; r < ROWS; r++) begin
      ref_col[i][r] = W'($urandom);
      acc(1, i, r, $urandom_range(0, 15), 1, ref_col[i][r]);
    end
    for (int i = 0; i < SR; i++) for (int k = 0; k < COLS; k++) begin
      acc(0, i, 0, k, 0, '0);
      checks++;
      if (rdata !== ref_row[i][k]) begin failures++; $display("row %0d col %0d: %h vs %h", i, k, rdata, ref_row[i][k]); end
    end
    for (int i = 0; i < SC; i++) for (int r = 0; r < ROWS; r++) begin
      acc(1, i, r, 0, 0, '0);
      checks++;
      if (rdata !== ref_col[i][r]) begin failures++; $display("col %0d row %0d: %h vs %h", i, r, rdata, ref_col[i][r]); end
    end
    // rdata holds while idle
    begin
      automatic logic [W-1:0] held = rdata;
      repeat (3) @(negedge clk);
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
