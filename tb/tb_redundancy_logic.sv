// tb_redundancy_logic: loads spare-row and spare-column registers and checks
// that accesses are steered to the spare row, spare column or main array as
// a reference model says, including row-over-column priority, that read data
// come back from the right array a clock later, that full flags and clear
// work, and that loads beyond the number of spares are ignored.
module tb_redundancy_logic;
  localparam int unsigned ROWS = 16, COLS = 16, W = 8, SR = 2, SC = 2;
  logic clk = 0, rst_n = 0, clear = 0, ld_row = 0, ld_col = 0;
  logic [7:0] ld_addr = '0;
  logic [SR-1:0] row_valid;
  logic [3:0] row_addr [SR];
  logic [SC-1:0] col_valid;
  logic [3:0] col_addr [SC];
  logic rows_full, cols_full;
  logic en = 0, we = 0;
  logic [7:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic m_en, m_we, s_en, s_we, s_is_col;
  logic [7:0] m_addr;
  logic [W-1:0] m_wdata, s_wdata;
  logic [W-1:0] m_rdata = 8'hAA, s_rdata = 8'h55;
  logic [0:0] s_idx;
  logic [3:0] s_row, s_col;
  int checks = 0, failures = 0;

  redundancy_logic #(.ROWS(ROWS), .COLS(COLS), .DATA_W(W), .SPARE_ROWS(SR), .SPARE_COLS(SC)) dut (
    .clk, .rst_n, .clear, .ld_row, .ld_col, .ld_addr, .row_valid, .row_addr, .col_valid, .col_addr,
    .rows_full, .cols_full, .en, .we, .addr, .wdata, .rdata,
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .s_en, .s_we, .s_is_col, .s_idx, .s_row, .s_col, .s_wdata, .s_rdata);

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

  task automatic load(input logic r, input logic [7:0] a);
    @(negedge clk); ld_row = r; ld_col = !r; ld_addr = a;
    @(negedge clk); ld_row = 0; ld_col = 0;
  endtask

  // reference: replaced rows 3 and 9, replaced columns 5 and 12
  function automatic int where(input logic [7:0] a, output int idx);
    idx = 0;
    if (a[7:4] == 3) begin idx = 0; return 1; end
    if (a[7:4] == 9) begin idx = 1; return 1; end
    if (a[3:0] == 5) begin idx = 0; return 2; end
    if (a[3:0] == 12) begin idx = 1; return 2; end
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(row_valid == 0 && col_valid == 0 && !rows_full, "empty after reset");
    load(1, 8'h37);
    load(0, 8'h25);
    load(1, 8'h9A);
    load(0, 8'hFC);
    chk(rows_full && cols_full, "full");
    load(1, 8'hE0);   // ignored
    load(0, 8'h01);   // ignored
    chk(row_addr[0] == 3 && row_addr[1] == 9 && col_addr[0] == 5 && col_addr[1] == 12, "registers");
    for (int i = 0; i < 300; i++) begin
      automatic logic [7:0] a = 8'($urandom);
      automatic int idx;
      automatic int w = where(a, idx);
      @(negedge clk);
      en = 1; we = ($urandom_range(0, 1) != 0); addr = a; wdata = 8'($urandom);
      m_rdata = 8'($urandom); s_rdata = 8'($urandom);
      #1;
      chk(m_en == (w == 0) && s_en == (w != 0), $sformatf("enables addr %h", a));
      if (w != 0) chk(s_is_col == (w == 2) && s_idx == 1'(idx) && s_row == a[7:4] && s_col == a[3:0],
                      $sformatf("spare select addr %h", a));
      chk(m_addr == a && m_wdata == wdata && s_wdata == wdata && m_we == we && s_we == we, "pass-through");
      if (!we) begin
        @(negedge clk); en = 0;
        chk(rdata == ((w != 0) ? s_rdata : m_rdata), $sformatf("read mux addr %h", a));
      end
    end
    en = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(row_valid == 0 && col_valid == 0, "clear");
    @(negedge clk); en = 1; addr = 8'h35; #1;
    chk(m_en && !s_en, "main after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
