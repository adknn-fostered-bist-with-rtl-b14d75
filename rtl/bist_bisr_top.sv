// bist_bisr_top: memory built-in self-test and self-repair around one SRAM.
//
// A March test controller, fed by a pattern generator, tests the memory under
// test through the repair logic; a comparator checks every read; failures go
// through the controller's failure-record state into the response recorder,
// whose fault table the repair analyzer turns into spare-row and spare-column
// assignments held in the redundancy logic; the flow controller then re-tests
// the memory through those assignments. A start register written by software
// launches and steers all this (start, stop, resume, soft reset,
// halt-on-error, BIST clock enable, memory ID).
// Interface: cfg_we/cfg_wdata write the start register (bit map in
// start_register). fault[] programs the fault-injection slots of the memory
// model (fault_cfg_t in bist_pkg). While no test or repair runs, the sys_*
// port reads and writes the memory through the repair logic, with the same
// one-clock read latency as the array. Status outputs give the flow result
// (0 none, 1 pass, 2 repaired, 3 unrepairable), the recorder's summary and
// fault table, and which spares are in use.
// Timing: a clean March pass over N words with B backgrounds takes 12*N*B+2
// clocks, plus 2 clocks per failing read; the whole flow adds a few clocks of
// hand-over and 2*FT_DEPTH+1 for the repair analysis.
// The block structure follows the document's block diagram; widths, sizes of
// the array and of the spares, and all encodings are this design's choices
// except the 8-bit word, the 256 test patterns and the repair threshold of 2.
module bist_bisr_top
  import bist_pkg::*;
#(
  parameter int unsigned ROWS       = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  parameter int unsigned FT_DEPTH   = 8,
  parameter int unsigned NUM_BG     = 256,
  parameter int unsigned NUM_FI     = 10,
  parameter int unsigned THRESH     = 2,
  parameter int unsigned MEM_ID_W   = 4,
  localparam int unsigned NUM_WORDS = ROWS * COLS,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned COL_W     = $clog2(COLS),
  localparam int unsigned ADDR_W    = ROW_W + COL_W,
  localparam int unsigned CFG_W     = MEM_ID_W + 6,
  localparam int unsigned SP_MAX    = SPARE_ROWS > SPARE_COLS ? SPARE_ROWS : SPARE_COLS,
  localparam int unsigned IDX_W     = SP_MAX > 1 ? $clog2(SP_MAX) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // start register
  input  logic                  cfg_we,
  input  logic [CFG_W-1:0]      cfg_wdata,
  output logic [CFG_W-1:0]      cfg_rdata,
  // fault injection into the memory model
  input  fault_cfg_t            fault [NUM_FI],
  // system access
  input  logic                  sys_en,
  input  logic                  sys_we,
  input  logic [ADDR_W-1:0]     sys_addr,
  input  logic [DATA_W-1:0]     sys_wdata,
  output logic [DATA_W-1:0]     sys_rdata,
  // status
  output logic                  busy,
  output logic                  done,
  output logic [1:0]            result,
  output logic                  pass1_failed,
  output logic                  in_retest,
  output logic                  paused,
  output logic                  halted,
  output march_el_e             element,
  output logic [MEM_ID_W-1:0]   rec_mem_id,
  output logic [15:0]           fail_count,
  output logic [15:0]           faulty_words,
  output logic [15:0]           faulty_cells,
  output logic [ADDR_W-1:0]     first_fail_addr,
  output logic                  ft_overflow,
  output logic [FT_DEPTH-1:0]   ft_valid,
  output logic [ADDR_W-1:0]     ft_addr [FT_DEPTH],
  output logic [DATA_W-1:0]     ft_mask [FT_DEPTH],
  output fault_kind_e           ft_kind [FT_DEPTH],
  output logic [SPARE_ROWS-1:0] spare_row_used,
  output logic [SPARE_COLS-1:0] spare_col_used
);

  // ---- start register ----
  logic start_pulse, stop, resume_pulse, soft_reset, halt_on_error, bist_clk_en;
  logic [MEM_ID_W-1:0] mem_id;

  start_register #(.MEM_ID_W(MEM_ID_W)) u_start (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .cfg_rdata,
    .start_pulse, .stop, .resume_pulse, .soft_reset, .halt_on_error,
    .bist_clk_en, .mem_id
  );

  // ---- flow ----
  logic test_start, test_done, rec_clear, rl_clear, alloc_start, alloc_done, alloc_repairable;
  logic rec_any_fail;

  bisr_flow_ctrl u_flow (
    .clk, .rst_n, .soft_reset, .start(start_pulse),
    .test_start, .test_done, .rec_clear, .rec_any_fail, .rec_overflow(ft_overflow),
    .rl_clear, .alloc_start, .alloc_done, .alloc_repairable,
    .busy, .done, .result, .pass1_failed, .in_retest
  );

  // ---- pattern generator and test controller ----
  logic tpg_addr_init, tpg_down, tpg_addr_step, tpg_bg_clear, tpg_bg_step;
  logic [ADDR_W-1:0] tpg_addr;
  logic tpg_addr_last, tpg_bg_last;
  logic [DATA_W-1:0] tpg_background;

  test_pattern_gen #(.NUM_WORDS(NUM_WORDS), .DATA_W(DATA_W), .NUM_BG(NUM_BG)) u_tpg (
    .clk, .rst_n, .addr_init(tpg_addr_init), .down(tpg_down), .addr_step(tpg_addr_step),
    .bg_clear(tpg_bg_clear), .bg_step(tpg_bg_step), .addr(tpg_addr), .addr_last(tpg_addr_last),
    .background(tpg_background), .bg_index(), .bg_last(tpg_bg_last)
  );

  logic              b_en, b_we;
  logic [ADDR_W-1:0] b_addr;
  logic [DATA_W-1:0] b_wdata;
  logic              rd_pending_q, cmp_fail;
  logic [DATA_W-1:0] exp_q, cmp_mask;
  logic              rec_valid;
  logic [ADDR_W-1:0] rec_addr;
  logic [DATA_W-1:0] rec_mask, rec_exp;

  test_controller #(.NUM_WORDS(NUM_WORDS), .DATA_W(DATA_W)) u_tc (
    .clk, .rst_n, .soft_reset, .clk_en(bist_clk_en), .start(test_start), .stop,
    .resume(resume_pulse), .halt_on_error,
    .tpg_addr_init, .tpg_down, .tpg_addr_step, .tpg_bg_clear, .tpg_bg_step,
    .tpg_addr, .tpg_addr_last, .tpg_background, .tpg_bg_last,
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata),
    .rd_pending_q, .exp_q, .cmp_fail, .cmp_mask,
    .rec_valid, .rec_addr, .rec_mask, .rec_exp,
    .busy(), .done(test_done), .paused, .halted, .element
  );

  // ---- access path: BIST while the flow runs, else the system port ----
  logic              a_en, a_we;
  logic [ADDR_W-1:0] a_addr;
  logic [DATA_W-1:0] a_wdata, a_rdata;

  always_comb begin
    if (busy) begin
      a_en = b_en;  a_we = b_we;  a_addr = b_addr;  a_wdata = b_wdata;
    end else begin
      a_en = sys_en; a_we = sys_we; a_addr = sys_addr; a_wdata = sys_wdata;
    end
  end
  assign sys_rdata = a_rdata;

  comparator #(.DATA_W(DATA_W)) u_cmp (
    .valid(rd_pending_q), .rdata(a_rdata), .expected(exp_q),
    .fail(cmp_fail), .fail_mask(cmp_mask)
  );

  // ---- response recorder / fault table ----
  response_recorder #(.NUM_WORDS(NUM_WORDS), .DATA_W(DATA_W), .FT_DEPTH(FT_DEPTH),
                      .MEM_ID_W(MEM_ID_W)) u_rec (
    .clk, .rst_n, .clear(rec_clear || soft_reset), .mem_id,
    .rec_valid, .rec_addr, .rec_mask, .rec_exp,
    .ent_valid(ft_valid), .ent_addr(ft_addr), .ent_mask(ft_mask), .ent_kind(ft_kind),
    .rec_mem_id, .fail_count, .faulty_words, .faulty_cells, .first_fail_addr,
    .any_fail(rec_any_fail), .overflow(ft_overflow)
  );

  // ---- redundancy logic, repair analyzer ----
  logic              ld_row, ld_col;
  logic [ADDR_W-1:0] ld_addr;
  logic [ROW_W-1:0]  row_addr [SPARE_ROWS];
  logic [COL_W-1:0]  col_addr [SPARE_COLS];
  logic              rows_full, cols_full;
  logic              m_en, m_we, s_en, s_we, s_is_col;
  logic [ADDR_W-1:0] m_addr;
  logic [DATA_W-1:0] m_wdata, m_rdata, s_wdata, s_rdata;
  logic [IDX_W-1:0]  s_idx;
  logic [ROW_W-1:0]  s_row;
  logic [COL_W-1:0]  s_col;

  redundancy_logic #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W),
                     .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS(SPARE_COLS)) u_rl (
    .clk, .rst_n, .clear(rl_clear || soft_reset), .ld_row, .ld_col, .ld_addr,
    .row_valid(spare_row_used), .row_addr, .col_valid(spare_col_used), .col_addr,
    .rows_full, .cols_full,
    .en(a_en), .we(a_we), .addr(a_addr), .wdata(a_wdata), .rdata(a_rdata),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .s_en, .s_we, .s_is_col, .s_idx, .s_row, .s_col, .s_wdata, .s_rdata
  );

  bira_allocator #(.ROWS(ROWS), .COLS(COLS), .FT_DEPTH(FT_DEPTH), .SPARE_ROWS(SPARE_ROWS),
                   .SPARE_COLS(SPARE_COLS), .THRESH(THRESH)) u_bira (
    .clk, .rst_n, .start(alloc_start), .ent_valid(ft_valid), .ent_addr(ft_addr),
    .overflow(ft_overflow), .row_valid(spare_row_used), .row_addr,
    .col_valid(spare_col_used), .col_addr, .rows_full, .cols_full,
    .ld_row, .ld_col, .ld_addr, .busy(), .done(alloc_done),
    .repairable(alloc_repairable)
  );

  // ---- memories ----
  mut_sram #(.NUM_WORDS(NUM_WORDS), .DATA_W(DATA_W), .NUM_FI(NUM_FI)) u_mut (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata), .fault
  );

  spare_memory #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W),
                 .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS(SPARE_COLS)) u_spare (
    .clk, .en(s_en), .we(s_we), .is_col(s_is_col), .idx(s_idx), .row(s_row), .col(s_col),
    .wdata(s_wdata), .rdata(s_rdata)
  );

endmodule
