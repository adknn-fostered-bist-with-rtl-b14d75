// redundancy_logic: repair registers and address steering for self-repair.
//
// It keeps the addresses of the faulty rows and columns that have been given
// a spare (the repair registers), loaded one at a time by the repair analyzer
// through ld_row / ld_col, and cleared by clear. Every access, from the BIST
// or from the system, passes through it: an access whose row is held in a
// spare-row register goes to that spare row, else one whose column is held
// in a spare-column register goes to that spare column, else it goes to the
// main array. Read data come back one clock after the access, from the array
// the access was steered to (the choice is registered alongside the read).
// The document names this "redundancy logic" and says it stores the faulty
// addresses and routes accesses to the spare memory; the row-before-column
// priority is this design's choice.
module redundancy_logic #(
  parameter int unsigned ROWS       = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned COL_W     = $clog2(COLS),
  localparam int unsigned ADDR_W    = ROW_W + COL_W,
  localparam int unsigned SP_MAX    = SPARE_ROWS > SPARE_COLS ? SPARE_ROWS : SPARE_COLS,
  localparam int unsigned IDX_W     = SP_MAX > 1 ? $clog2(SP_MAX) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // repair register load
  input  logic              clear,
  input  logic              ld_row,
  input  logic              ld_col,
  input  logic [ADDR_W-1:0] ld_addr,
  output logic [SPARE_ROWS-1:0] row_valid,
  output logic [ROW_W-1:0]      row_addr [SPARE_ROWS],
  output logic [SPARE_COLS-1:0] col_valid,
  output logic [COL_W-1:0]      col_addr [SPARE_COLS],
  output logic              rows_full,
  output logic              cols_full,
  // access in
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // main array
  output logic              m_en,
  output logic              m_we,
  output logic [ADDR_W-1:0] m_addr,
  output logic [DATA_W-1:0] m_wdata,
  input  logic [DATA_W-1:0] m_rdata,
  // spare memory
  output logic              s_en,
  output logic              s_we,
  output logic              s_is_col,
  output logic [IDX_W-1:0]  s_idx,
  output logic [ROW_W-1:0]  s_row,
  output logic [COL_W-1:0]  s_col,
  output logic [DATA_W-1:0] s_wdata,
  input  logic [DATA_W-1:0] s_rdata
);

  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  assign row = addr[ADDR_W-1:COL_W];
  assign col = addr[COL_W-1:0];

  assign rows_full = &row_valid;
  assign cols_full = &col_valid;

  // Lowest free slot of each kind.
  logic [IDX_W-1:0] free_row, free_col;
  always_comb begin
    free_row = '0;
    free_col = '0;
    for (int k = SPARE_ROWS-1; k >= 0; k--) if (!row_valid[k]) free_row = IDX_W'(k);
    for (int k = SPARE_COLS-1; k >= 0; k--) if (!col_valid[k]) free_col = IDX_W'(k);
  end

  // Repair registers: fill the lowest free slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= '0;
      col_valid <= '0;
      for (int k = 0; k < SPARE_ROWS; k++) row_addr[k] <= '0;
      for (int k = 0; k < SPARE_COLS; k++) col_addr[k] <= '0;
    end else if (clear) begin
      row_valid <= '0;
      col_valid <= '0;
    end else begin
      if (ld_row && !rows_full) begin
        row_valid[free_row] <= 1'b1;
        row_addr[free_row]  <= ld_addr[ADDR_W-1:COL_W];
      end
      if (ld_col && !cols_full) begin
        col_valid[free_col] <= 1'b1;
        col_addr[free_col]  <= ld_addr[COL_W-1:0];
      end
    end
  end

  // Steering.
  logic             hit_row, hit_col;
  logic [IDX_W-1:0] row_idx, col_idx;

  always_comb begin
    hit_row = 1'b0;
    hit_col = 1'b0;
    row_idx = '0;
    col_idx = '0;
    for (int k = SPARE_ROWS-1; k >= 0; k--)
      if (row_valid[k] && row_addr[k] == row) begin
        hit_row = 1'b1;
        row_idx = IDX_W'(k);
      end
    for (int k = SPARE_COLS-1; k >= 0; k--)
      if (col_valid[k] && col_addr[k] == col) begin
        hit_col = 1'b1;
        col_idx = IDX_W'(k);
      end
  end

  assign m_en     = en && !hit_row && !hit_col;
  assign m_we     = we;
  assign m_addr   = addr;
  assign m_wdata  = wdata;
  assign s_en     = en && (hit_row || hit_col);
  assign s_we     = we;
  assign s_is_col = !hit_row;
  assign s_idx    = hit_row ? row_idx : col_idx;
  assign s_row    = row;
  assign s_col    = col;
  assign s_wdata  = wdata;

  // An access goes to exactly one array.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(m_en && s_en)) else $error("access steered to both arrays");
  end

  // Remember where the last read went.
  logic spare_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          spare_q <= 1'b0;
    else if (en && !we)  spare_q <= hit_row || hit_col;
  end

  assign rdata = spare_q ? s_rdata : m_rdata;

endmodule
