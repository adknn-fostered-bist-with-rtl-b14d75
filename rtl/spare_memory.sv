// spare_memory: the redundant storage used by self-repair.
//
// SPARE_ROWS spare rows of COLS words and SPARE_COLS spare columns of ROWS
// words, each word DATA_W bits. An access names either a spare row
// (is_col = 0, idx = spare row number, word picked by col) or a spare column
// (is_col = 1, idx = spare column number, word picked by row). Reads return
// the word on rdata one clock after en with we low, like the main array.
// The spares are taken to be fault-free; the document does not say how they
// are built, so plain register arrays are used here.
module spare_memory #(
  parameter int unsigned ROWS       = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned COL_W     = $clog2(COLS),
  localparam int unsigned SP_MAX    = SPARE_ROWS > SPARE_COLS ? SPARE_ROWS : SPARE_COLS,
  localparam int unsigned IDX_W     = SP_MAX > 1 ? $clog2(SP_MAX) : 1
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic              is_col,
  input  logic [IDX_W-1:0]  idx,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] srow [SPARE_ROWS][COLS];
  logic [DATA_W-1:0] scol [SPARE_COLS][ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (!is_col && 32'(idx) < SPARE_ROWS) begin
        if (we) srow[idx][col] <= wdata;
        else    rdata          <= srow[idx][col];
      end else if (is_col && 32'(idx) < SPARE_COLS) begin
        if (we) scol[idx][row] <= wdata;
        else    rdata          <= scol[idx][row];
      end
    end
  end

endmodule
