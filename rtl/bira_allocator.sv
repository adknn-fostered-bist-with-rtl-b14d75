// bira_allocator: repair analyzer of the self-repair (built-in redundancy
// analysis). It decides which faulty rows and columns get a spare.
//
// After a test, start makes it read the fault table of the response
// recorder and load the repair registers of redundancy_logic, one entry per
// clock, in two passes over the table:
//   pass 1 (rows): an entry not yet covered by a spare, whose row holds at
//     least THRESH uncovered faulty words, gets a spare row while one is free;
//   pass 2 (columns): every entry still uncovered gets a spare column while
//     one is free, else a spare row while one is free, else the memory is
//     reported unrepairable.
// This is the allocation rule the document gives (threshold two, spare row
// first for rows with two or more faults, then spare columns, carrying on
// while spares remain). The document frames the analysis as a Namib beetle
// optimisation but gives no hardware for it; this block implements only the
// threshold rule. A fault table that overflowed is unrepairable at once.
// Timing: done rises 2*FT_DEPTH + 1 clocks after start (1 clock for an
// overflowed table) and stays high until
// the next start; repairable is valid with done.
module bira_allocator #(
  parameter int unsigned ROWS       = 16,
  parameter int unsigned COLS       = 16,
  parameter int unsigned FT_DEPTH   = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  parameter int unsigned THRESH     = 2,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned COL_W     = $clog2(COLS),
  localparam int unsigned ADDR_W    = ROW_W + COL_W,
  localparam int unsigned IDX_W     = $clog2(FT_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  // fault table
  input  logic [FT_DEPTH-1:0]   ent_valid,
  input  logic [ADDR_W-1:0]     ent_addr [FT_DEPTH],
  input  logic                  overflow,
  // repair registers
  input  logic [SPARE_ROWS-1:0] row_valid,
  input  logic [ROW_W-1:0]      row_addr [SPARE_ROWS],
  input  logic [SPARE_COLS-1:0] col_valid,
  input  logic [COL_W-1:0]      col_addr [SPARE_COLS],
  input  logic                  rows_full,
  input  logic                  cols_full,
  output logic                  ld_row,
  output logic                  ld_col,
  output logic [ADDR_W-1:0]     ld_addr,
  // result
  output logic                  busy,
  output logic                  done,
  output logic                  repairable
);

  typedef enum logic [1:0] {A_IDLE, A_ROWS, A_COLS, A_DONE} astate_e;
  astate_e          state;
  logic [IDX_W-1:0] idx;
  logic             unrepairable;

  function automatic logic [ROW_W-1:0] row_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:COL_W];
  endfunction
  function automatic logic [COL_W-1:0] col_of(logic [ADDR_W-1:0] a);
    return a[COL_W-1:0];
  endfunction

  // Which table entries are already covered by a spare.
  logic [FT_DEPTH-1:0] covered;
  always_comb begin
    for (int j = 0; j < FT_DEPTH; j++) begin
      covered[j] = 1'b0;
      for (int k = 0; k < SPARE_ROWS; k++)
        if (row_valid[k] && row_addr[k] == row_of(ent_addr[j])) covered[j] = 1'b1;
      for (int k = 0; k < SPARE_COLS; k++)
        if (col_valid[k] && col_addr[k] == col_of(ent_addr[j])) covered[j] = 1'b1;
    end
  end

  // Uncovered faulty words in the row of the current entry.
  logic [IDX_W:0] row_count;
  always_comb begin
    row_count = '0;
    for (int j = 0; j < FT_DEPTH; j++)
      if (ent_valid[j] && !covered[j] && row_of(ent_addr[j]) == row_of(ent_addr[idx]))
        row_count = row_count + 1'b1;
  end

  logic cur_open;  // current entry needs a spare
  assign cur_open = ent_valid[idx] && !covered[idx];

  always_comb begin
    ld_row  = 1'b0;
    ld_col  = 1'b0;
    ld_addr = ent_addr[idx];
    if (state == A_ROWS && cur_open && 32'(row_count) >= THRESH && !rows_full)
      ld_row = 1'b1;
    if (state == A_COLS && cur_open) begin
      if (!cols_full)      ld_col = 1'b1;
      else if (!rows_full) ld_row = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= A_IDLE;
      idx          <= '0;
      unrepairable <= 1'b0;
    end else begin
      case (state)
        A_IDLE, A_DONE: if (start) begin
          idx          <= '0;
          unrepairable <= overflow;
          state        <= overflow ? A_DONE : A_ROWS;
        end
        A_ROWS: begin
          idx <= idx + 1'b1;
          if (32'(idx) == FT_DEPTH - 1) state <= A_COLS;
        end
        A_COLS: begin
          if (cur_open && cols_full && rows_full) unrepairable <= 1'b1;
          idx <= idx + 1'b1;
          if (32'(idx) == FT_DEPTH - 1) state <= A_DONE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  // The analysis runs only on a stable fault table: no restart while busy.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(start && busy)) else $error("analysis restarted while busy");
  end

  assign busy       = (state == A_ROWS) || (state == A_COLS);
  assign done       = (state == A_DONE);
  assign repairable = !unrepairable;

endmodule
