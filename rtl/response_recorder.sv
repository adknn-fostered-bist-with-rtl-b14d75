// response_recorder: output response recorder and fault table of the BIST.
//
// Each failure record from the test controller (address, mask of failing
// bits, expected word) is looked up in a fault table of FT_DEPTH entries. A
// record for an address already in the table ORs its mask in; a new address
// takes the next free entry; with the table full, overflow is set. Each entry
// also notes whether its word failed on bits expected 0, on bits expected 1,
// or both, from which kind (see bist_pkg::classify) gives the fault kind.
// The recorder also keeps what the document says it keeps: the memory ID
// (latched from mem_id when clear is given at the start of a test), the
// number of failing reads, the number of faulty words and of faulty cells
// (bits), and the first failing address. The table is read by the repair
// analyzer through the ent_* outputs. clear empties everything in one clock.
// Records arrive at most one every two clocks; an entry is updated the clock
// after rec_valid.
module response_recorder
  import bist_pkg::*;
#(
  parameter int unsigned NUM_WORDS = 256,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned FT_DEPTH  = 8,
  parameter int unsigned MEM_ID_W  = 4,
  localparam int unsigned ADDR_W   = $clog2(NUM_WORDS),
  localparam int unsigned CNT_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [MEM_ID_W-1:0] mem_id,
  input  logic                rec_valid,
  input  logic [ADDR_W-1:0]   rec_addr,
  input  logic [DATA_W-1:0]   rec_mask,
  input  logic [DATA_W-1:0]   rec_exp,
  // fault table
  output logic [FT_DEPTH-1:0] ent_valid,
  output logic [ADDR_W-1:0]   ent_addr [FT_DEPTH],
  output logic [DATA_W-1:0]   ent_mask [FT_DEPTH],
  output fault_kind_e         ent_kind [FT_DEPTH],
  // summary
  output logic [MEM_ID_W-1:0] rec_mem_id,
  output logic [CNT_W-1:0]    fail_count,
  output logic [CNT_W-1:0]    faulty_words,
  output logic [CNT_W-1:0]    faulty_cells,
  output logic [ADDR_W-1:0]   first_fail_addr,
  output logic                any_fail,
  output logic                overflow
);

  logic [FT_DEPTH-1:0] fail0, fail1;

  // Look-up of the incoming address, and the first free entry.
  logic                        hit, has_free;
  logic [$clog2(FT_DEPTH)-1:0] hit_idx, free_idx;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = FT_DEPTH-1; i >= 0; i--) begin
      if (ent_valid[i] && ent_addr[i] == rec_addr) begin
        hit     = 1'b1;
        hit_idx = ($clog2(FT_DEPTH))'(i);
      end
      if (!ent_valid[i]) begin
        has_free = 1'b1;
        free_idx = ($clog2(FT_DEPTH))'(i);
      end
    end
  end

  logic f0_in, f1_in;
  assign f0_in = |(rec_mask & ~rec_exp);
  assign f1_in = |(rec_mask & rec_exp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid       <= '0;
      fail0           <= '0;
      fail1           <= '0;
      for (int i = 0; i < FT_DEPTH; i++) begin
        ent_addr[i] <= '0;
        ent_mask[i] <= '0;
      end
      rec_mem_id      <= '0;
      fail_count      <= '0;
      first_fail_addr <= '0;
      any_fail        <= 1'b0;
      overflow        <= 1'b0;
    end else if (clear) begin
      ent_valid  <= '0;
      fail0      <= '0;
      fail1      <= '0;
      rec_mem_id <= mem_id;
      fail_count <= '0;
      any_fail   <= 1'b0;
      overflow   <= 1'b0;
    end else if (rec_valid) begin
      if (fail_count != '1) fail_count <= fail_count + 1'b1;
      if (!any_fail) first_fail_addr <= rec_addr;
      any_fail <= 1'b1;
      if (hit) begin
        ent_mask[hit_idx] <= ent_mask[hit_idx] | rec_mask;
        fail0[hit_idx]    <= fail0[hit_idx] | f0_in;
        fail1[hit_idx]    <= fail1[hit_idx] | f1_in;
      end else if (has_free) begin
        ent_valid[free_idx] <= 1'b1;
        ent_addr[free_idx]  <= rec_addr;
        ent_mask[free_idx]  <= rec_mask;
        fail0[free_idx]     <= f0_in;
        fail1[free_idx]     <= f1_in;
      end else begin
        overflow <= 1'b1;
      end
    end
  end

  always_comb begin
    faulty_words = '0;
    faulty_cells = '0;
    for (int i = 0; i < FT_DEPTH; i++) begin
      ent_kind[i] = ent_valid[i] ? classify(fail0[i], fail1[i]) : FK_NONE;
      if (ent_valid[i]) begin
        faulty_words = faulty_words + 1'b1;
        faulty_cells = faulty_cells + CNT_W'($countones(ent_mask[i]));
      end
    end
  end

endmodule
