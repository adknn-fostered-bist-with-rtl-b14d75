// tb_response_recorder: feeds failure records and checks the fault table
// (allocation, merging of repeated addresses, masks), the fault kinds, the
// counters, the first failing address, the memory ID, overflow and clear.
module tb_response_recorder;
  import bist_pkg::*;
  localparam int unsigned N = 256, W = 8, FT = 4;
  logic clk = 0, rst_n = 0, clear = 0, rec_valid = 0;
  logic [3:0] mem_id = 4'd6;
  logic [7:0] rec_addr = '0;
  logic [W-1:0] rec_mask = '0, rec_exp = '0;
  logic [FT-1:0] ent_valid;
  logic [7:0] ent_addr [FT];
  logic [W-1:0] ent_mask [FT];
  fault_kind_e ent_kind [FT];
  logic [3:0] rec_mem_id;
  logic [15:0] fail_count, faulty_words, faulty_cells;
  logic [7:0] first_fail_addr;
  logic any_fail, overflow;
  int checks = 0, failures = 0;

  response_recorder #(.NUM_WORDS(N), .DATA_W(W), .FT_DEPTH(FT), .MEM_ID_W(4)) dut (
    .clk, .rst_n, .clear, .mem_id, .rec_valid, .rec_addr, .rec_mask, .rec_exp,
    .ent_valid, .ent_addr, .ent_mask, .ent_kind, .rec_mem_id, .fail_count, .faulty_words,
    .faulty_cells, .first_fail_addr, .any_fail, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rec(input logic [7:0] a, input logic [W-1:0] m, input logic [W-1:0] e);
    @(negedge clk); rec_valid = 1; rec_addr = a; rec_mask = m; rec_exp = e;
    @(negedge clk); rec_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(rec_mem_id == 6 && !any_fail && ent_valid == 0 && fail_count == 0, "after clear");
    // word 0x12: bit 0 fails expecting 1 (stuck-at-0 like)
    rec(8'h12, 8'h01, 8'hFF);
    chk(ent_valid == 4'b0001 && ent_addr[0] == 8'h12 && ent_mask[0] == 8'h01, "first entry");
    chk(ent_kind[0] == FK_FAILS_ON1, "kind fails on 1");
    chk(first_fail_addr == 8'h12 && any_fail, "first fail addr");
    // same word again, bit 0 expecting 1 again, and bit 3 expecting 0
    rec(8'h12, 8'h01, 8'h01);
    rec(8'h12, 8'h08, 8'h00);
    chk(ent_valid == 4'b0001 && ent_mask[0] == 8'h09, "merged entry");
    chk(ent_kind[0] == FK_FAILS_ON_BOTH, "kind both");
    // three more words; 0x40 fails expecting 0
    rec(8'h40, 8'h80, 8'h00);
    chk(ent_kind[1] == FK_FAILS_ON0, "kind fails on 0");
    rec(8'h41, 8'h03, 8'h03);
    rec(8'hFF, 8'h10, 8'hFF);
    chk(ent_valid == 4'b1111 && !overflow, "table full, no overflow");
    chk(faulty_words == 4 && faulty_cells == 16'd6, "word and cell counts");
    chk(fail_count == 6, "fail count");
    chk(first_fail_addr == 8'h12, "first fail addr kept");
    // a fifth word overflows, a known one still merges
    rec(8'h77, 8'h01, 8'h00);
    chk(overflow, "overflow");
    rec(8'h41, 8'h04, 8'h00);
    chk(ent_mask[2] == 8'h07, "merge after overflow");
    chk(fail_count == 8, "fail count 8");
    mem_id = 4'd2;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(ent_valid == 0 && !overflow && fail_count == 0 && faulty_words == 0 && rec_mem_id == 2, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
