// test_pattern_gen: address and data-background generator of the BIST.
//
// It holds the address counter that the March elements walk and the data
// background they write. addr_init loads the first address of an element
// (0 going up, NUM_WORDS-1 going down, as down says) and addr_step moves one
// address in that direction; addr_last is high on the last address of the
// sweep. bg_clear returns to the first background and bg_step moves to the
// next; bg_last is high on the last. wdata(value) is the background for a
// logical 0 and its complement for a logical 1.
// The document has its patterns generated by a neural network it does not
// specify. This generator instead steps through NUM_BG data backgrounds,
// taken from an 8-bit count; the default of 256 is the number of distinct
// patterns the document gives for an 8-bit memory. With DATA_W above 8 the
// background is the count repeated across the word.
module test_pattern_gen #(
  parameter int unsigned NUM_WORDS = 256,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned NUM_BG    = 256,
  localparam int unsigned ADDR_W   = $clog2(NUM_WORDS),
  localparam int unsigned BG_W     = (NUM_BG > 1) ? $clog2(NUM_BG) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              addr_init,
  input  logic              down,
  input  logic              addr_step,
  input  logic              bg_clear,
  input  logic              bg_step,
  output logic [ADDR_W-1:0] addr,
  output logic              addr_last,
  output logic [DATA_W-1:0] background,
  output logic [BG_W-1:0]   bg_index,
  output logic              bg_last
);

  logic dir_down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      dir_down <= 1'b0;
      bg_index <= '0;
    end else begin
      if (addr_init) begin
        dir_down <= down;
        addr     <= down ? ADDR_W'(NUM_WORDS - 1) : '0;
      end else if (addr_step) begin
        addr <= dir_down ? addr - 1'b1 : addr + 1'b1;
      end
      if (bg_clear)     bg_index <= '0;
      else if (bg_step) bg_index <= bg_last ? '0 : bg_index + 1'b1;
    end
  end

  assign addr_last = dir_down ? (addr == '0) : (addr == ADDR_W'(NUM_WORDS - 1));
  assign bg_last   = (bg_index == BG_W'(NUM_BG - 1));

  always_comb begin
    for (int i = 0; i < DATA_W; i++) background[i] = (i % 8 < BG_W) ? bg_index[(i % 8) % BG_W] : 1'b0;
  end

endmodule
