// start_register: the control register that starts and steers the BIST.
//
// Software (or a tester) writes a cfg word with cfg_we. Its fields, named as
// in the document's start register, are: clock (BIST clock enable), stop,
// start, resume, reset, halt-on-error and memory ID. start, resume and reset
// act once: a write with the bit set gives a one-clock pulse. clock, stop,
// halt-on-error and memory ID are held until the next write; stop is also
// cleared by a resume. The bit positions are this design's choice:
//   [0] start  [1] stop  [2] resume  [3] reset  [4] halt_on_error
//   [5] clock enable  [MEM_ID_W+5:6] memory ID
// Outputs change one clock after the write.
module start_register #(
  parameter int unsigned MEM_ID_W = 4,
  localparam int unsigned CFG_W   = MEM_ID_W + 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [CFG_W-1:0]    cfg_wdata,
  output logic [CFG_W-1:0]    cfg_rdata,
  output logic                start_pulse,
  output logic                stop,
  output logic                resume_pulse,
  output logic                soft_reset,
  output logic                halt_on_error,
  output logic                bist_clk_en,
  output logic [MEM_ID_W-1:0] mem_id
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_pulse   <= 1'b0;
      stop          <= 1'b0;
      resume_pulse  <= 1'b0;
      soft_reset    <= 1'b0;
      halt_on_error <= 1'b0;
      bist_clk_en   <= 1'b1;
      mem_id        <= '0;
    end else begin
      start_pulse  <= cfg_we && cfg_wdata[0];
      resume_pulse <= cfg_we && cfg_wdata[2];
      soft_reset   <= cfg_we && cfg_wdata[3];
      if (cfg_we) begin
        stop          <= cfg_wdata[1] && !cfg_wdata[2];
        halt_on_error <= cfg_wdata[4];
        bist_clk_en   <= cfg_wdata[5];
        mem_id        <= cfg_wdata[CFG_W-1:6];
      end
    end
  end

  assign cfg_rdata = {mem_id, bist_clk_en, halt_on_error, 1'b0, 1'b0, stop, 1'b0};

endmodule
