// tb_start_register: writes each field of the start register and checks the
// one-clock pulses (start, resume, reset), the held levels (stop, halt on
// error, clock enable, memory ID), stop cleared by resume, and read-back.
module tb_start_register;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [9:0] cfg_wdata = '0, cfg_rdata;
  logic start_pulse, stop, resume_pulse, soft_reset, halt_on_error, bist_clk_en;
  logic [3:0] mem_id;
  int checks = 0, failures = 0;

  start_register #(.MEM_ID_W(4)) dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .cfg_rdata,
    .start_pulse, .stop, .resume_pulse, .soft_reset, .halt_on_error, .bist_clk_en, .mem_id);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [9:0] v);
    @(negedge clk); cfg_we = 1; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(bist_clk_en && !stop && !start_pulse && mem_id == 0, "reset values");
    // start with mem id 5, clock on, halt on error
    wr({4'd5, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1});
    chk(start_pulse, "start pulse");
    chk(mem_id == 5 && halt_on_error && bist_clk_en, "held fields");
    chk(cfg_rdata == {4'd5, 1'b1, 1'b1, 4'b0}, "read back");
    @(negedge clk);
    chk(!start_pulse, "start pulse is one clock");
    chk(mem_id == 5 && halt_on_error, "fields held after write");
    wr({4'd5, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0});
    chk(stop && !start_pulse, "stop set");
    repeat (3) @(negedge clk);
    chk(stop, "stop held");
    wr({4'd5, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0});
    chk(resume_pulse && !stop && !halt_on_error, "resume clears stop");
    @(negedge clk);
    chk(!resume_pulse, "resume pulse is one clock");
    wr({4'd9, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0});
    chk(soft_reset && !bist_clk_en && mem_id == 9, "reset pulse, clock off");
    @(negedge clk);
    chk(!soft_reset, "reset pulse is one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
