// tb_test_pattern_gen: sweeps the address counter up and down and checks
// every address and the last-address flag; steps the backgrounds through a
// full cycle and checks the index, the background word and the wrap.
module tb_test_pattern_gen;
  localparam int unsigned N = 16, W = 8, B = 4;
  logic clk = 0, rst_n = 0;
  logic addr_init = 0, down = 0, addr_step = 0, bg_clear = 0, bg_step = 0;
  logic [3:0] addr;
  logic addr_last, bg_last;
  logic [W-1:0] background;
  logic [1:0] bg_index;
  int checks = 0, failures = 0;

  test_pattern_gen #(.NUM_WORDS(N), .DATA_W(W), .NUM_BG(B)) dut (.clk, .rst_n, .addr_init, .down,
    .addr_step, .bg_clear, .bg_step, .addr, .addr_last, .background, .bg_index, .bg_last);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      @(negedge clk); addr_init = 1; down = logic'(d);
      @(negedge clk); addr_init = 0;
      for (int i = 0; i < N; i++) begin
        automatic int exp_a = d ? N - 1 - i : i;
        chk(addr == 4'(exp_a), $sformatf("addr %0d dir %0d got %0d", exp_a, d, addr));
        chk(addr_last == (i == N - 1), "addr_last");
        addr_step = 1; @(negedge clk); addr_step = 0;
      end
    end
    @(negedge clk); bg_clear = 1; @(negedge clk); bg_clear = 0;
    for (int k = 0; k < 2 * B; k++) begin
      chk(bg_index == 2'(k % B), "bg index");
      chk(background == W'(k % B), "background word");
      chk(bg_last == ((k % B) == B - 1), "bg_last");
      bg_step = 1; @(negedge clk); bg_step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
