// tb_comparator: random reads against random expected words; checks the
// fail flag and the fail mask against a reference XOR, and that nothing is
// flagged while valid is low.
module tb_comparator;
  localparam int unsigned W = 8;
  logic valid, fail;
  logic [W-1:0] rdata, expected, mask;
  int checks = 0, failures = 0;

  comparator #(.DATA_W(W)) dut (.valid, .rdata, .expected, .fail, .fail_mask(mask));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      valid    = ($urandom_range(0, 3) != 0);
      expected = W'($urandom);
      rdata    = ($urandom_range(0, 1) != 0) ? expected : W'($urandom);
      #1;
      checks++;
      if (valid) begin
        automatic logic [W-1:0] ref_mask = '0;
        for (int b = 0; b < W; b++) ref_mask[b] = (rdata[b] != expected[b]);
        if (mask !== ref_mask || fail !== (ref_mask != 0)) begin
          failures++;
          $display("mismatch rd=%h exp=%h mask=%h fail=%b", rdata, expected, mask, fail);
        end
      end else if (fail || mask != 0) begin
        failures++;
        $display("flag while not valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
