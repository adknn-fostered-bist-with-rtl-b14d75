// tb_mut_sram: checks the memory model fault-free (random writes and reads
// against a reference array) and then each injectable fault type with a
// short operation sequence whose outcome is worked out by hand. Victim is
// word 3 bit 2, aggressor word 7 bit 5.
module tb_mut_sram;
  import bist_pkg::*;
  localparam int unsigned N = 16, W = 8, NF = 2;
  logic clk = 0, en = 0, we = 0;
  logic [3:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  fault_cfg_t fault [NF];
  logic [W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  mut_sram #(.NUM_WORDS(N), .DATA_W(W), .NUM_FI(NF)) dut (.clk, .en, .we, .addr, .wdata, .rdata, .fault);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [W-1:0] d);
    @(negedge clk); en = 1; we = 1; addr = 4'(a); wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd_chk(input int a, input logic [W-1:0] e, input string what);
    @(negedge clk); en = 1; we = 0; addr = 4'(a);
    @(negedge clk); en = 0;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %s: addr %0d read %h expected %h", what, a, rdata, e); end
  endtask

  task automatic set_fault(input fault_type_e t, input logic p);
    fault[0] = '{ftype: t, pol: p, vaddr: 16'd3, vbit: 8'd2, aaddr: 16'd7, abit: 8'd5};
  endtask

  initial begin
    fault[0] = '0;
    fault[1] = '0;
    // fault-free
    for (int i = 0; i < N; i++) begin ref_mem[i] = W'($urandom); wr(i, ref_mem[i]); end
    for (int i = 0; i < 40; i++) begin
      automatic int a = $urandom_range(0, N - 1);
      if ($urandom_range(0, 1) != 0) begin ref_mem[a] = W'($urandom); wr(a, ref_mem[a]); end
      else rd_chk(a, ref_mem[a], "fault-free");
    end
    // slot with a victim outside the array does nothing
    fault[1] = '{ftype: FT_SA, pol: 1'b1, vaddr: 16'd40, vbit: 8'd0, aaddr: 16'd0, abit: 8'd0};
    wr(5, 8'h00); rd_chk(5, 8'h00, "out-of-range slot");

    set_fault(FT_SA, 1);   wr(3, 8'h00); rd_chk(3, 8'h04, "SA1"); wr(3, 8'hFF); rd_chk(3, 8'hFF, "SA1 b");
    set_fault(FT_SA, 0);   wr(3, 8'hFF); rd_chk(3, 8'hFB, "SA0");
    set_fault(FT_TF, 1);   wr(3, 8'h00); wr(3, 8'hFF); rd_chk(3, 8'hFB, "TF up");
    set_fault(FT_TF, 0);   wr(3, 8'hFF); wr(3, 8'h00); rd_chk(3, 8'h04, "TF down");
    set_fault(FT_RDF, 1);  wr(3, 8'h00); rd_chk(3, 8'h04, "RDF first read"); rd_chk(3, 8'h04, "RDF cell flipped");
    set_fault(FT_DRDF, 1); wr(3, 8'h00); rd_chk(3, 8'h00, "DRDF first read"); rd_chk(3, 8'h04, "DRDF cell flipped");
    set_fault(FT_IRF, 1);  wr(3, 8'h00); rd_chk(3, 8'h04, "IRF read");
    fault[0].ftype = FT_NONE;                  rd_chk(3, 8'h00, "IRF cell unchanged");
    set_fault(FT_WDF, 1);  wr(3, 8'hFF); wr(3, 8'h00); rd_chk(3, 8'h00, "WDF transition write ok");
                           wr(3, 8'h00); rd_chk(3, 8'h04, "WDF non-transition write flips");
    set_fault(FT_CFID, 0); wr(3, 8'hFF); wr(7, 8'h00); rd_chk(3, 8'hFF, "CFid no aggressor event");
                           wr(7, 8'h20); rd_chk(3, 8'hFB, "CFid aggressor rise");
                           rd_chk(7, 8'h20, "CFid aggressor intact");
    set_fault(FT_CFST, 0); wr(3, 8'hFF); wr(7, 8'h20); rd_chk(3, 8'hFB, "CFst aggressor 1");
                           wr(7, 8'h00); rd_chk(3, 8'hFF, "CFst aggressor 0");
    set_fault(FT_CFDS, 1); wr(3, 8'h00); rd_chk(3, 8'h00, "CFds before");
                           rd_chk(7, 8'h00, "CFds aggressor read"); rd_chk(3, 8'h04, "CFds victim disturbed");
    set_fault(FT_TCF, 1);  wr(7, 8'h20); wr(3, 8'h00); wr(3, 8'hFF); rd_chk(3, 8'hFB, "TCF aggressor 1");
                           wr(7, 8'h00); wr(3, 8'h00); wr(3, 8'hFF); rd_chk(3, 8'hFF, "TCF aggressor 0");
    set_fault(FT_AF, 0);   wr(3, 8'h11); wr(7, 8'h6C); rd_chk(3, 8'h6C, "AF write lands in victim word");
                           rd_chk(7, 8'h6C, "AF aggressor written"); wr(3, 8'h22); rd_chk(7, 8'h6C, "AF victim write stays");
    // other words untouched by all of this
    rd_chk(0, ref_mem[0], "other word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
