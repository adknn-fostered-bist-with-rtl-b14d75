// comparator: checks a word read from the memory under test against the
// word the March test expects.
//
// Purely combinational. When valid is high (a read issued one clock earlier
// has its data on rdata), fail goes high if any bit differs, and fail_mask
// marks the differing bits (rdata XOR expected). With valid low both are 0.
// The document's comparator compares the read data with the chosen pattern;
// the bitwise XOR and the mask output are this design's form of it.
module comparator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              valid,
  input  logic [DATA_W-1:0] rdata,
  input  logic [DATA_W-1:0] expected,
  output logic              fail,
  output logic [DATA_W-1:0] fail_mask
);

  assign fail_mask = valid ? (rdata ^ expected) : '0;
  assign fail      = |fail_mask;

endmodule
