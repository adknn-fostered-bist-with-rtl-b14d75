// mut_sram: memory under test, a single-port synchronous SRAM with fault
// injection.
//
// The array holds NUM_WORDS words of DATA_W bits, addressed by a flat word
// address {row, column}. A read returns its word on rdata one clock after en
// with we low; a write stores wdata at the clock edge. rdata holds its value
// between reads.
//
// NUM_FI fault slots (fault_cfg_t, see bist_pkg) make the array misbehave the
// way the faulty SRAM cells the document lists do: stuck-at, transition,
// read destructive, deceptive read destructive, incorrect read, write
// destructive, and idempotent, state, disturb and transition coupling. Each
// slot acts on one victim bit and, for coupling faults, one aggressor bit.
// The exact rules of each fault, and the slot encoding, are this design's
// reading of the document's fault descriptions:
//   SA   victim always reads pol and is stored as pol
//   TF   a write that would take the victim from ~pol to pol leaves it at ~pol
//   RDF  reading the victim while it holds ~pol returns pol and sets it to pol
//   DRDF reading the victim while it holds ~pol returns ~pol, then sets it to pol
//   IRF  reading the victim while it holds ~pol returns pol, cell unchanged
//   WDF  writing ~pol over a stored ~pol sets the victim to pol
//   CFID a 0->1 write of the aggressor bit sets the victim to pol
//   CFST while the aggressor bit holds 1 the victim reads as pol
//   CFDS any read or write of the aggressor word sets the victim to pol
//   TCF  while the aggressor bit holds 1, a write taking the victim to pol fails
//   AF   address decoder fault: a write to the aggressor word also writes the
//        whole victim word (victim bit and polarity are not used)
// A slot whose victim or aggressor lies outside the array has no effect.
module mut_sram
  import bist_pkg::*;
#(
  parameter int unsigned NUM_WORDS = 256,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned NUM_FI    = 4,
  localparam int unsigned ADDR_W   = $clog2(NUM_WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  fault_cfg_t        fault [NUM_FI]
);

  logic [DATA_W-1:0] mem [NUM_WORDS];

  // Per-slot decode.
  logic [NUM_FI-1:0] v_hit, a_hit, v_ok, a_ok, a_state;
  logic [ADDR_W-1:0] vaddr [NUM_FI];
  logic [ADDR_W-1:0] aaddr [NUM_FI];

  always_comb begin
    for (int s = 0; s < NUM_FI; s++) begin
      v_ok[s]    = (32'(fault[s].vaddr) < NUM_WORDS) && (32'(fault[s].vbit) < DATA_W)
                   && (fault[s].ftype != FT_NONE);
      a_ok[s]    = (32'(fault[s].aaddr) < NUM_WORDS) && (32'(fault[s].abit) < DATA_W);
      vaddr[s]   = fault[s].vaddr[ADDR_W-1:0];
      aaddr[s]   = fault[s].aaddr[ADDR_W-1:0];
      v_hit[s]   = v_ok[s] && (vaddr[s] == addr);
      a_hit[s]   = v_ok[s] && a_ok[s] && (aaddr[s] == addr);
      a_state[s] = a_ok[s] && mem[aaddr[s]][fault[s].abit[$clog2(DATA_W)-1:0]];
    end
  end

  // Word actually stored by a write, and word returned by a read.
  logic [DATA_W-1:0] old_word, store_word, read_word;

  always_comb begin
    old_word   = mem[addr];
    store_word = wdata;
    read_word  = old_word;
    for (int s = 0; s < NUM_FI; s++) begin
      if (v_hit[s]) begin
        automatic int unsigned b = 32'(fault[s].vbit);
        automatic logic p = fault[s].pol;
        case (fault[s].ftype)
          FT_SA: begin
            store_word[b] = p;
            read_word[b]  = p;
          end
          FT_TF:   if (old_word[b] == ~p && wdata[b] == p) store_word[b] = ~p;
          FT_WDF:  if (old_word[b] == ~p && wdata[b] == ~p) store_word[b] = p;
          FT_TCF:  if (a_state[s] && old_word[b] == ~p && wdata[b] == p) store_word[b] = ~p;
          FT_RDF, FT_IRF: if (old_word[b] == ~p) read_word[b] = p;
          FT_CFST: if (a_state[s]) read_word[b] = p;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= store_word;
      else    rdata     <= read_word;
      // Side effects on victims: read-destructive faults and coupling.
      for (int s = 0; s < NUM_FI; s++) begin
        automatic int unsigned b  = 32'(fault[s].vbit);
        automatic int unsigned ab = 32'(fault[s].abit);
        if (v_hit[s] && !we && (fault[s].ftype == FT_RDF || fault[s].ftype == FT_DRDF)
            && mem[addr][b] == ~fault[s].pol)
          mem[vaddr[s]][b] <= fault[s].pol;
        if (a_hit[s] && we && fault[s].ftype == FT_AF && vaddr[s] != addr)
          mem[vaddr[s]] <= store_word;
        if (a_hit[s] && fault[s].ftype == FT_CFDS)
          mem[vaddr[s]][b] <= fault[s].pol;
        if (a_hit[s] && we && fault[s].ftype == FT_CFID && !mem[addr][ab] && wdata[ab])
          mem[vaddr[s]][b] <= fault[s].pol;
      end
    end
  end

endmodule
