// bist_pkg: types and helpers shared by the memory BIST/BISR blocks.
//
// The test is a six-element March sequence over the memory under test:
//   E1 w0 | E2 r0 w1 | E3 r1 w0 r0 | E4 w0 r0 w1 | E5 r1 w0 | E6 r0
// "0" and "1" are relative to the current data background: a w0 writes the
// background word, a w1 its complement. Elements E1..E3 walk the addresses
// upwards, E4..E5 downwards and E6 upwards (the element list follows the
// document; the address orders are this design's choice).
//
// The fault types the memory model can be made to show are the ones the
// document names (stuck-at, transition, read/write destructive, deceptive
// read destructive, incorrect read, the coupling family and address
// decoder faults). Their encoding
// and the configuration record are this design's own.
package bist_pkg;

  // March elements, in the order the test controller runs them.
  typedef enum logic [2:0] {
    EL_W0     = 3'd0,  // w0
    EL_R0W1   = 3'd1,  // r0 w1
    EL_R1W0R0 = 3'd2,  // r1 w0 r0
    EL_W0R0W1 = 3'd3,  // w0 r0 w1
    EL_R1W0   = 3'd4,  // r1 w0
    EL_R0     = 3'd5   // r0
  } march_el_e;

  // One March operation: read or write, and the logical value (0 = background).
  typedef struct packed {
    logic is_read;
    logic value;
  } march_op_t;

  // Number of operations per address in an element.
  function automatic int unsigned el_len(march_el_e el);
    case (el)
      EL_W0:     return 1;
      EL_R0W1:   return 2;
      EL_R1W0R0: return 3;
      EL_W0R0W1: return 3;
      EL_R1W0:   return 2;
      default:   return 1;
    endcase
  endfunction

  // Operation number idx (0-based) of element el.
  function automatic march_op_t el_op(march_el_e el, logic [1:0] idx);
    march_op_t op;
    op = '{is_read: 1'b0, value: 1'b0};
    case (el)
      EL_W0:     op = '{1'b0, 1'b0};
      EL_R0W1:   op = (idx == 2'd0) ? march_op_t'{1'b1, 1'b0} : march_op_t'{1'b0, 1'b1};
      EL_R1W0R0: op = (idx == 2'd0) ? march_op_t'{1'b1, 1'b1} :
                      (idx == 2'd1) ? march_op_t'{1'b0, 1'b0} : march_op_t'{1'b1, 1'b0};
      EL_W0R0W1: op = (idx == 2'd0) ? march_op_t'{1'b0, 1'b0} :
                      (idx == 2'd1) ? march_op_t'{1'b1, 1'b0} : march_op_t'{1'b0, 1'b1};
      EL_R1W0:   op = (idx == 2'd0) ? march_op_t'{1'b1, 1'b1} : march_op_t'{1'b0, 1'b0};
      default:   op = '{1'b1, 1'b0};
    endcase
    return op;
  endfunction

  // Address direction of an element: 1 = descending.
  function automatic logic el_down(march_el_e el);
    return (el == EL_W0R0W1) || (el == EL_R1W0);
  endfunction

  // Injectable fault types of the memory model.
  typedef enum logic [3:0] {
    FT_NONE    = 4'd0,
    FT_SA      = 4'd1,   // stuck-at: victim bit always holds pol
    FT_TF      = 4'd2,   // transition fault: victim cannot make the transition to pol
    FT_RDF     = 4'd3,   // read destructive: read of ~pol returns pol and sets the cell to pol
    FT_DRDF    = 4'd4,   // deceptive read destructive: read returns the right value, then flips
    FT_IRF     = 4'd5,   // incorrect read: read returns the complement, cell unchanged
    FT_WDF     = 4'd6,   // write destructive: non-transition write of ~pol flips the cell
    FT_CFID    = 4'd7,   // idempotent coupling: aggressor rising transition forces victim to pol
    FT_CFST    = 4'd8,   // state coupling: while aggressor holds 1, victim reads as pol
    FT_CFDS    = 4'd9,   // disturb coupling: any read or write of the aggressor word flips victim
    FT_TCF     = 4'd10,  // transition coupling: victim write transition to pol fails while aggressor is 1
    FT_AF      = 4'd11   // address decoder: a write to the aggressor word also lands in the victim word
  } fault_type_e;

  // One fault-injection slot. Addresses are flat word addresses.
  typedef struct packed {
    fault_type_e ftype;
    logic        pol;        // polarity / value the fault forces
    logic [15:0] vaddr;      // victim word
    logic [7:0]  vbit;       // victim bit in the word
    logic [15:0] aaddr;      // aggressor word (coupling faults)
    logic [7:0]  abit;       // aggressor bit (coupling faults)
  } fault_cfg_t;

  // Fault kind, as told apart by the response recorder from which expected
  // values a word failed on.
  typedef enum logic [1:0] {
    FK_NONE      = 2'd0,
    FK_FAILS_ON1 = 2'd1,  // only reads expecting 1 fail: stuck-at-0, up-transition, coupling forcing 0
    FK_FAILS_ON0 = 2'd2,  // only reads expecting 0 fail: stuck-at-1, down-transition, incorrect read of 0
    FK_FAILS_ON_BOTH = 2'd3  // both: read destructive, incorrect read of both values, disturb coupling
  } fault_kind_e;

  function automatic fault_kind_e classify(logic fail_exp0, logic fail_exp1);
    case ({fail_exp1, fail_exp0})
      2'b01:   return FK_FAILS_ON0;
      2'b10:   return FK_FAILS_ON1;
      2'b11:   return FK_FAILS_ON_BOTH;
      default: return FK_NONE;
    endcase
  endfunction

endpackage
