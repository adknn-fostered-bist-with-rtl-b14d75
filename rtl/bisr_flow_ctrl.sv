// bisr_flow_ctrl: sequences test, repair and re-test.
//
// On start it clears the fault table and the repair registers and runs the
// March test (pass 1). A clean pass 1 ends with result RES_PASS. Otherwise,
// unless the fault table overflowed, it runs the repair analyzer, which loads
// the repair registers; then it clears the fault table and runs the March
// test again through the repair logic (pass 2). A clean pass 2 gives
// RES_REPAIRED; a failing pass 2, an overflow or an analyzer that runs out of
// spares gives RES_UNREPAIRABLE. The order follows the document's flow (test,
// send the failure data to the self-repair, repair, test the repaired
// memory); the exact hand-over, one clock per launch state, is this design's.
// done is high from the end of the flow until the next start; soft_reset
// returns to idle.
module bisr_flow_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_reset,
  input  logic       start,
  // test controller
  output logic       test_start,
  input  logic       test_done,
  // response recorder
  output logic       rec_clear,
  input  logic       rec_any_fail,
  input  logic       rec_overflow,
  // repair analyzer and repair registers
  output logic       rl_clear,
  output logic       alloc_start,
  input  logic       alloc_done,
  input  logic       alloc_repairable,
  // status
  output logic       busy,
  output logic       done,
  output logic [1:0] result,
  output logic       pass1_failed,
  output logic       in_retest
);

  localparam logic [1:0] RES_NONE = 2'd0, RES_PASS = 2'd1,
                         RES_REPAIRED = 2'd2, RES_UNREPAIRABLE = 2'd3;

  typedef enum logic [2:0] {
    F_IDLE, F_LAUNCH1, F_TEST1, F_LAUNCH_A, F_ALLOC, F_LAUNCH2, F_TEST2, F_DONE
  } fstate_e;
  fstate_e state;

  assign test_start  = (state == F_LAUNCH1) || (state == F_LAUNCH2);
  assign rec_clear   = test_start;
  assign rl_clear    = (state == F_LAUNCH1);
  assign alloc_start = (state == F_LAUNCH_A);
  assign done        = (state == F_DONE);
  assign busy        = (state != F_IDLE) && (state != F_DONE);
  assign in_retest   = (state == F_LAUNCH2) || (state == F_TEST2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= F_IDLE;
      result       <= RES_NONE;
      pass1_failed <= 1'b0;
    end else if (soft_reset) begin
      state        <= F_IDLE;
      result       <= RES_NONE;
      pass1_failed <= 1'b0;
    end else begin
      case (state)
        F_IDLE, F_DONE: if (start) begin
          state        <= F_LAUNCH1;
          result       <= RES_NONE;
          pass1_failed <= 1'b0;
        end
        F_LAUNCH1: state <= F_TEST1;
        F_TEST1: if (test_done) begin
          pass1_failed <= rec_any_fail;
          if (!rec_any_fail) begin
            result <= RES_PASS;
            state  <= F_DONE;
          end else if (rec_overflow) begin
            result <= RES_UNREPAIRABLE;
            state  <= F_DONE;
          end else begin
            state <= F_LAUNCH_A;
          end
        end
        F_LAUNCH_A: state <= F_ALLOC;
        F_ALLOC: if (alloc_done) begin
          if (alloc_repairable) state <= F_LAUNCH2;
          else begin
            result <= RES_UNREPAIRABLE;
            state  <= F_DONE;
          end
        end
        F_LAUNCH2: state <= F_TEST2;
        F_TEST2: if (test_done) begin
          result <= rec_any_fail ? RES_UNREPAIRABLE : RES_REPAIRED;
          state  <= F_DONE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
