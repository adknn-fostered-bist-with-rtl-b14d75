// test_controller: the March test controller of the BIST.
//
// It walks the six March elements of bist_pkg (w0; r0 w1; r1 w0 r0;
// w0 r0 w1; r1 w0; r0) over every address, once for each data background of
// the pattern generator, issuing one memory operation per clock. The states
// follow the document: idle, the six elements, and a failure-record state.
// A read's data are compared one clock later (exp_q / rd_pending_q feed the
// comparator). When the comparator reports a failure, the controller issues
// nothing in that clock, latches the failing address, expected word and fail
// mask, and spends the next clock in FAIL_REC, where rec_valid hands them to
// the response recorder; it then returns to the element it left. So each
// failing read costs two clocks, and a clean test of N words and B
// backgrounds takes 12*N*B + 2 clocks from start to done.
// Control inputs come from the start register: stop pauses after the current
// operation and resume continues; with halt_on_error set, the controller also
// pauses after every recorded failure (halted = 1) until resume; clk_en low
// freezes it (a start is still taken, a resume is not). done stays high
// until the next start.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned NUM_WORDS = 256,
  parameter int unsigned DATA_W    = 8,
  localparam int unsigned ADDR_W   = $clog2(NUM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              soft_reset,
  input  logic              clk_en,
  input  logic              start,
  input  logic              stop,
  input  logic              resume,
  input  logic              halt_on_error,
  // pattern generator
  output logic              tpg_addr_init,
  output logic              tpg_down,
  output logic              tpg_addr_step,
  output logic              tpg_bg_clear,
  output logic              tpg_bg_step,
  input  logic [ADDR_W-1:0] tpg_addr,
  input  logic              tpg_addr_last,
  input  logic [DATA_W-1:0] tpg_background,
  input  logic              tpg_bg_last,
  // memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  // comparator
  output logic              rd_pending_q,
  output logic [DATA_W-1:0] exp_q,
  input  logic              cmp_fail,
  input  logic [DATA_W-1:0] cmp_mask,
  // failure record
  output logic              rec_valid,
  output logic [ADDR_W-1:0] rec_addr,
  output logic [DATA_W-1:0] rec_mask,
  output logic [DATA_W-1:0] rec_exp,
  // status
  output logic              busy,
  output logic              done,
  output logic              paused,
  output logic              halted,
  output march_el_e         element
);

  typedef enum logic [2:0] {
    S_IDLE, S_RUN, S_FAIL_REC, S_PAUSE, S_DRAIN, S_DONE
  } state_e;

  state_e            state, state_d;
  logic [1:0]        op_idx;
  logic [ADDR_W-1:0] addr_q;
  logic              fail_now;
  march_op_t         op;
  logic              issue, last_op_of_el, last_el, finish;

  assign fail_now      = rd_pending_q && cmp_fail;
  assign op            = el_op(element, op_idx);
  assign issue         = clk_en && (state == S_RUN) && !fail_now && !stop;
  assign last_op_of_el = (32'(op_idx) == el_len(element) - 1);
  assign last_el       = (element == EL_R0);
  assign finish        = issue && last_op_of_el && tpg_addr_last && last_el && tpg_bg_last;

  // Memory operation of this clock.
  assign mem_en    = issue;
  assign mem_we    = !op.is_read;
  assign mem_addr  = tpg_addr;
  assign mem_wdata = op.value ? ~tpg_background : tpg_background;

  // Pattern generator stepping.
  always_comb begin
    tpg_addr_init = 1'b0;
    tpg_down      = 1'b0;
    tpg_addr_step = 1'b0;
    tpg_bg_clear  = 1'b0;
    tpg_bg_step   = 1'b0;
    if ((state == S_IDLE || state == S_DONE) && start) begin
      tpg_addr_init = 1'b1;
      tpg_down      = el_down(EL_W0);
      tpg_bg_clear  = 1'b1;
    end else if (issue && last_op_of_el) begin
      if (!tpg_addr_last) begin
        tpg_addr_step = 1'b1;
      end else if (last_el) begin
        tpg_bg_step   = !tpg_bg_last;
        tpg_addr_init = 1'b1;
        tpg_down      = el_down(EL_W0);
      end else begin
        tpg_addr_init = 1'b1;
        tpg_down      = el_down(march_el_e'(element + 3'd1));
      end
    end
  end

  // Next state.
  always_comb begin
    state_d = state;
    case (state)
      S_IDLE:     if (start) state_d = S_RUN;
      S_RUN:      if (fail_now) state_d = S_FAIL_REC;
                  else if (finish) state_d = S_DRAIN;
                  else if (stop) state_d = S_PAUSE;
      S_FAIL_REC: state_d = (halt_on_error || stop) ? S_PAUSE : S_RUN;
      S_PAUSE:    if (fail_now) state_d = S_FAIL_REC;
                  else if (resume) state_d = S_RUN;
      S_DRAIN:    state_d = fail_now ? S_FAIL_REC : S_DONE;
      S_DONE:     if (start) state_d = S_RUN;
      default:    state_d = S_IDLE;
    endcase
  end

  logic finished_q;  // the last operation has been issued

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      element      <= EL_W0;
      op_idx       <= '0;
      rd_pending_q <= 1'b0;
      exp_q        <= '0;
      addr_q       <= '0;
      rec_valid    <= 1'b0;
      rec_addr     <= '0;
      rec_mask     <= '0;
      rec_exp      <= '0;
      halted       <= 1'b0;
      finished_q   <= 1'b0;
    end else if (soft_reset) begin
      state        <= S_IDLE;
      element      <= EL_W0;
      op_idx       <= '0;
      rd_pending_q <= 1'b0;
      rec_valid    <= 1'b0;
      halted       <= 1'b0;
      finished_q   <= 1'b0;
    end else if (clk_en || ((state == S_IDLE || state == S_DONE) && start)) begin
      // Leaving FAIL_REC for DRAIN's successor: a failure on the very last
      // read returns to DONE rather than RUN.
      if (state == S_FAIL_REC && finished_q && !(halt_on_error || stop))
        state <= S_DONE;
      else if (state == S_PAUSE && resume && finished_q)
        state <= S_DONE;
      else
        state <= state_d;

      rd_pending_q <= issue && op.is_read;
      if (issue) begin
        exp_q  <= mem_wdata;
        addr_q <= tpg_addr;
      end

      rec_valid <= fail_now;
      if (fail_now) begin
        rec_addr <= addr_q;
        rec_mask <= cmp_mask;
        rec_exp  <= exp_q;
      end

      if (state == S_FAIL_REC) halted <= halt_on_error;
      if (resume)              halted <= 1'b0;

      if ((state == S_IDLE || state == S_DONE) && start) begin
        element    <= EL_W0;
        op_idx     <= '0;
        finished_q <= 1'b0;
      end else if (issue) begin
        if (finish) finished_q <= 1'b1;
        if (!last_op_of_el) begin
          op_idx <= op_idx + 2'd1;
        end else begin
          op_idx <= '0;
          if (tpg_addr_last) element <= last_el ? EL_W0 : march_el_e'(element + 3'd1);
        end
      end
    end
  end

  // A failure record is handed over only from the failure-record state, and
  // memory operations are issued only while running.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!rec_valid || state == S_FAIL_REC) else $error("failure record outside FAIL_REC");
      assert (!mem_en || state == S_RUN) else $error("memory operation while not running");
    end
  end

  assign busy   = (state != S_IDLE) && (state != S_DONE);
  assign done   = (state == S_DONE);
  assign paused = (state == S_PAUSE);

endmodule
