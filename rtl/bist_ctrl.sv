// BIST session controller.
//
// Runs one test of T_LEN steps. On `start` (in IDLE or DONE) it spends one
// cycle in INIT, pulsing `init` so the TIG, MISA and checker load their
// initial states, then T_LEN cycles in RUN with `step` high, one test vector
// per cycle, and ends in DONE with `done` high until the next start. `t` is
// the index of the vector applied in the current RUN cycle.
//
// Early stop: because a fault shows as soon as the alternation breaks, the
// test need not run to the end. With stop_on_fail high, a `fail` from the
// checker ends the run at once (step is withheld in that cycle) and `aborted`
// is set. The FSM and the early-stop option are this design's own; the scheme
// only fixes the test length T. Asynchronous active-low reset to IDLE.
module bist_ctrl #(
  parameter int unsigned T_LEN = 5,
  parameter int unsigned TW    = (T_LEN > 1) ? $clog2(T_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop_on_fail,
  input  logic          fail,
  output logic          init,
  output logic          step,
  output logic [TW-1:0] t,
  output logic          busy,
  output logic          done,
  output logic          aborted
);

  typedef enum logic [1:0] {IDLE, INIT, RUN, DONE} state_e;

  state_e state;
  logic   halt;

  assign halt = stop_on_fail && fail;
  assign init = (state == INIT);
  assign step = (state == RUN) && !halt;
  assign busy = (state == INIT) || (state == RUN);
  assign done = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      t       <= '0;
      aborted <= 1'b0;
    end else begin
      unique case (state)
        IDLE, DONE: if (start) begin
          state   <= INIT;
          aborted <= 1'b0;
        end
        INIT: begin
          state <= RUN;
          t     <= '0;
        end
        RUN: begin
          if (halt) begin
            state   <= DONE;
            aborted <= 1'b1;
          end else if (t == TW'(T_LEN - 1)) begin
            state <= DONE;
          end else begin
            t <= t + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
