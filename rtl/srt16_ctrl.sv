// srt16_ctrl -- sequencer of the radix-16 speculative divider.
//
// States: IDLE -> ITER -> TERM -> DONE -> IDLE.
//   IDLE : waits for start; on start the datapath loads w[0] = x/4 and the
//          quotient converter is cleared.
//   ITER : every cycle is either a speculation or a correction.  The error
//          detector looks at the residual produced by the previous
//          speculation; if it reports an error the cycle is a correction
//          (corr = 1), after which the next cycle is always a speculation:
//          a corrected residual is within bounds by construction, so
//          detection is skipped for it (this is what makes every correction
//          cost exactly one extra cycle, as in the original design).  A
//          speculation cycle commits the previous digit, now known to be
//          right, to the quotient converter and speculates the next one.
//          After NDIGITS speculated digits one more cycle checks (and if
//          needed corrects) the last digit and commits it.
//   TERM : one cycle in which the top resolves the sign of the final
//          remainder; DONE raises done for one cycle.
// Latency from the start cycle to done: NDIGITS + corrections + 3 cycles.
// The original design gives the overlap of detection and speculation and the
// single correction cycle; the state encoding and handshake are this
// design's own.
module srt16_ctrl
  import srt16_pkg::*;
#(
  parameter int NDIGITS = NDIG
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       err,          // error detector verdict
  output logic       busy,
  output logic       load,         // datapath: w <- x/4
  output logic       dp_en,        // datapath: update residual
  output logic       corr,         // datapath: correction cycle
  output logic       commit,       // converter: append pending digit
  output logic       term,         // top: resolve final remainder
  output logic       done,
  output logic [7:0] n_corr        // correction cycles of this division
);
  typedef enum logic [1:0] {IDLE, ITER, TERM, DONE} state_t;

  state_t     state, state_n;
  logic [4:0] cnt;                 // digits speculated so far
  logic       just_corr;           // residual is known good (loaded or corrected)

  always_comb begin
    state_n = state;
    load    = 1'b0;
    dp_en   = 1'b0;
    corr    = 1'b0;
    commit  = 1'b0;
    term    = 1'b0;
    done    = 1'b0;
    busy    = (state != IDLE);
    unique case (state)
      IDLE: if (start) begin
        load    = 1'b1;
        state_n = ITER;
      end
      ITER: begin
        if (err && !just_corr) begin
          corr  = 1'b1;
          dp_en = 1'b1;
        end else begin
          commit = (cnt != 0);
          if (cnt == 5'(NDIGITS)) state_n = TERM;
          else                    dp_en   = 1'b1;
        end
      end
      TERM: begin
        term    = 1'b1;
        state_n = DONE;
      end
      DONE: begin
        done    = 1'b1;
        state_n = IDLE;
      end
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      just_corr <= 1'b1;
      n_corr    <= '0;
    end else begin
      state <= state_n;
      if (load) begin
        cnt       <= '0;
        just_corr <= 1'b1;
        n_corr    <= '0;
      end else if (dp_en) begin
        if (corr) begin
          just_corr <= 1'b1;
          n_corr    <= n_corr + 8'd1;
        end else begin
          just_corr <= 1'b0;
          cnt       <= cnt + 5'd1;
        end
      end
    end
  end

  // a correction is never followed by another one
  assert property (@(posedge clk) disable iff (!rst_n) corr |=> !corr);
  initial assert (NDIGITS < 32) else $error("srt16_ctrl: NDIGITS too large for the counter");
endmodule
