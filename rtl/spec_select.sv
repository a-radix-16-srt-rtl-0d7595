// spec_select -- speculative quotient-digit selection F^s (radix 16).
//
// The top six bits of the carry-save residual 16*w (5 integer bits, 1
// fraction bit, sum and carry) are added by a 6-bit CPA; the result is the
// estimate w' (the widths of the original design).  Two tables produce
// the two parts of the speculated digit q_s = q_h + q_l:
//   q_h in {0,+-4,+-8} from the 5 integer bits of w' and the 2 bits of d',
//   q_l in {0,+-1,+-2,+-4} from all 6 bits of w' and d'.
// q_h depends on fewer bits so it is ready earlier and drives the first
// multiple multiplexer; q_l is needed only for the second CSA.  The table
// contents are this design's own and are computed in srt16_pkg from the
// selection bounds (every speculated residual satisfies |w_s| <= 2.8 d).
// Combinational.
module spec_select
  import srt16_pkg::*;
(
  input  logic [WS_BITS-1:0] ws_sum,   // bits 2^4..2^-1 of 16w, sum vector
  input  logic [WS_BITS-1:0] ws_car,   // same bits, carry vector
  input  logic [DS_BITS-1:0] d_est,    // d' : the two bits after the leading one
  output digit_t             qh,
  output digit_t             ql
);
  localparam qh_table_t QH_TAB = build_qh_table();
  localparam ql_table_t QL_TAB = build_ql_table();

  logic [WS_BITS-1:0] w_est;

  always_comb begin
    w_est = ws_sum + ws_car;
    qh    = digit_t'(QH_TAB[{w_est[WS_BITS-1:1], d_est}]);
    ql    = digit_t'(QL_TAB[{w_est, d_est}]);
  end
endmodule
