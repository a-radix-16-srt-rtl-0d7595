// err_detect_corr -- speculation error detection and correction F^c.
//
// Adds the carry-save bits of the speculated residual w_s from weight 2^1
// down to 2^-4 (2 integer and 4 fraction bits, as in the original
// design) to form the estimate w''.  With d'' (2 bits after the divisor's
// leading one) a table gives the correction digit qc in {-2..+2}:
//   qc = 0  : the estimate proves -rho*d <= w_s <= rho*d, the speculation
//             was right;
//   qc != 0 : error; the residual is corrected as w = w_s - qc*d and the
//             digit as q = q_s + qc, always in one extra cycle.
// The test is conservative as in the original method: a cell that
// only partly lies in bounds is corrected as well, by a digit that keeps
// the result within rho*d.  Thresholds are computed in srt16_pkg.
// Combinational.
module err_detect_corr
  import srt16_pkg::*;
(
  input  logic [WC_BITS-1:0] ws_sum,   // bits 2^1..2^-4 of w_s, sum vector
  input  logic [WC_BITS-1:0] ws_car,   // same bits, carry vector
  input  logic [DC_BITS-1:0] d_est,    // d''
  output logic               err,
  output digit_t             qc
);
  localparam fc_table_t FC_TAB = build_fc_table();

  logic [WC_BITS-1:0] w_est;

  always_comb begin
    w_est = ws_sum + ws_car;
    qc    = digit_t'(FC_TAB[{w_est, d_est}]);
    err   = (qc != '0);
  end
endmodule
