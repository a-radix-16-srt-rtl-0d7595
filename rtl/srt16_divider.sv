// srt16_divider -- radix-16 SRT mantissa divider with quotient-digit
// speculation (top level).
//
// Divides two normalized significands, x = x_mant/2^53 and d = d_mant/2^53,
// both in [1/2,1) (MSB of each input set).  The recurrence starts from
// w[0] = x/4, so after NDIGITS radix-16 digits the result is
//   quotient = floor(x_mant * 2^(4*NDIGITS-2) / d_mant)
// i.e. quotient/2^(4*NDIGITS) = x/(4d) truncated; rem_zero tells whether
// the division was exact (sticky information for a rounding stage, which
// is not part of this unit).
//
// Structure: srt16_datapath (speculation, error detection/correction,
// multiple multiplexers, two CSAs, residual register), otf_convert
// (on-the-fly quotient conversion), srt16_ctrl (sequencing).  At the end
// the carry-save remainder is assimilated once; if it is negative the
// converter's Q - ulp is the truncated quotient.
//
// Interface: pulse start for one cycle while busy is low; inputs are
// sampled in that cycle.  done is high for one cycle when quotient,
// rem_zero and n_corr are valid; they hold until the next start.  Latency
// is NDIGITS + 3 + n_corr cycles from start to done (n_corr = number of
// correction cycles).  The original design fixes the radix, digit set, estimate
// widths, the q_h/q_l split and the one-cycle correction; the handshake,
// x/4 initialisation and termination are this design's own.
module srt16_divider
  import srt16_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [MANT-1:0]     x_mant,
  input  logic [MANT-1:0]     d_mant,
  output logic                busy,
  output logic                done,
  output logic [4*NDIG-1:0]   quotient,
  output logic                rem_zero,
  output logic [7:0]          n_corr
);
  logic              load, dp_en, corr, commit, term, err;
  digit_t            q_pend;
  cs_res_t           res;
  logic [4*NDIG-1:0] quo, quo_m;
  logic [RES_W-1:0]  rem;
  logic [MANT-1:0]   d_hold;

  // the divisor must stay stable for the whole division
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 d_hold <= '0;
    else if (start && !busy)    d_hold <= d_mant;

  srt16_ctrl #(.NDIGITS(NDIG)) u_ctrl (
    .clk, .rst_n, .start, .err, .busy, .load, .dp_en, .corr, .commit,
    .term, .done, .n_corr
  );

  srt16_datapath u_dp (
    .clk, .rst_n, .load, .en(dp_en), .corr,
    .x_mant, .d_mant(load ? d_mant : d_hold),
    .err, .q_pend, .res
  );

  otf_convert #(.NDIGITS(NDIG)) u_otf (
    .clk, .rst_n, .clear(load), .append(commit), .q(q_pend),
    .quo, .quo_m
  );

  // termination: sign and zero test of the final remainder
  assign rem = res.s + res.c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quotient <= '0;
      rem_zero <= 1'b0;
    end else if (term) begin
      quotient <= rem[RES_W-1] ? quo_m : quo;
      rem_zero <= (rem == '0);
    end
  end
endmodule
