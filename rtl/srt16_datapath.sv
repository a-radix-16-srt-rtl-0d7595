// srt16_datapath -- residual recurrence of the radix-16 speculative divider.
//
// Holds the speculated partial remainder w_s in carry-save form and, each
// enabled cycle, does one of two things (as in the original design):
//   speculation (corr = 0): w_s <- 16*w - q_h*d - q_l*d.  q_h comes first
//     from spec_select and feeds the first CSA together with 16*w; q_l feeds
//     the second CSA.  The speculated digit q_s = q_h + q_l is kept as the
//     pending digit.
//   correction (corr = 1): w <- w_s - qc*d.  The residual multiplexer passes
//     the register contents instead of the first CSA's output and the digit
//     multiplexer passes qc instead of q_l, so only the second CSA is used;
//     the pending digit becomes q_s + qc.
// The error detector runs on the register contents in the same cycle as
// the next speculation (error detection of step j-1 overlaps speculation of
// step j); err is its raw verdict, the controller decides whether the cycle
// is a correction.  load initialises w[0] = x/4 and clears the pending digit.
// Timing: all outputs are combinational from the register except qs/qc/err,
// which also depend on d; one register stage, updated on en.
module srt16_datapath
  import srt16_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,      // initialise with x
  input  logic                en,        // update residual this cycle
  input  logic                corr,      // 1: correction cycle, 0: speculation cycle
  input  logic [MANT-1:0]     x_mant,    // dividend significand, MSB = 1
  input  logic [MANT-1:0]     d_mant,    // divisor significand, MSB = 1
  output logic                err,       // error detector verdict on w_s
  output digit_t              q_pend,    // last digit (speculated, or corrected)
  output cs_res_t             res        // residual register
);
  logic [RES_W-1:0]   d_res;
  logic [DS_BITS-1:0] d_est;
  logic [RES_W-1:0]   s16, c16;          // 16*w
  digit_t             qh, ql, q2, qc;
  logic [RES_W-1:0]   m1, m2;
  logic               n1, n2;
  logic [RES_W-1:0]   s1, c1;            // first CSA
  logic [RES_W-1:0]   s2_in, c2_in;      // residual multiplexer
  logic [RES_W-1:0]   s2, c2;            // second CSA

  // d as a residual-format fraction (RES_FRAC fraction bits)
  assign d_res = RES_W'({d_mant, 2'b00});
  assign d_est = d_mant[MANT-2 -: DS_BITS];
  assign s16   = res.s << LOG2R;
  assign c16   = res.c << LOG2R;

  spec_select u_spec (
    .ws_sum (res.s[RES_FRAC -: WS_BITS]),
    .ws_car (res.c[RES_FRAC -: WS_BITS]),
    .d_est  (d_est),
    .qh     (qh),
    .ql     (ql)
  );

  err_detect_corr u_edc (
    .ws_sum (res.s[RES_FRAC+1 -: WC_BITS]),
    .ws_car (res.c[RES_FRAC+1 -: WC_BITS]),
    .d_est  (d_est),
    .err    (err),
    .qc     (qc)
  );

  div_multiple #(.W(RES_W)) u_mul_h (.d(d_res), .q(qh), .m(m1), .neg(n1));

  csa32 #(.W(RES_W)) u_csa1 (
    .a(s16), .b(c16), .c(m1), .cin(n1), .sum(s1), .carry(c1)
  );

  // spec./corr. multiplexers
  always_comb begin
    q2    = corr ? qc : ql;
    s2_in = corr ? res.s : s1;
    c2_in = corr ? res.c : c1;
  end

  div_multiple #(.W(RES_W)) u_mul_l (.d(d_res), .q(q2), .m(m2), .neg(n2));

  csa32 #(.W(RES_W)) u_csa2 (
    .a(s2_in), .b(c2_in), .c(m2), .cin(n2), .sum(s2), .carry(c2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res    <= '0;
      q_pend <= '0;
    end else if (load) begin
      res.s  <= RES_W'(x_mant);           // x/4 : MANT bits below 2^-2
      res.c  <= '0;
      q_pend <= '0;
    end else if (en) begin
      res.s  <= s2;
      res.c  <= c2;
      q_pend <= corr ? digit_t'(q_pend + qc) : digit_t'(qh + ql);
    end
  end
endmodule
