// otf_convert -- on-the-fly conversion of signed radix-16 quotient digits.
//
// Keeps the quotient Q and QM = Q - ulp as plain binary numbers while
// signed digits q in {-15..+15} arrive most significant first, so no
// carry-propagate addition is needed at the end:
//   Q  <- q >= 0 ? Q*16 + q        : QM*16 + (16 + q)
//   QM <- q >  0 ? Q*16 + (q - 1)  : QM*16 + (15 + q)
// The original design names on-the-fly conversion without detailing it; this
// is the standard Ercegovac-Lang scheme.  clear sets Q = 0, QM = -1
// (all ones, modulo 2^(4*NDIG)).  One digit per cycle with append.
module otf_convert
  import srt16_pkg::*;
#(
  parameter int NDIGITS = NDIG
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   append,
  input  digit_t                 q,
  output logic [4*NDIGITS-1:0]   quo,     // Q
  output logic [4*NDIGITS-1:0]   quo_m    // Q - ulp
);
  logic [3:0] q_lo, qm_lo;

  always_comb begin
    q_lo  = q[3:0];                        // q mod 16, also 16 + q for q < 0
    qm_lo = 4'(q[3:0] - 4'd1);             // (q - 1) mod 16, also 15 + q
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quo   <= '0;
      quo_m <= '1;
    end else if (clear) begin
      quo   <= '0;
      quo_m <= '1;
    end else if (append) begin
      quo   <= q[4]           ? {quo_m[4*NDIGITS-5:0], q_lo}  : {quo[4*NDIGITS-5:0], q_lo};
      quo_m <= (q[4] || q == 0) ? {quo_m[4*NDIGITS-5:0], qm_lo} : {quo[4*NDIGITS-5:0], qm_lo};
    end
  end

  always_ff @(posedge clk)
    if (append) assert (q >= -15 && q <= 15) else $error("otf_convert: digit %0d out of range", q);
endmodule
