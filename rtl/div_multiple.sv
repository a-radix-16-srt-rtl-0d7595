// div_multiple -- divisor-multiple multiplexer.
//
// Produces -q*d for a signed digit q whose magnitude is 0, 1, 2, 4 or 8, in
// the form (m, neg) with m + neg = -q*d (mod 2^W): for q > 0 the shifted
// divisor is inverted and neg = 1 is added later as the carry-in of a CSA;
// for q < 0 the shifted divisor passes unchanged.  The divider uses two of
// them, one for q_h in {-8,-4,0,4,8} and one for q_l or the correction digit
// in {-4,-2,-1,0,1,2,4}, the two multiplexers of the original
// design.  Combinational; the assertion flags a digit outside the set.
module div_multiple
  import srt16_pkg::*;
#(
  parameter int W = RES_W
) (
  input  logic [W-1:0] d,      // divisor in residual format
  input  digit_t       q,
  output logic [W-1:0] m,
  output logic         neg
);
  logic [4:0]   mag;
  logic [W-1:0] mult;

  always_comb begin
    mag = q[4] ? 5'(-q) : 5'(q);
    unique case (mag)
      5'd1:    mult = d;
      5'd2:    mult = d << 1;
      5'd4:    mult = d << 2;
      5'd8:    mult = d << 3;
      default: mult = '0;
    endcase
    neg = !q[4] && (mag != 5'd0);
    m   = neg ? ~mult : mult;
  end

  always_comb
    assert (mag inside {5'd0, 5'd1, 5'd2, 5'd4, 5'd8} || $isunknown(q))
      else $error("div_multiple: digit %0d has no multiple", q);
endmodule
