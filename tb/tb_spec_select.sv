// tb_spec_select -- exhaustive test of the speculative selection F^s.
//
// For every pair of 6-bit sum/carry inputs and every d', the estimate
// W = sum + carry (mod 64, half units of 16w) is formed here; then for a
// grid of points (16w, d) inside the cell 16w in [W/2, W/2+1),
// d in [1/2 + d'/8, 1/2 + (d'+1)/8) with |16w| <= 12.8 d (a committed
// residual is within rho*d, rho = 12/15) it checks with real arithmetic
// that the speculated residual 16w - (q_h + q_l) d stays within 2.8 d, the
// range the correction step can repair.  It also checks the digit sets
// (q_h in {0,+-4,+-8}, q_l in {0,+-1,+-2,+-4}), that q_h does not depend on
// the fraction bit of the estimate, and that +-11 is never speculated.
module tb_spec_select;
  import srt16_pkg::*;
  logic [WS_BITS-1:0] ws_sum, ws_car;
  logic [DS_BITS-1:0] d_est;
  digit_t qh, ql;
  int checks = 0, failures = 0;
  int qh_seen [64][4];

  spec_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int west, q, viol;
    real w16, d, dev;
    foreach (qh_seen[a, b]) qh_seen[a][b] = 99;
    for (int s = 0; s < 64; s++)
      for (int c = 0; c < 64; c++)
        for (int i = 0; i < 4; i++) begin
          ws_sum = 6'(s);
          ws_car = 6'(c);
          d_est  = 2'(i);
          #1;
          west = (s + c) % 64;
          if (west >= 32) west -= 64;
          q = int'(qh) + int'(ql);
          checks++;
          if (!(qh inside {0, 4, -4, 8, -8}) || !(ql inside {0, 1, -1, 2, -2, 4, -4}) ||
              q == 11 || q == -11) begin
            failures++;
            $display("FAIL digit set qh=%0d ql=%0d", qh, ql);
          end
          // q_h must be a function of the integer part only
          if (qh_seen[(west >>> 1) + 32][i] == 99) qh_seen[(west >>> 1) + 32][i] = int'(qh);
          else if (qh_seen[(west >>> 1) + 32][i] != int'(qh)) begin
            failures++;
            $display("FAIL q_h depends on the fraction bit (W=%0d d'=%0d)", west, i);
          end
          viol = 0;
          for (int a = 0; a <= 16; a++)
            for (int b = 0; b <= 16; b++) begin
              w16 = west / 2.0 + a / 16.0 * 0.999;
              d   = 0.5 + i / 8.0 + b / 16.0 * 0.124;
              if (w16 > 12.8 * d || w16 < -12.8 * d) continue;
              dev = w16 - q * d;
              if (dev > 2.8 * d || dev < -2.8 * d) viol++;
            end
          checks++;
          if (viol != 0) begin
            failures++;
            $display("FAIL W=%0d d'=%0d q=%0d: residual out of range", west, i, q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
