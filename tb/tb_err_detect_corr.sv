// tb_err_detect_corr -- exhaustive test of error detection and correction.
//
// For every 6-bit sum/carry pair and every d'', the estimate
// W'' = sum + carry (mod 64, units of 2^-4) is formed here; for a grid of
// points (w_s, d) inside the cell w_s in [W''/16, W''/16 + 1/8),
// d in [1/2 + d''/8, 1/2 + (d''+1)/8) with |w_s| <= 2.8 d (the range of a
// speculated residual) it checks with real arithmetic that
//   - the corrected residual w_s - qc*d is within rho*d, rho = 12/15;
//   - no error is missed: qc = 0 only where |w_s| <= rho*d for all points;
//   - err = (qc != 0) and qc is in {-2..+2}.
// It also counts cells flagged although part of them is in bounds (the
// conservative corrections the method accepts) and requires some.
module tb_err_detect_corr;
  import srt16_pkg::*;
  logic [WC_BITS-1:0] ws_sum, ws_car;
  logic [DC_BITS-1:0] d_est;
  logic   err;
  digit_t qc;
  int checks = 0, failures = 0, conservative = 0, flagged = 0;

  err_detect_corr dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int west, bad, inb;
    real ws, d, wc;
    for (int s = 0; s < 64; s++)
      for (int c = 0; c < 64; c++)
        for (int i = 0; i < 4; i++) begin
          ws_sum = 6'(s);
          ws_car = 6'(c);
          d_est  = 2'(i);
          #1;
          west = (s + c) % 64;
          if (west >= 32) west -= 64;
          checks += 2;
          if (err != (qc != 0) || qc > 2 || qc < -2) begin
            failures++;
            $display("FAIL err=%b qc=%0d", err, qc);
          end
          bad = 0;
          inb = 0;
          for (int a = 0; a <= 16; a++)
            for (int b = 0; b <= 16; b++) begin
              ws = west / 16.0 + a / 16.0 * 0.1249;
              d  = 0.5 + i / 8.0 + b / 16.0 * 0.1249;
              if (ws > 2.8 * d || ws < -2.8 * d) continue;
              wc = ws - qc * d;
              if (wc > 0.8 * d || wc < -0.8 * d) bad++;
              if (ws <= 0.8 * d && ws >= -0.8 * d) inb++;
            end
          if (bad != 0) begin
            failures++;
            $display("FAIL W''=%0d d''=%0d qc=%0d leaves %0d points out of bounds", west, i, qc, bad);
          end
          if (err) flagged++;
          if (err && inb != 0) conservative++;
        end
    checks++;
    if (conservative == 0 || flagged == 0) begin
      failures++;
      $display("FAIL no flagged or no conservative cells");
    end
    $display("flagged cells %0d, of them partly in bounds %0d", flagged, conservative);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
