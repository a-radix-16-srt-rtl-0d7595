// tb_srt16_datapath -- self-checking test of the residual recurrence.
//
// The testbench sequences the datapath itself (load, then speculation
// cycles, with a correction cycle whenever the error detector flags a
// freshly speculated residual) and keeps an exact reference residual as a
// 128-bit integer scaled by 2^RES_FRAC.  After every cycle it checks
//   - the carry-save register value against the reference;
//   - the pending digit: q_h + q_l after a speculation, plus qc after a
//     correction;
//   - |w_s| <= 2.8 d after a speculation and |w| <= rho*d = 0.8 d after a
//     correction or an unflagged speculation (no missed error);
// and at the end x/4 * 16^NDIG = Q*d + w with Q the accumulated digits.
module tb_srt16_datapath;
  import srt16_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0, corr = 1'b0;
  logic [MANT-1:0] x_mant, d_mant;
  logic    err;
  digit_t  q_pend;
  cs_res_t res;
  int checks = 0, failures = 0, ncorr = 0;

  srt16_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [127:0] absv(logic signed [127:0] v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    logic signed [127:0] wref, dref, qacc, lhs;
    logic [RES_W-1:0] rv;
    int nspec, dig;
    logic prev_good;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      x_mant = {1'b1, 20'($urandom), 32'($urandom)};
      d_mant = {1'b1, 20'($urandom), 32'($urandom)};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      wref = 128'(x_mant);
      dref = 128'(d_mant) <<< 2;
      qacc = 0;
      nspec = 0;
      prev_good = 1'b1;
      while (nspec < NDIG || !prev_good) begin
        corr = err && !prev_good;
        if (!corr && nspec == NDIG) break;
        en = 1'b1;
        #1;
        if (corr) begin
          dig  = int'(dut.qc);
          wref = wref - dig * dref;
          qacc = qacc + 128'(signed'(dig));
          dig  = int'(q_pend) + dig;
        end else begin
          if (!prev_good) begin
            checks++;
            if (absv(wref) * 5 > dref * 4) begin
              failures++;
              $display("FAIL missed error w/d=%f", $itor(wref) / $itor(dref));
            end
          end
          dig  = int'(dut.qh) + int'(dut.ql);
          wref = wref * 16 - dig * dref;
          qacc = qacc * 16 + 128'(signed'(dig));
        end
        @(negedge clk);
        en = 1'b0;
        rv = res.s + res.c;
        checks += 3;
        if (rv != RES_W'(wref)) begin
          failures++;
          $display("FAIL residual %h expected %h", rv, RES_W'(wref));
        end
        if (int'(q_pend) != dig) begin
          failures++;
          $display("FAIL pending digit %0d expected %0d", q_pend, dig);
        end
        if (corr ? (absv(wref) * 5 > dref * 4) : (absv(wref) * 5 > dref * 14)) begin
          failures++;
          $display("FAIL residual bound w/d=%f corr=%b", $itor(wref) / $itor(dref), corr);
        end
        if (corr) begin ncorr++; prev_good = 1'b1; end
        else begin nspec++; prev_good = 1'b0; end
      end
      corr = 1'b0;
      lhs = 128'(x_mant) <<< (4 * NDIG);
      checks++;
      if (lhs != qacc * dref + wref) begin
        failures++;
        $display("FAIL x*16^N != Q*d + w");
      end
    end
    checks++;
    if (ncorr == 0) begin failures++; $display("FAIL no correction happened"); end
    $display("corrections %0d", ncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
