// tb_srt16_ctrl -- self-checking test of the divider sequencer.
//
// Starts divisions while driving the error input randomly (and with long
// runs of 1s) and checks against a reference model kept here:
//   - load only in the start cycle, busy from then until done;
//   - a cycle is a correction exactly when err is high and the previous
//     cycle was not a correction or the load;
//   - exactly NDIG speculation updates and NDIG digit commits per division,
//     the last commit in the final check cycle;
//   - done NDIG + 3 + corrections cycles after start, n_corr matching.
module tb_srt16_ctrl;
  import srt16_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, err = 1'b0;
  logic busy, load, dp_en, corr, commit, term, done;
  logic [7:0] n_corr;
  int checks = 0, failures = 0;

  srt16_ctrl #(.NDIGITS(NDIG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, ncorr, nspec, ncommit, mode;
    logic prev_good;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      mode  = t % 3;                  // 0: random, 1: never, 2: always err
      start = 1'b1;
      #1;
      checks++;
      if (!load || busy) begin failures++; $display("FAIL no load on start"); end
      @(negedge clk);
      start     = 1'b0;
      cyc       = 1;
      ncorr     = 0;
      nspec     = 0;
      ncommit   = 0;
      prev_good = 1'b1;
      while (!done) begin
        err = (mode == 2) ? 1'b1 : (mode == 1) ? 1'b0 : 1'($urandom);
        #1;
        checks++;
        if (!busy || load) begin failures++; $display("FAIL busy/load"); end
        if (!term && nspec <= NDIG && ncommit <= NDIG) begin
          if (corr != (err && !prev_good && dp_en) && !(nspec == NDIG && ncommit == NDIG)) begin
            failures++;
            $display("FAIL corr=%b err=%b prev_good=%b", corr, err, prev_good);
          end
        end
        if (dp_en && corr) begin ncorr++; prev_good = 1'b1; end
        else if (dp_en)    begin nspec++; prev_good = 1'b0; end
        if (commit) ncommit++;
        @(negedge clk);
        cyc++;
      end
      err = 1'b0;
      checks += 4;
      if (nspec != NDIG)   begin failures++; $display("FAIL %0d speculations", nspec); end
      if (ncommit != NDIG) begin failures++; $display("FAIL %0d commits", ncommit); end
      if (int'(n_corr) != ncorr) begin failures++; $display("FAIL n_corr %0d vs %0d", n_corr, ncorr); end
      if (cyc != NDIG + 3 + ncorr) begin failures++; $display("FAIL latency %0d", cyc); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
