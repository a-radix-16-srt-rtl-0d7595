// tb_srt16_divider -- end-to-end test of the radix-16 speculative divider
// at its default (double precision) size.
//
// Drives directed and random significand pairs, compares the quotient with
// floor(x_mant * 2^(4*NDIG-2) / d_mant) and rem_zero with the exact
// remainder, both computed here with 128-bit integer arithmetic, and checks
// the latency NDIG + 3 + n_corr cycles.  It counts how often each mechanism
// of the design occurs -- speculation hits, corrections by -2, -1, +1, +2,
// speculated digits +-12, digits +-11 reached through a correction,
// negative final remainders (Q - ulp chosen) and exact divisions -- and
// counts a failure for any that never occurs.  It also prints the measured
// cycles per digit C_d = 1 + N_c / (N_d * NDIG).
module tb_srt16_divider;
  import srt16_pkg::*;

  localparam int NRAND = 4000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic [MANT-1:0]   x_mant = '0, d_mant = '0;
  logic              busy, done, rem_zero;
  logic [4*NDIG-1:0] quotient;
  logic [7:0]        n_corr;

  int checks = 0, failures = 0;
  int n_hit = 0, n_cm2 = 0, n_cm1 = 0, n_cp1 = 0, n_cp2 = 0;
  int n_spec12 = 0, n_dig11 = 0, n_negrem = 0, n_exact = 0;
  longint n_corr_total = 0, n_div = 0;

  srt16_divider dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled from the design's internal control
  always @(posedge clk) if (rst_n && dut.dp_en) begin
    if (dut.corr) begin
      case (dut.u_dp.qc)
        -2: n_cm2++;
        -1: n_cm1++;
         1: n_cp1++;
         2: n_cp2++;
        default: ;
      endcase
      if ((dut.u_dp.q_pend + dut.u_dp.qc) == 11 || (dut.u_dp.q_pend + dut.u_dp.qc) == -11) n_dig11++;
    end else begin
      if (dut.u_ctrl.cnt != 0 && !dut.u_ctrl.just_corr) n_hit++;
      if ((dut.u_dp.qh + dut.u_dp.ql) == 12 || (dut.u_dp.qh + dut.u_dp.ql) == -12) n_spec12++;
    end
  end

  task automatic divide(input logic [MANT-1:0] xm, input logic [MANT-1:0] dm);
    logic [127:0] num, q_ref, r_ref;
    int cyc;
    num   = 128'(xm) << (4 * NDIG - 2);
    q_ref = num / 128'(dm);
    r_ref = num % 128'(dm);
    @(negedge clk);
    x_mant = xm;
    d_mant = dm;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    x_mant = '1;                       // inputs are only sampled at start
    d_mant = {1'b1, {(MANT-1){1'b0}}};
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (quotient != q_ref[4*NDIG-1:0]) begin
      failures++;
      $display("FAIL x=%h d=%h q=%h expected %h", xm, dm, quotient, q_ref[4*NDIG-1:0]);
    end
    if (rem_zero != (r_ref == 0)) begin
      failures++;
      $display("FAIL x=%h d=%h rem_zero=%b", xm, dm, rem_zero);
    end
    if (cyc != NDIG + 3 + int'(n_corr)) begin
      failures++;
      $display("FAIL latency %0d cycles with %0d corrections", cyc, n_corr);
    end
    if (rem_zero) n_exact++;
    n_corr_total += longint'(n_corr);
    n_div++;
  endtask

  // negative final remainder: quotient came from Q - ulp
  always @(posedge clk) if (dut.term && dut.rem[RES_W-1]) n_negrem++;

  function automatic logic [MANT-1:0] rnd_mant();
    return {1'b1, 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    real cd;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: extremes and exact cases
    divide({1'b1, {(MANT-1){1'b0}}}, {1'b1, {(MANT-1){1'b0}}});
    divide('1, '1);
    divide('1, {1'b1, {(MANT-1){1'b0}}});
    divide({1'b1, {(MANT-1){1'b0}}}, '1);
    divide({2'b11, {(MANT-2){1'b0}}}, {1'b1, {(MANT-1){1'b0}}});
    divide({1'b1, {(MANT-1){1'b0}}}, {2'b11, {(MANT-2){1'b0}}});
    divide({3'b101, {(MANT-3){1'b0}}}, {3'b111, {(MANT-3){1'b0}}});
    for (int k = 0; k < NRAND; k++) divide(rnd_mant(), rnd_mant());
    // back-to-back start in the cycle after done
    divide(rnd_mant(), rnd_mant());

    cd = 1.0 + real'(n_corr_total) / (real'(n_div) * NDIG);
    $display("divisions=%0d corrections=%0d C_d=%f hits=%0d", n_div, n_corr_total, cd, n_hit);
    $display("corrections -2:%0d -1:%0d +1:%0d +2:%0d  spec +-12:%0d  digit +-11:%0d  neg remainder:%0d  exact:%0d",
             n_cm2, n_cm1, n_cp1, n_cp2, n_spec12, n_dig11, n_negrem, n_exact);
    checks += 8;
    if (n_hit == 0)    begin failures++; $display("FAIL no speculation hit"); end
    if (n_cm2 == 0)    begin failures++; $display("FAIL no correction by -2"); end
    if (n_cm1 == 0)    begin failures++; $display("FAIL no correction by -1"); end
    if (n_cp1 == 0)    begin failures++; $display("FAIL no correction by +1"); end
    if (n_cp2 == 0)    begin failures++; $display("FAIL no correction by +2"); end
    if (n_spec12 == 0) begin failures++; $display("FAIL digit 12 never speculated"); end
    if (n_dig11 == 0)  begin failures++; $display("FAIL digit 11 never formed"); end
    if (n_negrem == 0) begin failures++; $display("FAIL no negative final remainder"); end
    if (n_exact == 0)  begin failures++; $display("FAIL no exact division"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
