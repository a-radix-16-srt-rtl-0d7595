// tb_otf_convert -- self-checking test of the on-the-fly converter.
//
// Appends random sequences of signed digits in {-15..+15} (first digit
// positive, so the quotient is positive) and after every digit compares Q
// with the accumulated sum of q_j * 16^(k-j), computed here with ordinary
// signed arithmetic, and QM with Q - 1, both modulo 2^(4*NDIGITS).
module tb_otf_convert;
  import srt16_pkg::*;
  localparam int N = NDIG;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, append = 1'b0;
  digit_t q;
  logic [4*N-1:0] quo, quo_m;
  int checks = 0, failures = 0;

  otf_convert #(.NDIGITS(N)) dut (.clk, .rst_n, .clear, .append, .q, .quo, .quo_m);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int v;
    q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      acc = 0;
      for (int j = 0; j < N; j++) begin
        v = int'($urandom % 31) - 15;
        if (j == 0) v = int'($urandom % 15) + 1;
        if (t < 2) v = (t == 0) ? 15 : ((j == 0) ? 1 : -15);
        q      = digit_t'(v);
        append = 1'b1;
        @(negedge clk);
        append = 1'b0;
        acc = acc * 16 + longint'(v);
        checks += 2;
        if (quo != (4*N)'(acc)) begin
          failures++;
          $display("FAIL Q=%h expected %h", quo, (4*N)'(acc));
        end
        if (quo_m != (4*N)'(acc - 1)) begin
          failures++;
          $display("FAIL QM=%h expected %h", quo_m, (4*N)'(acc - 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
