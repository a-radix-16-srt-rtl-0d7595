// tb_div_multiple -- self-checking test of the divisor-multiple
// multiplexer: for random divisors and every digit of the two sets
// {0,+-1,+-2,+-4,+-8} checks m + neg = -q*d (mod 2^W).
module tb_div_multiple;
  import srt16_pkg::*;
  localparam int W = RES_W;
  localparam int DIGS [9] = '{0, 1, -1, 2, -2, 4, -4, 8, -8};
  logic [W-1:0] d, m;
  digit_t       q;
  logic         neg;
  logic signed [W+4:0] expect_v;
  int checks = 0, failures = 0;

  div_multiple #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      d = W'({1'b1, 20'($urandom), 32'($urandom), 2'b00});
      foreach (DIGS[j]) begin
        q = digit_t'(DIGS[j]);
        #1;
        expect_v = (W+5)'(-($signed({6'b0, d}) * DIGS[j]));
        checks++;
        if (W'(m + W'(neg)) != W'(expect_v)) begin
          failures++;
          $display("FAIL d=%h q=%0d m=%h neg=%b", d, q, m, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
