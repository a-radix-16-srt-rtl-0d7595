// tb_csa32 -- self-checking test of the 3:2 carry-save adder: random and
// corner vectors; checks sum + carry = a + b + c + cin (mod 2^W), the sum
// bits against the bitwise parity and the carry LSB against cin.
module tb_csa32;
  localparam int W = 58;
  logic [W-1:0] a, b, c, sum, carry;
  logic         cin;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      a   = {26'($urandom), 32'($urandom)};
      b   = {26'($urandom), 32'($urandom)};
      c   = {26'($urandom), 32'($urandom)};
      cin = 1'($urandom);
      if (k == 0) begin a = '1; b = '1; c = '1; cin = 1'b1; end
      if (k == 1) begin a = '0; b = '0; c = '0; cin = 1'b0; end
      #1;
      checks += 3;
      if (W'(sum + carry) != W'(a + b + c + W'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h cin=%b", a, b, c, cin);
      end
      if (sum != (a ^ b ^ c)) failures++;
      if (carry[0] != cin) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
