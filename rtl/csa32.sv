// csa32 -- 3:2 carry-save adder (full-adder row).
//
// Adds three W-bit vectors without carry propagation: a + b + c + cin =
// sum + carry (mod 2^W).  The carry vector is shifted left by one place and
// its free least significant bit takes cin, which is how the divider injects
// the +1 of a two's complement negation of a divisor multiple.  Purely
// combinational.  The original design shows the two CSAs of the residual update only as
// blocks; the full-adder row is the standard realisation.
module csa32 #(
  parameter int W = 58
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-2:0] maj;   // the top carry leaves the word (mod 2^W)

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, cin};
  end
endmodule
