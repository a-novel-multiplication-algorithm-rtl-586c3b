// booth_enc: radix-4 modified Booth encoder for one digit. From the multiplier
// bits b[2k+1], b[2k], b[2k-1] it forms the digit
//   q = -2*b[2k+1] + b[2k] + b[2k-1],  q in {-2,-1,0,1,2}
// as three select lines: one (|q| = 1), two (|q| = 2) and neg (q is negative,
// or the pattern 111 whose zero row is then inverted and corrected back to 0).
// Combinational. The modified Booth coding is the one the published design
// names; this encoder logic is the standard formulation chosen here.
module booth_enc (
  input  logic [2:0] bits,   // {b[2k+1], b[2k], b[2k-1]}
  output logic       one,
  output logic       two,
  output logic       neg
);
  always_comb begin
    one = bits[1] ^ bits[0];
    two = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    neg = bits[2];
  end
endmodule
