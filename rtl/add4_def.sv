// add4_def: adds four binary bits i1..i4 of one column, plus the transfer bit
// t_in from the column below, into a digit of {0,1,2,3} in the three-bit
// (d,e,f) coding and a transfer bit t_out for the column above:
//   i1 + i2 + i3 + i4 + t_in = 2*t_out + d + e + f
// The most significant section is an ordinary full adder on i1..i3 that yields
// t_out (majority) and d (parity). The least significant section re-codes
// i4 + t_in as e = i4 & t_in, f = i4 | t_in, so that e + f = i4 + t_in and the
// forbidden pattern (e,f) = (1,0) cannot occur. t_out does not depend on t_in,
// so a row of these cells has no rippling carry: the longest path is the two
// XORs that form d. Structure as published; combinational.
module add4_def (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic t_in,
  output logic t_out,
  output logic d,
  output logic e,
  output logic f
);
  full_adder u_fa (.a(i1), .b(i2), .c(i3), .s(d), .co(t_out));

  always_comb begin
    e = i4 & t_in;
    f = i4 | t_in;
  end
endmodule
