// compressor42: 4:2 counter of the partial product tree. It takes four bits
// x1..x4 of column j and the transfer cin from column j-1, and gives a sum bit
// in column j plus two bits (carry, cout) for column j+1:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// It is the four-input digit adder (add4_def) followed by the (d,e,f) -> (t,w)
// converter (fa_tw): the redundant digit (t,w) of value 2t+w is exactly a
// carry-save pair, with w the sum and t the carry. cout is the digit adder's
// transfer, which does not depend on cin, so a row of these counters has no
// rippling path. Using this pair as a common 4:2 counter follows the published
// design; combinational.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic d, e, f;

  add4_def u_add4 (.i1(x1), .i2(x2), .i3(x3), .i4(x4), .t_in(cin),
                   .t_out(cout), .d(d), .e(e), .f(f));
  fa_tw    u_conv (.d(d), .e(e), .f(f), .t(carry), .w(sum));

  // The digit adder must never emit the forbidden pattern.
  always_comb assert (!(e && !f)) else $error("compressor42: (e,f)=(1,0) emitted");
endmodule
