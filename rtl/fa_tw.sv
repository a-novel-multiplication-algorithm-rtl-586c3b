// fa_tw: converts one radix-2 digit of the set {0,1,2,3} from its three-bit
// coding (d,e,f) into the two-bit coding (t,w).
//
// In the three-bit coding the digit value is d+e+f, and the pattern
// (e,f) = (1,0) never occurs, so e=1 implies f=1. The two-bit coding gives the
// value 2t+w. With the forbidden pattern excluded the conversion needs only an
// AND, an OR, an XOR and one inverted input:
//   t = e | (d & f)          (value >= 2)
//   w = d ^ (f & ~e)         (value is odd)
// The cell is purely combinational. Its behaviour follows the published
// conversion table; the two equations are this design's minimisation of it,
// which matches the gate count of the published cell (AND+OR for t,
// inverter+AND+XOR for w).
module fa_tw (
  input  logic d,
  input  logic e,
  input  logic f,
  output logic t,
  output logic w
);
  always_comb begin
    t = e | (d & f);
    w = d ^ (f & ~e);
  end
endmodule
