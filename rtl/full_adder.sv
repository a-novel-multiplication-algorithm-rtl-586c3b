// full_adder: 3:2 counter. Adds three bits of equal weight into a sum bit of
// the same weight and a carry bit of the next weight. It is the upper section
// of the four-input digit adder (add4_def) on its own, and the 3:2 cell used in
// the partial product tree where three rows remain. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
