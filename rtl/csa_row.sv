// csa_row: a row of W full adders (3:2 counters) that reduces three W-bit
// binary rows to a sum row and a carry row of the same total, modulo 2^W.
// The carry of column j goes to bit j+1 of the carry row; the top carry is
// dropped. Used in the partial product tree where exactly three rows are left
// over at a level. Combinational. The published tree names 3:2 counters
// without placing them; using them for left-over row triples is this design's.
module csa_row #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] ci,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] co;

  for (genvar j = 0; j < W; j++) begin : g_col
    full_adder u_fa (.a(a[j]), .b(b[j]), .c(ci[j]), .s(s[j]), .co(co[j]));
  end

  assign c = {co[W-2:0], 1'b0};

  logic unused_top;
  assign unused_top = co[W-1];
endmodule
