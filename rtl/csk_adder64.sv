// csk_adder64: 64-bit carry-skip adder with slicing, used as the final adder
// of the multiplier and able to work as eight 8-bit, four 16-bit or two
// 32-bit independent adders.
//
// The 64 bits are split into ten units of growing width, 1, 3, 4, 5, 6, 7, 8,
// 9, 10 and 11 bits from the least significant end (csk_unit). Between
// consecutive units sits an inverting 2:1 multiplexer driven by the lower
// unit's skip_n: when every bit of the unit propagates, the unit's carry in is
// passed on directly (the skip), otherwise the unit's own carry out. Since
// each of these multiplexers inverts, the carries alternate between direct
// (C) and inverted (NC) polarity, so that odd-width units above one bit see
// an inverted carry, as their internal chains expect.
//
// Slicing: {part1,part0} = 00 -> one 64-bit add, 10 -> two 32-bit lanes,
// 01 -> four 16-bit lanes, 11 -> eight 8-bit lanes. The lane boundaries at
// bits 8, 16, ..., 56 fall inside the 5- to 11-bit units, which cut their own
// carry chain there. cin enters at bit 0 only (the lowest lane); the other
// lanes start with a zero carry. cout is the carry out of bit 63, i.e. of the
// top lane. Combinational.
//
// Unit sizes, the inter-unit multiplexers, carry polarities and the decoders
// follow the published architecture. The numeric meaning of {part1,part0} is
// inferred from the decoders; the carry-in handling of the upper lanes is
// this design's choice.
module csk_adder64
  import nmul_pkg::*;
(
  input  logic [ADD_W-1:0] a,
  input  logic [ADD_W-1:0] b,
  input  logic             cin,
  input  logic             part0,
  input  logic             part1,
  output logic [ADD_W-1:0] s,
  output logic             cout
);
  // cr[u] is the carry entering unit u in that unit's polarity; cr[N_UNITS]
  // is the direct carry out of the adder.
  logic [N_UNITS:0] cr;
  logic [N_UNITS-1:0] co_raw, skip_n;

  assign cr[0] = cin;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    localparam int unsigned W   = UNIT_W[u];
    localparam int unsigned LSB = UNIT_LSB[u];

    csk_unit #(.W(W), .CUT(UNIT_CUT[u]), .SLICE(UNIT_SLICE[u])) u_unit (
      .a(a[LSB +: W]), .b(b[LSB +: W]), .ci_raw(cr[u]),
      .part0(part0), .part1(part1),
      .s(s[LSB +: W]), .co_raw(co_raw[u]), .skip_n(skip_n[u]));

    // Inverting skip multiplexer: input 1 = unit carry out, 0 = unit carry in.
    assign cr[u+1] = ~(skip_n[u] ? co_raw[u] : cr[u]);
  end

  assign cout = cr[N_UNITS];
endmodule
