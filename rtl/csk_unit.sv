// csk_unit: one W-bit unit of the sliceable carry-skip adder.
//
// How it works. Each bit forms p = a ^ b. The unit's carry chain is one 2:1
// multiplexer per bit: when p is 1 the carry from below passes, otherwise the
// bit's own generate value (a, which equals b there) is taken. The chain
// multiplexers invert, so the chain alternates polarity from bit to bit, and
// the generate input of every other bit is taken inverted to match. Units of
// odd width (other than the 1-bit unit) receive and return an inverted carry;
// in them the multiplexer of the most significant bit does not invert, which
// keeps the polarity of the carry out equal to that of the carry in.
//
// Fast carry attract. Sum bits from the third bit on do not wait for the
// unit's carry in to ripple through the chain: a "Mux-s" picks, for bit k,
// either the unit's carry in (when bits 0..k-1 all propagate) or the chain
// carry c(k-1) (which then does not depend on the carry in). The group
// propagate signals Cs/NCs are themselves built by a chain of inverting
// multiplexers and alternate between AND and NAND polarity. skip_n is the
// NAND of all the unit's propagate signals; the adder uses it to let the
// carry in bypass the unit.
//
// Slicing. A unit with CUT >= 0 can be cut between bits CUT-1 and CUT. The
// request lines part1/part0 are decoded inside the unit, according to SLICE,
// into the active-low enable PAR. When PAR is low: the propagate of bit CUT
// is forced low (pp), so no carry crosses the cut and the unit is never
// skipped; the chain multiplexer of bit CUT takes the bit's own generate
// (a & b, from a NAND gate); and the sum of bit CUT is formed with a zero
// carry in. Bits below the cut still belong to the lower lane.
//
// Interface: ci_raw/co_raw carry the carry in/out in the unit's polarity
// (inverted for odd widths above 1). Combinational.
//
// The unit structure (chain, Mux-s, group propagate chain, cut logic and the
// decoders) follows the published 4-bit and 6-bit units; its generalisation to
// every width is this design's.
module csk_unit
  import nmul_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int          CUT   = -1,
  parameter slice_e      SLICE = SLICE_NONE
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci_raw,
  input  logic         part0,
  input  logic         part1,
  output logic [W-1:0] s,
  output logic         co_raw,
  output logic         skip_n
);
  // Odd units above one bit take an inverted carry.
  localparam bit INV_IN = (W % 2 == 1) && (W > 1);

  logic par;
  always_comb begin
    unique case (SLICE)
      SLICE_NAND: par = ~(part0 & part1);
      SLICE_INV:  par = ~part0;
      SLICE_NOR:  par = ~(part0 | part1);
      default:    par = 1'b1;
    endcase
  end

  logic [W-1:0] p, pp, gen;
  logic         cin;

  always_comb begin
    cin = INV_IN ? ~ci_raw : ci_raw;
    for (int k = 0; k < W; k++) begin
      p[k]   = a[k] ^ b[k];
      pp[k]  = (k == CUT) ? (p[k] & par) : p[k];
      gen[k] = (k == CUT) ? (a[k] & b[k]) : a[k];
    end
  end

  // Polarity (1 = inverted) of the chain signal out of bit k.
  function automatic logic chain_pol(int k);
    logic pol = INV_IN;
    for (int j = 0; j <= k; j++) begin
      if (!((j == W - 1) && (W % 2 == 1))) pol = ~pol;
    end
    return pol;
  endfunction

  for (genvar k = 0; k < W; k++) begin : g_bit
    localparam logic PREV_POL = (k == 0) ? INV_IN : chain_pol(k - 1);
    localparam logic POL      = chain_pol(k);
    localparam bit   MSB_BUF  = (k == W - 1) && (W % 2 == 1);

    logic prev;   // chain signal from below, raw polarity
    logic m;      // chain multiplexer before its output inversion
    logic ch;     // chain signal out of this bit, raw polarity
    logic c;      // carry out of this bit, true polarity
    logic gpx;    // group propagate of bits 0..k: Cs (even k) or NCs (odd k)
    logic gp;     // the same in true polarity
    logic cn;     // carry into this bit before the cut gating
    logic cink;   // carry into this bit's sum

    if (k == 0) begin : g_first
      assign prev = ci_raw;
      assign gpx  = pp[0];
    end else begin : g_next
      assign prev = g_bit[k-1].ch;
      // Inverting multiplexer chain: NAND at odd places, AND at even places.
      assign gpx  = ~(pp[k] ? g_bit[k-1].gpx : ((k % 2) == 0));
    end

    assign m  = pp[k] ? prev : (PREV_POL ? ~gen[k] : gen[k]);
    assign ch = MSB_BUF ? m : ~m;
    assign c  = POL ? ~ch : ch;
    assign gp = (k % 2 == 1) ? ~gpx : gpx;

    // Carry attract: from the third bit on a Mux-s takes the unit carry in
    // directly whenever all lower bits of the unit propagate.
    if (k == 0) begin : g_cn0
      assign cn = cin;
    end else if (k == 1) begin : g_cn1
      assign cn = g_bit[0].c;
    end else begin : g_cnk
      assign cn = g_bit[k-1].gp ? cin : g_bit[k-1].c;
    end

    assign cink = (k == CUT) ? (cn & par) : cn;
    assign s[k] = p[k] ^ cink;
  end

  assign co_raw = g_bit[W-1].ch;
  assign skip_n = ~(&pp);

  // The true-polarity carry and group propagate of the top bit feed nothing.
  logic unused_top;
  assign unused_top = g_bit[W-1].c ^ g_bit[W-1].gp;

  initial begin
    assert (CUT < int'(W)) else $fatal(1, "csk_unit: CUT outside the unit");
    assert ((SLICE == SLICE_NONE) == (CUT < 0)) else $fatal(1, "csk_unit: SLICE and CUT disagree");
  end
endmodule
