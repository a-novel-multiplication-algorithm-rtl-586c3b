// cs3_adder: adds two W-digit numbers whose radix-2 digits lie in {0,1,2,3},
// both in the two-bit (t,w) coding (digit value 2t+w, digit j of weight 2^j),
// and returns the sum in the same coding, modulo 2^W.
//
// Digit j works in three steps, none of which waits for a neighbour's result:
//   * A_j + B_j, in {0..6}, is split into a transfer t_A + t_B in {0,1,2}
//     (sent to digit j+1) and a remainder w_A + w_B in {0,1,2}.
//   * The remainder plus the transfer from digit j-1, in {0..4}, is split by
//     a four-input digit adder (add4_def) into a transfer in {0,1} (majority
//     of three of the bits, sent to digit j+1) and a remainder in {0,1,2}.
//   * The remainder plus that second transfer from digit j-1 is the result
//     digit in {0,1,2,3}, produced in the (d,e,f) coding and converted to
//     (t,w) by fa_tw.
// Both transfers out of a digit depend only on that digit's own inputs and
// the first-level transfer from below, so the addition takes the same time
// for any W. The top digit's t bit has weight 2^W and is meaningless in the
// modulo-2^W result. Combinational.
//
// The digit-set flow ({0..6} -> {0..4} -> {0,1,2,3}) and the use of the
// (d,e,f) and (t,w) codings follow the published design; mapping the steps
// onto add4_def and fa_tw is this design's.
module cs3_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] at,   // operand A, t bits
  input  logic [W-1:0] aw,   // operand A, w bits
  input  logic [W-1:0] bt,   // operand B, t bits
  input  logic [W-1:0] bw,   // operand B, w bits
  output logic [W-1:0] st,   // sum, t bits
  output logic [W-1:0] sw    // sum, w bits
);
  for (genvar j = 0; j < W; j++) begin : g_dig
    logic ta_in, tb_in;   // first-level transfer from digit j-1
    logic t2_in, t2_out;  // second-level transfer in and out
    logic d, e, f;

    if (j == 0) begin : g_lsd
      assign ta_in = 1'b0;
      assign tb_in = 1'b0;
      assign t2_in = 1'b0;
    end else begin : g_up
      assign ta_in = at[j-1];
      assign tb_in = bt[j-1];
      assign t2_in = g_dig[j-1].t2_out;
    end

    add4_def u_add (.i1(aw[j]), .i2(bw[j]), .i3(ta_in), .i4(tb_in), .t_in(t2_in),
                    .t_out(t2_out), .d(d), .e(e), .f(f));
    fa_tw    u_cv  (.d(d), .e(e), .f(f), .t(st[j]), .w(sw[j]));
  end

  // The first-level transfers of the top digit leave the W-digit window.
  logic unused_top;
  assign unused_top = at[W-1] ^ bt[W-1] ^ g_dig[W-1].t2_out;
endmodule
