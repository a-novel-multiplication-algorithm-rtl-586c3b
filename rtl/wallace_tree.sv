// wallace_tree: partial product reduction tree. Adds ROWS binary rows of W
// bits down to two rows (sum_row, carry_row) whose sum equals the sum of the
// inputs modulo 2^W.
//
// The tree works on groups of four rows, as in the published tree, and is a
// binary tree of redundant-digit adders. At the first level each group of
// four binary partial product rows goes through a row of 4:2 counters
// (compressor42_row) and becomes one number in the digit set {0,1,2,3}, held
// as a (w, t<<1) pair of rows. At later levels each group of two such digit
// numbers is added by a two-operand digit adder (cs3_adder) into one. A group
// of four rows that mixes digit and binary rows uses a 4:2 counter row, which
// computes the same thing. Where three rows are left over at a level they
// pass through a row of full adders (csa_row); one or two left-over rows pass
// on untouched. The levels repeat until two rows remain. For the 17 rows of a
// 32x32 radix-4 Booth multiplier that is 17 -> 9 -> 5 -> 3 -> 2, four levels.
//
// The rows are kept at the full width W; bit positions that hold constant
// zeros turn the counters there into half adders or wires after constant
// propagation, which is how this tree obtains the half adder and partial
// cells of a hand-placed tree. Combinational.
module wallace_tree #(
  parameter int unsigned W    = 64,
  parameter int unsigned ROWS = 17
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  // Number of rows after one level of reduction.
  function automatic int unsigned next_rows(int unsigned n);
    return (n / 4) * 2 + (((n % 4) == 3) ? 2 : (n % 4));
  endfunction

  // Number of row pairs (digit rows) that one level makes out of n rows.
  function automatic int unsigned pairs_out(int unsigned n);
    return (n / 4) + (((n % 4) == 3) ? 1 : 0);
  endfunction

  // Rows present at level l.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned k = 0; k < l; k++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();

  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned N  = rows_at(l);
    localparam int unsigned NN = rows_at(l + 1);
    localparam int unsigned G  = N / 4;
    localparam int unsigned R  = N % 4;
    // Rows 0 .. 2*PAIRS_IN-1 entering this level are digit rows (pairs made
    // by the counter rows of the level below); the rest are binary rows.
    localparam int unsigned PAIRS_IN = (l == 0) ? 0 : pairs_out(rows_at(l - 1));

    logic [W-1:0] cur [ROWS];   // rows entering this level
    logic [W-1:0] nxt [ROWS];   // rows leaving it

    if (l == 0) begin : g_src_in
      assign cur = rows;
    end else begin : g_src_lvl
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < G; g++) begin : g_c42
      if (4 * g + 3 < PAIRS_IN * 2) begin : g_digits
        // Both operands are {0,1,2,3} digit rows from the level below:
        // row 2k holds the w bits, row 2k+1 the t bits shifted up one place.
        logic [W-1:0] st, sw;
        cs3_adder #(.W(W)) u_add (
          .at(cur[4*g+1] >> 1), .aw(cur[4*g]),
          .bt(cur[4*g+3] >> 1), .bw(cur[4*g+2]),
          .st(st), .sw(sw));
        assign nxt[2*g]   = sw;
        assign nxt[2*g+1] = {st[W-2:0], 1'b0};
      end else begin : g_binary
        // Four binary rows into one digit row.
        compressor42_row #(.W(W)) u_row (
          .x1(cur[4*g]), .x2(cur[4*g+1]), .x3(cur[4*g+2]), .x4(cur[4*g+3]),
          .s(nxt[2*g]), .c(nxt[2*g+1]));
      end
    end

    if (R == 3) begin : g_csa
      csa_row #(.W(W)) u_row (
        .a(cur[4*G]), .b(cur[4*G+1]), .ci(cur[4*G+2]),
        .s(nxt[2*G]), .c(nxt[2*G+1]));
    end else begin : g_pass
      for (genvar k = 0; k < R; k++) begin : g_k
        assign nxt[2*G+k] = cur[4*G+k];
      end
    end

    for (genvar k = NN; k < ROWS; k++) begin : g_zero
      assign nxt[k] = '0;
    end
  end

  assign sum_row   = g_lvl[NLEV-1].nxt[0];
  assign carry_row = g_lvl[NLEV-1].nxt[1];

  initial begin
    assert (ROWS >= 3) else $fatal(1, "wallace_tree: ROWS must be at least 3");
  end
endmodule
