// compressor42_row: a row of W 4:2 counters that reduces four W-bit binary
// rows to two (a sum row and a carry row) of the same total, modulo 2^W.
//
// Counter j takes bit j of the four rows and the transfer cout of counter j-1
// (0 for j = 0). Its sum goes to bit j of the sum row and its carry to bit j+1
// of the carry row; the carries out of the top column are dropped, which keeps
// the result exact modulo 2^W. Because a counter's transfer out does not
// depend on its transfer in, the row has the delay of one counter, whatever W.
// The same row also adds two numbers held as {0,1,2,3} digits in the (t,w)
// coding: feed it the w rows and the t rows shifted up by one place.
// Combinational. The counter and its carry-free row follow the published
// design; the fixed-width, modulo-2^W row is this design's choice.
module compressor42_row #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] carry;

  for (genvar j = 0; j < W; j++) begin : g_col
    logic cin, cout;
    if (j == 0) begin : g_lsb
      assign cin = 1'b0;
    end else begin : g_up
      assign cin = g_col[j-1].cout;
    end
    compressor42 u_c42 (.x1(x1[j]), .x2(x2[j]), .x3(x3[j]), .x4(x4[j]), .cin(cin),
                        .sum(s[j]), .carry(carry[j]), .cout(cout));
  end

  // The two top-column carries leave the W-bit window.
  assign c = {carry[W-2:0], 1'b0};

  logic unused_top;
  assign unused_top = carry[W-1] ^ g_col[W-1].cout;
endmodule
