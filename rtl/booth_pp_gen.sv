// booth_pp_gen: partial product generation step of the multiplier. The N-bit
// two's complement multiplier b is recoded into N/2 radix-4 modified Booth
// digits, halving the number of partial products. Row k is the N-bit two's
// complement multiplicand a times digit k, sign-extended to 2N bits and
// shifted up by 2k places. A negative digit is formed as the bit-wise inverse
// of the positive multiple; the +1 that completes the negation is collected,
// for all rows, in one extra correction row (bit 2k set when digit k is
// negative). The N/2+1 rows then sum to a*b modulo 2^(2N), which is the exact
// signed product.
//
// Outputs: pp[0..N/2-1] are the Booth rows, pp[N/2] is the correction row.
// The modified Booth coding is named by the published design; the signed
// operands, full sign extension and the separate correction row are this
// design's choices. Combinational.
module booth_pp_gen #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,            // multiplicand, two's complement
  input  logic [N-1:0]   b,            // multiplier, two's complement
  output logic [2*N-1:0] pp [N/2+1]
);
  localparam int unsigned ND = N / 2;

  logic [N:0] bx;                       // b with the implicit b[-1] = 0
  assign bx = {b, 1'b0};

  logic [ND-1:0] one, two, neg;
  logic [2*N-1:0] a_ext;
  assign a_ext = {{N{a[N-1]}}, a};

  for (genvar k = 0; k < ND; k++) begin : g_digit
    logic [2*N-1:0] mag;
    logic [2*N-1:0] row;

    booth_enc u_enc (.bits(bx[2*k+2 -: 3]), .one(one[k]), .two(two[k]), .neg(neg[k]));

    always_comb begin
      mag = ({2*N{one[k]}} & a_ext) | ({2*N{two[k]}} & (a_ext << 1));
      row = neg[k] ? ~mag : mag;
      pp[k] = row << (2 * k);
    end
  end

  always_comb begin
    pp[ND] = '0;
    for (int k = 0; k < ND; k++) pp[ND][2*k] = neg[k];
  end

  initial begin
    assert (N % 2 == 0 && N >= 4) else $fatal(1, "booth_pp_gen: N must be even and >= 4");
  end
endmodule
