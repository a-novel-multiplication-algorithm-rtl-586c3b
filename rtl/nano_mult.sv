// nano_mult: 32x32-bit signed multiplier built in three steps, with its final
// adder also usable on its own for packed additions.
//
//   1. booth_pp_gen recodes the multiplier b into 16 radix-4 Booth digits and
//      forms 16 partial product rows plus one correction row (17 rows of 64
//      bits).
//   2. wallace_tree reduces the 17 rows to two with levels of 4:2 counters
//      (17 -> 9 -> 5 -> 3 -> 2). Each 4:2 counter is the four-input digit
//      adder (add4_def) plus the (d,e,f) -> (t,w) converter (fa_tw).
//   3. csk_adder64, the 64-bit carry-skip adder with growing unit sizes, adds
//      the two rows into the 64-bit product.
//
// Interface: with op_add = 0 the result is the signed product a*b (cin,
// part0, part1, x and y are ignored; cout is the adder's carry out, with no
// meaning for the product). With op_add = 1 the final adder instead adds x and
// y with carry in cin, sliced into 64-, 32-, 16- or 8-bit lanes by
// {part1,part0} = 00, 10, 01, 11; the multiplier inputs are then ignored.
// The whole unit is combinational: a result is valid one propagation delay
// after the inputs settle.
//
// The three-step structure, the 4:2 tree and the final adder follow the
// published design. Signed operands, the row layout of the partial products
// and the multiplexer that lets the packed-add mode use the final adder are
// this design's choices.
module nano_mult
  import nmul_pkg::*;
(
  input  logic [MUL_W-1:0] a,        // multiplicand (two's complement)
  input  logic [MUL_W-1:0] b,        // multiplier (two's complement)
  input  logic             op_add,   // 0: multiply, 1: packed add of x and y
  input  logic [ADD_W-1:0] x,
  input  logic [ADD_W-1:0] y,
  input  logic             cin,
  input  logic             part0,
  input  logic             part1,
  output logic [ADD_W-1:0] result,
  output logic             cout
);
  localparam int unsigned ROWS = MUL_W / 2 + 1;

  logic [ADD_W-1:0] pp [ROWS];
  logic [ADD_W-1:0] sum_row, carry_row;
  logic [ADD_W-1:0] fa_a, fa_b;
  logic             fa_cin, fa_p0, fa_p1;

  booth_pp_gen #(.N(MUL_W)) u_pp (.a(a), .b(b), .pp(pp));

  wallace_tree #(.W(ADD_W), .ROWS(ROWS)) u_tree (
    .rows(pp), .sum_row(sum_row), .carry_row(carry_row));

  always_comb begin
    if (op_add) begin
      fa_a   = x;
      fa_b   = y;
      fa_cin = cin;
      fa_p0  = part0;
      fa_p1  = part1;
    end else begin
      fa_a   = sum_row;
      fa_b   = carry_row;
      fa_cin = 1'b0;
      fa_p0  = 1'b0;
      fa_p1  = 1'b0;
    end
  end

  csk_adder64 u_add (.a(fa_a), .b(fa_b), .cin(fa_cin), .part0(fa_p0), .part1(fa_p1),
                     .s(result), .cout(cout));
endmodule
