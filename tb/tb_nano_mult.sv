// tb_nano_mult: end-to-end test of the complete multiplier at its default
// size (32x32 bits, 64-bit final adder). Multiply mode is checked against the
// simulator's signed product on corner operands and random ones; packed-add
// mode against lane-wise arithmetic in all four lane widths. It also counts
// how often each mechanism of the design occurred and fails if one never did:
// each Booth digit value -2..2, a skip taken in the final adder, each lane
// width, a carry in, and a carry out of the top lane. A set of 24x24-bit
// products (operands sign-extended to 32 bits) covers the 12-partial-product
// case.
module tb_nano_mult;
  logic [31:0] a, b;
  logic [63:0] x, y, result;
  logic op_add, cin, part0, part1, cout;
  int checks = 0, failures = 0;
  int digit_seen [5];
  int lane_seen [4];
  int skip_seen = 0, cin_seen = 0, cout_seen = 0, mul_seen = 0;
  logic clk = 0;

  nano_mult dut (.a(a), .b(b), .op_add(op_add), .x(x), .y(y), .cin(cin),
                 .part0(part0), .part1(part1), .result(result), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A unit is skipped when all its bits propagate (the skip_n line is low).
  always @(posedge clk) if (!(&dut.u_add.skip_n)) skip_seen++;

  task automatic mul(logic [31:0] av, logic [31:0] bv);
    logic [63:0] want;
    logic [32:0] bx;
    op_add = 0;
    a = av;
    b = bv;
    x = {$urandom, $urandom};
    y = {$urandom, $urandom};
    cin = 1'($urandom);
    {part1, part0} = 2'($urandom);
    @(posedge clk);
    #1;
    want = 64'(signed'(av)) * 64'(signed'(bv));
    bx = {bv, 1'b0};
    for (int k = 0; k < 16; k++)
      digit_seen[-2 * int'(bx[2*k+2]) + int'(bx[2*k+1]) + int'(bx[2*k]) + 2]++;
    mul_seen++;
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL mul %h * %h got %h want %h", av, bv, result, want);
    end
  endtask

  task automatic add(logic [63:0] xv, logic [63:0] yv, logic c, logic [1:0] p);
    int lw;
    logic [63:0] want;
    logic want_co;
    op_add = 1;
    a = $urandom;
    b = $urandom;
    x = xv;
    y = yv;
    cin = c;
    {part1, part0} = p;
    @(posedge clk);
    #1;
    case (p)
      2'b00:   lw = 64;
      2'b10:   lw = 32;
      2'b01:   lw = 16;
      default: lw = 8;
    endcase
    lane_seen[p]++;
    if (c) cin_seen++;
    want = '0;
    want_co = 0;
    for (int l = 0; l < 64; l += lw) begin
      logic [63:0] m;
      logic [64:0] t;
      m = (lw == 64) ? '1 : ((64'd1 << lw) - 1);
      t = 65'((xv >> l) & m) + 65'((yv >> l) & m) + 65'((l == 0) ? c : 1'b0);
      want |= (t[63:0] & m) << l;
      want_co = t[lw];
    end
    if (want_co) cout_seen++;
    checks += 2;
    if (result !== want) begin
      failures++;
      $display("FAIL add lanes=%0d %h + %h + %b got %h want %h", lw, xv, yv, c, result, want);
    end
    if (cout !== want_co) begin
      failures++;
      $display("FAIL add lanes=%0d cout got %b want %b", lw, cout, want_co);
    end
  endtask

  initial begin
    automatic logic [31:0] corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                32'h7FFF_FFFF, 32'h5555_5555, 32'hAAAA_AAAA};
    foreach (corner[i]) foreach (corner[j]) mul(corner[i], corner[j]);
    for (int n = 0; n < 3000; n++) mul($urandom, $urandom);
    // 24x24 products: 12 significant Booth digits, the size of the
    // 12-partial-product tree of the original tree drawing.
    for (int n = 0; n < 500; n++) begin
      automatic logic [23:0] a24 = 24'($urandom), b24 = 24'($urandom);
      mul(32'(signed'(a24)), 32'(signed'(b24)));
    end
    for (int n = 0; n < 2000; n++) begin
      automatic logic [63:0] xv;
      xv = {$urandom, $urandom};
      add(xv, (n % 2) ? ~xv : {$urandom, $urandom}, 1'($urandom), 2'(n));
    end

    for (int q = 0; q < 5; q++) begin
      checks++;
      if (digit_seen[q] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", q - 2);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (lane_seen[m] == 0) begin
        failures++;
        $display("FAIL lane mode %b never occurred", 2'(m));
      end
    end
    checks += 4;
    if (skip_seen == 0) begin failures++; $display("FAIL no unit skip occurred"); end
    if (cin_seen == 0)  begin failures++; $display("FAIL no carry in occurred"); end
    if (cout_seen == 0) begin failures++; $display("FAIL no carry out occurred"); end
    if (mul_seen == 0)  begin failures++; $display("FAIL no multiplication ran"); end
    $display("mechanisms: multiplications=%0d booth digits -2..2 = %0d %0d %0d %0d %0d",
             mul_seen, digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4]);
    $display("mechanisms: lanes 64/16/32/8 = %0d/%0d/%0d/%0d skip cycles=%0d cin=%0d cout=%0d",
             lane_seen[0], lane_seen[1], lane_seen[2], lane_seen[3], skip_seen, cin_seen, cout_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
