// tb_booth_pp_gen: checks the 32-bit Booth partial product generator. The 17
// rows it produces must add up, modulo 2^64, to the signed product a*b
// computed by the simulator. Every row is also compared with its own
// expected value (digit times multiplicand, shifted, with inverted negative
// multiples), and the test counts that all five digit values -2..2 were seen.
module tb_booth_pp_gen;
  localparam int N  = 32;
  localparam int ND = N / 2;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [ND+1];
  int checks = 0, failures = 0;
  int digit_seen [5];
  logic clk = 0;

  booth_pp_gen dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] av, logic [N-1:0] bv);
    logic [2*N-1:0] total, expect_p, corr;
    logic [N:0] bx;
    a = av;
    b = bv;
    #1;
    bx = {bv, 1'b0};
    total = '0;
    corr = '0;
    for (int k = 0; k <= ND; k++) total += pp[k];
    for (int k = 0; k < ND; k++) begin
      automatic int q;
      automatic logic [2*N-1:0] mult, row;
      q = -2 * int'(bx[2*k+2]) + int'(bx[2*k+1]) + int'(bx[2*k]);
      digit_seen[q+2]++;
      mult = 64'(signed'(av)) * 64'(q < 0 ? -q : q);
      row  = bx[2*k+2] ? ~mult : mult;
      row  = row << (2 * k);
      corr[2*k] = bx[2*k+2];
      checks++;
      if (pp[k] !== row) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h got %h want %h", k, av, bv, pp[k], row);
      end
    end
    checks++;
    if (pp[ND] !== corr) begin
      failures++;
      $display("FAIL correction row a=%h b=%h got %h want %h", av, bv, pp[ND], corr);
    end
    expect_p = 64'(signed'(av)) * 64'(signed'(bv));
    checks++;
    if (total !== expect_p) begin
      failures++;
      $display("FAIL sum a=%h b=%h got %h want %h", av, bv, total, expect_p);
    end
  endtask

  initial begin
    automatic logic [N-1:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                 32'h7FFF_FFFF, 32'hAAAA_5555};
    foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) check_one($urandom, $urandom);
    for (int q = 0; q < 5; q++) begin
      checks++;
      if (digit_seen[q] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never produced", q - 2);
      end
    end
    $display("Booth digits -2..2 seen: %0d %0d %0d %0d %0d", digit_seen[0],
             digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
