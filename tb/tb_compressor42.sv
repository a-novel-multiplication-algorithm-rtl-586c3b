// tb_compressor42: exhaustive check of the 4:2 counter over all 32 input
// patterns: x1+x2+x3+x4+cin == sum + 2*(carry+cout), and cout independent of
// cin.
module tb_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  logic clk = 0;

  compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_prev;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      checks++;
      if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
          int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL in=%05b -> sum=%b carry=%b cout=%b", v[4:0], sum, carry, cout);
      end
      if (v % 2 == 1) begin
        checks++;
        if (cout != cout_prev) begin
          failures++;
          $display("FAIL cout depends on cin at in=%05b", v[4:0]);
        end
      end
      cout_prev = cout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
