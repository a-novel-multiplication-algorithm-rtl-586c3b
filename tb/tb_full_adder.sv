// tb_full_adder: exhaustive check of the 3:2 counter: a + b + c == s + 2*co.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;
  logic clk = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(c) != int'(s) + 2 * int'(co)) begin
        failures++;
        $display("FAIL abc=%b%b%b -> s=%b co=%b", a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
