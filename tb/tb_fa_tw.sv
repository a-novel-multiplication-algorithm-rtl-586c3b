// tb_fa_tw: exhaustive check of the (d,e,f) -> (t,w) digit converter. For
// every valid three-bit code ((e,f) != (1,0)) the two-bit code must carry the
// same value: 2t + w == d + e + f.
module tb_fa_tw;
  logic d, e, f, t, w;
  int checks = 0, failures = 0;
  logic clk = 0;

  fa_tw dut (.d(d), .e(e), .f(f), .t(t), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {d, e, f} = 3'(v);
      if (e && !f) continue;
      #1;
      checks++;
      if (2 * int'(t) + int'(w) != int'(d) + int'(e) + int'(f)) begin
        failures++;
        $display("FAIL def=%b%b%b -> tw=%b%b", d, e, f, t, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
