// tb_add4_def: exhaustive check of the four-input digit adder over all 32
// input patterns: the column sum must equal 2*t_out + d + e + f, the digit
// must never use the forbidden pattern (e,f) = (1,0), and t_out must not
// depend on t_in (no rippling transfer).
module tb_add4_def;
  logic i1, i2, i3, i4, t_in, t_out, d, e, f;
  int checks = 0, failures = 0;
  logic clk = 0;

  add4_def dut (.i1(i1), .i2(i2), .i3(i3), .i4(i4), .t_in(t_in),
                .t_out(t_out), .d(d), .e(e), .f(f));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic t_prev;
    for (int v = 0; v < 32; v++) begin
      {i1, i2, i3, i4, t_in} = 5'(v);
      #1;
      checks++;
      if (int'(i1) + int'(i2) + int'(i3) + int'(i4) + int'(t_in) !=
          2 * int'(t_out) + int'(d) + int'(e) + int'(f)) begin
        failures++;
        $display("FAIL in=%05b -> t_out=%b def=%b%b%b", v[4:0], t_out, d, e, f);
      end
      checks++;
      if (e && !f) begin
        failures++;
        $display("FAIL in=%05b gives forbidden (e,f)=(1,0)", v[4:0]);
      end
      // Patterns v and v^1 differ only in t_in.
      if (v % 2 == 1) begin
        checks++;
        if (t_out != t_prev) begin
          failures++;
          $display("FAIL t_out depends on t_in at in=%05b", v[4:0]);
        end
      end
      t_prev = t_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
