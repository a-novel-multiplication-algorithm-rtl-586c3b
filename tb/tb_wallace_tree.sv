// tb_wallace_tree: the two rows out of the reduction tree must sum, modulo
// 2^W, to the sum of the input rows. Two trees are tested: the 17-row, 64-bit
// tree of the 32x32 multiplier, and a 12-row, 48-bit tree (the 12 partial
// products of the published tree drawing), with random rows and with rows of
// all ones (which load every counter with carries).
module tb_wallace_tree;
  logic [63:0] r17 [17];
  logic [47:0] r12 [12];
  logic [63:0] s17, c17;
  logic [47:0] s12, c12;
  int checks = 0, failures = 0;
  logic clk = 0;

  wallace_tree #(.W(64), .ROWS(17)) dut17 (.rows(r17), .sum_row(s17), .carry_row(c17));
  wallace_tree #(.W(48), .ROWS(12)) dut12 (.rows(r12), .sum_row(s12), .carry_row(c12));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int mode);
    logic [63:0] t17;
    logic [47:0] t12;
    t17 = '0;
    t12 = '0;
    foreach (r17[k]) begin
      r17[k] = (mode == 1) ? '1 : {$urandom, $urandom};
      if (mode == 2) r17[k] = r17[k] << (2 * k);
      t17 += r17[k];
    end
    foreach (r12[k]) begin
      r12[k] = (mode == 1) ? '1 : 48'({$urandom, $urandom});
      t12 += r12[k];
    end
    #1;
    checks += 2;
    if (s17 + c17 !== t17) begin
      failures++;
      $display("FAIL 17-row tree: %h + %h != %h", s17, c17, t17);
    end
    if (s12 + c12 !== t12) begin
      failures++;
      $display("FAIL 12-row tree: %h + %h != %h", s12, c12, t12);
    end
  endtask

  initial begin
    check(1);
    for (int n = 0; n < 2000; n++) check(n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
