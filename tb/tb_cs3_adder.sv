// tb_cs3_adder: checks the two-operand {0,1,2,3} digit adder. Operands are
// random digit rows in (t,w) coding, with all-threes rows (every digit sum at
// its maximum of 6) and all-zero rows mixed in. The value of the result,
// sum of (2*t_j + w_j)*2^j, must equal the sum of the operand values modulo
// 2^W. The test also counts digit positions whose operand digits add up to
// each value 0..6, so that every case of the digit-set flow is covered.
module tb_cs3_adder;
  localparam int W = 32;

  logic [W-1:0] at, aw, bt, bw, st, sw;
  int checks = 0, failures = 0;
  int dsum_seen [7];
  logic clk = 0;

  cs3_adder #(.W(W)) dut (.at(at), .aw(aw), .bt(bt), .bw(bw), .st(st), .sw(sw));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] value(logic [W-1:0] t, logic [W-1:0] w);
    return (t << 1) + w;
  endfunction

  task automatic check();
    logic [W-1:0] want;
    #1;
    for (int j = 0; j < W; j++)
      dsum_seen[2 * int'(at[j]) + int'(aw[j]) + 2 * int'(bt[j]) + int'(bw[j])]++;
    want = value(at, aw) + value(bt, bw);
    checks++;
    if (value(st, sw) !== want) begin
      failures++;
      $display("FAIL A=(%h,%h) B=(%h,%h) got (%h,%h) value %h want %h",
               at, aw, bt, bw, st, sw, value(st, sw), want);
    end
  endtask

  initial begin
    at = '1; aw = '1; bt = '1; bw = '1; check();
    at = '0; aw = '0; bt = '0; bw = '0; check();
    for (int n = 0; n < 5000; n++) begin
      at = $urandom; aw = $urandom; bt = $urandom; bw = $urandom;
      if (n % 5 == 0) begin at = '1; aw = '1; end
      check();
    end
    for (int v = 0; v < 7; v++) begin
      checks++;
      if (dsum_seen[v] == 0) begin
        failures++;
        $display("FAIL digit sum %0d never occurred", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
