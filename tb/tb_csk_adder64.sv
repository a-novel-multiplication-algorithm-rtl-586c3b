// tb_csk_adder64: checks the 64-bit sliceable carry-skip adder in its four
// lane modes ({part1,part0} = 00: 64-bit, 10: 32-bit, 01: 16-bit, 11: 8-bit)
// against lane-wise arithmetic: the lowest lane adds with cin, every other
// lane with a zero carry, and cout is the carry out of the top lane. Operands
// are random, all-propagate (b = ~a, so a carry in must cross every unit
// through the skip multiplexers) and all-propagate with one bit flipped.
module tb_csk_adder64;
  logic [63:0] a, b, s;
  logic cin, part0, part1, cout;
  int checks = 0, failures = 0;
  int mode_seen [4];
  logic clk = 0;

  csk_adder64 dut (.a(a), .b(b), .cin(cin), .part0(part0), .part1(part1),
                   .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lane_bits(logic [1:0] p);
    case (p)
      2'b00:   return 64;
      2'b10:   return 32;
      2'b01:   return 16;
      default: return 8;
    endcase
  endfunction

  task automatic check();
    int lw;
    logic [63:0] exp_s;
    logic exp_co;
    logic [64:0] t;
    #1;
    lw = lane_bits({part1, part0});
    mode_seen[{part1, part0}]++;
    exp_s = '0;
    exp_co = 1'b0;
    for (int l = 0; l < 64; l += lw) begin
      logic [63:0] m;
      m = (lw == 64) ? '1 : ((64'd1 << lw) - 1);
      t = 65'((a >> l) & m) + 65'((b >> l) & m) + 65'((l == 0) ? cin : 1'b0);
      exp_s |= (t[63:0] & m) << l;
      exp_co = t[lw];
    end
    checks += 2;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL lanes=%0d a=%h b=%h cin=%b got %h want %h", lw, a, b, cin, s, exp_s);
    end
    if (cout !== exp_co) begin
      failures++;
      $display("FAIL lanes=%0d a=%h b=%h cin=%b cout got %b want %b", lw, a, b, cin, cout, exp_co);
    end
  endtask

  initial begin
    for (int n = 0; n < 8000; n++) begin
      a = {$urandom, $urandom};
      case (n % 3)
        0: b = {$urandom, $urandom};
        1: b = ~a;
        default: b = ~a ^ (64'd1 << ($urandom % 64));
      endcase
      cin = 1'($urandom);
      {part1, part0} = 2'($urandom);
      check();
    end
    // Carry from bit 0 all the way to cout.
    a = '1; b = '0; cin = 1; {part1, part0} = 2'b00; check();
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL lane mode %0d never tested", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
