// tb_csk_unit: checks the carry-skip adder unit in all ten configurations of
// the 64-bit adder (1- to 11-bit units, with and without a cut, each kind of
// slice decoder). Every unit gets its own carry in, in its own polarity, and
// its sum bits, carry out and skip_n are compared with an arithmetic model:
// without an active cut the unit is a W-bit adder; with an active cut the
// bits below the cut add with the carry in and the bits from the cut up add
// with a zero carry. Operands are random, all-propagate (b = ~a) to exercise
// the carry-attract path and skip_n, and mostly-propagate.
module tb_csk_unit;
  import nmul_pkg::*;

  logic [63:0] a, b, s;
  logic [N_UNITS-1:0] ci_raw, co_raw, skip_n;
  logic part0, part1;
  int checks = 0, failures = 0;
  int cuts_active = 0, skips = 0;
  logic clk = 0;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_u
    csk_unit #(.W(UNIT_W[u]), .CUT(UNIT_CUT[u]), .SLICE(UNIT_SLICE[u])) dut (
      .a(a[UNIT_LSB[u] +: UNIT_W[u]]), .b(b[UNIT_LSB[u] +: UNIT_W[u]]),
      .ci_raw(ci_raw[u]), .part0(part0), .part1(part1),
      .s(s[UNIT_LSB[u] +: UNIT_W[u]]), .co_raw(co_raw[u]), .skip_n(skip_n[u]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit cut_active(int u, logic p0, logic p1);
    case (UNIT_SLICE[u])
      SLICE_NAND: return p0 & p1;
      SLICE_INV:  return p0;
      SLICE_NOR:  return p0 | p1;
      default:    return 1'b0;
    endcase
  endfunction

  task automatic check_all();
    #1;
    for (int u = 0; u < N_UNITS; u++) begin
      int w = UNIT_W[u], l = UNIT_LSB[u], cut;
      bit inv = (w % 2 == 1) && (w > 1);
      bit cin = ci_raw[u] ^ inv;
      bit act = cut_active(u, part0, part1);
      logic [15:0] ua, ub, us, exp_s, mask, lo_mask, tot_lo, tot_hi;
      logic exp_co, exp_skn;
      mask = 16'((17'd1 << w) - 1);
      ua = 16'(a >> l) & mask;
      ub = 16'(b >> l) & mask;
      us = 16'(s >> l) & mask;
      cut = act ? UNIT_CUT[u] : w;
      lo_mask = 16'((17'd1 << cut) - 1);
      tot_lo = (ua & lo_mask) + (ub & lo_mask) + 16'(cin);
      tot_hi = (ua & ~lo_mask) + (ub & ~lo_mask);
      if (act) begin
        exp_s  = ((tot_lo & lo_mask) | tot_hi) & mask;
        exp_co = tot_hi[w];
      end else begin
        exp_s  = tot_lo & mask;
        exp_co = tot_lo[w];
      end
      exp_skn = act ? 1'b1 : ~(&((ua ^ ub) | ~mask));
      if (act) cuts_active++;
      if (!exp_skn) skips++;
      checks += 3;
      if (us !== exp_s) begin
        failures++;
        $display("FAIL unit %0d (%0d bits) sum: a=%h b=%h cin=%b cut=%b got %h want %h",
                 u, w, ua, ub, cin, act, us, exp_s);
      end
      if ((co_raw[u] ^ inv) !== exp_co) begin
        failures++;
        $display("FAIL unit %0d (%0d bits) carry out: a=%h b=%h cin=%b cut=%b got %b want %b",
                 u, w, ua, ub, cin, act, co_raw[u] ^ inv, exp_co);
      end
      if (skip_n[u] !== exp_skn) begin
        failures++;
        $display("FAIL unit %0d skip_n got %b want %b", u, skip_n[u], exp_skn);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = {$urandom, $urandom};
      case (n % 4)
        0: b = {$urandom, $urandom};
        1: b = ~a;
        2: b = ~a ^ (64'd1 << ($urandom % 64));
        default: b = a;
      endcase
      ci_raw = N_UNITS'($urandom);
      {part1, part0} = 2'(n / 4);
      check_all();
    end
    checks += 2;
    if (cuts_active == 0) begin
      failures++;
      $display("FAIL no cut was ever active");
    end
    if (skips == 0) begin
      failures++;
      $display("FAIL no unit ever signalled a skip");
    end
    $display("cuts active %0d, skips %0d", cuts_active, skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
