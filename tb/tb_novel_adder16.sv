// tb_novel_adder16: end-to-end self-check of the 16-bit adder at its
// default parameters (16 bits, four 4-bit groups).
//
// Three sets of operands are applied, each with cin = 0 and cin = 1:
//   1. corner cases (zero, all ones, a carry that ripples from cin to cout);
//   2. every combination of one of four slice patterns per group: kill
//      (both slices 0), generate (both 1111), propagate (a ^ b = 1111) and
//      a random slice, so carries start, stop and pass through the selects
//      in every arrangement (4^4 x 2 cases);
//   3. NRAND random operand pairs.
// Each result {cout, sum} is compared with the integer a + b + cin.
// Being combinational, the adder must give the result with zero clock cycles
// of latency: the outputs are sampled one time step after the inputs change.
//
// The test also counts, from the reference arithmetic, how often each of the
// design's mechanisms was exercised, and fails if one never was: for each
// upper group the carry-in-0 path selected, the excess-1 path selected, and
// an excess-1 increment that carries out of the group; carry-in set; carry
// out set; and a carry that travels from cin all the way to cout.
module tb_novel_adder16;
  localparam int unsigned W = 16;
  localparam int unsigned G = 4;
  localparam int unsigned NG = W / G;
  localparam int unsigned NRAND = 200000;

  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int sel0_cnt[NG], sel1_cnt[NG], bec_carry_cnt[NG];
  int cin_cnt = 0, cout_cnt = 0, full_ripple_cnt = 0;

  novel_adder16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand set and check it against the integer sum.
  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] expected;
    a = ta;
    b = tb;
    cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + (W+1)'(tc);
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h, expected %h", ta, tb, tc, cout, sum,
                 expected);
    end
    // Mechanism coverage, worked out from the operands alone.
    if (tc) cin_cnt++;
    if (expected[W]) cout_cnt++;
    if ((ta ^ tb) == '1 && tc) full_ripple_cnt++;
    for (int g = 1; g < NG; g++) begin
      logic [W:0] low;
      logic carry_in;
      int slice0;
      low = ({1'b0, ta} & ((W+1)'(1) << (g*G)) - 1) + ({1'b0, tb} & ((W+1)'(1) << (g*G)) - 1)
            + (W+1)'(tc);
      carry_in = low[g*G];
      slice0 = int'(ta[g*G +: G]) + int'(tb[g*G +: G]);
      if (carry_in) sel1_cnt[g]++;
      else sel0_cnt[g]++;
      if (carry_in && slice0 == (1 << G) - 1) bec_carry_cnt[g]++;
    end
  endtask

  function automatic logic [G-1:0] pattern_a(input int p, input logic [G-1:0] r);
    case (p)
      0: return '0;
      1: return '1;
      2: return r;
      default: return r;
    endcase
  endfunction

  function automatic logic [G-1:0] pattern_b(input int p, input logic [G-1:0] ra,
                                             input logic [G-1:0] r);
    case (p)
      0: return '0;
      1: return '1;
      2: return ~ra;
      default: return r;
    endcase
  endfunction

  initial begin
    logic [W-1:0] ta, tb;
    for (int g = 0; g < NG; g++) begin
      sel0_cnt[g] = 0;
      sel1_cnt[g] = 0;
      bec_carry_cnt[g] = 0;
    end

    // 1. Corner cases.
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '1, 1'(c));
      apply('1, '0, 1'(c));
      apply('1, W'(1), 1'(c));
      apply(W'(16'h5555), W'(16'haaaa), 1'(c));
      apply(W'(16'h0fff), W'(16'h0001), 1'(c));
    end

    // 2. Every arrangement of kill / generate / propagate / random groups.
    for (int combo = 0; combo < (1 << (2*NG)); combo++) begin
      for (int c = 0; c < 2; c++) begin
        for (int g = 0; g < NG; g++) begin
          logic [G-1:0] ra, rb;
          int p;
          p  = (combo >> (2*g)) & 3;
          ra = G'($urandom);
          rb = G'($urandom);
          ta[g*G +: G] = pattern_a(p, ra);
          tb[g*G +: G] = pattern_b(p, ta[g*G +: G], rb);
        end
        apply(ta, tb, 1'(c));
      end
    end

    // 3. Random operands.
    for (int n = 0; n < NRAND; n++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end

    // Every mechanism must have happened at least once.
    for (int g = 1; g < NG; g++) begin
      checks += 3;
      $display("group %0d: carry-in-0 path %0d, excess-1 path %0d, excess-1 carry out %0d",
               g, sel0_cnt[g], sel1_cnt[g], bec_carry_cnt[g]);
      if (sel0_cnt[g] == 0 || sel1_cnt[g] == 0 || bec_carry_cnt[g] == 0) begin
        failures++;
        $display("FAIL group %0d mechanism not exercised", g);
      end
    end
    checks += 3;
    $display("cin set %0d, cout set %0d, cin-to-cout ripple %0d", cin_cnt, cout_cnt,
             full_ripple_cnt);
    if (cin_cnt == 0) failures++;
    if (cout_cnt == 0) failures++;
    if (full_ripple_cnt == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
