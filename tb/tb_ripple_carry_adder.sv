// tb_ripple_carry_adder: exhaustive self-check of the 4-bit ripple-carry
// adder at its default width.
//
// Every a, b and cin (512 cases) is applied and {cout, sum} is compared with
// the integer a + b + cin. The cases where the carry ripples through all four
// cells (a ^ b all ones, cin = 1) are counted and must occur. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_ripple_carry_adder;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0, full_ripples = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, cin} = (2*W+1)'(v);
      #1;
      checks++;
      if ((a ^ b) == '1 && cin) full_ripples++;
      if ({cout, sum} != (W+1)'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h", a, b, cin, cout, sum);
      end
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("full-length ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
