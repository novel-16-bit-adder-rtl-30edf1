// tb_bec_select_stage: exhaustive self-check of one 4-bit carry-select group
// built from a ripple-carry adder, an excess-1 converter and a multiplexer.
//
// Every a, b and incoming carry sel (512 cases) is applied; {cout, sum} must
// equal a + b + sel. The test counts how often the excess-1 path is taken
// (sel = 1) and how often that increment carries out of a group whose
// carry-in-0 result had no carry (a + b = 15, sel = 1), and fails if either
// never happens. A watchdog ends the run with a failure if it does not finish.
module tb_bec_select_stage;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, sum;
  logic sel, cout;
  int checks = 0, failures = 0, bec_taken = 0, bec_carry = 0;

  bec_select_stage dut (.a(a), .b(b), .sel(sel), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, sel} = (2*W+1)'(v);
      #1;
      checks++;
      if (sel) bec_taken++;
      if (sel && (int'(a) + int'(b) == (1 << W) - 1)) bec_carry++;
      if ({cout, sum} != (W+1)'(int'(a) + int'(b) + int'(sel))) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b -> cout=%b sum=%h", a, b, sel, cout, sum);
      end
    end
    checks += 2;
    if (bec_taken == 0) begin
      failures++;
      $display("FAIL excess-1 path never selected");
    end
    if (bec_carry == 0) begin
      failures++;
      $display("FAIL excess-1 carry out never exercised");
    end
    $display("excess-1 selected: %0d, excess-1 carry out: %0d", bec_taken, bec_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
