// tb_binary_to_excess1: exhaustive self-check of the 5-bit binary to
// excess-1 converter.
//
// All 32 inputs are applied and x is compared with (b + 1) mod 32, which
// includes the wrap of the all-ones input to zero. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_binary_to_excess1;
  localparam int unsigned W = 5;
  logic [W-1:0] b, x;
  int checks = 0, failures = 0;

  binary_to_excess1 dut (.b(b), .x(x));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      b = W'(v);
      #1;
      checks++;
      if (x != W'((v + 1) % (1 << W))) begin
        failures++;
        $display("FAIL b=%b -> x=%b", b, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
