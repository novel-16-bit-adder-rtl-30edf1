// tb_mux2: exhaustive self-check of the 8:4 word multiplexer.
//
// Every pair of 4-bit words is applied with sel = 0 and sel = 1; y must equal
// d0 and d1 respectively. A watchdog ends the run with a failure if it does
// not finish in time.
module tb_mux2;
  localparam int unsigned W = 4;
  logic [W-1:0] d0, d1, y;
  logic sel;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {sel, d1, d0} = (2*W+1)'(v);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h -> y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
