// binary_to_excess1: binary to excess-1 converter (BEC), x = b + 1.
//
// It stands in for a second ripple-carry adder run with carry-in 1: the
// carry-in-1 sum of a group equals its carry-in-0 sum plus one. Bit 0 is
// inverted and every higher bit is XORed with the AND of all bits below it:
//   x[0] = ~b[0]
//   x[i] =  b[i] ^ (b[0] & ... & b[i-1])
// The AND terms are built as a prefix chain, so a WIDTH-bit BEC costs
// WIDTH-1 ANDs, WIDTH-1 XORs and one inverter, fewer gates than a
// ripple-carry adder. The all-ones input wraps to zero.
// The default WIDTH of 5 is the 4-bit group plus its carry (an N-bit group
// needs an N+1-bit converter). The gate equations are the common form of a
// BEC; the exact gates are this design's choice. Purely combinational.
module binary_to_excess1 #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] all_ones_below;  // all_ones_below[i] = &b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign x = b ^ all_ones_below;
endmodule
