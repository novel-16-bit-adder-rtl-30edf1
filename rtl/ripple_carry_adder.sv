// ripple_carry_adder: WIDTH full adders connected in a chain.
//
// Bit i adds a[i], b[i] and the carry out of bit i-1; bit 0 takes cin and
// the carry out of the last bit is cout. The carry therefore ripples through
// all WIDTH cells, so the delay grows linearly with WIDTH. The 4-bit default
// is the group size of the 16-bit adder. Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
