// full_adder: one-bit full adder, the cell the ripple-carry groups are
// chained from.
//
// sum  = a ^ b ^ cin
// cout = (a & b) | (cin & (a ^ b))
// The half-sum a ^ b is shared between the two outputs, the usual two-XOR,
// two-AND, one-OR form; the gate structure is this design's choice.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;  // propagate: a ^ b

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (cin & p);
  end
endmodule
