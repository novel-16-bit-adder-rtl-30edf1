// bec_select_stage: one upper group of the carry-select adder, built from a
// single ripple-carry adder, a binary-to-excess-1 converter and a multiplexer.
//
// A classic carry-select group holds two ripple-carry adders, one computing
// the group with carry-in 0 and one with carry-in 1. Here only the carry-in-0
// adder is kept. Its WIDTH sum bits and its carry out form a (WIDTH+1)-bit
// result r0; the carry-in-1 result is r0 + 1, produced by a (WIDTH+1)-bit
// excess-1 converter. When the carry from the group below (sel) arrives, the
// multiplexer passes r0 (sel = 0) or r0 + 1 (sel = 1), sum and carry out
// together. r0 is at most 2*(2^WIDTH - 1), so r0 + 1 never overflows the
// WIDTH+1 bits.
//
// The ripple adder and the converter work while the lower groups are still
// settling; only the multiplexer lies on the carry path from sel to cout.
// The multiplexer is WIDTH+1 bits wide (10:5 at the default) so the carry is
// selected with the sum; a separate carry select would work as well.
// Purely combinational.
module bec_select_stage #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,   // carry out of the group below
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] sum0;   // group sum assuming carry-in 0
  logic             cout0;  // group carry assuming carry-in 0
  logic [WIDTH:0]   r1;     // {cout0, sum0} + 1: the carry-in-1 result

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (sum0),
    .cout(cout0)
  );

  binary_to_excess1 #(.WIDTH(WIDTH + 1)) u_bec (
    .b({cout0, sum0}),
    .x(r1)
  );

  mux2 #(.WIDTH(WIDTH + 1)) u_mux (
    .d0 ({cout0, sum0}),
    .d1 (r1),
    .sel(sel),
    .y  ({cout, sum})
  );
endmodule
