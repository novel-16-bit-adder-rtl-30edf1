// mux2: two-to-one word multiplexer (a "2W:W mux"; 8:4 at the default).
//
// y = d1 when sel is 1, d0 when sel is 0. In the adder d0 is the carry-in-0
// result of a group, d1 the excess-1 (carry-in-1) result, and sel the carry
// arriving from the group below. Written as an AND-OR per bit, which is this
// design's choice. Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    y = (d0 & {WIDTH{~sel}}) | (d1 & {WIDTH{sel}});
  end
endmodule
