// novel_adder16: 16-bit carry-select adder in which each upper group uses a
// single ripple-carry adder and a binary-to-excess-1 converter instead of
// two ripple-carry adders.
//
// The operands are cut into WIDTH/GROUP groups of GROUP bits (4 x 4 bits at
// the defaults). The lowest group, bits 3:0, is a plain ripple-carry adder
// fed by cin: its carry-in is known from the start, so it needs no select.
// Every higher group g (bits 4g+3:4g) is a bec_select_stage: it adds its
// slice with carry-in 0, forms the carry-in-1 result by adding one with an
// excess-1 converter, and picks between the two with the carry out of group
// g-1. All groups add in parallel; once group 0 has rippled, the carry moves
// through one multiplexer per group. The carry out of the top group is cout.
//
// Interface: a, b, cin in; sum, cout out; sum + 2^WIDTH*cout = a + b + cin.
// Purely combinational: no clock, register or reset, zero-cycle latency.
// The group structure, the 16-bit width and the 4-bit groups follow the
// adder as it was published; gate-level choices inside the blocks, and the
// one-bit-wider select that carries each group's carry, are this design's.
module novel_adder16
  import novel_adder_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH,
  parameter int unsigned GROUP = GROUP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  // The groups must tile the operands exactly.
  if (WIDTH % GROUP != 0 || NGROUPS < 1) begin : g_bad_size
    $error("novel_adder16: WIDTH must be a non-zero multiple of GROUP");
  end

  logic [NGROUPS-1:0] gcarry;  // gcarry[g]: carry out of group g

  ripple_carry_adder #(.WIDTH(GROUP)) u_group0 (
    .a   (a[GROUP-1:0]),
    .b   (b[GROUP-1:0]),
    .cin (cin),
    .sum (sum[GROUP-1:0]),
    .cout(gcarry[0])
  );

  for (genvar g = 1; g < NGROUPS; g++) begin : g_stage
    bec_select_stage #(.WIDTH(GROUP)) u_stage (
      .a   (a[g*GROUP +: GROUP]),
      .b   (b[g*GROUP +: GROUP]),
      .sel (gcarry[g-1]),
      .sum (sum[g*GROUP +: GROUP]),
      .cout(gcarry[g])
    );
  end

  assign cout = gcarry[NGROUPS-1];
endmodule
