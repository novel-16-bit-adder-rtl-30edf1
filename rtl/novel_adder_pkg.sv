// novel_adder_pkg: sizes shared by the adder and its stages.
//
// The adder is 16 bits wide and is cut into 4-bit groups, the sizes the
// design is built around. They are the defaults of the top-level adder.
package novel_adder_pkg;
  localparam int unsigned ADDER_WIDTH = 16;  // operand width
  localparam int unsigned GROUP_WIDTH = 4;   // bits per ripple-carry group
endpackage
